// sp2_flag_reg: the FLAG register of SP-2, holding CF, SF and ZF.
//
// Captures the ALU's carry, sign and zero outputs on the rising clock edge
// when load is high, and holds them otherwise. The control unit reads the
// stored flags to decide conditional branches, so a branch tests the flags of
// the last instruction that loaded them.
// The three flags and the register follow the document's figure. The figure
// shows no load enable: loading only on ALU instructions (load driven by the
// control unit) is this design's choice, so that loads, stores, I/O and
// branches between a compare and the branch that tests it leave the flags
// alone. The synchronous reset to zero is also this design's addition.
module sp2_flag_reg (
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  logic cf_in,
  input  logic sf_in,
  input  logic zf_in,
  output logic cf,
  output logic sf,
  output logic zf
);

  always_ff @(posedge clk) begin
    if (rst) begin
      {cf, sf, zf} <= 3'b000;
    end else if (load) begin
      {cf, sf, zf} <= {cf_in, sf_in, zf_in};
    end
  end

endmodule
