// sp2_sram: the 128 x 13-bit memory of SP-2, holding program and data alike.
//
// One write port and two read ports. RA1/RD1 fetches the instruction at the
// PC; RA2/RD2 reads the operand of a LOAD. Both reads are combinational (the
// value of the addressed word appears in the same cycle); a write of WD to
// address WA happens on the rising clock edge when WE is high. A word written
// in a cycle is seen by the reads from the next cycle on.
// Size (128 words of 13 bits), the unified program/data organisation and the
// port names follow the document. The memory has no reset: its contents are
// whatever was written through the write port (the document loads programs
// through the same port from an external address/instruction input).
module sp2_sram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 13,
  localparam int unsigned AWID = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [AWID-1:0]   ra1,
  output logic [WIDTH-1:0]  rd1,
  input  logic [AWID-1:0]   ra2,
  output logic [WIDTH-1:0]  rd2,
  input  logic [AWID-1:0]   wa,
  input  logic [WIDTH-1:0]  wd,
  input  logic              we
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rd1 = mem[ra1];
  assign rd2 = mem[ra2];

endmodule
