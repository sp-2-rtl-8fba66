// sp2_pc: the 7-bit program counter of SP-2 and its next-address selection.
//
// The PC drives the instruction read port of the memory. Each enabled clock
// edge loads the next address, chosen by two selectors in series as in the
// document's figure:
//   first  INT_INPUT_SEL: PC + 1, or the input interrupt vector (address 01)
//   second Jmp_Sel:       the result of the first, or the branch target
// so a taken branch has priority over the interrupt vector (the control unit
// never raises both). The PC wraps from 127 to 0. The enable stands for the
// document's "PC Enable" switch that lets the clock reach the CPU; the
// synchronous reset to address 0 is this design's addition.
module sp2_pc
  import sp2_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          jmp_sel,
  input  logic          int_input_sel,
  input  logic [AW-1:0] jmp_addr,
  output logic [AW-1:0] pc
);

  logic [AW-1:0] pc_inc;
  logic [AW-1:0] seq_or_int;
  logic [AW-1:0] pc_next;

  assign pc_inc     = pc + AW'(1);
  assign seq_or_int = int_input_sel ? INT_VECTOR : pc_inc;
  assign pc_next    = jmp_sel ? jmp_addr : seq_or_int;

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end

endmodule
