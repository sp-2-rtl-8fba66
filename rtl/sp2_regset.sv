// sp2_regset: the register set of SP-2, eight 4-bit registers R0..R7.
//
// Two read ports (Ra -> A, Rb -> B) are combinational; one write port
// (Wr, Wrd, REG_EN) writes on the rising clock edge. Two registers have fixed
// roles, as the document specifies:
//   R6 is the output register OUT. The CPU writes it like any other register
//      and its value is always present on OutRD, which feeds the TTY.
//   R7 is the input register IN. The CPU cannot write it; it is loaded from
//      InRData (the switches) when InR_EN is high.
// LOG_R shows all eight registers ({R7,...,R0}) for observation.
// Port names follow the document's figure. If the CPU write and InR_EN target
// R7 in the same cycle only the input load takes effect (the CPU write to R7
// is always ignored). The synchronous reset that clears all registers is this
// design's addition; the document shows no reset.
module sp2_regset
  import sp2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [RW-1:0]        ra,
  input  logic [RW-1:0]        rb,
  input  logic [RW-1:0]        wr,
  input  logic [DW-1:0]        wrd,
  input  logic                 reg_en,
  input  logic [DW-1:0]        in_rdata,
  input  logic                 in_r_en,
  output logic [DW-1:0]        a,
  output logic [DW-1:0]        b,
  output logic [DW-1:0]        out_rd,
  output logic [NREG*DW-1:0]   log_r
);

  logic [DW-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      if (reg_en && wr != RW'(IN_REG)) regs[wr] <= wrd;
      if (in_r_en) regs[IN_REG] <= in_rdata;
    end
  end

  assign a      = regs[ra];
  assign b      = regs[rb];
  assign out_rd = regs[OUT_REG];

  always_comb begin
    for (int i = 0; i < NREG; i++) log_r[i*DW +: DW] = regs[i];
  end

endmodule
