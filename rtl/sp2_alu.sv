// sp2_alu: the 4-bit arithmetic and logic unit of SP-2.
//
// Purely combinational. It performs the 13 operations of the instruction set
// on operands A and B and returns the 4-bit result R and three status bits:
//   AND OR XOR        bitwise, R = A op B
//   NOT               R = ~A (B is ignored)
//   SHL SHR ROL ROR   A shifted or rotated by B[1:0] places
//   DIV               R = A / B (unsigned quotient); DIVE = 1 when B = 0, R = 0
//   MUL               R = low 4 bits of A * B; MULE = 1 when the product exceeds 4 bits
//   SUB CMP           R = A - B; CF = borrow (A < B unsigned)
//   ADD               R = A + B; CF = carry out
// SF is R[3], ZF is 1 when R = 0, CF is 0 for operations other than ADD, SUB, CMP.
// The operation list and codes, SF and ZF follow the document, and so do the
// port names (A, B, OP, R, CF, SF, ZF, DIVE, MULE). The document does not say
// how far the shifts go, what DIVE and MULE mean or how CF is formed: the shift
// distance taken from B[1:0], the error meanings of DIVE/MULE and the carry and
// borrow rule are this design's choices. CMP computes the same as SUB; that its
// result is not stored is decided by the control unit.
module sp2_alu
  import sp2_pkg::*;
(
  input  alu_op_e        op,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  output logic [DW-1:0]  r,
  output logic           cf,
  output logic           sf,
  output logic           zf,
  output logic           dive,
  output logic           mule
);

  logic [DW:0]     sum;
  logic [DW:0]     diff;
  logic [2*DW-1:0] prod;
  logic [1:0]      sh;
  logic [2*DW-1:0] rol_w;
  logic [2*DW-1:0] ror_w;

  assign sum   = {1'b0, a} + {1'b0, b};
  assign diff  = {1'b0, a} - {1'b0, b};
  assign prod  = {{DW{1'b0}}, a} * {{DW{1'b0}}, b};
  assign sh    = b[1:0];
  assign rol_w = {a, a} << sh;
  assign ror_w = {a, a} >> sh;

  always_comb begin
    r    = '0;
    cf   = 1'b0;
    dive = 1'b0;
    mule = 1'b0;
    unique case (op)
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      ALU_XOR: r = a ^ b;
      ALU_NOT: r = ~a;
      ALU_SHL: r = a << sh;
      ALU_SHR: r = a >> sh;
      ALU_DIV: begin
        if (b == '0) dive = 1'b1;
        else         r    = a / b;
      end
      ALU_MUL: begin
        r    = prod[DW-1:0];
        mule = |prod[2*DW-1:DW];
      end
      ALU_SUB, ALU_CMP: begin
        r  = diff[DW-1:0];
        cf = diff[DW];
      end
      ALU_ADD: begin
        r  = sum[DW-1:0];
        cf = sum[DW];
      end
      ALU_ROL: r = rol_w[2*DW-1:DW];
      ALU_ROR: r = ror_w[DW-1:0];
      default: r = '0;
    endcase
  end

  assign sf = r[DW-1];
  assign zf = (r == '0);

endmodule
