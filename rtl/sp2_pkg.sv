// sp2_pkg: widths, instruction fields and opcode encodings shared by the SP-2 CPU.
//
// SP-2 is a 4-bit single-cycle CPU with 13-bit instructions. An instruction is
// split into a 6-bit opcode (bits 12:7) and a 7-bit rest (bits 6:0). Opcode
// bits 5:4 give the instruction type, bits 3:0 the operation within the type:
//   00 ALU, register mode     op RA, RB         RA = bits 6:4, RB = bits 3:1
//   01 ALU, immediate mode    op RA, imm        RA = bits 6:4, imm = bits 3:0
//   10 branch                 Jcc addr          addr = bits 6:0
//   11 memory and I/O         see mem_op_e      RA = bits 6:4, RB = bits 3:1
//                                               (bits 3:2 in based indexed mode,
//                                               with the displacement in 1:0),
//                                               direct address = bits 3:0
// The type codes, the ALU operation codes, the branch codes JMP..JG and the
// memory/I/O codes follow the document's tables. The code of JC (jump on
// carry) is not given there and is this design's choice (0110).
package sp2_pkg;

  localparam int unsigned DW   = 4;   // data word
  localparam int unsigned IW   = 13;  // instruction / memory word
  localparam int unsigned AW   = 7;   // memory address
  localparam int unsigned NREG = 8;   // R0..R7
  localparam int unsigned RW   = 3;   // register index

  localparam int unsigned OUT_REG = 6;  // R6: output register, written by the CPU
  localparam int unsigned IN_REG  = 7;  // R7: input register, written by the input device

  localparam logic [AW-1:0] INT_VECTOR = 7'd1;  // input interrupt handler address
  localparam logic [6:0]    ASCII_BASE = 7'h30; // '0'

  typedef enum logic [1:0] {
    T_ALU_REG = 2'b00,
    T_ALU_IMM = 2'b01,
    T_BRANCH  = 2'b10,
    T_MEM_IO  = 2'b11
  } itype_e;

  typedef enum logic [3:0] {
    ALU_AND = 4'b0000,
    ALU_OR  = 4'b0001,
    ALU_XOR = 4'b0010,
    ALU_NOT = 4'b0011,
    ALU_SHL = 4'b0100,
    ALU_SHR = 4'b0101,
    ALU_DIV = 4'b0110,
    ALU_MUL = 4'b0111,
    ALU_SUB = 4'b1000,
    ALU_ADD = 4'b1001,
    ALU_ROL = 4'b1010,
    ALU_ROR = 4'b1011,
    ALU_CMP = 4'b1100
  } alu_op_e;

  typedef enum logic [3:0] {
    BR_JMP = 4'b0000,
    BR_JE  = 4'b0001,
    BR_JNE = 4'b0010,
    BR_JL  = 4'b0011,
    BR_JLE = 4'b0100,
    BR_JG  = 4'b0101,
    BR_JC  = 4'b0110
  } br_op_e;

  typedef enum logic [3:0] {
    M_LOAD_DIR   = 4'b0000,
    M_LOAD_IND   = 4'b0001,
    M_LOAD_BIX   = 4'b0010,
    M_STORE_DIR  = 4'b0011,
    M_STORE_IND  = 4'b0100,
    M_STORE_BIX  = 4'b0101,
    M_ACCEPT_IN  = 4'b1101,
    M_PRINT_OUT  = 4'b1110,
    M_PRINT_CLR  = 4'b1111
  } mem_op_e;

  // Memory address source, used by both LD_Sel and ST_Sel.
  typedef enum logic [1:0] {
    AS_PHYS  = 2'b00,  // external loader address (write port) / unused (read port)
    AS_DIR   = 2'b01,  // zero-extended bits 3:0
    AS_IND   = 2'b10,  // value of RB
    AS_BIX   = 2'b11   // ALU result RB + disp
  } addr_sel_e;

  // Decoded control word (the Control Unit outputs of the document).
  typedef struct packed {
    alu_op_e   op;
    logic      reg_en;
    logic      imm_sel;
    logic      jmp_sel;
    logic      bi_sel;
    addr_sel_e ld_sel;
    logic      ld_en;
    addr_sel_e st_sel;
    logic      ram_en;
    logic      int_input_sel;
    logic      int_print_en;
    logic      int_print_clr;
    logic      flag_en;
  } ctrl_t;

endpackage
