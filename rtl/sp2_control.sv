// sp2_control: the control unit of SP-2, a combinational decoder.
//
// From the 6-bit opcode, the stored flags (ZF, SF, CF) and INT_INPUT_AVAIL it
// produces the control word that steers the single-cycle datapath:
//   ALU, register / immediate mode (type 00 / 01)
//     Op = opcode[3:0], REG_EN = 1 except for CMP, Imm_Sel = type 01,
//     flags loaded.
//   Branch (type 10)
//     Jmp_Sel = 1 when the condition holds: JMP always, JE ZF, JNE !ZF,
//     JL !ZF & SF, JLE SF | ZF, JG !ZF & !SF, JC CF.
//   Memory and I/O (type 11)
//     LOAD  dir/ind/bix: REG_EN = LD_EN = 1, LD_Sel = 01/10/11
//     STORE dir/ind/bix: RAM_EN = 1, ST_Sel = 01/10/11
//     based indexed (bix) modes also set Based_Indexed_Sel and Op = ADD so
//     that the ALU forms RB + displacement.
//     ACCEPT_INPUT: INT_INPUT_SEL = INT_INPUT_AVAIL (load IN, jump to 01)
//     PRINT_OUTPUT: INT_PRINT_EN = 1;  PRINT_CLEAR: INT_PRINT_CLR = 1
// The opcode map and the select values follow the document's control tables.
// This design's own choices: CMP is the ALU operation that does not write
// back (one table names code 1011 instead, which is ROR); the memory/I/O type
// is 11 (one table prints 10, which is the branch type); STORE based indexed
// is 0101 (one table repeats 0100); Op = ADD on memory instructions (the table
// leaves it open); JC uses code 0110 and tests CF; flags are loaded only by ALU
// instructions; ACCEPT_INPUT without pending input does nothing, so a program
// waits for input by looping over it; unused codes do nothing.
module sp2_control
  import sp2_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic       zf,
  input  logic       sf,
  input  logic       cf,
  input  logic       int_input_avail,
  output ctrl_t      ctrl
);

  itype_e     itype;
  logic [3:0] fn;

  assign itype = itype_e'(opcode[5:4]);
  assign fn    = opcode[3:0];

  always_comb begin
    ctrl = '{op: ALU_ADD, ld_sel: AS_PHYS, st_sel: AS_PHYS, default: 1'b0};
    unique case (itype)
      T_ALU_REG, T_ALU_IMM: begin
        ctrl.op      = alu_op_e'(fn);
        ctrl.reg_en  = (fn < 4'(ALU_CMP));
        ctrl.imm_sel = (itype == T_ALU_IMM);
        ctrl.flag_en = (fn <= 4'(ALU_CMP));
      end
      T_BRANCH: begin
        unique case (br_op_e'(fn))
          BR_JMP:  ctrl.jmp_sel = 1'b1;
          BR_JE:   ctrl.jmp_sel = zf;
          BR_JNE:  ctrl.jmp_sel = !zf;
          BR_JL:   ctrl.jmp_sel = !zf && sf;
          BR_JLE:  ctrl.jmp_sel = sf || zf;
          BR_JG:   ctrl.jmp_sel = !zf && !sf;
          BR_JC:   ctrl.jmp_sel = cf;
          default: ctrl.jmp_sel = 1'b0;
        endcase
      end
      T_MEM_IO: begin
        unique case (mem_op_e'(fn))
          M_LOAD_DIR: begin
            ctrl.reg_en = 1'b1; ctrl.ld_en = 1'b1; ctrl.ld_sel = AS_DIR;
          end
          M_LOAD_IND: begin
            ctrl.reg_en = 1'b1; ctrl.ld_en = 1'b1; ctrl.ld_sel = AS_IND;
          end
          M_LOAD_BIX: begin
            ctrl.reg_en = 1'b1; ctrl.ld_en = 1'b1; ctrl.ld_sel = AS_BIX;
            ctrl.bi_sel = 1'b1;
          end
          M_STORE_DIR: begin
            ctrl.ram_en = 1'b1; ctrl.st_sel = AS_DIR;
          end
          M_STORE_IND: begin
            ctrl.ram_en = 1'b1; ctrl.st_sel = AS_IND;
          end
          M_STORE_BIX: begin
            ctrl.ram_en = 1'b1; ctrl.st_sel = AS_BIX;
            ctrl.bi_sel = 1'b1;
          end
          M_ACCEPT_IN: ctrl.int_input_sel = int_input_avail;
          M_PRINT_OUT: ctrl.int_print_en  = 1'b1;
          M_PRINT_CLR: ctrl.int_print_clr = 1'b1;
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  // A cycle selects one next-PC source, and writes a register or the memory,
  // never both.
  always_comb begin
    assert (!(ctrl.jmp_sel && ctrl.int_input_sel)) else $error("jump and interrupt vector together");
    assert (!(ctrl.reg_en && ctrl.ram_en)) else $error("register and memory write together");
    assert (!ctrl.ld_en || ctrl.reg_en) else $error("load without register write");
  end

endmodule
