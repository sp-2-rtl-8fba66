// tb_sp2_control: exhaustive self-check of the SP-2 control unit.
// Every opcode (64) is applied with every combination of ZF, SF, CF and
// INT_INPUT_AVAIL; each control output is compared with the expected value,
// written here row by row from the instruction tables (ALU register/immediate,
// the seven branches, six loads/stores and three I/O instructions).
module tb_sp2_control;
  import sp2_pkg::*;

  logic [5:0] opcode;
  logic zf, sf, cf, avail;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  sp2_control dut (.opcode(opcode), .zf(zf), .sf(sf), .cf(cf),
                   .int_input_avail(avail), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL opcode=%b z=%b s=%b c=%b avail=%b: %s=%b expected %b",
                                  opcode, zf, sf, cf, avail, what, got, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < 64; o++)
      for (int f = 0; f < 16; f++) begin
        logic e_reg, e_imm, e_jmp, e_bi, e_lden, e_ram, e_isel, e_pen, e_pclr, e_flag;
        logic [1:0] e_ldsel, e_stsel;
        logic chk_op;
        logic [3:0] e_op;
        int t, fn;
        opcode = 6'(o);
        {zf, sf, cf, avail} = 4'(f);
        t = o / 16; fn = o % 16;
        e_reg = 0; e_imm = 0; e_jmp = 0; e_bi = 0; e_lden = 0; e_ram = 0;
        e_isel = 0; e_pen = 0; e_pclr = 0; e_flag = 0; e_ldsel = 0; e_stsel = 0;
        chk_op = 0; e_op = 0;
        if (t <= 1) begin
          chk_op = 1; e_op = 4'(fn);
          e_reg = (fn <= 11);
          e_imm = (t == 1);
          e_flag = (fn <= 12);
        end else if (t == 2) begin
          case (fn)
            0: e_jmp = 1;
            1: e_jmp = zf;
            2: e_jmp = !zf;
            3: e_jmp = !zf && sf;
            4: e_jmp = sf || zf;
            5: e_jmp = !zf && !sf;
            6: e_jmp = cf;
            default: e_jmp = 0;
          endcase
        end else begin
          case (fn)
            0: begin e_reg = 1; e_lden = 1; e_ldsel = 1; end
            1: begin e_reg = 1; e_lden = 1; e_ldsel = 2; end
            2: begin e_reg = 1; e_lden = 1; e_ldsel = 3; e_bi = 1; chk_op = 1; e_op = 9; end
            3: begin e_ram = 1; e_stsel = 1; end
            4: begin e_ram = 1; e_stsel = 2; end
            5: begin e_ram = 1; e_stsel = 3; e_bi = 1; chk_op = 1; e_op = 9; end
            13: e_isel = avail;
            14: e_pen = 1;
            15: e_pclr = 1;
            default: ;
          endcase
        end
        #1;
        expect_bit(ctrl.reg_en, e_reg, "REG_EN");
        expect_bit(ctrl.imm_sel, e_imm, "Imm_Sel");
        expect_bit(ctrl.jmp_sel, e_jmp, "Jmp_Sel");
        expect_bit(ctrl.bi_sel, e_bi, "Based_Indexed_Sel");
        expect_bit(ctrl.ld_en, e_lden, "LD_EN");
        expect_bit(ctrl.ram_en, e_ram, "RAM_EN");
        expect_bit(ctrl.int_input_sel, e_isel, "INT_INPUT_SEL");
        expect_bit(ctrl.int_print_en, e_pen, "INT_PRINT_EN");
        expect_bit(ctrl.int_print_clr, e_pclr, "INT_PRINT_CLR");
        expect_bit(ctrl.flag_en, e_flag, "flag load");
        if (e_lden) begin
          expect_bit(ctrl.ld_sel[1], e_ldsel[1], "LD_Sel[1]");
          expect_bit(ctrl.ld_sel[0], e_ldsel[0], "LD_Sel[0]");
        end
        if (e_ram) begin
          expect_bit(ctrl.st_sel[1], e_stsel[1], "ST_Sel[1]");
          expect_bit(ctrl.st_sel[0], e_stsel[0], "ST_Sel[0]");
        end
        if (chk_op) begin
          checks++;
          if (ctrl.op != e_op) begin
            failures++;
            $display("FAIL opcode=%b Op=%b expected %b", opcode, ctrl.op, e_op);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
