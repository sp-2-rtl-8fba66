// tb_sp2_alu: exhaustive self-check of the SP-2 ALU.
// Every operation code 0..15 is applied with every pair of 4-bit operands;
// the result and the CF/SF/ZF/DIVE/MULE outputs are compared with integer
// arithmetic worked out here. Codes 13..15 must give a zero result.
module tb_sp2_alu;
  import sp2_pkg::*;

  logic [3:0] op_raw;
  logic [3:0] a, b, r;
  logic cf, sf, zf, dive, mule;
  int checks = 0, failures = 0;

  sp2_alu dut (.op(alu_op_e'(op_raw)), .a(a), .b(b), .r(r), .cf(cf), .sf(sf),
               .zf(zf), .dive(dive), .mule(mule));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int o, int ai, int bi);
    int er, ecf, edive, emule, s;
    er = 0; ecf = 0; edive = 0; emule = 0;
    s = bi % 4;
    case (o)
      0:  er = ai & bi;
      1:  er = ai | bi;
      2:  er = ai ^ bi;
      3:  er = 15 - ai;
      4:  er = (ai * (1 << s)) % 16;
      5:  er = ai / (1 << s);
      6:  if (bi == 0) edive = 1; else er = ai / bi;
      7:  begin er = (ai * bi) % 16; emule = (ai * bi) > 15; end
      8, 12: begin er = (ai - bi + 16) % 16; ecf = ai < bi; end
      9:  begin er = (ai + bi) % 16; ecf = (ai + bi) > 15; end
      10: er = ((ai * (1 << s)) % 16) | (ai / (1 << (4 - s)) % 16);
      11: er = (ai / (1 << s)) | ((ai * (1 << (4 - s))) % 16);
      default: er = 0;
    endcase
    checks++;
    if (r !== 4'(er) || cf !== 1'(ecf) || sf !== 1'(er >= 8) || zf !== 1'(er == 0) ||
        dive !== 1'(edive) || mule !== 1'(emule)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%0d b=%0d: r=%0d cf=%b sf=%b zf=%b dive=%b mule=%b, expected r=%0d cf=%0d",
                 o, ai, bi, r, cf, sf, zf, dive, mule, er, ecf);
    end
  endtask

  initial begin
    for (int o = 0; o < 16; o++)
      for (int ai = 0; ai < 16; ai++)
        for (int bi = 0; bi < 16; bi++) begin
          op_raw = 4'(o); a = 4'(ai); b = 4'(bi);
          #1;
          check_one(o, ai, bi);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
