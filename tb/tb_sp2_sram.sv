// tb_sp2_sram: self-check of the 128 x 13 SP-2 memory.
// Fills every word, then mixes random writes with reads on both read ports,
// comparing with a shadow array. Also checks that a word written in a cycle
// is read back from the next cycle on and that WE low leaves memory unchanged.
module tb_sp2_sram;
  logic clk = 0, we;
  logic [6:0] ra1, ra2, wa;
  logic [12:0] rd1, rd2, wd;
  logic [12:0] model [128];
  int checks = 0, failures = 0;

  sp2_sram dut (.clk(clk), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
                .wa(wa), .wd(wd), .we(we));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    for (int i = 0; i < 128; i++) begin
      wa = 7'(i); wd = 13'($urandom); we = 1;
      @(posedge clk); #1;
      model[i] = wd;
    end
    we = 0;
    for (int i = 0; i < 128; i++) begin
      ra1 = 7'(i); ra2 = 7'(127 - i); #1;
      check(rd1 == model[i], "RD1 after fill");
      check(rd2 == model[127 - i], "RD2 after fill");
    end
    for (int n = 0; n < 2000; n++) begin
      wa = 7'($urandom); wd = 13'($urandom); we = 1'($urandom);
      ra1 = wa; ra2 = 7'($urandom);
      #1;
      check(rd1 == model[wa], "old word before the write edge");
      @(posedge clk); #1;
      if (we) model[wa] = wd;
      check(rd1 == model[wa], "RD1 after write edge");
      check(rd2 == model[ra2], "RD2 random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
