// tb_sp2_pc: self-check of the SP-2 program counter.
// Checks reset to 0, increment with wrap at 127, hold when disabled, jump to
// the target, jump to the interrupt vector 01, and jump priority over the
// vector, against a next-address model written here.
module tb_sp2_pc;
  logic clk = 0, rst, en, jmp_sel, int_input_sel;
  logic [6:0] jmp_addr, pc;
  int model;
  int checks = 0, failures = 0;
  int wraps = 0;

  sp2_pc dut (.clk(clk), .rst(rst), .en(en), .jmp_sel(jmp_sel),
              .int_input_sel(int_input_sel), .jmp_addr(jmp_addr), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; jmp_sel = 0; int_input_sel = 0; jmp_addr = 0;
    @(posedge clk); #1; rst = 0; model = 0;
    checks++; if (pc != 0) failures++;
    // straight count through the wrap
    en = 1;
    for (int n = 0; n < 130; n++) begin
      @(posedge clk); #1;
      model = (model + 1) % 128;
      if (model == 0) wraps++;
      checks++; if (pc != 7'(model)) failures++;
    end
    for (int n = 0; n < 1000; n++) begin
      en = 1'($urandom_range(0, 4) != 0);
      jmp_sel = 1'($urandom_range(0, 3) == 0);
      int_input_sel = 1'($urandom_range(0, 3) == 0);
      jmp_addr = 7'($urandom);
      @(posedge clk); #1;
      if (en) begin
        if (jmp_sel) model = jmp_addr;
        else if (int_input_sel) model = 1;
        else model = (model + 1) % 128;
      end
      checks++;
      if (pc != 7'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%0d expected %0d", pc, model);
      end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
