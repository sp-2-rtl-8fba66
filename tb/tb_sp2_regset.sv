// tb_sp2_regset: self-check of the SP-2 register set.
// Random writes, input-register loads and reads are compared with a shadow
// array kept here. It checks both read ports, that R7 ignores CPU writes and
// takes InRData, that OutRD shows R6, that LOG_R shows all registers and that
// reset clears everything.
module tb_sp2_regset;
  import sp2_pkg::*;

  logic clk = 0, rst;
  logic [2:0] ra, rb, wr;
  logic [3:0] wrd, in_rdata, a, b, out_rd;
  logic reg_en, in_r_en;
  logic [31:0] log_r;
  logic [3:0] model [8];
  int checks = 0, failures = 0;

  sp2_regset dut (.clk(clk), .rst(rst), .ra(ra), .rb(rb), .wr(wr), .wrd(wrd),
                  .reg_en(reg_en), .in_rdata(in_rdata), .in_r_en(in_r_en),
                  .a(a), .b(b), .out_rd(out_rd), .log_r(log_r));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); rb = 3'(7 - i);
      #1;
      check(a == model[i], "read port A");
      check(b == model[7 - i], "read port B");
      check(log_r[i*4 +: 4] == model[i], "LOG_R");
    end
    check(out_rd == model[6], "OutRD is R6");
  endtask

  initial begin
    rst = 1; reg_en = 0; in_r_en = 0; wr = 0; wrd = 0; in_rdata = 0; ra = 0; rb = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    check_all();
    for (int n = 0; n < 400; n++) begin
      wr = 3'($urandom_range(0, 7));
      wrd = 4'($urandom);
      reg_en = 1'($urandom_range(0, 3) != 0);
      in_rdata = 4'($urandom);
      in_r_en = 1'($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (reg_en && wr != 7) model[wr] = wrd;
      if (in_r_en) model[7] = in_rdata;
      reg_en = 0; in_r_en = 0;
      check_all();
    end
    // explicit: CPU write to R7 is ignored
    wr = 7; wrd = ~model[7]; reg_en = 1;
    @(posedge clk); #1; reg_en = 0;
    ra = 7; #1; check(a == model[7], "R7 not CPU writable");
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
