// tb_sp2_flag_reg: self-check of the SP-2 flag register.
// Random flag inputs and load enables; the outputs must follow a model that
// takes the inputs only when load is high, and reset must clear the flags.
module tb_sp2_flag_reg;
  logic clk = 0, rst, load, cf_in, sf_in, zf_in, cf, sf, zf;
  logic [2:0] model;
  int checks = 0, failures = 0;

  sp2_flag_reg dut (.clk(clk), .rst(rst), .load(load), .cf_in(cf_in), .sf_in(sf_in),
                    .zf_in(zf_in), .cf(cf), .sf(sf), .zf(zf));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; {cf_in, sf_in, zf_in} = 3'b111;
    @(posedge clk); #1; rst = 0; model = 0;
    checks++; if ({cf, sf, zf} != model) failures++;
    for (int n = 0; n < 500; n++) begin
      load = 1'($urandom);
      {cf_in, sf_in, zf_in} = 3'($urandom);
      @(posedge clk); #1;
      if (load) model = {cf_in, sf_in, zf_in};
      checks++;
      if ({cf, sf, zf} != model) begin
        failures++;
        if (failures < 10) $display("FAIL flags=%b expected %b", {cf, sf, zf}, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
