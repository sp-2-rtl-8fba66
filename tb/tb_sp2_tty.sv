// tb_sp2_tty: self-check of the SP-2 character display at its 2 x 20 size.
// Writes random digits with random clears and idle cycles and compares the
// screen and cursor with a model kept here: characters fill a row left to
// right, continue on the next row, scroll the screen up when the last row is
// full, and a clear blanks the screen. Counts that wrap, scroll and clear
// all happened.
module tb_sp2_tty;
  localparam int ROWS = 2, COLS = 20;
  logic clk = 0, rst, we, clr;
  logic [6:0] ch;
  logic [ROWS-1:0][COLS-1:0][6:0] screen;
  logic [0:0] row;
  logic [4:0] col;
  logic [6:0] m [ROWS][COLS];
  int mrow, mcol;
  int checks = 0, failures = 0, n_wrap = 0, n_scroll = 0, n_clr = 0;

  sp2_tty dut (.clk(clk), .rst(rst), .we(we), .clr(clr), .ch(ch),
               .screen(screen), .row(row), .col(col));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_clear();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) m[r][c] = 7'h20;
    mrow = 0; mcol = 0;
  endtask

  task automatic model_put(logic [6:0] x);
    if (mcol == COLS) begin
      if (mrow == ROWS - 1) begin
        n_scroll++;
        for (int r = 0; r < ROWS - 1; r++) for (int c = 0; c < COLS; c++) m[r][c] = m[r+1][c];
        for (int c = 0; c < COLS; c++) m[ROWS-1][c] = 7'h20;
      end else begin
        n_wrap++;
        mrow++;
      end
      mcol = 0;
    end
    m[mrow][mcol] = x;
    mcol++;
  endtask

  task automatic compare();
    int bad = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      if (screen[r][c] != m[r][c]) bad++;
    checks++;
    if (bad != 0 || int'(row) != mrow || int'(col) != mcol) begin
      failures++;
      if (failures < 10) $display("FAIL screen (%0d cells differ) row=%0d col=%0d expected %0d %0d",
                                  bad, row, col, mrow, mcol);
    end
  endtask

  initial begin
    rst = 1; we = 0; clr = 0; ch = 0;
    @(posedge clk); #1; rst = 0;
    model_clear();
    compare();
    for (int n = 0; n < 600; n++) begin
      int k;
      k = $urandom_range(0, 99);
      we = (k < 85); clr = (k >= 97);
      ch = 7'h30 + 7'($urandom_range(0, 15));
      @(posedge clk); #1;
      if (clr) begin model_clear(); n_clr++; end
      else if (we) model_put(ch);
      we = 0; clr = 0;
      compare();
    end
    checks += 3;
    if (n_wrap == 0) failures++;
    if (n_scroll == 0) failures++;
    if (n_clr == 0) failures++;
    $display("wraps=%0d scrolls=%0d clears=%0d", n_wrap, n_scroll, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
