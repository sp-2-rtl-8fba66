// sp2_tty: a character display of ROWS x COLS cells, the output device of SP-2.
//
// On a rising clock edge with clr high every cell is set to a space and the
// cursor returns to the top-left cell. Otherwise, with we high, the 7-bit
// ASCII character on ch is written at the cursor and the cursor advances.
// When a row is full the next character starts the following row; when the
// last row is full the next character first scrolls the screen up one row
// (the top row is lost, the bottom row is cleared). clr wins over we.
// The screen contents are presented on 'screen', row 0 first, and the cursor
// on row/col (col = COLS means the current row is full).
// The 2-row by 20-column size follows the document, which only names the
// display; the cursor, wrap and scroll behaviour and the blank-as-space
// convention are this design's choices. Reset clears the screen like clr.
module sp2_tty #(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 20,
  localparam int unsigned RBITS = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CBITS = $clog2(COLS + 1)
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              we,
  input  logic                              clr,
  input  logic [6:0]                        ch,
  output logic [ROWS-1:0][COLS-1:0][6:0]    screen,
  output logic [RBITS-1:0]                  row,
  output logic [CBITS-1:0]                  col
);

  localparam logic [6:0] SPACE = 7'h20;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) screen[r][c] <= SPACE;
      row <= '0;
      col <= '0;
    end else if (we) begin
      if (col == CBITS'(COLS)) begin
        if (row == RBITS'(ROWS - 1)) begin
          for (int r = 0; r < ROWS - 1; r++) screen[r] <= screen[r+1];
          for (int c = 1; c < COLS; c++) screen[ROWS-1][c] <= SPACE;
          screen[ROWS-1][0] <= ch;
        end else begin
          screen[row + RBITS'(1)][0] <= ch;
          row <= row + RBITS'(1);
        end
        col <= CBITS'(1);
      end else begin
        screen[row][col] <= ch;
        col <= col + CBITS'(1);
      end
    end
  end

endmodule
