// stencil_reg: stencil register, the sliding window of a kernel.
//
// The stencil register is a ROWS x COLS shift register. Each valid cycle it
// takes one column of ROWS pixels from the line buffer and shifts the window
// one position: win[r][0] takes col_in[r] and win[r][c] takes win[r][c-1], so
// win[r][c] is the pixel c columns left of the newest one. A column read once
// from the line buffer is thus re-used by COLS consecutive windows.
//
// Interface and timing: the window, win_valid and the coordinates of the
// newest column (x_out, y_out) are registered; win_valid is 1 for one cycle
// after every shift. win_full is 1 when the whole window lies inside the
// image (x >= COLS-1 and y >= ROWS-1); windows at the left border wrap onto
// the end of the previous row and rows above the image are zero. The
// coordinate pass-through and win_full are this implementation's additions;
// rst_n (asynchronous, active low) clears the window.
module stencil_reg #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ROWS   = 3,
  parameter int unsigned COLS   = 3,
  parameter int unsigned X_W    = 6,
  parameter int unsigned Y_W    = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] col_in [ROWS],
  input  logic              col_valid,
  input  logic [X_W-1:0]    x_in,
  input  logic [Y_W-1:0]    y_in,
  output logic [DATA_W-1:0] win    [ROWS][COLS],
  output logic              win_valid,
  output logic              win_full,
  output logic [X_W-1:0]    x_out,
  output logic [Y_W-1:0]    y_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) win[r][c] <= '0;
      win_valid <= 1'b0;
      win_full  <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      win_valid <= col_valid;
      if (col_valid) begin
        for (int r = 0; r < ROWS; r++) begin
          win[r][0] <= col_in[r];
          for (int c = 1; c < COLS; c++) win[r][c] <= win[r][c-1];
        end
        win_full <= (int'(x_in) >= COLS - 1) && (int'(y_in) >= ROWS - 1);
        x_out    <= x_in;
        y_out    <= y_in;
      end
    end
  end

endmodule
