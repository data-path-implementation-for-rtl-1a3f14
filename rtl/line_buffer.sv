// line_buffer: row memory in front of a stencil (sliding-window) kernel.
//
// Pixels arrive one per valid cycle in row-major order. The line buffer keeps
// the last ROWS-1 image rows so that, for every incoming pixel, it can hand
// the whole column of ROWS pixels above and including it to the stencil
// register. Each row that is re-used by the next row traversal is read from
// the line buffer instead of from DRAM.
//
// Storage is ROWS-1 row memories of IMG_W words. Memory j holds the row j+1
// rows above the current one. With every valid pixel at column x the column
// is read out at x and the memories shift down by one row at that column
// (memory 0 takes the new pixel, memory j takes memory j-1).
//
// Interface and timing: col_out[ROWS-1] is the incoming pixel (bottom row of
// the window) and col_out[ROWS-1-k] the pixel k rows above it; col_out,
// col_valid and the pixel's coordinates x_out / y_out are registered, so they
// appear on the clock edge after the pixel was presented. Cycles with
// pix_valid = 0 change nothing. Rows above the top of the image read as zero.
// Coordinates wrap at IMG_W and IMG_H, so frames follow one another without a
// gap. The memory organisation, the zero padding at the top border, the
// coordinate outputs and the image size defaults are this implementation's
// choices; rst_n (asynchronous, active low) clears the counters and outputs,
// not the memories. An assertion checks in simulation that the
// position counters, which address the row memories, stay inside the image.
module line_buffer #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ROWS   = 5,
  parameter int unsigned IMG_W  = 64,
  parameter int unsigned IMG_H  = 64,
  parameter int unsigned X_W    = (IMG_W <= 2) ? 1 : $clog2(IMG_W),
  parameter int unsigned Y_W    = (IMG_H <= 2) ? 1 : $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] pix_in,
  input  logic              pix_valid,
  output logic [DATA_W-1:0] col_out [ROWS],
  output logic              col_valid,
  output logic [X_W-1:0]    x_out,
  output logic [Y_W-1:0]    y_out
);

  localparam int unsigned NMEM = (ROWS > 1) ? ROWS - 1 : 1;

  logic [DATA_W-1:0] mem [NMEM][IMG_W];
  logic [X_W-1:0]    x_q;
  logic [Y_W-1:0]    y_q;

  // Pixel position counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else begin
      // The counters never leave the image (x_q addresses the row memories).
      a_pos_in_image: assert ((int'(x_q) < IMG_W) && (int'(y_q) < IMG_H))
        else $error("line_buffer: pixel position outside the image");
      if (pix_valid) begin
        if (int'(x_q) == IMG_W - 1) begin
          x_q <= '0;
          y_q <= (int'(y_q) == IMG_H - 1) ? '0 : y_q + 1'b1;
        end else begin
          x_q <= x_q + 1'b1;
        end
      end
    end
  end

  // Row memories (no reset: plain storage).
  if (ROWS > 1) begin : g_mem
    always_ff @(posedge clk) begin
      if (pix_valid) begin
        mem[0][x_q] <= pix_in;
        for (int j = 1; j < NMEM; j++) mem[j][x_q] <= mem[j-1][x_q];
      end
    end
  end

  // Registered column output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) col_out[r] <= '0;
      col_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      col_valid <= pix_valid;
      if (pix_valid) begin
        col_out[ROWS-1] <= pix_in;
        for (int j = 0; j < ROWS - 1; j++)
          col_out[ROWS-2-j] <= (int'(y_q) > j) ? mem[j][x_q] : '0;
        x_out <= x_q;
        y_out <= y_q;
      end
    end
  end

endmodule
