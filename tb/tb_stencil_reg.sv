// tb_stencil_reg: self-checking testbench of the stencil register.
//
// A 3x3 and a 2x3 stencil register receive random columns with random idle
// cycles and coordinates that walk an 8x6 image. The testbench keeps the
// history of shifted-in columns and checks after every edge that
// win[r][c] is the column shifted in c shifts ago (zero before the first
// ones), that win_valid marks exactly the cycles after a shift, that
// win_full is 1 exactly for windows inside the image, and that the
// coordinates are passed along.
module tb_stencil_reg;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fulls = 0, gaps = 0;

  logic [DW-1:0] col3 [3]; logic cv; logic [2:0] xi; logic [2:0] yi;
  logic [DW-1:0] col2 [2];
  logic [DW-1:0] w3 [3][3]; logic wv3, wf3; logic [2:0] xo3, yo3;
  logic [DW-1:0] w2 [2][3]; logic wv2, wf2; logic [2:0] xo2, yo2;

  assign col2[0] = col3[0];
  assign col2[1] = col3[1];

  stencil_reg #(.DATA_W(DW), .ROWS(3), .COLS(3), .X_W(3), .Y_W(3)) u3 (
    .clk, .rst_n, .col_in(col3), .col_valid(cv), .x_in(xi), .y_in(yi),
    .win(w3), .win_valid(wv3), .win_full(wf3), .x_out(xo3), .y_out(yo3));
  stencil_reg #(.DATA_W(DW), .ROWS(2), .COLS(3), .X_W(3), .Y_W(3)) u2 (
    .clk, .rst_n, .col_in(col2), .col_valid(cv), .x_in(xi), .y_in(yi),
    .win(w2), .win_valid(wv2), .win_full(wf2), .x_out(xo2), .y_out(yo2));

  logic [3*DW-1:0] hist [$];   // newest first
  int x = 0, y = 0;
  bit ef3 = 0, ef2 = 0;

  initial begin
    for (int r = 0; r < 3; r++) col3[r] = 0;
    cv = 0; xi = 0; yi = 0;
    for (int i = 0; i < 3; i++) hist.push_front('0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      cv = ($urandom % 4) != 0;
      if (!cv) gaps++;
      for (int r = 0; r < 3; r++) col3[r] = DW'($urandom);
      xi = 3'(x); yi = 3'(y);
      if (cv) begin
        hist.push_front({col3[2], col3[1], col3[0]});
        void'(hist.pop_back());
        ef3 = (x >= 2) && (y >= 2);
        ef2 = (x >= 2) && (y >= 1);
        if (++x == 8) begin x = 0; if (++y == 6) y = 0; end
      end
      @(posedge clk); #1;
      checks++;
      if (wv3 !== cv || wv2 !== cv) failures++;
      checks++;
      if (wf3 !== ef3 || wf2 !== ef2) begin
        failures++;
        if (failures < 10) $display("%0t full got %0d%0d exp %0d%0d", $time, wf3, wf2, ef3, ef2);
      end
      if (wf3) fulls++;
      if (cv) begin
        checks++;
        if (xo3 !== xi || yo3 !== yi || xo2 !== xi || yo2 !== yi) failures++;
      end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (w3[r][c] !== hist[c][r*DW +: DW]) begin
            failures++;
            if (failures < 10) $display("%0t w3[%0d][%0d] got %h exp %h", $time, r, c, w3[r][c],
                                        hist[c][r*DW +: DW]);
          end
          if (r < 2) begin
            checks++;
            if (w2[r][c] !== hist[c][r*DW +: DW]) failures++;
          end
        end
      @(negedge clk);
    end
    checks++;
    if (fulls == 0 || gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
