// tb_line_buffer: self-checking testbench of the line buffer.
//
// Two line buffers (3 rows over an 8x6 image, 5 rows over a 13x9 image, so
// that widths that are not a power of two are covered) receive the same
// random pixel stream with random idle cycles for three frames. The testbench
// keeps its own copy of each frame and checks, one cycle after every valid
// pixel, the whole column (pixel k rows above at index ROWS-1-k, zero above
// the top of the image), the coordinates and the valid bit; on idle cycles it
// checks that col_valid is 0.
module tb_line_buffer;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, gaps = 0, frames_seen = 0;

  logic [DW-1:0] pix; logic pv;
  logic [DW-1:0] ca [3]; logic cva; logic [2:0] xa; logic [2:0] ya;
  logic [DW-1:0] cb [5]; logic cvb; logic [3:0] xb; logic [3:0] yb;

  line_buffer #(.DATA_W(DW), .ROWS(3), .IMG_W(8), .IMG_H(6)) u_a (
    .clk, .rst_n, .pix_in(pix), .pix_valid(pv), .col_out(ca), .col_valid(cva),
    .x_out(xa), .y_out(ya));
  line_buffer #(.DATA_W(DW), .ROWS(5), .IMG_W(13), .IMG_H(9)) u_b (
    .clk, .rst_n, .pix_in(pix), .pix_valid(pv), .col_out(cb), .col_valid(cvb),
    .x_out(xb), .y_out(yb));

  logic [DW-1:0] img_a [6][8];
  logic [DW-1:0] img_b [9][13];
  int xa_m = 0, ya_m = 0, xb_m = 0, yb_m = 0;

  initial begin
    pix = 0; pv = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3 * 9 * 13 * 2; cyc++) begin
      int ex_a, ey_a, ex_b, ey_b;
      pv  = ($urandom % 3) != 0;
      pix = DW'($urandom);
      if (!pv) gaps++;
      ex_a = xa_m; ey_a = ya_m; ex_b = xb_m; ey_b = yb_m;
      if (pv) begin
        img_a[ya_m][xa_m] = pix;
        img_b[yb_m][xb_m] = pix;
        if (++xa_m == 8)  begin xa_m = 0; if (++ya_m == 6) ya_m = 0; end
        if (++xb_m == 13) begin xb_m = 0; if (++yb_m == 9) begin yb_m = 0; frames_seen++; end end
      end
      @(posedge clk); #1;
      checks++;
      if (cva !== pv || cvb !== pv) failures++;
      if (pv) begin
        checks++;
        if (int'(xa) != ex_a || int'(ya) != ey_a || int'(xb) != ex_b || int'(yb) != ey_b) begin
          failures++;
          $display("%0t coord mismatch", $time);
        end
        for (int k = 0; k < 3; k++) begin
          logic [DW-1:0] e;
          e = (ey_a >= k) ? img_a[ey_a-k][ex_a] : '0;
          checks++;
          if (ca[2-k] !== e) begin
            failures++;
            if (failures < 10) $display("%0t A k=%0d got %h exp %h", $time, k, ca[2-k], e);
          end
        end
        for (int k = 0; k < 5; k++) begin
          logic [DW-1:0] e;
          e = (ey_b >= k) ? img_b[ey_b-k][ex_b] : '0;
          checks++;
          if (cb[4-k] !== e) begin
            failures++;
            if (failures < 10) $display("%0t B k=%0d got %h exp %h", $time, k, cb[4-k], e);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (gaps == 0 || frames_seen < 2) begin
      failures++;
      $display("idle cycles or frame wrap never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
