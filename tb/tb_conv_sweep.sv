// tb_conv_sweep: the convolution topology across the precision and
// window-size ranges it is meant to be generated for.
//
// Precision sweep: 2-, 4-, 8- and 32-bit data paths on a 2x2 window.
// Window sweep: 3x3 (19-port switch), 4x4 (33-port switch, 16 PEs, the size
// of the "about 30 ports for about 15 PEs" point) and 3x5 (rectangular) at
// 16 bits. Each size is one conv_sweep_unit, which streams random columns
// and coefficients and checks every output value and its 6-cycle latency.
module tb_conv_sweep;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NU = 7;
  logic done [NU];
  int   ch [NU], fl [NU];

  conv_sweep_unit #(.DW(2),  .R(2), .C(2)) u_w2  (.clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  conv_sweep_unit #(.DW(4),  .R(2), .C(2)) u_w4  (.clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  conv_sweep_unit #(.DW(8),  .R(2), .C(2)) u_w8  (.clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  conv_sweep_unit #(.DW(32), .R(2), .C(2)) u_w32 (.clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]));
  conv_sweep_unit #(.DW(16), .R(3), .C(3)) u_3x3 (.clk, .rst_n, .done(done[4]), .checks(ch[4]), .failures(fl[4]));
  conv_sweep_unit #(.DW(16), .R(4), .C(4)) u_4x4 (.clk, .rst_n, .done(done[5]), .checks(ch[5]), .failures(fl[5]));
  conv_sweep_unit #(.DW(16), .R(3), .C(5)) u_3x5 (.clk, .rst_n, .done(done[6]), .checks(ch[6]), .failures(fl[6]));

  int checks = 0, failures = 0;

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int u = 0; u < NU; u++) all_done &= done[u];
    end while (!all_done);
    for (int u = 0; u < NU; u++) begin
      checks += ch[u];
      failures += fl[u];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    for (int u = 0; u < NU; u++) begin
      checks += ch[u];
      failures += fl[u];
    end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
