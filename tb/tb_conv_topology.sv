// tb_conv_topology: self-checking testbench of the convolution topology.
//
// Three instances share one stream of pixel columns:
//   u5   the default 5x5 window (25 map PEs, reduction PE, 51x51 switch),
//   u2   the 2x2 window of the convolution topology diagram,
//   u2f  a 2x2 window with fixed PEs (mult) and a fixed switch.
// The test configures the fabric, loads coefficients through the switch,
// streams random 8-bit pixel columns with random bubbles and compares every
// output against a model that keeps its own copy of the window (column
// history) and computes sum(f(pixel, coefficient)) with integer arithmetic.
// The result must arrive exactly 6 cycles after its column (one output per
// column: one inner loop per cycle). Phases:
//   1 convolution (map = mult)
//   2 run-time mode switch to sum of absolute differences (map = absDiff)
//   3 map = gt (counting pixels above a threshold), with new coefficients
//   4 switch re-routed so pix_out shows map PE 3's own result (reduction
//     bypassed), latency 4
// The fixed instance stays a convolution throughout, with whatever
// coefficients were loaded last, and is checked in every phase.
module tb_conv_topology;
  import spa_pkg::*;

  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int outs5 = 0, outs2 = 0, bubbles = 0;

  localparam int SELW = idx_width(func_count(FUNCS_MAP));
  localparam int F_MULT = func_index(FUNCS_MAP, OP_MULT);
  localparam int F_ABS  = func_index(FUNCS_MAP, OP_ABSDIFF);
  localparam int F_GT   = func_index(FUNCS_MAP, OP_GT);

  // ---------------- 5x5 ----------------
  localparam int N5 = 25, S5 = 51, A5 = $clog2(S5);
  logic [SELW-1:0] f5 [N5]; logic sr5 [N5]; logic sc5 [N5]; logic [A5-1:0] ad5 [S5];
  logic [DW-1:0] col5 [5]; logic [DW-1:0] co5 [N5]; logic cv5 [N5];
  logic [DW-1:0] po5; logic pv5;
  logic cfg_we, colv;

  conv_topology #(.DATA_W(DW)) u5 (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(f5), .pe_cfg_sel_sr(sr5), .pe_cfg_sel_sc(sc5),
    .sw_cfg_addr(ad5), .pix_col(col5), .pix_col_valid(colv), .coeff_in(co5),
    .coeff_valid(cv5), .pix_out(po5), .pix_out_valid(pv5));

  // ---------------- 2x2 ----------------
  localparam int N2 = 4, S2 = 9, A2 = $clog2(S2);
  logic [SELW-1:0] f2 [N2]; logic sr2 [N2]; logic sc2 [N2]; logic [A2-1:0] ad2 [S2];
  logic [DW-1:0] col2 [2]; logic [DW-1:0] co2 [N2]; logic cv2 [N2];
  logic [DW-1:0] po2, po2f; logic pv2, pv2f;

  assign col2[0] = col5[0];
  assign col2[1] = col5[1];

  conv_topology #(.DATA_W(DW), .ROWS(2), .COLS(2)) u2 (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(f2), .pe_cfg_sel_sr(sr2), .pe_cfg_sel_sc(sc2),
    .sw_cfg_addr(ad2), .pix_col(col2), .pix_col_valid(colv), .coeff_in(co2),
    .coeff_valid(cv2), .pix_out(po2), .pix_out_valid(pv2));

  conv_topology #(.DATA_W(DW), .ROWS(2), .COLS(2), .PE_CONFIGURABLE(1'b0),
                  .SW_CONFIGURABLE(1'b0)) u2f (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(f2), .pe_cfg_sel_sr(sr2), .pe_cfg_sel_sc(sc2),
    .sw_cfg_addr(ad2), .pix_col(col2), .pix_col_valid(colv), .coeff_in(co2),
    .coeff_valid(cv2), .pix_out(po2f), .pix_out_valid(pv2f));

  // ---------------- model ----------------
  int hist [$][5];             // column history, newest first
  int coef5 [N5], coef2 [N2];
  int mode;                    // 0 mult, 1 absdiff, 2 gt, 3 bypass PE 3

  // expected outputs by cycle number
  logic [DW:0] exp5 [int], exp2 [int], exp2f [int];
  int cycle = 0;

  function automatic int fmap(int m, int p, int c);
    case (m)
      0: return p * c;
      1: return (p > c) ? p - c : c - p;
      2: return (p > c) ? 1 : 0;
      default: return p * c;
    endcase
  endfunction

  task automatic tick();
    @(posedge clk); #1;
    cycle++;
    if (exp5.exists(cycle)) begin
      checks++;
      if (!pv5 || po5 !== exp5[cycle][DW-1:0]) begin
        failures++;
        if (failures < 10) $display("%0t u5 got %0d/%h exp %h", $time, pv5, po5, exp5[cycle][DW-1:0]);
      end
      outs5++;
      exp5.delete(cycle);
    end else begin
      checks++;
      if (pv5) begin failures++; if (failures < 10) $display("%0t u5 unexpected valid", $time); end
    end
    if (exp2.exists(cycle)) begin
      checks++;
      if (!pv2 || po2 !== exp2[cycle][DW-1:0]) begin
        failures++;
        if (failures < 10) $display("%0t u2 got %0d/%h exp %h", $time, pv2, po2, exp2[cycle][DW-1:0]);
      end
      outs2++;
      exp2.delete(cycle);
    end else begin
      checks++;
      if (pv2) begin failures++; if (failures < 10) $display("%0t u2 unexpected valid", $time); end
    end
    if (exp2f.exists(cycle)) begin
      checks++;
      if (!pv2f || po2f !== exp2f[cycle][DW-1:0]) begin
        failures++;
        if (failures < 10) $display("%0t u2f got %0d/%h exp %h", $time, pv2f, po2f, exp2f[cycle][DW-1:0]);
      end
      exp2f.delete(cycle);
    end else begin
      checks++;
      if (pv2f) begin failures++; if (failures < 10) $display("%0t u2f unexpected valid", $time); end
    end
    @(negedge clk);
  endtask

  // Program the configuration registers of u5 and u2 for a mode.
  task automatic configure(int m);
    for (int k = 0; k < N5; k++) begin
      f5[k] = SELW'(m == 1 ? F_ABS : m == 2 ? F_GT : F_MULT); sr5[k] = 1; sc5[k] = 1;
    end
    for (int k = 0; k < N2; k++) begin
      f2[k] = SELW'(m == 1 ? F_ABS : m == 2 ? F_GT : F_MULT); sr2[k] = 1; sc2[k] = 1;
    end
    for (int k = 0; k < N5; k++) begin ad5[2*k] = A5'(k); ad5[2*k+1] = A5'(k); end
    for (int k = 0; k < N2; k++) begin ad2[2*k] = A2'(k); ad2[2*k+1] = A2'(k); end
    ad5[2*N5] = A5'(m == 3 ? N5 + 3 : 2 * N5);
    ad2[2*N2] = A2'(m == 3 ? N2 + 3 : 2 * N2);
    cfg_we = 1;
    tick();
    cfg_we = 0;
    mode = m;
  endtask

  // Load coefficients through the switch (2 cycles switch + 1 cycle PE).
  task automatic load_coeffs(int lo, int hi);
    for (int k = 0; k < N5; k++) begin
      coef5[k] = lo + int'($urandom % (hi - lo + 1)); co5[k] = DW'(coef5[k]); cv5[k] = 1;
    end
    for (int k = 0; k < N2; k++) begin
      coef2[k] = lo + int'($urandom % (hi - lo + 1)); co2[k] = DW'(coef2[k]); cv2[k] = 1;
    end
    tick();
    for (int k = 0; k < N5; k++) cv5[k] = 0;
    for (int k = 0; k < N2; k++) cv2[k] = 0;
    repeat (4) tick();
  endtask

  task automatic stream(int n);
    for (int i = 0; i < n; i++) begin
      int col [5];
      colv = ($urandom % 5) != 0;
      for (int r = 0; r < 5; r++) begin col[r] = int'($urandom % 256); col5[r] = DW'(col[r]); end
      if (colv) begin
        int s;
        hist.push_front(col);
        void'(hist.pop_back());
        if (mode == 3) begin
          // PE 3 is (row 0, col 3) in 5x5 and (row 1, col 1) in 2x2; 4 cycles
          exp5[cycle + 4] = {1'b1, DW'(fmap(0, hist[3][0], coef5[3]))};
          exp2[cycle + 4] = {1'b1, DW'(fmap(0, hist[1][1], coef2[3]))};
        end else begin
          s = 0;
          for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++)
            s += fmap(mode, hist[c][r], coef5[r*5+c]);
          exp5[cycle + 6] = {1'b1, DW'(s)};
          s = 0;
          for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
            s += fmap(mode, hist[c][r], coef2[r*2+c]);
          exp2[cycle + 6] = {1'b1, DW'(s)};
        end
        // the fixed instance always convolves with the coefficients last loaded
        s = 0;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
          s += hist[c][r] * coef2[r*2+c];
        exp2f[cycle + 6] = {1'b1, DW'(s)};
      end else bubbles++;
      tick();
    end
    colv = 0;
  endtask

  initial begin
    int z [5] = '{0, 0, 0, 0, 0};
    cfg_we = 0; colv = 0;
    for (int r = 0; r < 5; r++) col5[r] = 0;
    for (int k = 0; k < N5; k++) begin f5[k] = 0; sr5[k] = 0; sc5[k] = 0; co5[k] = 0; cv5[k] = 0; end
    for (int k = 0; k < N2; k++) begin f2[k] = 0; sr2[k] = 0; sc2[k] = 0; co2[k] = 0; cv2[k] = 0; end
    for (int o = 0; o < S5; o++) ad5[o] = 0;
    for (int o = 0; o < S2; o++) ad2[o] = 0;
    for (int i = 0; i < 5; i++) hist.push_back(z);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: convolution with signed coefficients
    configure(0);
    load_coeffs(-8, 8);
    stream(300);
    repeat (8) tick();
    // phase 2: sum of absolute differences against a reference patch
    configure(1);
    load_coeffs(0, 255);
    stream(300);
    repeat (8) tick();
    // phase 3: threshold count
    configure(2);
    load_coeffs(0, 255);
    stream(300);
    repeat (8) tick();
    // phase 4: bypass the reduction PE (route map PE 3 to the output)
    configure(0);
    load_coeffs(-8, 8);
    configure(3);
    stream(200);
    repeat (8) tick();
    checks++;
    if (exp5.num() != 0 || exp2.num() != 0 || bubbles == 0 || outs5 < 800) begin
      failures++;
      $display("missing outputs: %0d %0d bubbles=%0d outs=%0d", exp5.num(), exp2.num(), bubbles, outs5);
    end
    $display("outputs=%0d bubbles=%0d", outs5, bubbles);
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
