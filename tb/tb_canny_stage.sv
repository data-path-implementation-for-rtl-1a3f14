// tb_canny_stage: one stage of an edge detector mapped onto a wave pipeline.
//
// The data-flow graph is the one of a Canny gradient stage: five products of
// pixels with constant coefficients and one negated pixel in the first
// level, a five-input sum, an arithmetic right shift, a max against the
// negated pixel and a min against an upper bound:
//
//   out = min( max( (sum_{i<5} p_i * c_i) >>> K, -p_5 ), HI )
//
// With two-input PEs the five-input sum becomes a three-level tree, so the
// graph needs 7 stages; the widest level has 6 operations, so the wave
// pipeline is instantiated 6 PEs high and 7 stages wide (the default 3x4
// grid is too small for it). The mapping, stage by stage (PE index in
// brackets, "nop" carries a value forward one stage):
//
//   0: [0..4] mult(p_i, const c_i)        [5] inv(p_5)
//   1: [0] sum(m0,m1) [1] sum(m2,m3) [2] nop(m4) [3] nop(-p5)
//   2: [0] sum        [1] nop(m4)    [2] nop(-p5)
//   3: [0] sum        [1] nop(-p5)
//   4: [0] rshift(sum, const K)      [1] nop(-p5)
//   5: [0] max
//   6: [0] min(max, const HI)  -> system output 0
//
// Random 8-bit pixels with random idle cycles are streamed for several
// coefficient sets; every output is compared in order with the formula above
// and must appear exactly 7*(2+2) = 28 cycles after its inputs. The max and
// min must each decide both ways at least once.
module tb_canny_stage;
  import spa_pkg::*;

  localparam int DW = 16, H = 6, W = 7, LAT = W * 4;
  localparam int SELW = idx_width(func_count(FUNCS_ALL));
  localparam int AW = idx_width(H);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we;
  logic [SELW-1:0] fn [W][H];
  logic sc [W][H];
  logic [DW-1:0] cst [W][H];
  logic [AW-1:0] ad [W][2*H];
  logic [DW-1:0] si [2*H];
  logic siv [2*H];
  logic [DW-1:0] so [H];
  logic sov [H];

  wave_pipeline #(.DATA_W(DW), .STAGE_H(H), .STAGE_W(W)) dut (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(fn), .pe_cfg_sel_sc(sc), .pe_cfg_const(cst),
    .sw_cfg_addr(ad), .sys_in(si), .sys_in_valid(siv), .sys_out(so), .sys_out_valid(sov));

  int cycle = 0;
  int exp_q [$], exp_cyc [$];
  int coef [5], shamt, hi;
  int n_out = 0, n_max_neg = 0, n_max_sum = 0, n_min_hi = 0, n_min_val = 0, n_bubbles = 0;

  function automatic int s16(int v);
    logic [31:0] u;
    u = v;
    return int'($signed(u[DW-1:0]));
  endfunction

  always @(posedge clk) begin
    #1;
    if (sov[0]) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("%0t unexpected output", $time);
      end else begin
        int e, ec;
        e = exp_q.pop_front(); ec = exp_cyc.pop_front();
        if (so[0] !== DW'(e) || cycle != ec) begin
          failures++;
          if (failures < 10) $display("%0t got %0d@%0d exp %0d@%0d", $time, $signed(so[0]), cycle, e, ec);
        end
        n_out++;
      end
    end
  end

  task automatic tick();
    @(posedge clk);
    cycle++;
    @(negedge clk);
  endtask

  task automatic nop_all();
    for (int s = 0; s < W; s++) begin
      for (int i = 0; i < H; i++) begin fn[s][i] = SELW'(OP_NOP); sc[s][i] = 0; cst[s][i] = '0; end
      for (int o = 0; o < 2*H; o++) ad[s][o] = '0;
    end
  endtask

  // Program the graph with new coefficients, shift and bound.
  task automatic configure();
    nop_all();
    for (int i = 0; i < 5; i++) begin
      coef[i] = int'($urandom % 17) - 8;
      fn[0][i] = SELW'(OP_MULT); sc[0][i] = 1; cst[0][i] = DW'(coef[i]);
    end
    fn[0][5] = SELW'(OP_INV);
    // stage 1
    fn[1][0] = SELW'(OP_SUM); fn[1][1] = SELW'(OP_SUM);
    ad[0][0] = 0; ad[0][1] = 1; ad[0][2] = 2; ad[0][3] = 3; ad[0][4] = 4; ad[0][6] = 5;
    // stage 2
    fn[2][0] = SELW'(OP_SUM);
    ad[1][0] = 0; ad[1][1] = 1; ad[1][2] = 2; ad[1][4] = 3;
    // stage 3
    fn[3][0] = SELW'(OP_SUM);
    ad[2][0] = 0; ad[2][1] = 1; ad[2][2] = 2;
    // stage 4
    shamt = int'($urandom % 4);
    fn[4][0] = SELW'(OP_RSHIFT); sc[4][0] = 1; cst[4][0] = DW'(shamt);
    ad[3][0] = 0; ad[3][2] = 1;
    // stage 5
    fn[5][0] = SELW'(OP_MAX);
    ad[4][0] = 0; ad[4][1] = 1;
    // stage 6
    hi = 200 + int'($urandom % 800);
    fn[6][0] = SELW'(OP_MIN); sc[6][0] = 1; cst[6][0] = DW'(hi);
    ad[5][0] = 0;
    // system output 0 <- PE 0 of the last stage
    ad[6][0] = 0;
    cfg_we = 1;
    tick();
    cfg_we = 0;
  endtask

  task automatic stream(int n);
    for (int k = 0; k < n; k++) begin
      bit v;
      v = ($urandom % 5) != 0;
      for (int j = 0; j < 2*H; j++) begin si[j] = DW'($urandom % 256); siv[j] = v; end
      if (v) begin
        int sum, sh, neg, mx, mn;
        sum = 0;
        for (int i = 0; i < 5; i++) sum += int'(si[2*i]) * coef[i];
        sh  = s16(sum) >>> shamt;
        neg = -int'(si[10]);
        mx  = (sh > neg) ? sh : neg;
        if (sh > neg) n_max_sum++; else n_max_neg++;
        mn  = (mx < hi) ? mx : hi;
        if (mx < hi) n_min_val++; else n_min_hi++;
        exp_q.push_back(s16(mn));
        exp_cyc.push_back(cycle + LAT);
      end else n_bubbles++;
      tick();
    end
    for (int j = 0; j < 2*H; j++) siv[j] = 0;
  endtask

  initial begin
    cfg_we = 0;
    nop_all();
    for (int j = 0; j < 2*H; j++) begin si[j] = '0; siv[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      configure();
      stream(500);
      repeat (LAT + 4) tick();
    end
    checks++;
    if (exp_q.size() != 0 || n_out < 1200) begin
      failures++;
      $display("outputs %0d, %0d still expected", n_out, exp_q.size());
    end
    checks++;
    if (n_max_sum == 0 || n_max_neg == 0 || n_min_hi == 0 || n_min_val == 0 || n_bubbles == 0) begin
      failures++;
      $display("a decision never went both ways: %0d %0d %0d %0d %0d",
               n_max_sum, n_max_neg, n_min_hi, n_min_val, n_bubbles);
    end
    $display("outputs=%0d max(sum)=%0d max(neg)=%0d min(hi)=%0d bubbles=%0d",
             n_out, n_max_sum, n_max_neg, n_min_hi, n_bubbles);
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
