// tb_wave_pipeline: self-checking testbench of the wave pipeline topology.
//
// The default 3x4 wave pipeline (stage height 3, 4 stages, 16-bit) runs:
//   1 a hand-mapped kernel in the style of an edge-detection stage:
//       out0 = max((x0*x1 + x2*x3) >>> 2, -x4)
//     stage 0: mult, mult, inv; stage 1: sum, nop, nop; stage 2: rshift by a
//     stored constant, nop; stage 3: max. The expected value is computed
//     directly from that formula.
//   2 twenty random configurations (random functions, constant selects,
//     constants and routes), each followed by a stream of random inputs with
//     random valid bits, compared against a stage-by-stage model written with
//     integer arithmetic.
// Every output word and valid bit is checked every cycle, at the latency of
// 4 x (2 + 2) = 16 cycles. Configuration changes are made while the pipeline
// is empty. A fixed variant (PE_CONFIGURABLE = SW_CONFIGURABLE = 0) built with
// a fixed version of the kernel (no shift) is checked on the same stream.
module tb_wave_pipeline;
  import spa_pkg::*;

  localparam int DW = 16, H = 3, W = 4, LAT = 16;
  localparam int SELW = idx_width(func_count(FUNCS_ALL));
  localparam int AW = idx_width(H);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, valid_outs = 0;

  logic                cfg_we;
  logic [SELW-1:0]     fn  [W][H];
  logic                ssc [W][H];
  logic [DW-1:0]       cst [W][H];
  logic [AW-1:0]       ad  [W][2*H];
  logic [DW-1:0]       si  [2*H];
  logic                siv [2*H];
  logic [DW-1:0]       so  [H], sof [H];
  logic                sov [H], sovf [H];

  wave_pipeline #(.DATA_W(DW)) dut (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(fn), .pe_cfg_sel_sc(ssc), .pe_cfg_const(cst),
    .sw_cfg_addr(ad), .sys_in(si), .sys_in_valid(siv), .sys_out(so), .sys_out_valid(sov));

  // Fixed variant. Function indices into the full list equal the operation
  // codes. A fixed PE takes y from its operand port, so there is no stored
  // shift amount and the fixed kernel computes max(x0*x1 + x2*x3, -x4):
  //   stage 0: mult(x0,x1), mult(x2,x3), inv(x4)
  //   stage 1: sum, nop ; stage 2: nop, nop ; stage 3: max
  localparam logic [W*H*SELW-1:0] FIX_FUNCS = {
    // stage 3: PE11 PE10 PE9
    SELW'(OP_NOP), SELW'(OP_NOP), SELW'(OP_MAX),
    // stage 2
    SELW'(OP_NOP), SELW'(OP_NOP), SELW'(OP_NOP),
    // stage 1
    SELW'(OP_NOP), SELW'(OP_NOP), SELW'(OP_SUM),
    // stage 0
    SELW'(OP_INV), SELW'(OP_MULT), SELW'(OP_MULT)};
  // routes: switch s output o at [(s*2H+o)*AW]
  localparam logic [W*2*H*AW-1:0] FIX_ADDR = {
    // switch 3 (outputs 0..2 used): out0 <- PE9
    AW'(0), AW'(0), AW'(0), AW'(0), AW'(0), AW'(0),
    // switch 2: out0 <- PE6, out1 <- PE7
    AW'(0), AW'(0), AW'(0), AW'(0), AW'(1), AW'(0),
    // switch 1: out0 <- PE3 (to PE6 x), out2 <- PE4 (to PE7 x)
    AW'(0), AW'(0), AW'(0), AW'(1), AW'(0), AW'(0),
    // switch 0: out0 <- PE0, out1 <- PE1, out2 <- PE2
    AW'(0), AW'(0), AW'(0), AW'(2), AW'(1), AW'(0)};

  wave_pipeline #(.DATA_W(DW), .PE_CONFIGURABLE(1'b0), .SW_CONFIGURABLE(1'b0),
                  .FIXED_FUNCS(FIX_FUNCS), .FIXED_ADDR(FIX_ADDR)) dut_fix (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(fn), .pe_cfg_sel_sc(ssc), .pe_cfg_const(cst),
    .sw_cfg_addr(ad), .sys_in(si), .sys_in_valid(siv), .sys_out(sof), .sys_out_valid(sovf));

  // ---------------- model ----------------
  int   m_fn [W][H]; bit m_ssc [W][H]; int m_cst [W][H]; int m_ad [W][2*H];
  logic [H*(DW+1)-1:0] expq [int];     // per cycle: {valid, data} per output
  logic [DW:0]         expf [int];     // fixed instance, output 0
  int cycle = 0;

  function automatic int s16(longint v);
    return int'($signed(v[DW-1:0]));
  endfunction

  function automatic longint fnc(int op, int x, int y);
    case (op)
      0:  return x;
      1:  return x + y;
      2:  return x - y;
      3:  return longint'(x) * y;
      4:  return (x > y) ? x - y : y - x;
      5:  return (x > y) ? 1 : 0;
      6:  return (x < y) ? 1 : 0;
      7:  return (x > y) ? x : y;
      8:  return (x < y) ? x : y;
      9:  return x >>> (y & 31);
      10: return -x;
      default: return 0;
    endcase
  endfunction

  // Evaluate one input set through the configured graph.
  function automatic logic [H*(DW+1)-1:0] eval(int xin [2*H], bit vin [2*H]);
    int opv [2*H]; bit opvv [2*H];
    int res [H];   bit resv [H];
    logic [H*(DW+1)-1:0] r;
    opv = xin; opvv = vin;
    for (int s = 0; s < W; s++) begin
      for (int i = 0; i < H; i++) begin
        int  y; bit vy, un;
        un = (m_fn[s][i] == 0) || (m_fn[s][i] == 10);
        y  = m_ssc[s][i] ? m_cst[s][i] : opv[2*i+1];
        vy = un ? 1'b1 : (m_ssc[s][i] ? 1'b1 : opvv[2*i+1]);
        resv[i] = opvv[2*i] && vy && (m_fn[s][i] < NUM_OPS);
        res[i]  = (m_fn[s][i] < NUM_OPS) ? s16(fnc(m_fn[s][i], opv[2*i], y)) : 0;
      end
      for (int o = 0; o < 2*H; o++) begin
        if (s == W - 1 && o >= H) break;
        opv[o]  = (m_ad[s][o] < H) ? res[m_ad[s][o]] : 0;
        opvv[o] = (m_ad[s][o] < H) ? resv[m_ad[s][o]] : 1'b0;
      end
    end
    for (int o = 0; o < H; o++) r[o*(DW+1) +: DW+1] = {opvv[o], DW'(opv[o])};
    return r;
  endfunction

  task automatic tick();
    @(posedge clk); #1;
    cycle++;
    begin
      logic [H*(DW+1)-1:0] e;
      e = expq.exists(cycle) ? expq[cycle] : '0;
      for (int o = 0; o < H; o++) begin
        logic [DW:0] eo;
        eo = e[o*(DW+1) +: DW+1];
        checks++;
        if (sov[o] !== eo[DW] || (eo[DW] && so[o] !== eo[DW-1:0])) begin
          failures++;
          if (failures < 10) $display("%0t out%0d got %0d/%h exp %0d/%h", $time, o, sov[o], so[o],
                                      eo[DW], eo[DW-1:0]);
        end
        if (sov[o]) valid_outs++;
      end
      expq.delete(cycle);
      if (expf.exists(cycle)) begin
        checks++;
        if (!sovf[0] || sof[0] !== expf[cycle][DW-1:0]) begin
          failures++;
          if (failures < 10) $display("%0t fixed got %0d/%h exp %h", $time, sovf[0], sof[0], expf[cycle][DW-1:0]);
        end
        expf.delete(cycle);
      end
    end
    @(negedge clk);
  endtask

  task automatic apply_cfg();
    for (int s = 0; s < W; s++) begin
      for (int i = 0; i < H; i++) begin
        fn[s][i] = SELW'(m_fn[s][i]); ssc[s][i] = m_ssc[s][i]; cst[s][i] = DW'(m_cst[s][i]);
      end
      for (int o = 0; o < 2*H; o++) ad[s][o] = AW'(m_ad[s][o]);
    end
    cfg_we = 1;
    tick();
    cfg_we = 0;
  endtask

  // Stream n input sets; directed = 1 also checks the formula of the
  // hand-mapped kernel.
  task automatic stream(int n, int vprob, bit directed);
    for (int t = 0; t < n; t++) begin
      int  xin [2*H]; bit vin [2*H];
      logic [H*(DW+1)-1:0] e;
      for (int j = 0; j < 2*H; j++) begin
        xin[j] = s16($urandom % 65536);
        if (directed && j < 4) xin[j] = int'($urandom % 256) - 128;
        vin[j] = ($urandom % 100) < vprob;
        si[j] = DW'(xin[j]); siv[j] = vin[j];
      end
      e = eval(xin, vin);
      if (directed && vin[0] && vin[1] && vin[2] && vin[3] && vin[4]) begin
        int f;
        f = s16((xin[0] * xin[1] + xin[2] * xin[3]) >>> 2);
        f = (f > s16(-xin[4])) ? f : s16(-xin[4]);
        checks++;
        if (e[DW] !== 1'b1 || e[DW-1:0] !== DW'(f)) begin
          failures++;
          $display("model disagrees with kernel formula");
        end
      end
      expq[cycle + LAT] = e;
      if (vin[0] && vin[1] && vin[2] && vin[3] && vin[4]) begin
        int f;
        f = s16(xin[0] * xin[1] + xin[2] * xin[3]);
        f = (f > s16(-xin[4])) ? f : s16(-xin[4]);
        expf[cycle + LAT] = {1'b1, DW'(f)};
      end
      tick();
    end
    for (int j = 0; j < 2*H; j++) siv[j] = 0;
    repeat (LAT + 2) tick();
  endtask

  initial begin
    cfg_we = 0;
    for (int j = 0; j < 2*H; j++) begin si[j] = 0; siv[j] = 0; end
    for (int s = 0; s < W; s++) begin
      for (int i = 0; i < H; i++) begin m_fn[s][i] = 0; m_ssc[s][i] = 0; m_cst[s][i] = 0; end
      for (int o = 0; o < 2*H; o++) m_ad[s][o] = 0;
    end
    apply_cfg();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- hand-mapped kernel ----
    m_fn[0] = '{3, 3, 10};                       // mult, mult, inv
    m_fn[1] = '{1, 0, 0};                        // sum, nop, nop
    m_fn[2] = '{9, 0, 0};                        // rshift, nop, nop
    m_fn[3] = '{7, 0, 0};                        // max
    m_ssc[2][0] = 1; m_cst[2][0] = 2;            // shift by stored constant 2
    m_ad[0] = '{0, 1, 2, 0, 0, 0};               // PE3 <- PE0,PE1 ; PE4 <- PE2
    m_ad[1] = '{0, 0, 1, 0, 0, 0};               // PE6 <- PE3 ; PE7 <- PE4
    m_ad[2] = '{0, 1, 0, 0, 0, 0};               // PE9 <- PE6, PE7
    m_ad[3] = '{0, 1, 2, 0, 0, 0};
    apply_cfg();
    stream(200, 90, 1);
    // ---- random configurations ----
    for (int k = 0; k < 20; k++) begin
      for (int s = 0; s < W; s++) begin
        for (int i = 0; i < H; i++) begin
          m_fn[s][i]  = int'($urandom % 12);       // 11 = not a function: invalid
          m_ssc[s][i] = $urandom % 2;
          m_cst[s][i] = s16($urandom % 65536);
        end
        for (int o = 0; o < 2*H; o++) m_ad[s][o] = int'($urandom % 4);   // 3 = no input
      end
      apply_cfg();
      stream(60, 85, 0);
    end
    checks++;
    if (valid_outs < 100) begin
      failures++;
      $display("too few valid outputs: %0d", valid_outs);
    end
    $display("valid outputs=%0d", valid_outs);
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
