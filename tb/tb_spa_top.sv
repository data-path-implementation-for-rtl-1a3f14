// tb_spa_top: end-to-end testbench of spa_top at its default parameters
// (64x64 image, 5x5 convolution topology, three wave-pipeline kernels of
// 4, 2 and 3 stages, 16-bit data).
//
// Convolution kernel: the fabric is configured as a 5x5 convolution, the
// coefficients are loaded through the switch and a 64x64 frame of random
// 8-bit pixels is streamed with random idle cycles. The configuration is then
// switched at run time to a sum of absolute differences against a reference
// patch and a second frame is streamed. Every output is compared, in order,
// with a model that forms each window from the pixel stream itself (rows
// above the image read zero, windows at the left edge wrap onto the previous
// row), and each output must leave exactly 7 cycles after its pixel entered
// (line buffer 1 + convolution topology 6).
//
// Application pipeline: kernel 0 is a box-style filter (sum of the six
// pixels of the 2x3 window, shifted right by 2), kernel 1 the maximum of four
// window pixels, kernel 2 a threshold against a stored constant. Two frames
// go through; each kernel's output stream is recomputed by the testbench from
// the previous one and the final stream is compared in order, each pixel 42
// cycles after its input: per kernel 1 (line buffer) + 1 (stencil register)
// + 4 cycles per wave stage, i.e. 18 + 10 + 14.
//
// Mechanisms counted (each must occur): idle input cycles (bubbles) on both
// halves, coefficient loads through the switch, run-time reconfiguration of
// the convolution (mode switch), frame wrap in the line buffers, top-border
// zero windows and windows wrapping at the left edge.
module tb_spa_top;
  import spa_pkg::*;

  localparam int DW = 16, IW = 64, IH = 64, NPIX = IW * IH;
  localparam int CN = 25, CS = 51;
  localparam int CSELW = idx_width(func_count(FUNCS_MAP));
  localparam int CAW = $clog2(CS);
  localparam int NK = 3, MW = 4, SH = 3;
  localparam int ASELW = idx_width(func_count(FUNCS_ALL));
  localparam int AAW = idx_width(SH);
  localparam int CONV_LAT = 7, APP_LAT = 42;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we;
  logic [CSELW-1:0] c_fn [CN]; logic c_sr [CN]; logic c_sc [CN]; logic [CAW-1:0] c_ad [CS];
  logic [DW-1:0] c_co [CN]; logic c_cv [CN];
  logic [DW-1:0] c_pin; logic c_pv; logic [DW-1:0] c_pout; logic c_pov;
  logic [ASELW-1:0] a_fn [NK][MW][SH]; logic a_sc [NK][MW][SH];
  logic [DW-1:0] a_cst [NK][MW][SH]; logic [AAW-1:0] a_ad [NK][MW][2*SH];
  logic [DW-1:0] a_pin; logic a_pv; logic [DW-1:0] a_pout; logic a_pov;

  spa_top dut (
    .clk, .rst_n, .cfg_we,
    .conv_pe_cfg_func(c_fn), .conv_pe_cfg_sel_sr(c_sr), .conv_pe_cfg_sel_sc(c_sc),
    .conv_sw_cfg_addr(c_ad), .conv_coeff_in(c_co), .conv_coeff_valid(c_cv),
    .conv_pix_in(c_pin), .conv_pix_in_valid(c_pv), .conv_pix_out(c_pout),
    .conv_pix_out_valid(c_pov),
    .app_pe_cfg_func(a_fn), .app_pe_cfg_sel_sc(a_sc), .app_pe_cfg_const(a_cst),
    .app_sw_cfg_addr(a_ad), .app_pix_in(a_pin), .app_pix_in_valid(a_pv),
    .app_pix_out(a_pout), .app_pix_out_valid(a_pov));

  // ---------------- counters of mechanisms ----------------
  int n_bubble_conv = 0, n_bubble_app = 0, n_coeff_loads = 0, n_mode_switch = 0;
  int n_frame_wrap = 0, n_top_pad = 0, n_left_wrap = 0;

  // ---------------- stream bookkeeping ----------------
  int cycle = 0;
  int conv_stream [$];          // all conv pixels ever sent (stream order)
  int conv_exp [$];             // expected outputs, in order
  int conv_exp_cyc [$];         // cycle each is due
  int app_exp [$];
  int app_exp_cyc [$];
  int conv_outs = 0, app_outs = 0;

  int coef [CN];
  int conv_mode = 0;            // 0 convolution, 1 SAD

  // Pixel of a stream at window offset: row offset dr rows up, column
  // offset dc shifts back, for the window ending at stream index n.
  function automatic int win_pix(ref int s [$], input int n, input int dr, input int dc);
    int m, y;
    m = n - dc;
    if (m < 0) return 0;
    y = (m / IW) % IH;
    if (y - dr < 0) return 0;
    return s[m - dr * IW];
  endfunction

  function automatic int s16(int v);
    logic [31:0] u;
    u = v;
    return int'($signed(u[DW-1:0]));
  endfunction

  // Collector: compares outputs in order and checks their cycle.
  always @(posedge clk) begin
    #1;
    if (c_pov) begin
      checks++;
      if (conv_exp.size() == 0) begin
        failures++;
        $display("%0t unexpected conv output", $time);
      end else begin
        int e, ec;
        e = conv_exp.pop_front(); ec = conv_exp_cyc.pop_front();
        if (c_pout !== DW'(e) || cycle != ec) begin
          failures++;
          if (failures < 10) $display("%0t conv got %h@%0d exp %h@%0d", $time, c_pout, cycle, DW'(e), ec);
        end
        conv_outs++;
      end
    end
    if (a_pov) begin
      checks++;
      if (app_exp.size() == 0) begin
        failures++;
        $display("%0t unexpected app output", $time);
      end else begin
        int e, ec;
        e = app_exp.pop_front(); ec = app_exp_cyc.pop_front();
        if (a_pout !== DW'(e) || cycle != ec) begin
          failures++;
          if (failures < 10) $display("%0t app got %h@%0d exp %h@%0d", $time, a_pout, cycle, DW'(e), ec);
        end
        app_outs++;
      end
    end
  end

  task automatic tick();
    @(posedge clk);
    cycle++;
    #2;
    @(negedge clk);
  endtask

  // ---------------- convolution half ----------------
  task automatic conv_configure(int mode);
    int f;
    f = (mode == 0) ? func_index(FUNCS_MAP, OP_MULT) : func_index(FUNCS_MAP, OP_ABSDIFF);
    for (int k = 0; k < CN; k++) begin
      c_fn[k] = CSELW'(f); c_sr[k] = 1; c_sc[k] = 1;
      c_ad[2*k] = CAW'(k); c_ad[2*k+1] = CAW'(k);
    end
    c_ad[2*CN] = CAW'(2 * CN);
    if (conv_mode != mode) n_mode_switch++;
    conv_mode = mode;
  endtask

  task automatic conv_load_coeffs(int lo, int hi);
    for (int k = 0; k < CN; k++) begin
      coef[k] = lo + int'($urandom % (hi - lo + 1)); c_co[k] = DW'(coef[k]); c_cv[k] = 1;
    end
    tick();
    for (int k = 0; k < CN; k++) c_cv[k] = 0;
    repeat (4) tick();
    n_coeff_loads++;
  endtask

  // Expected convolution output for the window ending at stream index n.
  // Window row r (0 = top) is 4-r rows above; PE column c is c shifts back.
  function automatic int conv_ref(int n);
    int s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        int p, k;
        p = win_pix(conv_stream, n, 4 - r, c);
        k = coef[r * 5 + c];
        s += (conv_mode == 0) ? p * k : ((p > k) ? p - k : k - p);
      end
    return s;
  endfunction

  // ---------------- application half ----------------
  int app_in [$], k0_out [$], k1_out [$], k2_out [$];

  task automatic app_configure();
    for (int k = 0; k < NK; k++)
      for (int s = 0; s < MW; s++) begin
        for (int i = 0; i < SH; i++) begin
          a_fn[k][s][i] = ASELW'(OP_NOP); a_sc[k][s][i] = 0; a_cst[k][s][i] = 0;
        end
        for (int o = 0; o < 2*SH; o++) a_ad[k][s][o] = '0;
      end
    // system input j = window pixel [j/3][j%3]; PE i of stage 0 takes inputs 2i, 2i+1
    // kernel 0: ((w00+w01) + (w02+w10)) + (w11+w12), then >>> 2
    a_fn[0][0] = '{ASELW'(OP_SUM), ASELW'(OP_SUM), ASELW'(OP_SUM)};
    a_ad[0][0] = '{AAW'(0), AAW'(1), AAW'(2), AAW'(0), AAW'(0), AAW'(0)};
    a_fn[0][1] = '{ASELW'(OP_SUM), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_ad[0][1] = '{AAW'(0), AAW'(1), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    a_fn[0][2] = '{ASELW'(OP_SUM), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_ad[0][2] = '{AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    a_fn[0][3] = '{ASELW'(OP_RSHIFT), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_sc[0][3][0] = 1; a_cst[0][3][0] = 2;
    a_ad[0][3] = '{AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    // kernel 1: max(max(w00,w01), max(w02,w10))
    a_fn[1][0] = '{ASELW'(OP_MAX), ASELW'(OP_MAX), ASELW'(OP_NOP)};
    a_ad[1][0] = '{AAW'(0), AAW'(1), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    a_fn[1][1] = '{ASELW'(OP_MAX), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_ad[1][1] = '{AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    // kernel 2: (w00 > 100) through nop stages
    a_fn[2][0] = '{ASELW'(OP_GT), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_sc[2][0][0] = 1; a_cst[2][0][0] = 100;
    a_ad[2][0] = '{AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    a_fn[2][1] = '{ASELW'(OP_NOP), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_ad[2][1] = '{AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
    a_fn[2][2] = '{ASELW'(OP_NOP), ASELW'(OP_NOP), ASELW'(OP_NOP)};
    a_ad[2][2] = '{AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0), AAW'(0)};
  endtask

  function automatic int k0_ref(ref int s [$], input int n);
    int t;
    // window row 0 is one row up, row 1 is the current row
    t = s16(s16(s16(win_pix(s, n, 1, 0) + win_pix(s, n, 1, 1)) +
                s16(win_pix(s, n, 1, 2) + win_pix(s, n, 0, 0))) +
            s16(win_pix(s, n, 0, 1) + win_pix(s, n, 0, 2)));
    return s16(t >>> 2);
  endfunction

  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

  function automatic int k1_ref(ref int s [$], input int n);
    return max2(max2(win_pix(s, n, 1, 0), win_pix(s, n, 1, 1)),
                max2(win_pix(s, n, 1, 2), win_pix(s, n, 0, 0)));
  endfunction

  function automatic int k2_ref(ref int s [$], input int n);
    return (win_pix(s, n, 1, 0) > 100) ? 1 : 0;
  endfunction

  // ---------------- stimulus ----------------
  // Stream one frame into both halves; conv_on / app_on select which.
  task automatic stream_frame(bit conv_on, bit app_on);
    int sent_c = 0, sent_a = 0;
    while ((conv_on && sent_c < NPIX) || (app_on && sent_a < NPIX)) begin
      bit gc, ga;
      gc = conv_on && sent_c < NPIX && (($urandom % 6) != 0);
      ga = app_on && sent_a < NPIX && (($urandom % 6) != 0);
      if (conv_on && sent_c < NPIX && !gc) n_bubble_conv++;
      if (app_on && sent_a < NPIX && !ga) n_bubble_app++;
      c_pv = gc; a_pv = ga;
      if (gc) begin
        int p, n;
        p = int'($urandom % 256);
        c_pin = DW'(p);
        conv_stream.push_back(p);
        n = conv_stream.size() - 1;
        if ((n / IW) % IH < 4) n_top_pad++;
        if (n % IW < 4 && n >= IW) n_left_wrap++;
        conv_exp.push_back(conv_ref(n));
        conv_exp_cyc.push_back(cycle + CONV_LAT);
        sent_c++;
      end
      if (ga) begin
        int p, n;
        p = int'($urandom % 256);
        a_pin = DW'(p);
        app_in.push_back(p);
        n = app_in.size() - 1;
        k0_out.push_back(k0_ref(app_in, n));
        k1_out.push_back(k1_ref(k0_out, n));
        k2_out.push_back(k2_ref(k1_out, n));
        app_exp.push_back(k2_out[n]);
        app_exp_cyc.push_back(cycle + APP_LAT);
        sent_a++;
      end
      tick();
    end
    c_pv = 0; a_pv = 0;
    n_frame_wrap++;
  endtask

  initial begin
    cfg_we = 0; c_pin = 0; c_pv = 0; a_pin = 0; a_pv = 0;
    for (int k = 0; k < CN; k++) begin c_fn[k] = 0; c_sr[k] = 0; c_sc[k] = 0; c_co[k] = 0; c_cv[k] = 0; end
    for (int o = 0; o < CS; o++) c_ad[o] = 0;
    app_configure();
    conv_configure(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_we = 1; tick(); cfg_we = 0;
    conv_load_coeffs(-8, 8);
    // Frame 1: convolution and application pipeline, both running.
    stream_frame(1, 1);
    repeat (60) tick();
    // Run-time mode switch: sum of absolute differences, second frame.
    conv_configure(1);
    cfg_we = 1; tick(); cfg_we = 0;
    conv_load_coeffs(0, 255);
    stream_frame(1, 1);
    repeat (80) tick();
    // ---- final checks ----
    checks++;
    if (conv_outs != 2 * NPIX || conv_exp.size() != 0) begin
      failures++;
      $display("conv outputs %0d, %0d still expected", conv_outs, conv_exp.size());
    end
    checks++;
    if (app_outs != 2 * NPIX || app_exp.size() != 0) begin
      failures++;
      $display("app outputs %0d, %0d still expected", app_outs, app_exp.size());
    end
    $display("mechanisms: conv bubbles=%0d app bubbles=%0d coeff loads=%0d mode switches=%0d frames=%0d top-pad windows=%0d left-wrap windows=%0d",
             n_bubble_conv, n_bubble_app, n_coeff_loads, n_mode_switch, n_frame_wrap, n_top_pad, n_left_wrap);
    checks++; if (n_bubble_conv == 0) begin failures++; $display("no conv bubble"); end
    checks++; if (n_bubble_app == 0)  begin failures++; $display("no app bubble"); end
    checks++; if (n_coeff_loads == 0) begin failures++; $display("no coefficient load"); end
    checks++; if (n_mode_switch == 0) begin failures++; $display("no mode switch"); end
    checks++; if (n_frame_wrap < 2)   begin failures++; $display("no frame wrap"); end
    checks++; if (n_top_pad == 0)     begin failures++; $display("no top padding"); end
    checks++; if (n_left_wrap == 0)   begin failures++; $display("no left wrap"); end
    $display("conv outputs=%0d app outputs=%0d", conv_outs, app_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
