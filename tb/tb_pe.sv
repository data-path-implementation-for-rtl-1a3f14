// tb_pe: self-checking testbench of the programmable element.
//
// Three PEs run side by side on the same random operand stream:
//   u_map  the default PE (functions mult, absDiff, gt, lt; pipe depth 2),
//   u_all  a PE with every function and pipe depth 3,
//   u_fix  a fixed (non-configurable) PE that always runs sub,
//   u_d1   the default PE at pipe depth 1, which must produce u_map's
//          outputs one cycle earlier.
// A cycle-level reference model (class pe_model) follows each PE's
// registers independently of the RTL: shift register, constant register,
// operand flops, configuration registers, the function itself written with
// integer arithmetic, and the output valid rule. Configurations, local
// register selects and valid bits are randomised; every cycle the outputs
// (both result words and valid) are compared, so the latency of 2 and 3
// cycles is checked along with the values. The shift-out port is checked to
// follow the shift register and its enable.
module tb_pe;
  import spa_pkg::*;

  localparam int DW = 16;

  // ------------------------------------------------------------------
  // reference model
  class pe_model;
    func_mask_t mask;
    int         depth;
    int         nfunc;
    int         sel_func;
    bit         sel_sr, sel_sc;
    int         sr, sc;
    bit         sr_fresh, sc_loaded;
    int         a, b;
    bit         va, vb;
    longint     q_res[$];
    bit         q_val[$];

    function new(func_mask_t m, int d, int fixed_func, bit fixed);
      mask  = m;
      depth = d;
      nfunc = 0;
      for (int k = 0; k < NUM_OPS; k++) if (m[k]) nfunc++;
      sel_func = fixed ? fixed_func : 0;
      sel_sr = 0; sel_sc = 0; sr = 0; sc = 0; sr_fresh = 0; sc_loaded = 0;
      a = 0; b = 0; va = 0; vb = 0;
      for (int i = 0; i < d - 2; i++) begin q_res.push_back(0); q_val.push_back(0); end
    endfunction

    function int op_of(int idx);
      int seen = 0;
      for (int k = 0; k < NUM_OPS; k++)
        if (mask[k]) begin
          if (seen == idx) return k;
          seen++;
        end
      return 0;
    endfunction

    static function longint fn(int op, int x, int y);
      case (op)
        0:  return x;
        1:  return x + y;
        2:  return x - y;
        3:  return longint'(x) * longint'(y);
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

    // One clock edge. Inputs are the values the PE samples at that edge.
    function void clock(bit cfg_we, int cfg_func, bit cfg_sr, bit cfg_sc, bit fixed,
                        int srin, bit srin_v, int scin, bit scin_v,
                        int a_in, bit va_in, int b_in, bit vb_in);
      int  x, y, op;
      bit  v0, v1, v2;
      // combinational part uses the registers as they are before this edge
      x  = sel_sr ? sr : a;
      y  = sel_sc ? sc : b;
      v2 = sel_func < nfunc;
      op = v2 ? op_of(sel_func) : 0;
      v0 = sel_sr ? sr_fresh : va;
      v1 = (op == 0 || op == 10) ? 1 : (sel_sc ? sc_loaded : vb);
      q_res.push_back(v2 ? fn(op, x, y) : 0);
      q_val.push_back(v0 & v1 & v2);
      // register updates
      sr_fresh = srin_v;
      if (srin_v) sr = srin;
      if (scin_v) begin sc = scin; sc_loaded = 1; end
      a = a_in; va = va_in; b = b_in; vb = vb_in;
      if (cfg_we && !fixed) begin sel_func = cfg_func; sel_sr = cfg_sr; sel_sc = cfg_sc; end
    endfunction

    function void expected(output longint res, output bit val);
      res = q_res[0];
      val = q_val[0];
    endfunction

    function void retire();
      void'(q_res.pop_front());
      void'(q_val.pop_front());
    endfunction
  endclass

  // ------------------------------------------------------------------
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // shared stimulus
  logic [DW-1:0] srin, scin, ain [2];
  logic          srin_v, scin_v, av [2];
  logic          cfg_we;
  logic          sel_sr, sel_sc;

  localparam int W_MAP = idx_width(func_count(FUNCS_MAP));
  localparam int W_ALL = idx_width(func_count(FUNCS_ALL));
  logic [W_MAP-1:0] func_map;
  logic [W_ALL-1:0] func_all;

  logic [DW-1:0] o_map [2], o_all [2], o_fix [2];
  logic          v_map, v_all, v_fix;
  logic [DW-1:0] so_map, so_all, so_fix;
  logic          sov_map, sov_all, sov_fix;

  localparam int FIX_FUNC = func_index(FUNCS_ALL, OP_SUB);

  pe #(.DATA_W(DW), .FUNCS(FUNCS_MAP), .PE_PIPE_DEPTH(2)) u_map (
    .clk, .rst_n, .cfg_we, .cfg_sel_func(func_map), .cfg_sel_sr_port(sel_sr),
    .cfg_sel_sc_port(sel_sc), .fab_to_pe_srin(srin), .fab_to_pe_srin_valid(srin_v),
    .fab_to_pe_scin(scin), .fab_to_pe_scin_valid(scin_v), .fab_to_pe(ain),
    .fab_to_pe_valid(av), .pe_to_fab_srout(so_map), .pe_to_fab_srout_valid(sov_map),
    .pe_to_fab(o_map), .pe_to_fab_valid(v_map));

  pe #(.DATA_W(DW), .FUNCS(FUNCS_ALL), .PE_PIPE_DEPTH(3)) u_all (
    .clk, .rst_n, .cfg_we, .cfg_sel_func(func_all), .cfg_sel_sr_port(sel_sr),
    .cfg_sel_sc_port(sel_sc), .fab_to_pe_srin(srin), .fab_to_pe_srin_valid(srin_v),
    .fab_to_pe_scin(scin), .fab_to_pe_scin_valid(scin_v), .fab_to_pe(ain),
    .fab_to_pe_valid(av), .pe_to_fab_srout(so_all), .pe_to_fab_srout_valid(sov_all),
    .pe_to_fab(o_all), .pe_to_fab_valid(v_all));

  pe #(.DATA_W(DW), .FUNCS(FUNCS_ALL), .PE_PIPE_DEPTH(2), .PE_CONFIGURABLE(1'b0),
       .FIXED_FUNC(FIX_FUNC), .FIXED_SEL_SR(1'b0), .FIXED_SEL_SC(1'b0)) u_fix (
    .clk, .rst_n, .cfg_we, .cfg_sel_func(func_all), .cfg_sel_sr_port(sel_sr),
    .cfg_sel_sc_port(sel_sc), .fab_to_pe_srin(srin), .fab_to_pe_srin_valid(srin_v),
    .fab_to_pe_scin(scin), .fab_to_pe_scin_valid(scin_v), .fab_to_pe(ain),
    .fab_to_pe_valid(av), .pe_to_fab_srout(so_fix), .pe_to_fab_srout_valid(sov_fix),
    .pe_to_fab(o_fix), .pe_to_fab_valid(v_fix));

  // depth 1: same as u_map one cycle earlier
  logic [DW-1:0] o_d1 [2], so_d1;
  logic          v_d1, sov_d1;
  logic [DW-1:0] prev_o_d1 [2] = '{0, 0};
  logic          prev_v_d1 = 0;

  pe #(.DATA_W(DW), .FUNCS(FUNCS_MAP), .PE_PIPE_DEPTH(1)) u_d1 (
    .clk, .rst_n, .cfg_we, .cfg_sel_func(func_map), .cfg_sel_sr_port(sel_sr),
    .cfg_sel_sc_port(sel_sc), .fab_to_pe_srin(srin), .fab_to_pe_srin_valid(srin_v),
    .fab_to_pe_scin(scin), .fab_to_pe_scin_valid(scin_v), .fab_to_pe(ain),
    .fab_to_pe_valid(av), .pe_to_fab_srout(so_d1), .pe_to_fab_srout_valid(sov_d1),
    .pe_to_fab(o_d1), .pe_to_fab_valid(v_d1));

  pe_model m_map, m_all, m_fix;

  function automatic int sx(logic [DW-1:0] v);
    return int'($signed(v));
  endfunction

  task automatic cmp(string name, pe_model m, logic [DW-1:0] o [2], logic v);
    longint r;
    bit     ev;
    m.expected(r, ev);
    checks++;
    if (v !== ev || (ev && (o[0] !== r[DW-1:0] || o[1] !== r[2*DW-1:DW]))) begin
      failures++;
      if (failures < 20)
        $display("%0t %s: got v=%0d %h_%h exp v=%0d %h", $time, name, v, o[1], o[0], ev,
                 r[2*DW-1:0]);
    end
    m.retire();
  endtask

  int func_hits [NUM_OPS];

  initial begin
    m_map = new(FUNCS_MAP, 2, 0, 0);
    m_all = new(FUNCS_ALL, 3, 0, 0);
    m_fix = new(FUNCS_ALL, 2, FIX_FUNC, 1);
    srin = 0; scin = 0; ain = '{0, 0}; srin_v = 0; scin_v = 0; av = '{0, 0};
    cfg_we = 0; sel_sr = 0; sel_sc = 0; func_map = 0; func_all = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // drive at negedge
      cfg_we   = ($urandom % 8) == 0;
      func_map = W_MAP'($urandom % 4);
      func_all = W_ALL'($urandom % 12);   // 11 is past the list: invalid
      sel_sr   = $urandom % 2;
      sel_sc   = $urandom % 2;
      srin     = DW'($urandom); srin_v = ($urandom % 4) != 0;
      scin     = DW'($urandom); scin_v = ($urandom % 16) == 0;
      ain[0]   = (cyc % 7 == 0) ? ain[1] : DW'($urandom);   // equal operands now and then
      ain[1]   = DW'($urandom);
      av[0]    = ($urandom % 8) != 0;
      av[1]    = ($urandom % 8) != 0;
      if (cyc % 5 == 0) ain[1] = DW'($urandom % 20);           // small shift amounts
      if (cfg_we && func_all < 11) func_hits[m_all.op_of(func_all)]++;
      m_map.clock(cfg_we, func_map, sel_sr, sel_sc, 0, sx(srin), srin_v, sx(scin), scin_v,
                  sx(ain[0]), av[0], sx(ain[1]), av[1]);
      m_all.clock(cfg_we, func_all, sel_sr, sel_sc, 0, sx(srin), srin_v, sx(scin), scin_v,
                  sx(ain[0]), av[0], sx(ain[1]), av[1]);
      m_fix.clock(cfg_we, func_all, sel_sr, sel_sc, 1, sx(srin), srin_v, sx(scin), scin_v,
                  sx(ain[0]), av[0], sx(ain[1]), av[1]);
      // the shift enable is passed on combinationally
      #1;
      checks++;
      if (sov_map !== srin_v || sov_all !== srin_v) failures++;
      @(posedge clk); #1;
      cmp("map", m_map, o_map, v_map);
      cmp("all", m_all, o_all, v_all);
      cmp("fix", m_fix, o_fix, v_fix);
      // depth-1 PE: one cycle ahead of the depth-2 PE
      checks++;
      if (v_map !== prev_v_d1 || (v_map && (o_map[0] !== prev_o_d1[0] || o_map[1] !== prev_o_d1[1]))) begin
        failures++;
        if (failures < 20) $display("%0t depth-1 PE does not lead the depth-2 PE by one cycle", $time);
      end
      prev_v_d1 = v_d1; prev_o_d1 = o_d1;
      // shift-out is the shift register
      checks++;
      if (so_map !== DW'(m_map.sr) || so_all !== DW'(m_all.sr)) begin
        failures++;
        $display("%0t srout mismatch", $time);
      end
      @(negedge clk);
    end
    for (int k = 0; k < NUM_OPS; k++) begin
      checks++;
      if (func_hits[k] == 0) begin
        failures++;
        $display("function %0d never configured", k);
      end
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
