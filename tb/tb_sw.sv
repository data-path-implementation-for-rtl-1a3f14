// tb_sw: self-checking testbench of the crossbar switch.
//
// u_cfg is the 3x2 switch of the switch block diagram with the default pipe
// depth 2; u_big is a 7-input, 5-output switch with pipe depth 3; u_fix is a
// fixed 3x2 switch whose routes are constants; u_d1 is the 3x2 switch at
// pipe depth 1, whose outputs must lead u_cfg's by exactly one cycle. Random data, valid bits and
// routes (including addresses that name no input) are applied; a reference
// model delays the configuration by one edge and the data by the pipe depth
// and every output word and valid bit is compared every cycle, which also
// checks the latency. It also checks that one input can feed several outputs
// (broadcast) and that routes change at run time.
module tb_sw;
  localparam int DW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int broadcasts = 0, reroutes = 0;

  // ---- 3x2 configurable ----
  logic [DW-1:0] in3 [3];  logic v3 [3];
  logic [1:0]    a32 [2];
  logic [DW-1:0] o32 [2];  logic vo32 [2];
  logic [DW-1:0] of32 [2]; logic vof32 [2];
  logic          cfg_we;

  sw #(.DATA_W(DW), .IN_PORTS(3), .OUT_PORTS(2)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr(a32), .fab_to_sw(in3), .fab_to_sw_valid(v3),
    .sw_to_fab(o32), .sw_to_fab_valid(vo32));

  // fixed: output 0 <- input 2, output 1 <- input 0
  sw #(.DATA_W(DW), .IN_PORTS(3), .OUT_PORTS(2), .SW_CONFIGURABLE(1'b0),
       .FIXED_ADDR(4'b00_10)) u_fix (
    .clk, .rst_n, .cfg_we, .cfg_addr(a32), .fab_to_sw(in3), .fab_to_sw_valid(v3),
    .sw_to_fab(of32), .sw_to_fab_valid(vof32));

  // packed {valid, data} entries per output
  typedef logic [DW:0] ent_t;
  typedef ent_t [1:0] e2_t;
  typedef ent_t [4:0] e5_t;

  // ---- 3x2 depth 1: one cycle ahead of u_cfg ----
  logic [DW-1:0] o1 [2]; logic vo1 [2];
  e2_t prev1;
  int  d1_checks = 0;

  sw #(.DATA_W(DW), .IN_PORTS(3), .OUT_PORTS(2), .SW_PIPE_DEPTH(1)) u_d1 (
    .clk, .rst_n, .cfg_we, .cfg_addr(a32), .fab_to_sw(in3), .fab_to_sw_valid(v3),
    .sw_to_fab(o1), .sw_to_fab_valid(vo1));

  // ---- 7x5 depth 3 ----
  logic [DW-1:0] in7 [7];  logic v7 [7];
  logic [2:0]    a75 [5];
  logic [DW-1:0] o75 [5];  logic vo75 [5];

  sw #(.DATA_W(DW), .IN_PORTS(7), .OUT_PORTS(5), .SW_PIPE_DEPTH(3)) u_big (
    .clk, .rst_n, .cfg_we, .cfg_addr(a75), .fab_to_sw(in7), .fab_to_sw_valid(v7),
    .sw_to_fab(o75), .sw_to_fab_valid(vo75));

  // reference state
  int r32 [2], r75 [5];                  // routes in effect
  // expected outputs per cycle: {valid, data} per output, packed
  e2_t e32 [$];
  e5_t e75 [$];
  e2_t ef  [$];

  initial begin
    e2_t t2;
    e5_t t5;
    cfg_we = 0;
    for (int i = 0; i < 3; i++) begin in3[i] = 0; v3[i] = 0; end
    for (int i = 0; i < 7; i++) begin in7[i] = 0; v7[i] = 0; end
    for (int o = 0; o < 2; o++) begin a32[o] = 0; r32[o] = 0; end
    for (int o = 0; o < 5; o++) begin a75[o] = 0; r75[o] = 0; end
    // pipeline pre-fill: depth 2 -> 0 entries before the first push, depth 3 -> 1
    for (int o = 0; o < 5; o++) t5[o] = '0;
    e75.push_back(t5);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // model: the mux uses routes and input registers before this edge
      for (int o = 0; o < 2; o++) begin
        t2[o] = (r32[o] < 3) ? {v3_q[r32[o]], in3_q[r32[o]]} : '0;
      end
      e32.push_back(t2);
      t2[0] = {v3_q[2], in3_q[2]};
      t2[1] = {v3_q[0], in3_q[0]};
      ef.push_back(t2);
      for (int o = 0; o < 5; o++) begin
        t5[o] = {v7_q[r75[o]], in7_q[r75[o]]};
      end
      e75.push_back(t5);
      // new stimulus
      cfg_we = ($urandom % 10) == 0;
      for (int o = 0; o < 2; o++) a32[o] = 2'($urandom);
      for (int o = 0; o < 5; o++) a75[o] = 3'($urandom % 7);
      for (int i = 0; i < 3; i++) begin in3[i] = DW'($urandom); v3[i] = $urandom % 2; end
      for (int i = 0; i < 7; i++) begin in7[i] = DW'($urandom); v7[i] = $urandom % 2; end
      @(posedge clk);
      // model register updates at this edge
      for (int i = 0; i < 3; i++) begin in3_q[i] = in3[i]; v3_q[i] = v3[i]; end
      for (int i = 0; i < 7; i++) begin in7_q[i] = in7[i]; v7_q[i] = v7[i]; end
      if (cfg_we) begin
        if (a32[0] != r32[0] || a32[1] != r32[1]) reroutes++;
        for (int o = 0; o < 2; o++) r32[o] = a32[o];
        for (int o = 0; o < 5; o++) r75[o] = a75[o];
        if (a32[0] == a32[1] && a32[0] < 3) broadcasts++;
      end
      #1;
      t2 = e32.pop_front();
      for (int o = 0; o < 2; o++) begin
        checks++;
        if ({vo32[o], o32[o]} !== t2[o]) begin
          failures++;
          if (failures < 10) $display("%0t 3x2 out%0d got %h/%0d exp %h/%0d", $time, o,
                                      o32[o], vo32[o], t2[o][DW-1:0], t2[o][DW]);
        end
      end
      t2 = ef.pop_front();
      for (int o = 0; o < 2; o++) begin
        checks++;
        if ({vof32[o], of32[o]} !== t2[o]) failures++;
      end
      for (int o = 0; o < 2; o++) begin
        checks++;
        if (cyc > 0 && {vo32[o], o32[o]} !== prev1[o]) begin
          failures++;
          if (failures < 10) $display("%0t depth-1 switch out%0d does not lead by one cycle", $time, o);
        end
        prev1[o] = {vo1[o], o1[o]};
      end
      t5 = e75.pop_front();
      for (int o = 0; o < 5; o++) begin
        checks++;
        if ({vo75[o], o75[o]} !== t5[o]) begin
          failures++;
          if (failures < 10) $display("%0t 7x5 out%0d got %h exp %h", $time, o, o75[o], t5[o][DW-1:0]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (broadcasts == 0 || reroutes == 0) begin
      failures++;
      $display("broadcast or reroute never exercised");
    end
    $display("broadcasts=%0d reroutes=%0d", broadcasts, reroutes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model copies of the input registers
  logic [DW-1:0] in3_q [3] = '{default: 0};
  logic          v3_q  [3] = '{default: 0};
  logic [DW-1:0] in7_q [7] = '{default: 0};
  logic          v7_q  [7] = '{default: 0};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
