// tb_reduction: self-checking testbench of the reduction PE.
//
// A 25-input reduction (the 5x5 convolution size) and a 6-input one with
// pipe depth 3 receive random operands and valid bits every cycle. The
// expected sum is the plain integer sum modulo 2^16 and is due PIPE_DEPTH
// cycles after the operands; the output valid must be 1 exactly when every
// input was valid. Runs with all inputs valid are forced now and then so both
// cases occur often.
module tb_reduction;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, valid_outs = 0;

  logic [DW-1:0] in25 [25]; logic v25 [25];
  logic [DW-1:0] in6 [6];   logic v6 [6];
  logic [DW-1:0] o25, o6;   logic vo25, vo6;

  reduction #(.DATA_W(DW), .NUM_IN(25)) u25 (
    .clk, .rst_n, .red_in(in25), .red_in_valid(v25), .red_out(o25), .red_out_valid(vo25));
  reduction #(.DATA_W(DW), .NUM_IN(6), .PIPE_DEPTH(3)) u6 (
    .clk, .rst_n, .red_in(in6), .red_in_valid(v6), .red_out(o6), .red_out_valid(vo6));

  logic [DW:0] q25 [$];
  logic [DW:0] q6  [$];

  initial begin
    int s; bit all, va;
    for (int i = 0; i < 25; i++) begin in25[i] = 0; v25[i] = 0; end
    for (int i = 0; i < 6; i++) begin in6[i] = 0; v6[i] = 0; end
    q25.push_back('0);            // depth 2: one edge to the input flops
    q6.push_back('0); q6.push_back('0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      all = ($urandom % 2) == 0;
      s = 0; va = 1;
      for (int i = 0; i < 25; i++) begin
        in25[i] = DW'($urandom); v25[i] = all ? 1'b1 : (($urandom % 8) != 0);
        s += int'(in25[i]); va &= v25[i];
      end
      q25.push_back({va, DW'(s)});
      s = 0; va = 1;
      for (int i = 0; i < 6; i++) begin
        in6[i] = DW'($urandom); v6[i] = all ? 1'b1 : (($urandom % 4) != 0);
        s += int'(in6[i]); va &= v6[i];
      end
      q6.push_back({va, DW'(s)});
      @(posedge clk); #1;
      begin
        logic [DW:0] e;
        e = q25.pop_front();
        checks++;
        if (vo25 !== e[DW] || (e[DW] && o25 !== e[DW-1:0])) begin
          failures++;
          if (failures < 10) $display("%0t r25 got %0d/%h exp %0d/%h", $time, vo25, o25, e[DW], e[DW-1:0]);
        end
        if (vo25) valid_outs++;
        e = q6.pop_front();
        checks++;
        if (vo6 !== e[DW] || (e[DW] && o6 !== e[DW-1:0])) begin
          failures++;
          if (failures < 10) $display("%0t r6 got %0d/%h exp %0d/%h", $time, vo6, o6, e[DW], e[DW-1:0]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (valid_outs == 0) failures++;
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
