// conv_sweep_unit: self-checking harness for one size of the convolution
// topology, used by tb_conv_sweep to run the precision and window-size sweeps.
//
// It instantiates conv_topology with DATA_W = DW and an R x C window,
// configures every map PE as mult (x from the shift chain, y from the
// constant register), routes coefficient k to PE k and the reduction result
// to the output, loads random coefficients and streams random pixel columns
// with idle cycles. The reference keeps its own column history and computes
// the sum of pixel*coefficient products modulo 2^DW (the low DW bits of a
// product do not depend on signedness). Every output must arrive exactly 6
// cycles after its column. Two coefficient sets are run. When finished it
// raises done; checks and failures are its counters.
module conv_sweep_unit #(
  parameter int DW = 8,
  parameter int R  = 2,
  parameter int C  = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import spa_pkg::*;

  localparam int N    = R * C;
  localparam int S    = 2 * N + 1;
  localparam int A    = $clog2(S);
  localparam int SELW = idx_width(func_count(FUNCS_MAP));
  localparam int LAT  = 6;

  logic            cfg_we;
  logic [SELW-1:0] fn [N];
  logic            sr [N], sc [N];
  logic [A-1:0]    ad [S];
  logic [DW-1:0]   col [R];
  logic            colv;
  logic [DW-1:0]   co [N];
  logic            cv [N];
  logic [DW-1:0]   po;
  logic            pv;

  conv_topology #(.DATA_W(DW), .ROWS(R), .COLS(C)) u_dut (
    .clk, .rst_n, .cfg_we, .pe_cfg_func(fn), .pe_cfg_sel_sr(sr), .pe_cfg_sel_sc(sc),
    .sw_cfg_addr(ad), .pix_col(col), .pix_col_valid(colv), .coeff_in(co),
    .coeff_valid(cv), .pix_out(po), .pix_out_valid(pv));

  longint    hist [C][R];
  longint    coef [N];
  logic [DW:0] expect_at [int];
  int        cycle = 0;
  int        outs = 0;

  function automatic logic [DW-1:0] trunc(longint v);
    logic [63:0] u;
    u = v;
    return u[DW-1:0];
  endfunction

  task automatic tick();
    @(posedge clk); #1;
    cycle++;
    if (expect_at.exists(cycle)) begin
      checks++;
      if (!pv || po !== expect_at[cycle][DW-1:0]) begin
        failures++;
        if (failures < 5) $display("%0t DW=%0d %0dx%0d got %0d/%h exp %h", $time, DW, R, C, pv, po,
                                   expect_at[cycle][DW-1:0]);
      end
      outs++;
      expect_at.delete(cycle);
    end else begin
      checks++;
      if (pv) begin
        failures++;
        if (failures < 5) $display("%0t DW=%0d %0dx%0d unexpected output", $time, DW, R, C);
      end
    end
    @(negedge clk);
  endtask

  task automatic load_coeffs();
    for (int k = 0; k < N; k++) begin
      co[k] = DW'($urandom);
      coef[k] = longint'(co[k]);
      cv[k] = 1;
    end
    tick();
    for (int k = 0; k < N; k++) cv[k] = 0;
    repeat (4) tick();
  endtask

  task automatic stream(int n);
    for (int i = 0; i < n; i++) begin
      colv = ($urandom % 4) != 0;
      for (int r = 0; r < R; r++) col[r] = DW'($urandom);
      if (colv) begin
        longint s;
        for (int c = C - 1; c > 0; c--) hist[c] = hist[c-1];
        for (int r = 0; r < R; r++) hist[0][r] = longint'(col[r]);
        s = 0;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) s += hist[c][r] * coef[r * C + c];
        expect_at[cycle + LAT] = {1'b1, trunc(s)};
      end
      tick();
    end
    colv = 0;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    cfg_we = 0; colv = 0;
    for (int r = 0; r < R; r++) col[r] = '0;
    for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) hist[c][r] = 0;
    for (int k = 0; k < N; k++) begin
      fn[k] = SELW'(func_index(FUNCS_MAP, OP_MULT)); sr[k] = 1; sc[k] = 1;
      co[k] = '0; cv[k] = 0;
      ad[2*k] = A'(k); ad[2*k+1] = A'(k);
    end
    ad[2*N] = A'(2 * N);
    @(posedge rst_n);
    @(negedge clk);
    cfg_we = 1; tick(); cfg_we = 0;
    for (int round = 0; round < 2; round++) begin
      load_coeffs();
      stream(300);
      repeat (LAT + 2) tick();
    end
    checks++;
    if (expect_at.num() != 0 || outs < 300) begin
      failures++;
      $display("DW=%0d %0dx%0d: %0d outputs, %0d missing", DW, R, C, outs, expect_at.num());
    end
    $display("DW=%0d window %0dx%0d (%0d-port switch): %0d outputs checked", DW, R, C, S, outs);
    done = 1;
  end
endmodule
