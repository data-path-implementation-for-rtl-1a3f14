// conv_topology: convolution topology of the fabric (one switch, ROWS x COLS
// map PEs and one reduction PE).
//
// The topology computes one output pixel per window, in the "map and reduce"
// style: each map PE applies one operation to one window pixel and one
// coefficient (multiply for a convolution, absolute difference for a sum of
// absolute differences, gt/lt for comparisons), and the reduction PE sums the
// ROWS*COLS map results. One window is finished per cycle once the pipeline
// is full.
//
// Structure, following the 2x2 convolution topology diagram:
//   * Window pixels arrive one column per cycle on pix_col (pix_col[r] enters
//     window row r). Within each row the PEs' shift registers are chained
//     (SrOut -> SrIn), so the row of PEs is itself the stencil register:
//     PE (r,c) holds the pixel that entered row r c shifts ago.
//   * A single switch with 2N+1 inputs and 2N+1 outputs (N = ROWS*COLS) joins
//     system inputs, PEs and the system output:
//       inputs  0 .. N-1    coefficient inputs coeff_in[k]
//       inputs  N .. 2N-1   output of map PE k (pe_to_fab[0])
//       input   2N          output of the reduction PE
//       outputs 2k, 2k+1    operand ports of map PE k
//       output  2N          pix_out
//     So coefficients reach the PEs through the switch and the result leaves
//     through it, as described. The pairing of switch outputs with PE ports is
//     this implementation's choice: output 2k drives fab_to_pe[0] of PE k,
//     output 2k+1 drives both fab_to_pe[1] and the constant-register input
//     (ScIn) of PE k. The constant register keeps the coefficient; the PE's
//     Sel_Sc_Port chooses between the stored and the live value.
//   * The map PEs' outputs also feed the reduction PE directly.
//
// Timing with the default pipe depths (2 for every PE and the switch): a
// column presented on pix_col with pix_col_valid at edge t is in the PE shift
// registers after edge t, the map results after t+2, the sum after t+4 and on
// pix_out after t+6, i.e. pix_out_valid rises 6 cycles after the column was
// presented. A cycle with pix_col_valid = 0 shifts nothing and produces no
// output (a bubble). Coefficients are loaded by presenting them on coeff_in
// with coeff_valid set while the switch routes input k to output 2k+1.
//
// PE_CONFIGURABLE / SW_CONFIGURABLE select the fixed variants used to measure
// the cost of flexibility. A fixed map PE runs FIXED_FUNC on (shift register,
// constant register); the fixed switch routes coeff k to outputs 2k and 2k+1
// and the reduction output to pix_out. The map PEs' high result words and the
// shift-out of the last PE of each row have no consumer in this topology, so
// lint reports them as unused; they are left open on purpose.
module conv_topology
  import spa_pkg::*;
#(
  parameter int unsigned DATA_W          = 16,
  parameter int unsigned ROWS            = 5,
  parameter int unsigned COLS            = 5,
  parameter func_mask_t  FUNCS           = FUNCS_MAP,
  parameter int unsigned PE_PIPE_DEPTH   = 2,
  parameter int unsigned SW_PIPE_DEPTH   = 2,
  parameter bit          PE_CONFIGURABLE = 1'b1,
  parameter bit          SW_CONFIGURABLE = 1'b1,
  parameter int unsigned FIXED_FUNC      = func_index(FUNCS, OP_MULT),
  // derived
  parameter int unsigned NPE    = ROWS * COLS,
  parameter int unsigned NSW    = 2 * NPE + 1,
  parameter int unsigned SEL_W  = idx_width(func_count(FUNCS)),
  parameter int unsigned ADDR_W = $clog2(NSW)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  logic [SEL_W-1:0]  pe_cfg_func   [NPE],
  input  logic              pe_cfg_sel_sr [NPE],
  input  logic              pe_cfg_sel_sc [NPE],
  input  logic [ADDR_W-1:0] sw_cfg_addr   [NSW],
  // window columns and coefficients
  input  logic [DATA_W-1:0] pix_col       [ROWS],
  input  logic              pix_col_valid,
  input  logic [DATA_W-1:0] coeff_in      [NPE],
  input  logic              coeff_valid   [NPE],
  // output pixel
  output logic [DATA_W-1:0] pix_out,
  output logic              pix_out_valid
);

  // Fixed switch routing (used only when SW_CONFIGURABLE = 0).
  function automatic logic [NSW*ADDR_W-1:0] fixed_route();
    logic [NSW*ADDR_W-1:0] r = '0;
    for (int k = 0; k < NPE; k++) begin
      r[(2*k)*ADDR_W +: ADDR_W]   = ADDR_W'(k);
      r[(2*k+1)*ADDR_W +: ADDR_W] = ADDR_W'(k);
    end
    r[(2*NPE)*ADDR_W +: ADDR_W] = ADDR_W'(2 * NPE);
    return r;
  endfunction

  logic [DATA_W-1:0] sw_in        [NSW];
  logic              sw_in_valid  [NSW];
  logic [DATA_W-1:0] sw_out       [NSW];
  logic              sw_out_valid [NSW];

  logic [DATA_W-1:0] pe_out       [NPE];
  logic [DATA_W-1:0] pe_out_hi    [NPE];  // high result word, not used here
  logic              pe_out_valid [NPE];

  logic [DATA_W-1:0] red_out;
  logic              red_out_valid;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned K = r * COLS + c;
      // Shift chain along the row: SrIn of PE (r,c) is SrOut of PE (r,c-1).
      logic [DATA_W-1:0] sr_in, sr_out;
      logic              sr_in_valid, sr_out_valid;
      if (c == 0) begin : g_first
        assign sr_in       = pix_col[r];
        assign sr_in_valid = pix_col_valid;
      end else begin : g_next
        assign sr_in       = g_col[c-1].sr_out;
        assign sr_in_valid = g_col[c-1].sr_out_valid;
      end
      logic [DATA_W-1:0] ops       [2];
      logic              ops_valid [2];
      logic [DATA_W-1:0] res       [2];
      assign ops[0]       = sw_out[2*K];
      assign ops[1]       = sw_out[2*K+1];
      assign ops_valid[0] = sw_out_valid[2*K];
      assign ops_valid[1] = sw_out_valid[2*K+1];

      pe #(
        .DATA_W          (DATA_W),
        .FUNCS           (FUNCS),
        .PE_PIPE_DEPTH   (PE_PIPE_DEPTH),
        .PE_CONFIGURABLE (PE_CONFIGURABLE),
        .FIXED_FUNC      (FIXED_FUNC),
        .FIXED_SEL_SR    (1'b1),
        .FIXED_SEL_SC    (1'b1)
      ) u_pe (
        .clk                   (clk),
        .rst_n                 (rst_n),
        .cfg_we                (cfg_we),
        .cfg_sel_func          (pe_cfg_func[K]),
        .cfg_sel_sr_port       (pe_cfg_sel_sr[K]),
        .cfg_sel_sc_port       (pe_cfg_sel_sc[K]),
        .fab_to_pe_srin        (sr_in),
        .fab_to_pe_srin_valid  (sr_in_valid),
        .fab_to_pe_scin        (sw_out[2*K+1]),
        .fab_to_pe_scin_valid  (sw_out_valid[2*K+1]),
        .fab_to_pe             (ops),
        .fab_to_pe_valid       (ops_valid),
        .pe_to_fab_srout       (sr_out),
        .pe_to_fab_srout_valid (sr_out_valid),
        .pe_to_fab             (res),
        .pe_to_fab_valid       (pe_out_valid[K])
      );
      assign pe_out[K]    = res[0];
      assign pe_out_hi[K] = res[1];

      assign sw_in[K]             = coeff_in[K];
      assign sw_in_valid[K]       = coeff_valid[K];
      assign sw_in[NPE+K]         = pe_out[K];
      assign sw_in_valid[NPE+K]   = pe_out_valid[K];
    end
  end

  reduction #(
    .DATA_W     (DATA_W),
    .NUM_IN     (NPE),
    .PIPE_DEPTH (PE_PIPE_DEPTH)
  ) u_reduction (
    .clk           (clk),
    .rst_n         (rst_n),
    .red_in        (pe_out),
    .red_in_valid  (pe_out_valid),
    .red_out       (red_out),
    .red_out_valid (red_out_valid)
  );

  assign sw_in[2*NPE]       = red_out;
  assign sw_in_valid[2*NPE] = red_out_valid;

  sw #(
    .DATA_W          (DATA_W),
    .IN_PORTS        (NSW),
    .OUT_PORTS       (NSW),
    .SW_PIPE_DEPTH   (SW_PIPE_DEPTH),
    .SW_CONFIGURABLE (SW_CONFIGURABLE),
    .ADDR_W          (ADDR_W),
    .FIXED_ADDR      (fixed_route())
  ) u_sw (
    .clk             (clk),
    .rst_n           (rst_n),
    .cfg_we          (cfg_we),
    .cfg_addr        (sw_cfg_addr),
    .fab_to_sw       (sw_in),
    .fab_to_sw_valid (sw_in_valid),
    .sw_to_fab       (sw_out),
    .sw_to_fab_valid (sw_out_valid)
  );

  assign pix_out       = sw_out[2*NPE];
  assign pix_out_valid = sw_out_valid[2*NPE];

endmodule
