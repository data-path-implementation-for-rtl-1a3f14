// pe: programmable element (PE), the execution unit of the fabric.
//
// A PE applies one arithmetic function, chosen at run time by its
// configuration register, to a stream of operand pairs. The set of functions
// it can run is fixed when the hardware is generated (parameter FUNCS, a mask
// over spa_pkg::op_e); the configuration register is a binary index into that
// list, so its width follows from the number of functions.
//
// Datapath, as in the PE block diagram:
//   * Input flops on every input: the shift register (ShiftReg, fed from
//     fab_to_pe_srin), the two fabric operands fab_to_pe[0] and fab_to_pe[1],
//     the constant register (fed from fab_to_pe_scin) and the configuration
//     registers Sel_Sr_Port, Sel_Sc_Port and Sel_Func.
//   * Local reg muxes: operand x is the shift register (sel_sr_port = 1) or
//     fab_to_pe[0]; operand y is the constant register (sel_sc_port = 1) or
//     fab_to_pe[1].
//   * Data gate: only the selected function sees the operands; all other
//     function inputs are held at zero so they do not toggle.
//   * Data mux: picks the selected function's result into the output flops.
//   * The shift register's output leaves the PE directly as pe_to_fab_srout,
//     so PEs chain into a shift register (the stencil register of a
//     convolution window).
//   * Output valid is the AND of three valid bits: Valid_0 (operand x valid),
//     Valid_1 (operand y valid, or 1 for a one-operand function) and Valid_2
//     (the configuration register selects a function present in the list).
//
// Interface and timing (this implementation's choices where the description
// is silent):
//   * Operands are registered on the clock edge they are presented at and the
//     result appears PE_PIPE_DEPTH cycles later: one input flop stage plus
//     PE_PIPE_DEPTH-1 output flop stages (PePipeDepth counts both sides).
//     With PE_PIPE_DEPTH = 1 the result leaves combinationally from the
//     input flops, one cycle after the operands.
//   * fab_to_pe_srin is shifted in only when fab_to_pe_srin_valid is 1; that
//     enable is passed on combinationally as pe_to_fab_srout_valid so that all
//     PEs of a chain shift together. Operand x taken from the shift register is
//     valid in the cycle after a shift.
//   * The constant register loads when fab_to_pe_scin_valid is 1 and stays
//     valid from then until reset.
//   * Configuration registers load when cfg_we is 1. With PE_CONFIGURABLE = 0
//     they are replaced by the constants FIXED_* (the "fixed PE" variant).
//   * Results are signed two's complement, 2*DATA_W bits wide:
//     pe_to_fab[0] carries the low word, pe_to_fab[1] the high word (the upper
//     half of a product, a sign extension otherwise).
//   * rst_n is an asynchronous active-low reset of all flops.
module pe
  import spa_pkg::*;
#(
  parameter int unsigned DATA_W          = 16,
  parameter func_mask_t  FUNCS           = FUNCS_MAP,
  parameter int unsigned PE_PIPE_DEPTH   = 2,
  parameter bit          PE_CONFIGURABLE = 1'b1,
  parameter int unsigned FIXED_FUNC      = 0,
  parameter bit          FIXED_SEL_SR    = 1'b0,
  parameter bit          FIXED_SEL_SC    = 1'b0,
  // derived
  parameter int unsigned N_FUNC = func_count(FUNCS),
  parameter int unsigned SEL_W  = idx_width(N_FUNC)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  logic [SEL_W-1:0]  cfg_sel_func,
  input  logic              cfg_sel_sr_port,
  input  logic              cfg_sel_sc_port,
  // fabric inputs
  input  logic [DATA_W-1:0] fab_to_pe_srin,
  input  logic              fab_to_pe_srin_valid,
  input  logic [DATA_W-1:0] fab_to_pe_scin,
  input  logic              fab_to_pe_scin_valid,
  input  logic [DATA_W-1:0] fab_to_pe       [2],
  input  logic              fab_to_pe_valid [2],
  // fabric outputs
  output logic [DATA_W-1:0] pe_to_fab_srout,
  output logic              pe_to_fab_srout_valid,
  output logic [DATA_W-1:0] pe_to_fab       [2],
  output logic              pe_to_fab_valid
);

  localparam int unsigned OUT_STAGES = (PE_PIPE_DEPTH > 1) ? PE_PIPE_DEPTH - 1 : 1;
  localparam int unsigned RES_W      = 2 * DATA_W;

  // Parameter checks at elaboration.
  if (N_FUNC == 0) begin : g_err_funcs
    $error("pe: the function list FUNCS is empty");
  end
  if (!PE_CONFIGURABLE && FIXED_FUNC >= N_FUNC) begin : g_err_fixed
    $error("pe: FIXED_FUNC does not name a function of FUNCS");
  end

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [RES_W-1:0]  res_t;

  // ---------------- input side flops ----------------
  word_t             sr_q, sc_q, a_q, b_q;
  logic              sr_fresh_q, sc_loaded_q, a_valid_q, b_valid_q;
  logic [SEL_W-1:0]  sel_func_q;
  logic              sel_sr_q, sel_sc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q        <= '0;
      sr_fresh_q  <= 1'b0;
      sc_q        <= '0;
      sc_loaded_q <= 1'b0;
      a_q         <= '0;
      b_q         <= '0;
      a_valid_q   <= 1'b0;
      b_valid_q   <= 1'b0;
    end else begin
      sr_fresh_q <= fab_to_pe_srin_valid;
      if (fab_to_pe_srin_valid) sr_q <= fab_to_pe_srin;
      if (fab_to_pe_scin_valid) begin
        sc_q        <= fab_to_pe_scin;
        sc_loaded_q <= 1'b1;
      end
      a_q       <= fab_to_pe[0];
      b_q       <= fab_to_pe[1];
      a_valid_q <= fab_to_pe_valid[0];
      b_valid_q <= fab_to_pe_valid[1];
    end
  end

  generate
    if (PE_CONFIGURABLE) begin : g_cfg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          sel_func_q <= '0;
          sel_sr_q   <= 1'b0;
          sel_sc_q   <= 1'b0;
        end else if (cfg_we) begin
          sel_func_q <= cfg_sel_func;
          sel_sr_q   <= cfg_sel_sr_port;
          sel_sc_q   <= cfg_sel_sc_port;
        end
      end
    end else begin : g_fixed
      // Fixed PE: the configuration inputs are not used.
      assign sel_func_q = SEL_W'(FIXED_FUNC);
      assign sel_sr_q   = FIXED_SEL_SR;
      assign sel_sc_q   = FIXED_SEL_SC;
    end
  endgenerate

  assign pe_to_fab_srout       = sr_q;
  assign pe_to_fab_srout_valid = fab_to_pe_srin_valid;

  // ---------------- local reg muxes ----------------
  word_t x, y;
  op_e   op;
  logic  valid_0, valid_1, valid_2;

  always_comb begin
    x       = sel_sr_q ? sr_q : a_q;
    y       = sel_sc_q ? sc_q : b_q;
    op      = func_at(FUNCS, int'(sel_func_q));
    valid_2 = (int'(sel_func_q) < int'(N_FUNC));
    valid_0 = sel_sr_q ? sr_fresh_q : a_valid_q;
    valid_1 = is_unary(op) ? 1'b1 : (sel_sc_q ? sc_loaded_q : b_valid_q);
  end

  // ---------------- data gate, functions, data mux ----------------
  word_t gx [NUM_OPS];
  word_t gy [NUM_OPS];
  res_t  fres [NUM_OPS];
  res_t  result;

  always_comb begin
    for (int k = 0; k < NUM_OPS; k++) begin
      // Data gate: a function absent from the list, or not selected, sees zeros.
      gx[k] = (FUNCS[k] && valid_2 && (int'(op) == k)) ? x : '0;
      gy[k] = (FUNCS[k] && valid_2 && (int'(op) == k)) ? y : '0;
    end
    fres[OP_NOP]     = res_t'(gx[OP_NOP]);
    fres[OP_SUM]     = res_t'(gx[OP_SUM]) + res_t'(gy[OP_SUM]);
    fres[OP_SUB]     = res_t'(gx[OP_SUB]) - res_t'(gy[OP_SUB]);
    fres[OP_MULT]    = res_t'(gx[OP_MULT]) * res_t'(gy[OP_MULT]);
    fres[OP_ABSDIFF] = (gx[OP_ABSDIFF] > gy[OP_ABSDIFF])
                       ? res_t'(gx[OP_ABSDIFF]) - res_t'(gy[OP_ABSDIFF])
                       : res_t'(gy[OP_ABSDIFF]) - res_t'(gx[OP_ABSDIFF]);
    fres[OP_GT]      = res_t'({1'b0, (gx[OP_GT] > gy[OP_GT])});
    fres[OP_LT]      = res_t'({1'b0, (gx[OP_LT] < gy[OP_LT])});
    fres[OP_MAX]     = (gx[OP_MAX] > gy[OP_MAX]) ? res_t'(gx[OP_MAX]) : res_t'(gy[OP_MAX]);
    fres[OP_MIN]     = (gx[OP_MIN] < gy[OP_MIN]) ? res_t'(gx[OP_MIN]) : res_t'(gy[OP_MIN]);
    fres[OP_RSHIFT]  = res_t'(gx[OP_RSHIFT]) >>> gy[OP_RSHIFT][$clog2(RES_W)-1:0];
    fres[OP_INV]     = -res_t'(gx[OP_INV]);
    // Data mux
    result = '0;
    for (int k = 0; k < NUM_OPS; k++)
      if (FUNCS[k] && (int'(op) == k)) result = fres[k];
  end

  // ---------------- output side flops ----------------
  if (PE_PIPE_DEPTH > 1) begin : g_out_flops
    res_t res_pipe   [OUT_STAGES];
    logic valid_pipe [OUT_STAGES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < OUT_STAGES; s++) begin
          res_pipe[s]   <= '0;
          valid_pipe[s] <= 1'b0;
        end
      end else begin
        res_pipe[0]   <= result;
        valid_pipe[0] <= valid_0 && valid_1 && valid_2;
        for (int s = 1; s < OUT_STAGES; s++) begin
          res_pipe[s]   <= res_pipe[s-1];
          valid_pipe[s] <= valid_pipe[s-1];
        end
      end
    end

    assign pe_to_fab[0]    = res_pipe[OUT_STAGES-1][DATA_W-1:0];
    assign pe_to_fab[1]    = res_pipe[OUT_STAGES-1][RES_W-1:DATA_W];
    assign pe_to_fab_valid = valid_pipe[OUT_STAGES-1];
  end else begin : g_no_out_flops
    // Depth 1: the input flops are the only stage, the result leaves
    // combinationally.
    assign pe_to_fab[0]    = result[DATA_W-1:0];
    assign pe_to_fab[1]    = result[RES_W-1:DATA_W];
    assign pe_to_fab_valid = valid_0 && valid_1 && valid_2;
  end

endmodule
