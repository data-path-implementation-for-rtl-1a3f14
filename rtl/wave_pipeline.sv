// wave_pipeline: wave pipeline topology of the fabric.
//
// The wave pipeline implements the directed acyclic graph (DAG) of operations
// of one image-processing kernel. It is a chain of STAGE_W stages; each stage
// is a column of STAGE_H PEs followed by a switch. The switch after stage s
// routes the STAGE_H results of that stage to the 2*STAGE_H operand inputs of
// stage s+1 (any result to any operand, several operands may take the same
// result); the switch after the last stage drives the STAGE_H system outputs.
// The 2*STAGE_H system inputs feed the operands of the first stage directly:
// PE i of stage 0 takes sys_in[2i] as x and sys_in[2i+1] as y. A value that
// must skip a stage passes through a PE configured as nop, so every path
// through the graph has the same latency and results of one input set stay
// together ("wave").
//
// PE (s,i) may take y from its constant register instead of its operand port
// (pe_cfg_sel_sc); the constant, pe_cfg_const, is written together with the
// rest of the configuration when cfg_we is 1. The PEs' shift registers and
// the high words of their results are not used in this topology (the
// switches carry one word per PE), so their outputs are left open.
//
// Timing: each PE and each switch adds its pipe depth (2 by default), so a
// set of inputs presented with valid at edge t produces outputs
// STAGE_W*(PE_PIPE_DEPTH+SW_PIPE_DEPTH) cycles later (16 for 3x4); one input
// set is accepted per cycle. The pairing of system inputs with first-stage
// operands, the constant-load path and the size of the last switch (STAGE_H
// outputs, as drawn) are this implementation's choices.
//
// PE_CONFIGURABLE / SW_CONFIGURABLE = 0 build the fixed variants: PE (s,i)
// then runs function index FIXED_FUNCS[(s*STAGE_H+i)*SEL_W +: SEL_W] on x and
// its operand-port y, and switch s uses the route
// FIXED_ADDR[(s*2*STAGE_H+o)*ADDR_W +: ADDR_W] for its output o.
module wave_pipeline
  import spa_pkg::*;
#(
  parameter int unsigned DATA_W          = 16,
  parameter int unsigned STAGE_H         = 3,
  parameter int unsigned STAGE_W         = 4,
  parameter func_mask_t  FUNCS           = FUNCS_ALL,
  parameter int unsigned PE_PIPE_DEPTH   = 2,
  parameter int unsigned SW_PIPE_DEPTH   = 2,
  parameter bit          PE_CONFIGURABLE = 1'b1,
  parameter bit          SW_CONFIGURABLE = 1'b1,
  // derived
  parameter int unsigned SEL_W  = idx_width(func_count(FUNCS)),
  parameter int unsigned ADDR_W = idx_width(STAGE_H),
  // fixed variants
  parameter logic [STAGE_W*STAGE_H*SEL_W-1:0]    FIXED_FUNCS = '0,
  parameter logic [STAGE_W*2*STAGE_H*ADDR_W-1:0] FIXED_ADDR  = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  logic [SEL_W-1:0]  pe_cfg_func   [STAGE_W][STAGE_H],
  input  logic              pe_cfg_sel_sc [STAGE_W][STAGE_H],
  input  logic [DATA_W-1:0] pe_cfg_const  [STAGE_W][STAGE_H],
  input  logic [ADDR_W-1:0] sw_cfg_addr   [STAGE_W][2*STAGE_H],
  // system interface
  input  logic [DATA_W-1:0] sys_in        [2*STAGE_H],
  input  logic              sys_in_valid  [2*STAGE_H],
  output logic [DATA_W-1:0] sys_out       [STAGE_H],
  output logic              sys_out_valid [STAGE_H]
);

  // Operand inputs of every stage: stage 0 from the system, stage s>0 from
  // switch s-1. Switch outputs of the last stage go to the system outputs.
  logic [DATA_W-1:0] opnd       [STAGE_W][2*STAGE_H];
  logic              opnd_valid [STAGE_W][2*STAGE_H];

  for (genvar s = 0; s < STAGE_W; s++) begin : g_stage
    localparam bit          LAST   = (s == STAGE_W - 1);
    localparam int unsigned SW_OUT = LAST ? STAGE_H : 2 * STAGE_H;

    logic [DATA_W-1:0] pe_res       [STAGE_H];
    logic              pe_res_valid [STAGE_H];
    logic [DATA_W-1:0] pe_res_hi    [STAGE_H];  // high result word, not routed

    for (genvar i = 0; i < STAGE_H; i++) begin : g_pe
      logic [DATA_W-1:0] ops       [2];
      logic              ops_valid [2];
      logic [DATA_W-1:0] res       [2];
      logic [DATA_W-1:0] sr_out_unused;
      logic              sr_out_valid_unused;
      assign ops[0]       = opnd[s][2*i];
      assign ops[1]       = opnd[s][2*i+1];
      assign ops_valid[0] = opnd_valid[s][2*i];
      assign ops_valid[1] = opnd_valid[s][2*i+1];

      pe #(
        .DATA_W          (DATA_W),
        .FUNCS           (FUNCS),
        .PE_PIPE_DEPTH   (PE_PIPE_DEPTH),
        .PE_CONFIGURABLE (PE_CONFIGURABLE),
        .FIXED_FUNC      (int'(FIXED_FUNCS[(s*STAGE_H+i)*SEL_W +: SEL_W])),
        .FIXED_SEL_SR    (1'b0),
        .FIXED_SEL_SC    (1'b0)
      ) u_pe (
        .clk                   (clk),
        .rst_n                 (rst_n),
        .cfg_we                (cfg_we),
        .cfg_sel_func          (pe_cfg_func[s][i]),
        .cfg_sel_sr_port       (1'b0),
        .cfg_sel_sc_port       (pe_cfg_sel_sc[s][i]),
        .fab_to_pe_srin        ('0),
        .fab_to_pe_srin_valid  (1'b0),
        .fab_to_pe_scin        (pe_cfg_const[s][i]),
        .fab_to_pe_scin_valid  (cfg_we),
        .fab_to_pe             (ops),
        .fab_to_pe_valid       (ops_valid),
        .pe_to_fab_srout       (sr_out_unused),
        .pe_to_fab_srout_valid (sr_out_valid_unused),
        .pe_to_fab             (res),
        .pe_to_fab_valid       (pe_res_valid[i])
      );
      assign pe_res[i]    = res[0];
      assign pe_res_hi[i] = res[1];
    end

    logic [ADDR_W-1:0] addr      [SW_OUT];
    logic [DATA_W-1:0] sw_out    [SW_OUT];
    logic              sw_valid  [SW_OUT];
    for (genvar o = 0; o < SW_OUT; o++) begin : g_addr
      assign addr[o] = sw_cfg_addr[s][o];
    end

    sw #(
      .DATA_W          (DATA_W),
      .IN_PORTS        (STAGE_H),
      .OUT_PORTS       (SW_OUT),
      .SW_PIPE_DEPTH   (SW_PIPE_DEPTH),
      .SW_CONFIGURABLE (SW_CONFIGURABLE),
      .ADDR_W          (ADDR_W),
      .FIXED_ADDR      (FIXED_ADDR[s*2*STAGE_H*ADDR_W +: SW_OUT*ADDR_W])
    ) u_sw (
      .clk             (clk),
      .rst_n           (rst_n),
      .cfg_we          (cfg_we),
      .cfg_addr        (addr),
      .fab_to_sw       (pe_res),
      .fab_to_sw_valid (pe_res_valid),
      .sw_to_fab       (sw_out),
      .sw_to_fab_valid (sw_valid)
    );

    if (s == 0) begin : g_sys_in
      for (genvar j = 0; j < 2 * STAGE_H; j++) begin : g_j
        assign opnd[0][j]       = sys_in[j];
        assign opnd_valid[0][j] = sys_in_valid[j];
      end
    end
    if (LAST) begin : g_sys_out
      for (genvar o = 0; o < STAGE_H; o++) begin : g_o
        assign sys_out[o]       = sw_out[o];
        assign sys_out_valid[o] = sw_valid[o];
      end
    end else begin : g_next
      for (genvar j = 0; j < 2 * STAGE_H; j++) begin : g_j
        assign opnd[s+1][j]       = sw_out[j];
        assign opnd_valid[s+1][j] = sw_valid[j];
      end
    end
  end

endmodule
