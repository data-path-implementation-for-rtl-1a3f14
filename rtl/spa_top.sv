// spa_top: the spatially programmable data path with its stencil front ends.
//
// Two uses of the fabric stand side by side, both fed by pixel streams:
//
//  1. Convolution kernel. A line buffer (CONV_ROWS rows) turns the input
//     pixel stream into window columns, which shift into the PE rows of a
//     CONV_ROWS x CONV_COLS convolution topology (map PEs + one reduction PE
//     + one switch). With coefficients loaded and the map PEs set to mult the
//     output is the convolution; set to absDiff it is the sum of absolute
//     differences. One output pixel per input pixel, 6 cycles after the
//     column leaves the line buffer.
//
//  2. Application pipeline. NUM_KERNELS kernels are cascaded; kernel k is a
//     line buffer, a stencil register of APP_WIN_ROWS x APP_WIN_COLS pixels
//     and a wave pipeline of APP_STAGE_H x K_STAGE_W[k] PEs. The window's
//     pixels are the wave pipeline's system inputs (window pixel win[r][c]
//     drives input r*APP_WIN_COLS+c), and output 0 of each wave pipeline is
//     the pixel stream of the next kernel's line buffer. Each kernel emits one
//     pixel per input pixel, so all kernels work on the same image size.
//
// Both halves are configured through plain array ports; the configuration
// registers of all PEs and switches load on cfg_we. The default sizes follow
// the evaluated configurations: a 5x5 window of 16-bit operations for the
// convolution topology, and three wave pipelines of stage height 3 with 4, 2
// and 3 stages as in the application pipeline drawing. The window shape of
// the application kernels (2x3, so that its six pixels match the six system
// inputs of a stage-height-3 wave pipeline), the use of output 0 as the
// kernel output and the image size are this implementation's choices.
// rst_n is an asynchronous active-low reset. The pixel-position outputs of
// the line buffers and stencil registers and the stencil registers'
// full-window flag are not needed by the window functions and are left open.
module spa_top
  import spa_pkg::*;
#(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned IMG_W       = 64,
  parameter int unsigned IMG_H       = 64,
  // convolution kernel
  parameter int unsigned CONV_ROWS   = 5,
  parameter int unsigned CONV_COLS   = 5,
  // application pipeline
  parameter int unsigned NUM_KERNELS  = 3,
  parameter int unsigned APP_STAGE_H  = 3,
  parameter int unsigned MAX_STAGE_W  = 4,
  parameter int unsigned K_STAGE_W [NUM_KERNELS] = '{4, 2, 3},
  parameter int unsigned APP_WIN_ROWS = 2,
  parameter int unsigned APP_WIN_COLS = 3,
  // derived
  parameter int unsigned CONV_NPE    = CONV_ROWS * CONV_COLS,
  parameter int unsigned CONV_NSW    = 2 * CONV_NPE + 1,
  parameter int unsigned CONV_SEL_W  = idx_width(func_count(FUNCS_MAP)),
  parameter int unsigned CONV_ADDR_W = $clog2(CONV_NSW),
  parameter int unsigned APP_SEL_W   = idx_width(func_count(FUNCS_ALL)),
  parameter int unsigned APP_ADDR_W  = idx_width(APP_STAGE_H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  // ---- convolution kernel ----
  input  logic [CONV_SEL_W-1:0]  conv_pe_cfg_func   [CONV_NPE],
  input  logic                   conv_pe_cfg_sel_sr [CONV_NPE],
  input  logic                   conv_pe_cfg_sel_sc [CONV_NPE],
  input  logic [CONV_ADDR_W-1:0] conv_sw_cfg_addr   [CONV_NSW],
  input  logic [DATA_W-1:0]      conv_coeff_in      [CONV_NPE],
  input  logic                   conv_coeff_valid   [CONV_NPE],
  input  logic [DATA_W-1:0]      conv_pix_in,
  input  logic                   conv_pix_in_valid,
  output logic [DATA_W-1:0]      conv_pix_out,
  output logic                   conv_pix_out_valid,
  // ---- application pipeline ----
  input  logic [APP_SEL_W-1:0]   app_pe_cfg_func   [NUM_KERNELS][MAX_STAGE_W][APP_STAGE_H],
  input  logic                   app_pe_cfg_sel_sc [NUM_KERNELS][MAX_STAGE_W][APP_STAGE_H],
  input  logic [DATA_W-1:0]      app_pe_cfg_const  [NUM_KERNELS][MAX_STAGE_W][APP_STAGE_H],
  input  logic [APP_ADDR_W-1:0]  app_sw_cfg_addr   [NUM_KERNELS][MAX_STAGE_W][2*APP_STAGE_H],
  input  logic [DATA_W-1:0]      app_pix_in,
  input  logic                   app_pix_in_valid,
  output logic [DATA_W-1:0]      app_pix_out,
  output logic                   app_pix_out_valid
);

  // ================= convolution kernel =================
  localparam int unsigned CX_W = (IMG_W <= 2) ? 1 : $clog2(IMG_W);
  localparam int unsigned CY_W = (IMG_H <= 2) ? 1 : $clog2(IMG_H);

  logic [DATA_W-1:0] conv_col [CONV_ROWS];
  logic              conv_col_valid;
  logic [CX_W-1:0]   conv_x_unused;
  logic [CY_W-1:0]   conv_y_unused;

  line_buffer #(
    .DATA_W (DATA_W),
    .ROWS   (CONV_ROWS),
    .IMG_W  (IMG_W),
    .IMG_H  (IMG_H)
  ) u_conv_lb (
    .clk       (clk),
    .rst_n     (rst_n),
    .pix_in    (conv_pix_in),
    .pix_valid (conv_pix_in_valid),
    .col_out   (conv_col),
    .col_valid (conv_col_valid),
    .x_out     (conv_x_unused),
    .y_out     (conv_y_unused)
  );

  conv_topology #(
    .DATA_W (DATA_W),
    .ROWS   (CONV_ROWS),
    .COLS   (CONV_COLS)
  ) u_conv (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_we        (cfg_we),
    .pe_cfg_func   (conv_pe_cfg_func),
    .pe_cfg_sel_sr (conv_pe_cfg_sel_sr),
    .pe_cfg_sel_sc (conv_pe_cfg_sel_sc),
    .sw_cfg_addr   (conv_sw_cfg_addr),
    .pix_col       (conv_col),
    .pix_col_valid (conv_col_valid),
    .coeff_in      (conv_coeff_in),
    .coeff_valid   (conv_coeff_valid),
    .pix_out       (conv_pix_out),
    .pix_out_valid (conv_pix_out_valid)
  );

  // ================= application pipeline =================
  localparam int unsigned APP_IN = 2 * APP_STAGE_H;

  logic [DATA_W-1:0] k_pix   [NUM_KERNELS+1];
  logic              k_valid [NUM_KERNELS+1];

  assign k_pix[0]   = app_pix_in;
  assign k_valid[0] = app_pix_in_valid;

  for (genvar k = 0; k < NUM_KERNELS; k++) begin : g_kernel
    localparam int unsigned SW = K_STAGE_W[k];

    logic [DATA_W-1:0] col [APP_WIN_ROWS];
    logic              col_valid;
    logic [CX_W-1:0]   x, x_unused;
    logic [CY_W-1:0]   y, y_unused;
    logic [DATA_W-1:0] win [APP_WIN_ROWS][APP_WIN_COLS];
    logic              win_valid, win_full_unused;

    line_buffer #(
      .DATA_W (DATA_W),
      .ROWS   (APP_WIN_ROWS),
      .IMG_W  (IMG_W),
      .IMG_H  (IMG_H)
    ) u_lb (
      .clk       (clk),
      .rst_n     (rst_n),
      .pix_in    (k_pix[k]),
      .pix_valid (k_valid[k]),
      .col_out   (col),
      .col_valid (col_valid),
      .x_out     (x),
      .y_out     (y)
    );

    stencil_reg #(
      .DATA_W (DATA_W),
      .ROWS   (APP_WIN_ROWS),
      .COLS   (APP_WIN_COLS),
      .X_W    (CX_W),
      .Y_W    (CY_W)
    ) u_st (
      .clk       (clk),
      .rst_n     (rst_n),
      .col_in    (col),
      .col_valid (col_valid),
      .x_in      (x),
      .y_in      (y),
      .win       (win),
      .win_valid (win_valid),
      .win_full  (win_full_unused),
      .x_out     (x_unused),
      .y_out     (y_unused)
    );

    logic [DATA_W-1:0]     sys_in       [APP_IN];
    logic                  sys_in_valid [APP_IN];
    logic [DATA_W-1:0]     sys_out      [APP_STAGE_H];
    logic                  sys_out_valid[APP_STAGE_H];
    logic [APP_SEL_W-1:0]  cfg_func   [SW][APP_STAGE_H];
    logic                  cfg_sel_sc [SW][APP_STAGE_H];
    logic [DATA_W-1:0]     cfg_const  [SW][APP_STAGE_H];
    logic [APP_ADDR_W-1:0] cfg_addr   [SW][APP_IN];

    for (genvar j = 0; j < APP_IN; j++) begin : g_in
      if (j < APP_WIN_ROWS * APP_WIN_COLS) begin : g_pix
        assign sys_in[j] = win[j / APP_WIN_COLS][j % APP_WIN_COLS];
      end else begin : g_zero
        assign sys_in[j] = '0;
      end
      assign sys_in_valid[j] = win_valid;
    end

    for (genvar s = 0; s < SW; s++) begin : g_cfg
      for (genvar i = 0; i < APP_STAGE_H; i++) begin : g_i
        assign cfg_func[s][i]   = app_pe_cfg_func[k][s][i];
        assign cfg_sel_sc[s][i] = app_pe_cfg_sel_sc[k][s][i];
        assign cfg_const[s][i]  = app_pe_cfg_const[k][s][i];
      end
      for (genvar o = 0; o < APP_IN; o++) begin : g_o
        assign cfg_addr[s][o] = app_sw_cfg_addr[k][s][o];
      end
    end

    wave_pipeline #(
      .DATA_W  (DATA_W),
      .STAGE_H (APP_STAGE_H),
      .STAGE_W (SW),
      .FUNCS   (FUNCS_ALL)
    ) u_wave (
      .clk           (clk),
      .rst_n         (rst_n),
      .cfg_we        (cfg_we),
      .pe_cfg_func   (cfg_func),
      .pe_cfg_sel_sc (cfg_sel_sc),
      .pe_cfg_const  (cfg_const),
      .sw_cfg_addr   (cfg_addr),
      .sys_in        (sys_in),
      .sys_in_valid  (sys_in_valid),
      .sys_out       (sys_out),
      .sys_out_valid (sys_out_valid)
    );

    assign k_pix[k+1]   = sys_out[0];
    assign k_valid[k+1] = sys_out_valid[0];
  end

  assign app_pix_out       = k_pix[NUM_KERNELS];
  assign app_pix_out_valid = k_valid[NUM_KERNELS];

endmodule
