// sw: circuit-switched crossbar switch of the fabric.
//
// The switch gives every output a dedicated connection to any one input, so
// the order of operations between PEs can be changed at run time. Routing is
// source based: the configuration register holds, for each output, the binary
// index of the input that drives it (an unpacked dimension of OUT_PORTS
// entries, each ADDR_W = clog2(IN_PORTS) bits wide, as in the switch
// description). Each output is one IN_PORTS:1 multiplexer.
//
// Data and valid bits are registered at the inputs and again at the outputs,
// as in the 3x2 switch block diagram, so a word presented at fab_to_sw on one
// clock edge leaves on sw_to_fab SW_PIPE_DEPTH cycles later (one input stage
// plus SW_PIPE_DEPTH-1 output stages; SwPipeDepth counts both sides; with
// SW_PIPE_DEPTH = 1 the mux output leaves combinationally from the input flops).
//
// This implementation's own choices: the address registers load from
// cfg_addr when cfg_we is 1; an address that names no input (>= IN_PORTS)
// drives zero with valid 0; with SW_CONFIGURABLE = 0 the register is replaced
// by the constant FIXED_ADDR (the "fixed switch" variant), packed with output
// 0 in the low ADDR_W bits; rst_n is an asynchronous active-low reset.
module sw #(
  parameter int unsigned DATA_W          = 16,
  parameter int unsigned IN_PORTS        = 3,
  parameter int unsigned OUT_PORTS       = 2,
  parameter int unsigned SW_PIPE_DEPTH   = 2,
  parameter bit          SW_CONFIGURABLE = 1'b1,
  parameter int unsigned ADDR_W          = (IN_PORTS <= 2) ? 1 : $clog2(IN_PORTS),
  parameter logic [OUT_PORTS*ADDR_W-1:0] FIXED_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr        [OUT_PORTS],
  input  logic [DATA_W-1:0] fab_to_sw       [IN_PORTS],
  input  logic              fab_to_sw_valid [IN_PORTS],
  output logic [DATA_W-1:0] sw_to_fab       [OUT_PORTS],
  output logic              sw_to_fab_valid [OUT_PORTS]
);

  localparam int unsigned OUT_STAGES = (SW_PIPE_DEPTH > 1) ? SW_PIPE_DEPTH - 1 : 1;

  logic [DATA_W-1:0] in_q       [IN_PORTS];
  logic              in_valid_q [IN_PORTS];
  logic [ADDR_W-1:0] addr_q     [OUT_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < IN_PORTS; i++) begin
        in_q[i]       <= '0;
        in_valid_q[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < IN_PORTS; i++) begin
        in_q[i]       <= fab_to_sw[i];
        in_valid_q[i] <= fab_to_sw_valid[i];
      end
    end
  end

  generate
    if (SW_CONFIGURABLE) begin : g_cfg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int o = 0; o < OUT_PORTS; o++) addr_q[o] <= '0;
        end else if (cfg_we) begin
          for (int o = 0; o < OUT_PORTS; o++) addr_q[o] <= cfg_addr[o];
        end
      end
    end else begin : g_fixed
      // Fixed switch: the configuration inputs are not used.
      for (genvar o = 0; o < OUT_PORTS; o++) begin : g_o
        assign addr_q[o] = FIXED_ADDR[o*ADDR_W +: ADDR_W];
      end
    end
  endgenerate

  // One multiplexer per output.
  logic [DATA_W-1:0] mux_out   [OUT_PORTS];
  logic              mux_valid [OUT_PORTS];

  always_comb begin
    for (int o = 0; o < OUT_PORTS; o++) begin
      mux_out[o]   = '0;
      mux_valid[o] = 1'b0;
      for (int i = 0; i < IN_PORTS; i++) begin
        if (int'(addr_q[o]) == i) begin
          mux_out[o]   = in_q[i];
          mux_valid[o] = in_valid_q[i];
        end
      end
    end
  end

  if (SW_PIPE_DEPTH > 1) begin : g_out_flops
    logic [DATA_W-1:0] out_pipe   [OUT_STAGES][OUT_PORTS];
    logic              valid_pipe [OUT_STAGES][OUT_PORTS];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < OUT_STAGES; s++)
          for (int o = 0; o < OUT_PORTS; o++) begin
            out_pipe[s][o]   <= '0;
            valid_pipe[s][o] <= 1'b0;
          end
      end else begin
        for (int o = 0; o < OUT_PORTS; o++) begin
          out_pipe[0][o]   <= mux_out[o];
          valid_pipe[0][o] <= mux_valid[o];
        end
        for (int s = 1; s < OUT_STAGES; s++)
          for (int o = 0; o < OUT_PORTS; o++) begin
            out_pipe[s][o]   <= out_pipe[s-1][o];
            valid_pipe[s][o] <= valid_pipe[s-1][o];
          end
      end
    end

    always_comb begin
      for (int o = 0; o < OUT_PORTS; o++) begin
        sw_to_fab[o]       = out_pipe[OUT_STAGES-1][o];
        sw_to_fab_valid[o] = valid_pipe[OUT_STAGES-1][o];
      end
    end
  end else begin : g_no_out_flops
    // Depth 1: only the input flops; the mux output leaves directly.
    always_comb begin
      for (int o = 0; o < OUT_PORTS; o++) begin
        sw_to_fab[o]       = mux_out[o];
        sw_to_fab_valid[o] = mux_valid[o];
      end
    end
  end

endmodule
