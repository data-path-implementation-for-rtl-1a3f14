// reduction: the reduce PE of the convolution topology.
//
// In the convolution topology every map PE applies one operation to one
// window pixel (a multiply for a convolution, an absolute difference for a
// sum of absolute differences) and a single separate PE performs the reduce
// step, the sum of all map results. This module is that reduction PE. Like
// every PE it has flops at its inputs and outputs: the NUM_IN operands and
// their valid bits are registered, summed by a combinational adder tree, and
// the sum is registered again, so the result appears PIPE_DEPTH cycles after
// the operands (PIPE_DEPTH-1 output stages). The sum wraps at DATA_W bits,
// the precision of the fabric. The output is valid when all inputs were
// valid. The reduce function being a fixed sum, the adder tree, the wrap and
// the all-inputs-valid rule are this implementation's choices; rst_n is an
// asynchronous active-low reset.
module reduction #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned NUM_IN     = 25,
  parameter int unsigned PIPE_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] red_in       [NUM_IN],
  input  logic              red_in_valid [NUM_IN],
  output logic [DATA_W-1:0] red_out,
  output logic              red_out_valid
);

  localparam int unsigned OUT_STAGES = (PIPE_DEPTH > 1) ? PIPE_DEPTH - 1 : 1;

  logic [DATA_W-1:0] in_q [NUM_IN];
  logic [NUM_IN-1:0] in_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_IN; i++) in_q[i] <= '0;
      in_valid_q <= '0;
    end else begin
      for (int i = 0; i < NUM_IN; i++) begin
        in_q[i]       <= red_in[i];
        in_valid_q[i] <= red_in_valid[i];
      end
    end
  end

  // Binary adder tree: level l has ceil(NUM_IN / 2^l) partial sums.
  localparam int unsigned LEVELS = (NUM_IN <= 1) ? 1 : $clog2(NUM_IN) + 1;

  logic [DATA_W-1:0] tree [LEVELS][NUM_IN];

  always_comb begin
    for (int l = 0; l < LEVELS; l++)
      for (int i = 0; i < NUM_IN; i++) tree[l][i] = '0;
    for (int i = 0; i < NUM_IN; i++) tree[0][i] = in_q[i];
    for (int l = 1; l < LEVELS; l++)
      for (int i = 0; 2 * i < NUM_IN; i++)
        tree[l][i] = tree[l-1][2*i] + ((2 * i + 1 < NUM_IN) ? tree[l-1][2*i+1] : '0);
  end

  logic [DATA_W-1:0] out_pipe   [OUT_STAGES];
  logic              valid_pipe [OUT_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < OUT_STAGES; s++) begin
        out_pipe[s]   <= '0;
        valid_pipe[s] <= 1'b0;
      end
    end else begin
      out_pipe[0]   <= tree[LEVELS-1][0];
      valid_pipe[0] <= &in_valid_q;
      for (int s = 1; s < OUT_STAGES; s++) begin
        out_pipe[s]   <= out_pipe[s-1];
        valid_pipe[s] <= valid_pipe[s-1];
      end
    end
  end

  assign red_out       = out_pipe[OUT_STAGES-1];
  assign red_out_valid = valid_pipe[OUT_STAGES-1];

endmodule
