// fc_layer: a linear (fully-connected) layer, Eq. (2), built as a
// single-input-port / single-output-port 1x1 convolution.
//
// Every input value is its own input map and every output value its own
// output map, so no memory structure is needed: the core accepts one input
// value x[i] per cycle and, in that cycle, updates all OUT_N accumulators
// with OUT_N multipliers, acc[j] += w[j][i] * x[i] (acc[j] starts from the
// bias b[j]). After the IN_N-th input the results, requantised and passed
// through the activation, go to a result bank and are sent one per cycle,
// out_last marking the last of them, while the next image's inputs are
// already being accumulated. The input is stalled only when a new set of
// results is ready before the previous one has been sent.
//
// Timing: IN_N cycles per image on the input, OUT_N on the output, results
// available one cycle after the last input.
//
// Weights w[j][i] (index j*IN_N + i) and biases are design-time constants,
// from cnn_pkg::param_value(SEED, ...) and bias_seed(SEED).
//
// From the document: single port in and out, all outputs' MACs for one input
// in the same cycle, outputs sent sequentially after all inputs. With fixed
// point the accumulation has no multi-cycle latency, so the interleaved
// accumulators the document needs for floating point are not required. The
// result bank and out_last are this design's own.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int unsigned IN_N  = 64,
  parameter int unsigned OUT_N = 10,
  parameter act_e        ACT   = ACT_NONE,
  parameter int unsigned SEED  = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output data_t out_data,
  output logic  out_valid,
  output logic  out_last,
  input  logic  out_ready
);
  localparam int unsigned IW = clog2_min1(IN_N);
  localparam int unsigned OW = clog2_min1(OUT_N);

  data_t wrom [OUT_N * IN_N];
  data_t brom [OUT_N];
  initial begin
    for (int i = 0; i < OUT_N * IN_N; i++) wrom[i] = param_value(SEED, i);
    for (int i = 0; i < OUT_N; i++)        brom[i] = param_value(bias_seed(SEED), i);
  end

  logic [IW-1:0] idx;
  logic [OW-1:0] obeat;
  acc_t          acc [OUT_N];
  data_t         res [OUT_N];
  logic          res_full, last_in, out_done, take;

  always_comb begin
    last_in  = (idx == IW'(IN_N - 1));
    out_done = res_full && out_ready && (obeat == OW'(OUT_N - 1));
    in_ready = !last_in || !res_full || out_done;
    take     = in_valid && in_ready;
  end

  assign out_valid = res_full;
  assign out_data  = res[obeat];
  assign out_last  = (obeat == OW'(OUT_N - 1));

  always_ff @(posedge clk) begin
    if (take) begin
      for (int j = 0; j < OUT_N; j++) begin
        automatic acc_t base = (idx == '0) ? bias_acc(brom[j]) : acc[j];
        automatic acc_t nsum = base + acc_t'(in_data) * acc_t'(wrom[j * IN_N + int'(idx)]);
        if (last_in) res[j] <= activate(requant(nsum), ACT);
        else         acc[j] <= nsum;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      obeat    <= '0;
      res_full <= 1'b0;
    end else begin
      if (take) idx <= last_in ? '0 : idx + 1'b1;
      if (res_full && out_ready) obeat <= out_done ? '0 : obeat + 1'b1;
      if (take && last_in) res_full <= 1'b1;
      else if (out_done)   res_full <= 1'b0;
    end
  end
endmodule
