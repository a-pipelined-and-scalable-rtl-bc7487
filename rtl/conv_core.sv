// conv_core: computation core of a convolutional layer (Algorithm 1, Eq. (1)).
//
// For every output position the core receives IN_FM input windows of
// KH x KW values, IN_PORTS of them at a time (one per port, feature map
// f = group * IN_PORTS + port), multiplies them with the layer's weights and
// accumulates, for each of the OUT_FM output maps,
//     o[k] = b[k] + sum over f, r, c of w[k][f][r][c] * x[f][r][c].
// LANES output maps are updated per cycle: each lane has IN_PORTS*KH*KW
// multipliers feeding one adder_tree, and the OUT_FM/LANES lane groups of a
// window are worked through in consecutive cycles while the window stays in
// the memory structure's registers (they are the core's input buffer).
// LANES is chosen (cnn_pkg::core_lanes) so that one position takes no more
// than the initiation interval of Eq. (4),
//     II = max(OUT_FM / OUT_PORTS, IN_FM / IN_PORTS) cycles,
// and the output side sends OUT_FM/OUT_PORTS beats per position, so a core
// sustains one position per II cycles.
//
// When the last input group of a position has been processed, the next cycle
// moves the sums, requantised and passed through the activation, into a
// result bank (as soon as the bank is free, at the latest in the cycle its
// last beat leaves); the bank is sent while the next position is
// accumulated, so the transfer costs one cycle of latency but no throughput. Output map k leaves on port
// k % OUT_PORTS in beat k / OUT_PORTS; each port has its own handshake, and a
// beat ends when every port has delivered its value.
//
// Weights are design-time constants in a read-only table (index
// ((k*IN_FM + f)*KH + r)*KW + c) filled from cnn_pkg::param_value(SEED, ...);
// biases likewise with bias_seed(SEED).
//
// From the document: the algorithm, hard-coded weights, the tree adder, the
// per-output accumulators, the interval of Eq. (4). This design's own: fixed
// point, the lane organisation that realises the interval, the result bank,
// the port and weight ordering.
module conv_core
  import cnn_pkg::*;
#(
  parameter int unsigned IN_PORTS  = 1,
  parameter int unsigned IN_FM     = 1,
  parameter int unsigned OUT_PORTS = 6,
  parameter int unsigned OUT_FM    = 6,
  parameter int unsigned KH        = 5,
  parameter int unsigned KW        = 5,
  parameter act_e        ACT       = ACT_RELU,
  parameter int unsigned SEED      = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t win_data  [IN_PORTS][KH*KW],
  input  logic  win_valid,
  output logic  win_ready,
  output data_t out_data  [OUT_PORTS],
  output logic  out_valid [OUT_PORTS],
  input  logic  out_ready [OUT_PORTS]
);
  localparam int unsigned NT    = KH * KW;
  localparam int unsigned G_IN  = IN_FM / IN_PORTS;
  localparam int unsigned LANES = core_lanes(IN_FM, IN_PORTS, OUT_FM, OUT_PORTS);
  localparam int unsigned STEPS = OUT_FM / LANES;
  localparam int unsigned BEATS = OUT_FM / OUT_PORTS;
  localparam int unsigned NPROD = IN_PORTS * NT;
  localparam int unsigned NW    = OUT_FM * IN_FM * NT;
  localparam int unsigned SW    = clog2_min1(STEPS);
  localparam int unsigned GW    = clog2_min1(G_IN);
  localparam int unsigned BW    = clog2_min1(BEATS);

  // design-time weight and bias tables
  data_t wrom [NW];
  data_t brom [OUT_FM];
  initial begin
    for (int i = 0; i < NW; i++)     wrom[i] = param_value(SEED, i);
    for (int i = 0; i < OUT_FM; i++) brom[i] = param_value(bias_seed(SEED), i);
  end

  logic [SW-1:0] step;
  logic [GW-1:0] gi;
  logic [BW-1:0] beat;
  acc_t          acc  [OUT_FM];
  data_t         res  [OUT_FM];
  logic          res_full;
  logic          sent [OUT_PORTS];

  logic          acc_done;
  logic          last_group, last_step, beat_done, out_done, compute, xfer;
  acc_t          prod [LANES][NPROD];
  acc_t          lsum [LANES];

  // ---------------- multipliers and adder trees ----------------
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      for (int p = 0; p < IN_PORTS; p++) begin
        for (int t = 0; t < NT; t++) begin
          prod[l][p*NT + t] = acc_t'(win_data[p][t]) *
                              acc_t'(wrom[((int'(step) * LANES + l) * IN_FM +
                                           int'(gi) * IN_PORTS + p) * NT + t]);
        end
      end
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    adder_tree #(.N(NPROD)) u_tree (.in(prod[l]), .sum(lsum[l]));
  end

  // ---------------- control ----------------
  always_comb begin
    last_group = (gi == GW'(G_IN - 1));
    last_step  = (step == SW'(STEPS - 1));
    beat_done  = res_full;
    for (int q = 0; q < OUT_PORTS; q++) beat_done &= (sent[q] || out_ready[q]);
    out_done   = beat_done && (beat == BW'(BEATS - 1));
    // finished sums move to the result bank as soon as it is free
    xfer       = acc_done && (!res_full || out_done);
    // a new position may overwrite the accumulators only once they are moved
    compute    = win_valid && (!acc_done || xfer);
    win_ready  = compute && last_step;
  end

  always_comb begin
    for (int q = 0; q < OUT_PORTS; q++) begin
      out_valid[q] = res_full && !sent[q];
      out_data[q]  = res[int'(beat) * OUT_PORTS + q];
    end
  end

  always_ff @(posedge clk) begin
    if (compute) begin
      for (int l = 0; l < LANES; l++) begin
        automatic acc_t base = (gi == '0) ? bias_acc(brom[int'(step) * LANES + l])
                                          : acc[int'(step) * LANES + l];
        acc[int'(step) * LANES + l] <= base + lsum[l];
      end
    end
    if (xfer) begin
      for (int k = 0; k < OUT_FM; k++) res[k] <= activate(requant(acc[k]), ACT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step     <= '0;
      gi       <= '0;
      beat     <= '0;
      acc_done <= 1'b0;
      res_full <= 1'b0;
      for (int q = 0; q < OUT_PORTS; q++) sent[q] <= 1'b0;
    end else begin
      // input side
      if (compute) begin
        if (last_step) begin
          step <= '0;
          gi   <= last_group ? '0 : gi + 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
      if (compute && last_group && last_step) acc_done <= 1'b1;
      else if (xfer)                          acc_done <= 1'b0;
      // output side
      if (beat_done) begin
        for (int q = 0; q < OUT_PORTS; q++) sent[q] <= 1'b0;
        beat <= out_done ? '0 : beat + 1'b1;
      end else begin
        for (int q = 0; q < OUT_PORTS; q++) sent[q] <= sent[q] || (out_valid[q] && out_ready[q]);
      end
      if (xfer)          res_full <= 1'b1;
      else if (out_done) res_full <= 1'b0;
    end
  end
endmodule
