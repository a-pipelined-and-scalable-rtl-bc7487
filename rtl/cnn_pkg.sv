// cnn_pkg: types, constants and helper functions shared by every layer of the
// dataflow CNN.
//
// Numbers: all feature-map values, weights and biases are signed fixed point,
// DATA_W bits with FRAC_W fraction bits (Q7.8 by default). Products and sums
// are kept at full precision in ACC_W-bit accumulators; a result is brought
// back to DATA_W bits by an arithmetic shift of FRAC_W and saturation. The
// reference networks use single-precision floating point; fixed point is this
// design's choice (it also removes the long floating-point accumulation
// latency that forced interleaved accumulators in the original).
//
// Weights: the layers hold their weights in on-chip read-only tables that are
// fixed when the design is built. Trained values are not part of the hardware,
// so the tables are filled from param_value(), a deterministic hash of a
// per-layer seed and the weight index, giving values in [-0.25, 0.25).
// Replace param_value() (or the table initialisation) with trained values.
//
// Streams: every stream in the design is a valid/ready channel with the
// AXI4-Stream transfer rule (a beat moves when valid and ready are both high).
package cnn_pkg;

  parameter int unsigned DATA_W = 16;
  parameter int unsigned FRAC_W = 8;
  parameter int unsigned ACC_W  = 40;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Non-linear function applied to a layer's outputs.
  typedef enum logic [0:0] {
    ACT_NONE = 1'b0,
    ACT_RELU = 1'b1
  } act_e;

  // Sub-sampling function.
  typedef enum logic [0:0] {
    POOL_MAX  = 1'b0,
    POOL_MEAN = 1'b1
  } pool_e;

  // Design-time weight / bias value number idx of the table with this seed.
  function automatic data_t param_value(int unsigned seed, int unsigned idx);
    logic [31:0] h;
    h = (idx + 32'd1) * 32'h9E37_79B1;
    h = h ^ ((seed + 32'd7) * 32'h85EB_CA77);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return data_t'(signed'({9'd0, h[6:0]}) - 16'sd64);
  endfunction

  // Seed of the bias table of a layer whose weight table uses seed.
  function automatic int unsigned bias_seed(int unsigned seed);
    return seed + 32'd1000;
  endfunction

  // Full-precision sum -> DATA_W bits: drop FRAC_W bits, saturate.
  function automatic data_t requant(acc_t a);
    acc_t s;
    s = a >>> FRAC_W;
    if (s > acc_t'(32767))       return data_t'(16'sh7FFF);
    else if (s < acc_t'(-32768)) return data_t'(16'sh8000);
    else                          return data_t'(s);
  endfunction

  function automatic data_t activate(data_t v, act_e act);
    if (act == ACT_RELU && v < 0) return '0;
    return v;
  endfunction

  // Bias placed at the binary point of a product sum.
  function automatic acc_t bias_acc(data_t b);
    return acc_t'(b) <<< FRAC_W;
  endfunction

  // Initiation interval of a computation core, Eq. (4):
  // max(OUT_FM / OUT_PORTS, IN_FM / IN_PORTS).
  function automatic int unsigned pipeline_ii(int unsigned in_fm, int unsigned in_ports,
                                              int unsigned out_fm, int unsigned out_ports);
    int unsigned a, b;
    a = out_fm / out_ports;
    b = in_fm / in_ports;
    return (a > b) ? a : b;
  endfunction

  // Output lanes a computation core needs to meet that interval: every input
  // window group must update OUT_FM accumulators, IN_FM/IN_PORTS groups per
  // position, all within pipeline_ii cycles. The result is rounded up to a
  // divisor of out_fm so that every lane group is full.
  function automatic int unsigned core_lanes(int unsigned in_fm, int unsigned in_ports,
                                             int unsigned out_fm, int unsigned out_ports);
    int unsigned need, ii;
    ii   = pipeline_ii(in_fm, in_ports, out_fm, out_ports);
    need = (out_fm * (in_fm / in_ports) + ii - 1) / ii;
    if (need < 1) need = 1;
    for (int unsigned l = need; l < out_fm; l++)
      if (out_fm % l == 0) return l;
    return out_fm;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
