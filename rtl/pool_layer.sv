// pool_layer: one sub-sampling core, for the feature maps of one port.
//
// The port's stream (raster order, CH maps interleaved per pixel) enters a
// window_buffer of K x K taps whose filters select with stride STRIDE, so
// each window covers a K x K block of one map. The window is reduced to its
// maximum (POOL_MAX) or its mean (POOL_MEAN, sum shifted right by log2(K*K),
// so K*K must be a power of two) and placed in an output register. Maps are
// treated separately and keep their interleaving on the output.
//
// Timing: one window enters the reduction per cycle when the output register
// is free or being emptied; the output register adds one cycle of latency.
// A layer with several output ports gets one pool_layer per port, as the
// maps are never combined.
//
// From the document: max/mean sub-sampling of each map through the same
// memory structure as the convolution, and one core per port. The output
// register and the shift used for the mean are this design's choices.
module pool_layer
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W  = 12,
  parameter int unsigned IMG_H  = 12,
  parameter int unsigned CH     = 1,
  parameter int unsigned K      = 2,
  parameter int unsigned STRIDE = 2,
  parameter pool_e       MODE   = POOL_MAX
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output data_t out_data,
  output logic  out_valid,
  input  logic  out_ready
);
  localparam int unsigned NT = K * K;

  data_t win_data [NT];
  logic  win_valid, win_ready;
  data_t reduced;

  window_buffer #(
    .IMG_W (IMG_W),
    .IMG_H (IMG_H),
    .CH    (CH),
    .KH    (K),
    .KW    (K),
    .STRIDE(STRIDE)
  ) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (in_data),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .win_data (win_data),
    .win_valid(win_valid),
    .win_ready(win_ready)
  );

  always_comb begin
    acc_t  sum;
    data_t mx;
    sum = '0;
    mx  = win_data[0];
    for (int t = 0; t < NT; t++) begin
      sum += acc_t'(win_data[t]);
      if (win_data[t] > mx) mx = win_data[t];
    end
    reduced = (MODE == POOL_MAX) ? mx : data_t'(sum >>> $clog2(NT));
  end

  assign win_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (win_ready) begin
      out_valid <= win_valid;
      if (win_valid) out_data <= reduced;
    end
  end
endmodule
