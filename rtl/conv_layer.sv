// conv_layer: a convolutional layer, memory structure plus computation core.
//
// Each of the IN_PORTS input ports carries IN_FM/IN_PORTS feature maps
// interleaved per pixel (map f travels on port f % IN_PORTS) and feeds its own
// window_buffer (chain of filters and FIFOs). When every port's buffer holds
// a complete window, the windows go to the conv_core as one group; the core
// takes IN_FM/IN_PORTS groups per output position, applies the weights and
// sends OUT_FM results over OUT_PORTS output ports (map k on port
// k % OUT_PORTS). A layer accepts a new position every
// max(OUT_FM/OUT_PORTS, IN_FM/IN_PORTS) cycles (Eq. (4)) and streams
// consecutive images without pause, so layers chained together form the
// high-level pipeline of the network.
//
// Interface: valid/ready streams, one per port. Output size per map:
// ((IMG_H-KH)/STRIDE+1) x ((IMG_W-KW)/STRIDE+1), raster order. No padding.
//
// The organisation (per-port filter pipelines, joined windows, one core) is
// the document's; sizes default to the first layer of the USPS network.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W     = 16,
  parameter int unsigned IMG_H     = 16,
  parameter int unsigned IN_PORTS  = 1,
  parameter int unsigned IN_FM     = 1,
  parameter int unsigned OUT_PORTS = 6,
  parameter int unsigned OUT_FM    = 6,
  parameter int unsigned KH        = 5,
  parameter int unsigned KW        = 5,
  parameter int unsigned STRIDE    = 1,
  parameter act_e        ACT       = ACT_RELU,
  parameter int unsigned SEED      = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data   [IN_PORTS],
  input  logic  in_valid  [IN_PORTS],
  output logic  in_ready  [IN_PORTS],
  output data_t out_data  [OUT_PORTS],
  output logic  out_valid [OUT_PORTS],
  input  logic  out_ready [OUT_PORTS]
);
  localparam int unsigned NT = KH * KW;

  data_t win_data  [IN_PORTS][NT];
  logic  port_valid[IN_PORTS];
  logic  win_valid, win_ready;

  for (genvar p = 0; p < IN_PORTS; p++) begin : g_port
    window_buffer #(
      .IMG_W (IMG_W),
      .IMG_H (IMG_H),
      .CH    (IN_FM / IN_PORTS),
      .KH    (KH),
      .KW    (KW),
      .STRIDE(STRIDE)
    ) u_mem (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_data  (in_data[p]),
      .in_valid (in_valid[p]),
      .in_ready (in_ready[p]),
      .win_data (win_data[p]),
      .win_valid(port_valid[p]),
      .win_ready(win_ready)
    );
  end

  // join: the core sees a window group only when every port has one
  always_comb begin
    win_valid = 1'b1;
    for (int p = 0; p < IN_PORTS; p++) win_valid &= port_valid[p];
  end

  conv_core #(
    .IN_PORTS (IN_PORTS),
    .IN_FM    (IN_FM),
    .OUT_PORTS(OUT_PORTS),
    .OUT_FM   (OUT_FM),
    .KH       (KH),
    .KW       (KW),
    .ACT      (ACT),
    .SEED     (SEED)
  ) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .win_data (win_data),
    .win_valid(win_valid),
    .win_ready(win_ready),
    .out_data (out_data),
    .out_valid(out_valid),
    .out_ready(out_ready)
  );
endmodule
