// cnn_usps: the USPS handwritten-digit network as one dataflow pipeline.
//
//   input 16x16x1 --> conv 5x5, 1 -> 6 maps, 1 input port, 6 output ports
//                     (fully parallel: one position per cycle)
//                 --> 6 max-pool cores 2x2, stride 2, one per port
//                 --> merge of the 6 ports into 1 (maps interleaved)
//                 --> conv 5x5, 6 -> 16 maps, single port in and out
//                     (one position per 16 cycles, Eq. (4))
//                 --> fully-connected 64 -> 10 classes, single port
//
// Pixels enter on s_* in raster order, one 16-bit Q7.8 value per beat, images
// back to back. The ten class scores of each image leave on m_*, class 0
// first, with m_last on class 9. Every stage is a free-running dataflow core
// joined to the next by valid/ready streams, so several images are in flight
// at once (the high-level pipeline): at steady state the interval between
// images is set by the slowest stage, here the input port (IMG_W*IMG_H
// cycles per image).
//
// The layer sizes, the port counts of each layer and the layer order are
// those of the document's first test case; the fixed-point format, the ReLU
// after each convolution, the design-time weight values (cnn_pkg), and the
// single-port second convolution fed through a port merge are this design's
// reading of it.
module cnn_usps
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W        = 16,
  parameter int unsigned IMG_H        = 16,
  parameter int unsigned K            = 5,
  parameter int unsigned C1_FM        = 6,
  parameter int unsigned C1_OUT_PORTS = 6,
  parameter int unsigned POOL_K       = 2,
  parameter int unsigned POOL_S       = 2,
  parameter int unsigned C2_FM        = 16,
  parameter int unsigned C2_IN_PORTS  = 1,
  parameter int unsigned C2_OUT_PORTS = 1,
  parameter int unsigned CLASSES      = 10,
  parameter int unsigned C1_SEED      = 1,
  parameter int unsigned C2_SEED      = 2,
  parameter int unsigned FC_SEED      = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t s_data,
  input  logic  s_valid,
  output logic  s_ready,
  output data_t m_data,
  output logic  m_valid,
  output logic  m_last,
  input  logic  m_ready
);
  localparam int unsigned C1_W  = IMG_W - K + 1;
  localparam int unsigned C1_H  = IMG_H - K + 1;
  localparam int unsigned P_W   = (C1_W - POOL_K) / POOL_S + 1;
  localparam int unsigned P_H   = (C1_H - POOL_K) / POOL_S + 1;
  localparam int unsigned C2_W  = P_W - K + 1;
  localparam int unsigned C2_H  = P_H - K + 1;
  localparam int unsigned FC_IN = C2_W * C2_H * C2_FM;

  // input port
  data_t in_data  [1];
  logic  in_valid [1];
  logic  in_ready [1];
  assign in_data[0]  = s_data;
  assign in_valid[0] = s_valid;
  assign s_ready     = in_ready[0];

  // conv1 -> pool
  data_t c1_data  [C1_OUT_PORTS];
  logic  c1_valid [C1_OUT_PORTS];
  logic  c1_ready [C1_OUT_PORTS];
  // pool -> merge
  data_t p_data   [C1_OUT_PORTS];
  logic  p_valid  [C1_OUT_PORTS];
  logic  p_ready  [C1_OUT_PORTS];
  // merge -> conv2
  data_t c2i_data [C2_IN_PORTS];
  logic  c2i_valid[C2_IN_PORTS];
  logic  c2i_ready[C2_IN_PORTS];
  // conv2 -> fc
  data_t c2_data  [C2_OUT_PORTS];
  logic  c2_valid [C2_OUT_PORTS];
  logic  c2_ready [C2_OUT_PORTS];
  data_t fc_data  [1];
  logic  fc_valid [1];
  logic  fc_ready [1];

  conv_layer #(
    .IMG_W(IMG_W), .IMG_H(IMG_H),
    .IN_PORTS(1), .IN_FM(1), .OUT_PORTS(C1_OUT_PORTS), .OUT_FM(C1_FM),
    .KH(K), .KW(K), .STRIDE(1), .ACT(ACT_RELU), .SEED(C1_SEED)
  ) u_conv1 (
    .clk(clk), .rst_n(rst_n),
    .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .out_data(c1_data), .out_valid(c1_valid), .out_ready(c1_ready)
  );

  // one sub-sampling core per output port of conv1
  for (genvar p = 0; p < C1_OUT_PORTS; p++) begin : g_pool
    pool_layer #(
      .IMG_W(C1_W), .IMG_H(C1_H), .CH(C1_FM / C1_OUT_PORTS),
      .K(POOL_K), .STRIDE(POOL_S), .MODE(POOL_MAX)
    ) u_pool (
      .clk(clk), .rst_n(rst_n),
      .in_data(c1_data[p]), .in_valid(c1_valid[p]), .in_ready(c1_ready[p]),
      .out_data(p_data[p]), .out_valid(p_valid[p]), .out_ready(p_ready[p])
    );
  end

  port_adapter #(.PREV(C1_OUT_PORTS), .NEXT(C2_IN_PORTS)) u_adapt_p2 (
    .clk(clk), .rst_n(rst_n),
    .in_data(p_data), .in_valid(p_valid), .in_ready(p_ready),
    .out_data(c2i_data), .out_valid(c2i_valid), .out_ready(c2i_ready)
  );

  conv_layer #(
    .IMG_W(P_W), .IMG_H(P_H),
    .IN_PORTS(C2_IN_PORTS), .IN_FM(C1_FM), .OUT_PORTS(C2_OUT_PORTS), .OUT_FM(C2_FM),
    .KH(K), .KW(K), .STRIDE(1), .ACT(ACT_RELU), .SEED(C2_SEED)
  ) u_conv2 (
    .clk(clk), .rst_n(rst_n),
    .in_data(c2i_data), .in_valid(c2i_valid), .in_ready(c2i_ready),
    .out_data(c2_data), .out_valid(c2_valid), .out_ready(c2_ready)
  );

  port_adapter #(.PREV(C2_OUT_PORTS), .NEXT(1)) u_adapt_fc (
    .clk(clk), .rst_n(rst_n),
    .in_data(c2_data), .in_valid(c2_valid), .in_ready(c2_ready),
    .out_data(fc_data), .out_valid(fc_valid), .out_ready(fc_ready)
  );

  fc_layer #(
    .IN_N(FC_IN), .OUT_N(CLASSES), .ACT(ACT_NONE), .SEED(FC_SEED)
  ) u_fc (
    .clk(clk), .rst_n(rst_n),
    .in_data(fc_data[0]), .in_valid(fc_valid[0]), .in_ready(fc_ready[0]),
    .out_data(m_data), .out_valid(m_valid), .out_last(m_last), .out_ready(m_ready)
  );
endmodule
