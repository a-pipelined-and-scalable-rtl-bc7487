// cnn_cifar10: the CIFAR-10 network as one dataflow pipeline, every layer in
// its single-input-port / single-output-port form.
//
//   input 32x32x3 --> conv 5x5, 3 -> 12 maps   (one position per 12 cycles)
//                 --> max-pool 2x2, stride 2, 12 interleaved maps
//                 --> conv 5x5, 12 -> 36 maps  (one position per 36 cycles)
//                 --> max-pool 2x2, stride 2, 36 interleaved maps
//                 --> linear 900 -> HIDDEN, ReLU
//                 --> linear HIDDEN -> 10 classes
//
// Pixels enter on s_* in raster order with the three colour values of a pixel
// one after the other (R, G, B), one 16-bit Q7.8 value per beat, images back
// to back. The ten class scores of each image leave on m_*, class 0 first,
// m_last on class 9. All layers run concurrently on different images once the
// pipeline is full; the slowest stage is the first convolution, 28x28
// positions at 12 cycles each (Eq. (4)), about 9.4k cycles per image.
//
// Layer sizes, the single-port form of every layer and the layer order are
// the document's second test case. The size of the hidden linear layer is not
// given there; HIDDEN = 64 is this design's choice, as are the fixed-point
// format, ReLU after the convolutions and the hidden layer, max (rather than
// mean) sub-sampling and the design-time weight values (cnn_pkg).
module cnn_cifar10
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W   = 32,
  parameter int unsigned IMG_H   = 32,
  parameter int unsigned IMG_CH  = 3,
  parameter int unsigned K       = 5,
  parameter int unsigned C1_FM   = 12,
  parameter int unsigned C2_FM   = 36,
  parameter int unsigned HIDDEN  = 64,
  parameter int unsigned CLASSES = 10,
  parameter int unsigned C1_SEED = 11,
  parameter int unsigned C2_SEED = 12,
  parameter int unsigned F1_SEED = 13,
  parameter int unsigned F2_SEED = 14
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
  localparam int unsigned P1_W  = C1_W / 2;
  localparam int unsigned P1_H  = C1_H / 2;
  localparam int unsigned C2_W  = P1_W - K + 1;
  localparam int unsigned C2_H  = P1_H - K + 1;
  localparam int unsigned P2_W  = C2_W / 2;
  localparam int unsigned P2_H  = C2_H / 2;
  localparam int unsigned F1_IN = P2_W * P2_H * C2_FM;

  data_t in_data [1];
  logic  in_valid[1], in_ready[1];
  data_t c1_data [1];
  logic  c1_valid[1], c1_ready[1];
  data_t p1_data [1];
  logic  p1_valid[1], p1_ready[1];
  data_t c2_data [1];
  logic  c2_valid[1], c2_ready[1];
  data_t p2_data;
  logic  p2_valid, p2_ready;
  data_t f1_data;
  logic  f1_valid, f1_ready, f1_last;

  assign in_data[0]  = s_data;
  assign in_valid[0] = s_valid;
  assign s_ready     = in_ready[0];

  conv_layer #(
    .IMG_W(IMG_W), .IMG_H(IMG_H),
    .IN_PORTS(1), .IN_FM(IMG_CH), .OUT_PORTS(1), .OUT_FM(C1_FM),
    .KH(K), .KW(K), .STRIDE(1), .ACT(ACT_RELU), .SEED(C1_SEED)
  ) u_conv1 (
    .clk(clk), .rst_n(rst_n),
    .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .out_data(c1_data), .out_valid(c1_valid), .out_ready(c1_ready)
  );

  pool_layer #(
    .IMG_W(C1_W), .IMG_H(C1_H), .CH(C1_FM), .K(2), .STRIDE(2), .MODE(POOL_MAX)
  ) u_pool1 (
    .clk(clk), .rst_n(rst_n),
    .in_data(c1_data[0]), .in_valid(c1_valid[0]), .in_ready(c1_ready[0]),
    .out_data(p1_data[0]), .out_valid(p1_valid[0]), .out_ready(p1_ready[0])
  );

  conv_layer #(
    .IMG_W(P1_W), .IMG_H(P1_H),
    .IN_PORTS(1), .IN_FM(C1_FM), .OUT_PORTS(1), .OUT_FM(C2_FM),
    .KH(K), .KW(K), .STRIDE(1), .ACT(ACT_RELU), .SEED(C2_SEED)
  ) u_conv2 (
    .clk(clk), .rst_n(rst_n),
    .in_data(p1_data), .in_valid(p1_valid), .in_ready(p1_ready),
    .out_data(c2_data), .out_valid(c2_valid), .out_ready(c2_ready)
  );

  pool_layer #(
    .IMG_W(C2_W), .IMG_H(C2_H), .CH(C2_FM), .K(2), .STRIDE(2), .MODE(POOL_MAX)
  ) u_pool2 (
    .clk(clk), .rst_n(rst_n),
    .in_data(c2_data[0]), .in_valid(c2_valid[0]), .in_ready(c2_ready[0]),
    .out_data(p2_data), .out_valid(p2_valid), .out_ready(p2_ready)
  );

  fc_layer #(
    .IN_N(F1_IN), .OUT_N(HIDDEN), .ACT(ACT_RELU), .SEED(F1_SEED)
  ) u_fc1 (
    .clk(clk), .rst_n(rst_n),
    .in_data(p2_data), .in_valid(p2_valid), .in_ready(p2_ready),
    .out_data(f1_data), .out_valid(f1_valid), .out_last(f1_last), .out_ready(f1_ready)
  );

  fc_layer #(
    .IN_N(HIDDEN), .OUT_N(CLASSES), .ACT(ACT_NONE), .SEED(F2_SEED)
  ) u_fc2 (
    .clk(clk), .rst_n(rst_n),
    .in_data(f1_data), .in_valid(f1_valid), .in_ready(f1_ready),
    .out_data(m_data), .out_valid(m_valid), .out_last(m_last), .out_ready(m_ready)
  );
endmodule
