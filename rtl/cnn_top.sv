// cnn_top: the two networks built with the dataflow layer library, side by
// side, each with its own input and output stream.
//
//   usps_*  : cnn_usps    - 16x16 grey-scale digits, conv / max-pool / conv /
//                           linear, first convolution and sub-sampling fully
//                           parallel (6 ports), 10 class scores per image.
//   cifar_* : cnn_cifar10 - 32x32 RGB images, conv / max-pool / conv /
//                           max-pool / linear / linear, every layer single
//                           port, 10 class scores per image.
//
// The two share only clock and reset. Streams are valid/ready with 16-bit
// Q7.8 data; inputs are raster-order pixels (colour values of a pixel in a
// row for CIFAR-10), outputs the class scores, class 0 first, *_m_last on the
// last. Each network accepts images back to back and keeps several in flight
// (the high-level pipeline between layers).
module cnn_top
  import cnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // USPS network
  input  data_t usps_s_data,
  input  logic  usps_s_valid,
  output logic  usps_s_ready,
  output data_t usps_m_data,
  output logic  usps_m_valid,
  output logic  usps_m_last,
  input  logic  usps_m_ready,
  // CIFAR-10 network
  input  data_t cifar_s_data,
  input  logic  cifar_s_valid,
  output logic  cifar_s_ready,
  output data_t cifar_m_data,
  output logic  cifar_m_valid,
  output logic  cifar_m_last,
  input  logic  cifar_m_ready
);
  cnn_usps u_usps (
    .clk(clk), .rst_n(rst_n),
    .s_data(usps_s_data), .s_valid(usps_s_valid), .s_ready(usps_s_ready),
    .m_data(usps_m_data), .m_valid(usps_m_valid), .m_last(usps_m_last), .m_ready(usps_m_ready)
  );

  cnn_cifar10 u_cifar (
    .clk(clk), .rst_n(rst_n),
    .s_data(cifar_s_data), .s_valid(cifar_s_valid), .s_ready(cifar_s_ready),
    .m_data(cifar_m_data), .m_valid(cifar_m_valid), .m_last(cifar_m_last), .m_ready(cifar_m_ready)
  );
endmodule
