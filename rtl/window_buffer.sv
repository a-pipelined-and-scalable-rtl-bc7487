// window_buffer: the memory structure of one input port of a layer.
//
// The input stream (raster order, CH feature maps interleaved per pixel)
// enters a chain of KH*KW window_filters joined by stream_fifos. The first
// filter of the chain owns the last tap of the window (KH-1, KW-1), the last
// filter the first tap (0, 0). Each FIFO is as long as the distance, counted
// in stream elements, between the taps of the two filters it joins, plus one
// word of slack: CH between horizontal neighbours and (IMG_W-KW+1)*CH from
// the start of one window row to the end of the row above. All filters
// therefore hold the taps of the same window at the same time, and the
// buffering is that of a sliding-window line buffer: every element is read
// once from the port and kept on chip exactly as long as windows need it.
//
// Output: win_data[t] is tap t = r*KW + c of the current window; win_valid
// is high when every filter holds its tap, and win_ready (given by the
// computation core) empties all window registers together. Windows come out
// in the order of their top-left corner (row, column), and for each corner
// once per channel. Once the chain is full, one window per cycle can be
// delivered (with STRIDE 1, one input element per cycle). Several images can
// follow each other without a gap.
//
// The structure (filters, FIFOs, window registers, stride in the filters)
// is the document's; the exact FIFO lengths, the one word of slack and the
// handshake are this design's.
module window_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W  = 16,
  parameter int unsigned IMG_H  = 16,
  parameter int unsigned CH     = 1,
  parameter int unsigned KH     = 5,
  parameter int unsigned KW     = 5,
  parameter int unsigned STRIDE = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output data_t win_data [KH*KW],
  output logic  win_valid,
  input  logic  win_ready
);
  localparam int unsigned N = KH * KW;

  // chain position j holds tap N-1-j
  data_t f_in_data  [N];
  logic  f_in_valid [N];
  logic  f_in_ready [N];
  data_t f_fwd_data [N];
  logic  f_fwd_valid[N];
  logic  f_fwd_ready[N];
  logic  f_win_valid[N];
  logic  all_valid;

  assign f_in_data[0]  = in_data;
  assign f_in_valid[0] = in_valid;
  assign in_ready      = f_in_ready[0];

  for (genvar j = 0; j < N; j++) begin : g_chain
    localparam int unsigned TAP = N - 1 - j;
    localparam int unsigned R   = TAP / KW;
    localparam int unsigned C   = TAP % KW;

    window_filter #(
      .IMG_W  (IMG_W),
      .IMG_H  (IMG_H),
      .CH     (CH),
      .KH     (KH),
      .KW     (KW),
      .STRIDE (STRIDE),
      .TAP_R  (R),
      .TAP_C  (C),
      .FORWARD(j != N - 1)
    ) u_filter (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_data  (f_in_data[j]),
      .in_valid (f_in_valid[j]),
      .in_ready (f_in_ready[j]),
      .fwd_data (f_fwd_data[j]),
      .fwd_valid(f_fwd_valid[j]),
      .fwd_ready(f_fwd_ready[j]),
      .win_data (win_data[TAP]),
      .win_valid(f_win_valid[j]),
      .win_ready(win_ready && all_valid)
    );

    if (j < N - 1) begin : g_fifo
      // distance from tap TAP to tap TAP-1 in stream elements
      localparam int unsigned DIST = (C > 0) ? CH : (IMG_W - KW + 1) * CH;
      stream_fifo #(
        .WIDTH(DATA_W),
        .DEPTH(DIST + 1)
      ) u_fifo (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_data  (f_fwd_data[j]),
        .in_valid (f_fwd_valid[j]),
        .in_ready (f_fwd_ready[j]),
        .out_data (f_in_data[j+1]),
        .out_valid(f_in_valid[j+1]),
        .out_ready(f_in_ready[j+1])
      );
    end else begin : g_end
      assign f_fwd_ready[j] = 1'b1;
    end
  end

  always_comb begin
    all_valid = 1'b1;
    for (int j = 0; j < N; j++) all_valid &= f_win_valid[j];
  end

  assign win_valid = all_valid;
endmodule
