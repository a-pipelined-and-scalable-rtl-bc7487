// window_filter: one filter of a memory structure, the building block taken
// from the memory system of a Streaming Stencil Time-step (SST).
//
// The filter sits in a chain and sees the whole input stream of its port, in
// raster order with CH feature maps interleaved per pixel (element order: row,
// column, channel). It reads every element from the FIFO before it and passes
// it on to the next FIFO (unless FORWARD is 0, for the last filter of the
// chain). It is responsible for one tap (TAP_R, TAP_C) of the KH x KW
// convolution window: when the element at hand is that tap of some output
// window, it also copies the element into its window register, which the
// computation core reads. Which elements are taps follows from the element's
// coordinates, the window size and the stride: row y is a tap row when
// y - TAP_R is a non-negative multiple of STRIDE below OUT_H * STRIDE (same
// for columns). No zero padding is applied.
//
// Timing: an element moves through the filter in the cycle it arrives (the
// filter has no register on the forward path; the FIFOs provide them). A
// needed element is taken only when the window register is empty or is being
// read in the same cycle, otherwise the filter stalls its input, which is
// what holds the chain in step with the computation core. Window register
// output: win_data / win_valid, emptied by win_ready.
//
// Following the document: forwarding to the next FIFO, selection of the
// element that belongs to the window, and stride by changing that selection.
// The counters and handshake are this design's own.
module window_filter
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W   = 16,
  parameter int unsigned IMG_H   = 16,
  parameter int unsigned CH      = 1,
  parameter int unsigned KH      = 5,
  parameter int unsigned KW      = 5,
  parameter int unsigned STRIDE  = 1,
  parameter int unsigned TAP_R   = 0,
  parameter int unsigned TAP_C   = 0,
  parameter bit          FORWARD = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the previous FIFO (or the port)
  input  data_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  // to the next FIFO
  output data_t fwd_data,
  output logic  fwd_valid,
  input  logic  fwd_ready,
  // window register, read by the computation core
  output data_t win_data,
  output logic  win_valid,
  input  logic  win_ready
);
  localparam int unsigned OUT_W = (IMG_W - KW) / STRIDE + 1;
  localparam int unsigned OUT_H = (IMG_H - KH) / STRIDE + 1;
  localparam int unsigned XW = clog2_min1(IMG_W);
  localparam int unsigned YW = clog2_min1(IMG_H);
  localparam int unsigned CW = clog2_min1(CH);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [CW-1:0] c;
  logic          x_tap, y_tap, needed, store_ok, take;

  // Is coordinate v the tap 'tap' of some window along an axis with n outputs?
  function automatic logic is_tap(int unsigned v, int unsigned tap, int unsigned n);
    if (v < tap) return 1'b0;
    if ((v - tap) % STRIDE != 0) return 1'b0;
    return ((v - tap) / STRIDE) < n;
  endfunction

  always_comb begin
    x_tap    = is_tap(int'(x), TAP_C, OUT_W);
    y_tap    = is_tap(int'(y), TAP_R, OUT_H);
    needed   = x_tap && y_tap;
    store_ok = !needed || !win_valid || win_ready;
    in_ready = store_ok && (!FORWARD || fwd_ready);
    take     = in_valid && in_ready;
  end

  assign fwd_data  = in_data;
  assign fwd_valid = FORWARD && in_valid && store_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      c         <= '0;
      win_valid <= 1'b0;
      win_data  <= '0;
    end else begin
      if (take && needed) begin
        win_data  <= in_data;
        win_valid <= 1'b1;
      end else if (win_ready) begin
        win_valid <= 1'b0;
      end
      if (take) begin
        if (c == CW'(CH - 1)) begin
          c <= '0;
          if (x == XW'(IMG_W - 1)) begin
            x <= '0;
            y <= (y == YW'(IMG_H - 1)) ? '0 : y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end
endmodule
