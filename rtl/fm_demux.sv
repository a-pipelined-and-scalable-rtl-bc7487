// fm_demux: demux core between a layer with fewer output ports and a layer
// with more input ports.
//
// The feature maps interleaved on the single input port are dealt out over
// N output ports, one element each in turn: element number e of a pixel goes
// to port e % N, so that map f ends on port f % N (the ordering every layer
// of this design uses). The input stream is passed through without a
// register: in_ready is the ready of the port whose turn it is, and the turn
// moves on with every transfer.
//
// The demux core is named and its purpose given by the document; this
// round-robin circuit is this design's own.
module fm_demux
  import cnn_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output data_t out_data  [N],
  output logic  out_valid [N],
  input  logic  out_ready [N]
);
  localparam int unsigned SW = clog2_min1(N);

  logic [SW-1:0] sel;

  always_comb begin
    in_ready = out_ready[sel];
    for (int k = 0; k < N; k++) begin
      out_data[k]  = in_data;
      out_valid[k] = in_valid && (sel == SW'(k));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    sel <= '0;
    else if (in_valid && in_ready) sel <= (sel == SW'(N - 1)) ? '0 : sel + 1'b1;
  end
endmodule
