// fm_merge: joins N output ports of a layer into one input port of the next
// layer, which has fewer input ports.
//
// The merge reads the N ports in turn, one element from each, so the maps
// they carry are interleaved on the output: port j's k-th map of a pixel
// comes out as element k*N + j. With every layer sending map f on port
// f % ports, this puts the maps back in ascending order. Pass-through
// without a register; in_ready goes only to the port whose turn it is.
//
// The document describes this case (previous layer with more output ports)
// as an extra innermost loop in the filters that cycles over the previous
// layer's ports, with FIFOs enlarged for the extra maps. Here the loop is a
// separate round-robin reader in front of an unchanged memory structure,
// whose FIFOs are sized for the interleaved maps; the result on the stream is
// the same.
module fm_merge
  import cnn_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data   [N],
  input  logic  in_valid  [N],
  output logic  in_ready  [N],
  output data_t out_data,
  output logic  out_valid,
  input  logic  out_ready
);
  localparam int unsigned SW = clog2_min1(N);

  logic [SW-1:0] sel;

  always_comb begin
    out_data  = in_data[sel];
    out_valid = in_valid[sel];
    for (int k = 0; k < N; k++) in_ready[k] = out_ready && (sel == SW'(k));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      sel <= '0;
    else if (out_valid && out_ready) sel <= (sel == SW'(N - 1)) ? '0 : sel + 1'b1;
  end
endmodule
