// adder_tree: sum of N full-precision products, built as a balanced binary
// tree (the "reduce" step of the computation core).
//
// Level 0 holds the N inputs; every further level adds neighbouring pairs of
// the level below (an odd last element is passed through), so level l has
// ceil(N / 2^l) values and the depth is ceil(log2(N)) adders instead of N-1
// for a chain. Each level has its own array, so no signal depends on another
// element of the same array. Purely combinational; the caller registers the
// result. Interface: in[N] (acc_t), sum (acc_t); no clock. The use of a tree
// to shorten the core's pipeline is the document's; this form of it is this
// design's own.
module adder_tree
  import cnn_pkg::*;
#(
  parameter int unsigned N = 25
) (
  input  acc_t in  [N],
  output acc_t sum
);
  // number of values at level l
  function automatic int unsigned width_at(int unsigned l);
    int unsigned w = N;
    for (int unsigned i = 0; i < l; i++) w = (w + 1) / 2;
    return w;
  endfunction

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned M = width_at(l);
    acc_t s [M];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < M; i++) begin : g_i
        assign s[i] = in[i];
      end
    end else begin : g_add
      localparam int unsigned MP = width_at(l - 1);
      for (genvar i = 0; i < M; i++) begin : g_i
        if (2 * i + 1 < MP) begin : g_pair
          assign s[i] = g_lvl[l-1].s[2*i] + g_lvl[l-1].s[2*i+1];
        end else begin : g_pass
          assign s[i] = g_lvl[l-1].s[2*i];
        end
      end
    end
  end

  assign sum = g_lvl[LEVELS].s[0];
endmodule
