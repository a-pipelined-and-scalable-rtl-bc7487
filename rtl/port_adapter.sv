// port_adapter: connects the PREV output ports of one layer to the NEXT input
// ports of the following layer, in the three cases the methodology names:
//   PREV == NEXT : ports wired straight through;
//   PREV <  NEXT : each previous port feeds an fm_demux over NEXT/PREV ports
//                  (demux j, output k drives next port j + k*PREV);
//   PREV >  NEXT : each next port is fed by an fm_merge over PREV/NEXT ports
//                  (merge q, input j reads previous port q + j*NEXT).
// Either way map f, which leaves on port f % PREV, arrives on port f % NEXT.
// The larger count must be a multiple of the smaller. No registers.
module port_adapter
  import cnn_pkg::*;
#(
  parameter int unsigned PREV = 6,
  parameter int unsigned NEXT = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_data   [PREV],
  input  logic  in_valid  [PREV],
  output logic  in_ready  [PREV],
  output data_t out_data  [NEXT],
  output logic  out_valid [NEXT],
  input  logic  out_ready [NEXT]
);
  if (PREV == NEXT) begin : g_direct
    for (genvar p = 0; p < PREV; p++) begin : g_p
      assign out_data[p]  = in_data[p];
      assign out_valid[p] = in_valid[p];
      assign in_ready[p]  = out_ready[p];
    end
  end else if (PREV < NEXT) begin : g_demux
    localparam int unsigned N = NEXT / PREV;
    for (genvar j = 0; j < PREV; j++) begin : g_j
      data_t d_data  [N];
      logic  d_valid [N];
      logic  d_ready [N];
      for (genvar k = 0; k < N; k++) begin : g_k
        assign out_data[j + k*PREV]  = d_data[k];
        assign out_valid[j + k*PREV] = d_valid[k];
        assign d_ready[k]            = out_ready[j + k*PREV];
      end
      fm_demux #(.N(N)) u_demux (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_data  (in_data[j]),
        .in_valid (in_valid[j]),
        .in_ready (in_ready[j]),
        .out_data (d_data),
        .out_valid(d_valid),
        .out_ready(d_ready)
      );
    end
  end else begin : g_merge
    localparam int unsigned N = PREV / NEXT;
    for (genvar q = 0; q < NEXT; q++) begin : g_q
      data_t m_data  [N];
      logic  m_valid [N];
      logic  m_ready [N];
      for (genvar j = 0; j < N; j++) begin : g_j
        assign m_data[j]            = in_data[q + j*NEXT];
        assign m_valid[j]           = in_valid[q + j*NEXT];
        assign in_ready[q + j*NEXT] = m_ready[j];
      end
      fm_merge #(.N(N)) u_merge (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_data  (m_data),
        .in_valid (m_valid),
        .in_ready (m_ready),
        .out_data (out_data[q]),
        .out_valid(out_valid[q]),
        .out_ready(out_ready[q])
      );
    end
  end
endmodule
