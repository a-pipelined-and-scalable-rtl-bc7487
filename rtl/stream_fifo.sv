// stream_fifo: first-in first-out channel between two filters of a memory
// structure (and wherever a stream needs slack).
//
// A circular buffer of DEPTH words (any DEPTH >= 1, not only powers of two)
// with a write and a read pointer and an occupancy counter. Input and output
// are valid/ready streams. in_ready is simply "not full" and out_valid "not
// empty", both taken from registers, so no combinational path crosses the
// FIFO; a word written in one cycle can be read in the next. A push and a pop
// may happen in the same cycle. The memory is read asynchronously (distributed
// RAM / registers), which suits the short queues between filters.
//
// The document gives the FIFOs' role and says their sizes follow from the
// distance between the window taps they separate; the circuit itself is this
// design's own.
module stream_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);
  localparam int unsigned AW = (DEPTH <= 2) ? 1 : $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    count;
  logic             push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
