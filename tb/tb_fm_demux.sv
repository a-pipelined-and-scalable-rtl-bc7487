// tb_fm_demux: a stream of numbered elements is dealt over 3 ports. Each
// port must receive exactly the elements e with e % 3 == its number, in
// order, under random input gaps and random, independent back-pressure on
// the outputs (which must stall the input only when the port whose turn it
// is refuses).
module tb_fm_demux;
  import cnn_pkg::*;
  localparam int N = 3, TOTAL = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data;
  logic in_valid, in_ready;
  data_t out_data [N];
  logic out_valid [N];
  logic out_ready [N];
  int checks = 0, failures = 0, sent = 0;
  int next_e [N];

  always #5 clk = ~clk;

  fm_demux #(.N(N)) dut (.*);

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid = (sent < TOTAL) && ($urandom_range(0, 3) != 0);
      in_data  = data_t'(sent);
      for (int k = 0; k < N; k++) out_ready[k] = ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready !== out_ready[sent % N]) begin
        failures++;
        $display("in_ready does not follow the port whose turn it is");
      end
      if (in_valid && in_ready) sent++;
      for (int k = 0; k < N; k++)
        if (out_valid[k] && out_ready[k]) begin
          checks++;
          if (out_data[k] !== data_t'(next_e[k])) begin
            failures++;
            $display("port %0d: got %0d expected %0d", k, out_data[k], next_e[k]);
          end
          next_e[k] += N;
        end
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    for (int k = 0; k < N; k++) begin
      out_ready[k] = 0;
      next_e[k] = k;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (sent == TOTAL);
    repeat (2) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (next_e[k] != TOTAL + k) begin
        failures++;
        $display("port %0d stopped at %0d", k, next_e[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
