// tb_fm_merge: 4 ports each send their own numbered stream (port j sends
// j, j+4, j+8, ...) with random, independent gaps; the merged output must
// be 0, 1, 2, 3, ... in order, under random output back-pressure.
module tb_fm_merge;
  import cnn_pkg::*;
  localparam int N = 4, PER = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data [N];
  logic in_valid [N];
  logic in_ready [N];
  data_t out_data;
  logic out_valid, out_ready;
  int checks = 0, failures = 0, expect_e = 0;
  int sent [N];

  always #5 clk = ~clk;

  fm_merge #(.N(N)) dut (.*);

  always @(negedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < N; j++) begin
        in_valid[j] = (sent[j] < PER) && ($urandom_range(0, 2) != 0);
        in_data[j]  = data_t'(sent[j] * N + j);
      end
      out_ready = ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < N; j++) if (in_valid[j] && in_ready[j]) sent[j]++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== data_t'(expect_e)) begin
          failures++;
          $display("got %0d expected %0d", out_data, expect_e);
        end
        expect_e++;
      end
    end
  end

  initial begin
    for (int j = 0; j < N; j++) begin
      in_valid[j] = 0;
      sent[j] = 0;
    end
    out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (expect_e == N * PER);
    repeat (2) @(posedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("extra output");
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
