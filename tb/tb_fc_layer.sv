// tb_fc_layer: a linear layer of 12 inputs and 5 outputs. Six random input
// vectors go in; each output is compared with b[j] + sum w[j][i] * x[i]
// (Eq. (2)) worked out here with the same weight tables and arithmetic, and
// out_last must mark the fifth output. The first three vectors run with
// random input gaps and output back-pressure; the last three at full rate,
// where a vector must be accepted every IN_N = 12 cycles (one input per
// cycle, the outputs of one vector sent while the next is accumulated).
module tb_fc_layer;
  import cnn_pkg::*;
  localparam int IN_N = 12, OUT_N = 5, SEED = 31, NV = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data, out_data;
  logic in_valid, in_ready, out_valid, out_last, out_ready;
  int checks = 0, failures = 0;
  data_t x [NV][IN_N];
  data_t expq [$];
  int sent = 0, outn = 0, cyc = 0;
  int acc_t_done [$];
  bit full_rate = 0;

  always #5 clk = ~clk;

  fc_layer #(.IN_N(IN_N), .OUT_N(OUT_N), .ACT(ACT_NONE), .SEED(SEED)) dut (.*);

  initial begin
    for (int v = 0; v < NV; v++) begin
      for (int i = 0; i < IN_N; i++) x[v][i] = data_t'($urandom_range(0, 4000)) - 16'sd2000;
      for (int j = 0; j < OUT_N; j++) begin
        acc_t s;
        s = bias_acc(param_value(bias_seed(SEED), j));
        for (int i = 0; i < IN_N; i++) s += acc_t'(x[v][i]) * acc_t'(param_value(SEED, j * IN_N + i));
        expq.push_back(requant(s));
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      full_rate = (sent >= 3 * IN_N);
      in_valid  = (sent < NV * IN_N) && (full_rate || $urandom_range(0, 3) != 0);
      in_data   = (sent < NV * IN_N) ? x[sent / IN_N][sent % IN_N] : '0;
      out_ready = full_rate || ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent++;
        if (full_rate && sent % IN_N == 0) acc_t_done.push_back(cyc);
      end
      if (out_valid && out_ready) begin
        checks++;
        if (expq.size() == 0 || out_data !== expq[0]) begin
          failures++;
          $display("got %0d expected %0d", out_data, expq.size() ? expq[0] : 0);
        end
        checks++;
        if (out_last !== (outn % OUT_N == OUT_N - 1)) begin
          failures++;
          $display("out_last wrong at output %0d", outn);
        end
        outn++;
        if (expq.size()) void'(expq.pop_front());
      end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (expq.size() == 0);
    repeat (2) @(posedge clk);
    for (int i = 1; i < acc_t_done.size(); i++) begin
      checks++;
      if (acc_t_done[i] - acc_t_done[i-1] != IN_N) begin
        failures++;
        $display("vector interval %0d, expected %0d", acc_t_done[i] - acc_t_done[i-1], IN_N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
