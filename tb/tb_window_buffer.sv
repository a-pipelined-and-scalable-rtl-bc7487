// tb_window_buffer: the memory structure with a 3x3 window on a 7x6 image
// with two interleaved channels, at stride 1 (instance a) and stride 2
// (instance b), fed the same stream of three images whose element values are
// their stream index. Every window delivered is compared, tap by tap, with
// the window worked out here from the coordinates. A first run uses random
// input gaps and a random window reader; a second run, at full rate, checks
// that the stride-1 buffer delivers one window per cycle once it is filled:
// all windows of an image within IMG_W*IMG_H*CH cycles.
module tb_window_buffer;
  import cnn_pkg::*;
  localparam int IW = 7, IH = 6, CH = 2, K = 3, NIMG = 3;
  localparam int NEL = IW * IH * CH;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data;
  logic in_valid;
  logic in_ready_a, in_ready_b, win_valid_a, win_valid_b, win_ready_a, win_ready_b;
  data_t win_a [K*K];
  data_t win_b [K*K];
  int checks = 0, failures = 0;
  data_t exp_a [$][K*K];
  data_t exp_b [$][K*K];
  int sent = 0, total = 0;
  bit full_rate = 0;
  int got_a = 0, first_a = -1, last_a = -1, cyc = 0;

  always #5 clk = ~clk;

  window_buffer #(.IMG_W(IW), .IMG_H(IH), .CH(CH), .KH(K), .KW(K), .STRIDE(1)) dut_a (
    .clk, .rst_n, .in_data, .in_valid, .in_ready(in_ready_a),
    .win_data(win_a), .win_valid(win_valid_a), .win_ready(win_ready_a));
  window_buffer #(.IMG_W(IW), .IMG_H(IH), .CH(CH), .KH(K), .KW(K), .STRIDE(2)) dut_b (
    .clk, .rst_n, .in_data, .in_valid(in_valid && in_ready_a), .in_ready(in_ready_b),
    .win_data(win_b), .win_valid(win_valid_b), .win_ready(win_ready_b));

  task automatic expect_windows(int base, int s, ref data_t q [$][K*K]);
    data_t w [K*K];
    for (int y0 = 0; y0 <= IH - K; y0 += s)
      for (int x0 = 0; x0 <= IW - K; x0 += s)
        for (int c = 0; c < CH; c++) begin
          for (int r = 0; r < K; r++)
            for (int k = 0; k < K; k++)
              w[r*K + k] = data_t'(base + ((y0 + r) * IW + x0 + k) * CH + c);
          q.push_back(w);
        end
  endtask

  task automatic compare(string nm, data_t got [K*K], ref data_t q [$][K*K]);
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("%s: unexpected window", nm);
      return;
    end
    for (int t = 0; t < K*K; t++)
      if (got[t] !== q[0][t]) begin
        failures++;
        $display("%s: tap %0d got %0d expected %0d", nm, t, got[t], q[0][t]);
        break;
      end
    void'(q.pop_front());
  endtask

  // the stride-2 buffer only sees what the stride-1 buffer accepts; it must
  // never refuse it (it has the same line lengths and reads faster)
  always @(negedge clk) begin
    if (rst_n) begin
      in_valid    = (sent < total) && (full_rate || $urandom_range(0, 3) != 0);
      in_data     = data_t'(sent);
      win_ready_a = full_rate || ($urandom_range(0, 2) != 0);
      win_ready_b = 1'b1;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready_a) begin
        sent++;
        checks++;
        if (!in_ready_b) begin
          failures++;
          $display("stride-2 buffer refused an element");
        end
      end
      if (win_valid_a && win_ready_a) begin
        compare("stride 1", win_a, exp_a);
        if (full_rate) begin
          got_a++;
          if (first_a < 0) first_a = cyc;
          last_a = cyc;
        end
      end
      if (win_valid_b && win_ready_b) compare("stride 2", win_b, exp_b);
    end
  end

  initial begin
    in_valid = 0; win_ready_a = 0; win_ready_b = 0; in_data = '0;
    for (int n = 0; n < NIMG; n++) begin
      expect_windows(n * NEL, 1, exp_a);
      expect_windows(n * NEL, 2, exp_b);
    end
    total = NIMG * NEL;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (exp_a.size() == 0 && exp_b.size() == 0);
    // second run at full rate: one more image
    @(negedge clk);
    full_rate = 1'b1;
    expect_windows(total, 1, exp_a);
    expect_windows(total, 2, exp_b);
    total = total + NEL;
    wait (exp_a.size() == 0 && exp_b.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (last_a - first_a + 1 > IW * IH * CH) begin
      failures++;
      $display("full rate: %0d windows took %0d cycles", got_a, last_a - first_a + 1);
    end
    $display("full rate: %0d windows in %0d cycles", got_a, last_a - first_a + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d / %0d windows missing", exp_a.size(), exp_b.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
