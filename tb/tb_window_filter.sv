// tb_window_filter: one filter (tap row 1, column 2 of a 3x3 window, stride
// 2, two interleaved channels, 7x6 image) fed with two images whose element
// values are their stream index. Both outputs are checked against lists
// worked out here from the coordinates: the forward stream must be the input
// stream unchanged, and the window register must receive exactly the
// elements at (y0*2 + 1, x0*2 + 2, ch) for every window corner (y0, x0) and
// channel, in order. Input gaps, forward back-pressure and a slow window
// reader are random, so the filter's stall is exercised.
module tb_window_filter;
  import cnn_pkg::*;
  localparam int IW = 7, IH = 6, CH = 2, K = 3, S = 2, TR = 1, TC = 2, NIMG = 2;
  localparam int OW = (IW - K) / S + 1, OH = (IH - K) / S + 1;
  localparam int NEL = IW * IH * CH;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data, fwd_data, win_data;
  logic in_valid, in_ready, fwd_valid, fwd_ready, win_valid, win_ready;
  int checks = 0, failures = 0, stalls = 0;
  data_t exp_fwd [$], exp_win [$];
  int sent = 0;

  always #5 clk = ~clk;

  window_filter #(.IMG_W(IW), .IMG_H(IH), .CH(CH), .KH(K), .KW(K), .STRIDE(S),
                  .TAP_R(TR), .TAP_C(TC), .FORWARD(1'b1)) dut (.*);

  initial begin
    for (int n = 0; n < NIMG; n++) begin
      for (int i = 0; i < NEL; i++) exp_fwd.push_back(data_t'(n * NEL + i));
      for (int y0 = 0; y0 < OH; y0++)
        for (int x0 = 0; x0 < OW; x0++)
          for (int c = 0; c < CH; c++)
            exp_win.push_back(data_t'(n * NEL + ((y0 * S + TR) * IW + x0 * S + TC) * CH + c));
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid  = (sent < NIMG * NEL) && ($urandom_range(0, 3) != 0);
      in_data   = data_t'(sent);
      fwd_ready = ($urandom_range(0, 3) != 0);
      win_ready = win_valid && ($urandom_range(0, 2) == 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready && fwd_ready) stalls++;
      if (in_valid && in_ready) sent++;
      if (fwd_valid && fwd_ready) begin
        checks++;
        if (exp_fwd.size() == 0 || fwd_data !== exp_fwd[0]) begin
          failures++;
          $display("forwarded %0d, expected %0d", fwd_data, exp_fwd.size() ? exp_fwd[0] : -1);
        end
        if (exp_fwd.size()) void'(exp_fwd.pop_front());
      end
      if (win_valid && win_ready) begin
        checks++;
        if (exp_win.size() == 0 || win_data !== exp_win[0]) begin
          failures++;
          $display("window tap %0d, expected %0d", win_data, exp_win.size() ? exp_win[0] : -1);
        end
        if (exp_win.size()) void'(exp_win.pop_front());
      end
    end
  end

  initial begin
    in_valid = 0; fwd_ready = 0; win_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (exp_fwd.size() == 0 && exp_win.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("the filter never stalled on a full window register");
    end
    $display("filter stalls: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d forwards, %0d window taps missing", exp_fwd.size(), exp_win.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
