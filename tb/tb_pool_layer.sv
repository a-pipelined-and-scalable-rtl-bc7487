// tb_pool_layer: sub-sampling cores on a 6x4 image with three interleaved
// maps, 2x2 window, stride 2: one max-pooling core (a) and one mean-pooling
// core (b) fed the same stream of three random images. Outputs are compared
// with the maximum and the mean (sum >>> 2) of each 2x2 block of each map,
// worked out here, in the order position, then map. Random input gaps and
// output back-pressure (independent for the two cores).
module tb_pool_layer;
  import cnn_pkg::*;
  localparam int IW = 6, IH = 4, CH = 3, K = 2, S = 2, NIMG = 3;
  localparam int OW = IW / 2, OH = IH / 2, NEL = IW * IH * CH;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data, out_a, out_b;
  logic in_valid, ready_a, ready_b, valid_a, valid_b, oready_a, oready_b;
  int checks = 0, failures = 0;
  data_t img [NIMG][IH][IW][CH];
  data_t exp_a [$], exp_b [$];
  int sent = 0;

  always #5 clk = ~clk;

  pool_layer #(.IMG_W(IW), .IMG_H(IH), .CH(CH), .K(K), .STRIDE(S), .MODE(POOL_MAX)) dut_a (
    .clk, .rst_n, .in_data, .in_valid(in_valid && ready_b), .in_ready(ready_a),
    .out_data(out_a), .out_valid(valid_a), .out_ready(oready_a));
  pool_layer #(.IMG_W(IW), .IMG_H(IH), .CH(CH), .K(K), .STRIDE(S), .MODE(POOL_MEAN)) dut_b (
    .clk, .rst_n, .in_data, .in_valid(in_valid && ready_a), .in_ready(ready_b),
    .out_data(out_b), .out_valid(valid_b), .out_ready(oready_b));

  initial begin
    for (int n = 0; n < NIMG; n++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++)
          for (int c = 0; c < CH; c++) img[n][y][x][c] = data_t'($urandom_range(0, 2000)) - 16'sd1000;
      for (int y = 0; y < OH; y++)
        for (int x = 0; x < OW; x++)
          for (int c = 0; c < CH; c++) begin
            data_t m;
            int s;
            m = img[n][2*y][2*x][c];
            s = 0;
            for (int r = 0; r < 2; r++)
              for (int k = 0; k < 2; k++) begin
                if (img[n][2*y + r][2*x + k][c] > m) m = img[n][2*y + r][2*x + k][c];
                s += int'(img[n][2*y + r][2*x + k][c]);
              end
            exp_a.push_back(m);
            exp_b.push_back(data_t'(s >>> 2));
          end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid = (sent < NIMG * NEL) && ($urandom_range(0, 3) != 0);
      if (sent < NIMG * NEL)
        in_data = img[sent / NEL][(sent % NEL) / (IW * CH)][(sent % (IW * CH)) / CH][sent % CH];
      oready_a = ($urandom_range(0, 3) != 0);
      oready_b = ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && ready_a && ready_b) sent++;
      if (valid_a && oready_a) begin
        checks++;
        if (exp_a.size() == 0 || out_a !== exp_a[0]) begin
          failures++;
          $display("max: got %0d expected %0d", out_a, exp_a.size() ? exp_a[0] : 0);
        end
        if (exp_a.size()) void'(exp_a.pop_front());
      end
      if (valid_b && oready_b) begin
        checks++;
        if (exp_b.size() == 0 || out_b !== exp_b[0]) begin
          failures++;
          $display("mean: got %0d expected %0d", out_b, exp_b.size() ? exp_b[0] : 0);
        end
        if (exp_b.size()) void'(exp_b.pop_front());
      end
    end
  end

  initial begin
    in_valid = 0; oready_a = 0; oready_b = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (exp_a.size() == 0 && exp_b.size() == 0);
    repeat (2) @(posedge clk);
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
