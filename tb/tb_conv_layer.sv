// tb_conv_layer: a convolutional layer with 2 input ports carrying 4 maps of
// 6x5 pixels, a 3x3 window at stride 1, and 3 output maps on one port, ReLU.
// Three random images go in back to back, port p carrying maps p and p+2
// interleaved per pixel, with random, independent gaps on the two ports and
// random output back-pressure. The expected output stream (raster order,
// maps 0..2 per position) is computed here from Eq. (1) with the same
// weight tables and arithmetic.
module tb_conv_layer;
  import cnn_pkg::*;
  localparam int IW = 6, IH = 5, IP = 2, IFM = 4, OP = 1, OFM = 3, K = 3, SEED = 21;
  localparam int OW = IW - K + 1, OH = IH - K + 1;
  localparam int NIMG = 3, NPIX = IW * IH;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data [IP];
  logic  in_valid [IP];
  logic  in_ready [IP];
  data_t out_data [OP];
  logic  out_valid [OP];
  logic  out_ready [OP];

  int checks = 0, failures = 0;
  data_t img [NIMG][IFM][IH][IW];
  data_t expq [$];
  int sent [IP];
  int total;

  always #5 clk = ~clk;

  conv_layer #(.IMG_W(IW), .IMG_H(IH), .IN_PORTS(IP), .IN_FM(IFM), .OUT_PORTS(OP),
               .OUT_FM(OFM), .KH(K), .KW(K), .STRIDE(1), .ACT(ACT_RELU), .SEED(SEED)) dut (.*);

  // element e of port p: pixel e / (IFM/IP), map (e % (IFM/IP)) * IP + p
  function automatic data_t elem(int p, int e);
    int n, pix, m;
    n   = e / (NPIX * IFM / IP);
    e   = e % (NPIX * IFM / IP);
    pix = e / (IFM / IP);
    m   = (e % (IFM / IP)) * IP + p;
    return img[n][m][pix / IW][pix % IW];
  endfunction

  initial begin
    total = NIMG * NPIX * IFM / IP;
    for (int n = 0; n < NIMG; n++) begin
      for (int f = 0; f < IFM; f++)
        for (int y = 0; y < IH; y++)
          for (int xx = 0; xx < IW; xx++) img[n][f][y][xx] = data_t'($urandom_range(0, 800)) - 16'sd300;
      for (int y = 0; y < OH; y++)
        for (int xx = 0; xx < OW; xx++)
          for (int k = 0; k < OFM; k++) begin
            acc_t s;
            s = bias_acc(param_value(bias_seed(SEED), k));
            for (int f = 0; f < IFM; f++)
              for (int r = 0; r < K; r++)
                for (int c = 0; c < K; c++)
                  s += acc_t'(img[n][f][y + r][xx + c]) *
                       acc_t'(param_value(SEED, ((k * IFM + f) * K + r) * K + c));
            expq.push_back(activate(requant(s), ACT_RELU));
          end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < IP; p++) begin
        in_valid[p] = (sent[p] < total) && ($urandom_range(0, 3) != 0);
        in_data[p]  = (sent[p] < total) ? elem(p, sent[p]) : '0;
      end
      out_ready[0] = ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < IP; p++) if (in_valid[p] && in_ready[p]) sent[p]++;
      if (out_valid[0] && out_ready[0]) begin
        checks++;
        if (expq.size() == 0 || out_data[0] !== expq[0]) begin
          failures++;
          $display("got %0d expected %0d", out_data[0], expq.size() ? expq[0] : 0);
        end
        if (expq.size()) void'(expq.pop_front());
      end
    end
  end

  initial begin
    for (int p = 0; p < IP; p++) begin
      in_valid[p] = 0;
      sent[p] = 0;
    end
    out_ready[0] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid[0]) begin
      failures++;
      $display("extra output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d outputs missing", expq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
