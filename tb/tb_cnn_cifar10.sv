// tb_cnn_cifar10: end-to-end test of the CIFAR-10 network at its full size.
//
// NIMG random 32x32 RGB images are streamed through the network, colour
// values of a pixel one after the other. The expected class scores come from
// a loop-nest model of the network written here (convolution + ReLU, 2x2
// max-pool, convolution + ReLU, 2x2 max-pool, linear + ReLU, linear) in the
// same fixed-point arithmetic and with the same design-time weights. The first
// image is sent with random input gaps, the rest at full rate, and the output
// sees random back-pressure throughout; the steady-state interval between images must not exceed the
// 128.1 us per image (12810 cycles at 100 MHz) reported for this network,
// and back-pressure and overlap of input and output of different images must
// occur.
module tb_cnn_cifar10;
  import cnn_pkg::*;

  localparam int IW = 32, IH = 32, IC = 3, K = 5, C1 = 12, C2 = 36, HID = 64, NCLS = 10;
  localparam int C1W = IW - K + 1, P1W = C1W / 2, C2W = P1W - K + 1, P2W = C2W / 2;
  localparam int F1IN = P2W * P2W * C2;
  localparam int NIMG = 3;
  localparam int NEL = IW * IH * IC;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  data_t s_data;
  logic  s_valid, s_ready;
  data_t m_data;
  logic  m_valid, m_last, m_ready;

  always #5 clk = ~clk;

  cnn_cifar10 dut (
    .clk(clk), .rst_n(rst_n),
    .s_data(s_data), .s_valid(s_valid), .s_ready(s_ready),
    .m_data(m_data), .m_valid(m_valid), .m_last(m_last), .m_ready(m_ready)
  );

  int    checks = 0, failures = 0;
  data_t img  [NIMG][IH][IW][IC];
  data_t expd [NIMG][NCLS];
  int    cycle = 0, gaps = 0, backpressure = 0, overlap = 0;
  int    last_t [NIMG];
  bit    full_rate = 1'b0;

  task automatic reference(int n);
    data_t a1 [C1][C1W][C1W];
    data_t p1 [C1][P1W][P1W];
    data_t a2 [C2][C2W][C2W];
    data_t p2 [F1IN];
    data_t h  [HID];
    acc_t  s;
    for (int k = 0; k < C1; k++)
      for (int y = 0; y < C1W; y++)
        for (int x = 0; x < C1W; x++) begin
          s = bias_acc(param_value(bias_seed(11), k));
          for (int f = 0; f < IC; f++)
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                s += acc_t'(img[n][y + r][x + c][f]) *
                     acc_t'(param_value(11, ((k * IC + f) * K + r) * K + c));
          a1[k][y][x] = activate(requant(s), ACT_RELU);
        end
    for (int k = 0; k < C1; k++)
      for (int y = 0; y < P1W; y++)
        for (int x = 0; x < P1W; x++) begin
          data_t m;
          m = a1[k][2*y][2*x];
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++) if (a1[k][2*y + r][2*x + c] > m) m = a1[k][2*y + r][2*x + c];
          p1[k][y][x] = m;
        end
    for (int k = 0; k < C2; k++)
      for (int y = 0; y < C2W; y++)
        for (int x = 0; x < C2W; x++) begin
          s = bias_acc(param_value(bias_seed(12), k));
          for (int f = 0; f < C1; f++)
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                s += acc_t'(p1[f][y + r][x + c]) *
                     acc_t'(param_value(12, ((k * C1 + f) * K + r) * K + c));
          a2[k][y][x] = activate(requant(s), ACT_RELU);
        end
    for (int y = 0; y < P2W; y++)
      for (int x = 0; x < P2W; x++)
        for (int k = 0; k < C2; k++) begin
          data_t m;
          m = a2[k][2*y][2*x];
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++) if (a2[k][2*y + r][2*x + c] > m) m = a2[k][2*y + r][2*x + c];
          p2[(y * P2W + x) * C2 + k] = m;
        end
    for (int j = 0; j < HID; j++) begin
      s = bias_acc(param_value(bias_seed(13), j));
      for (int i = 0; i < F1IN; i++) s += acc_t'(p2[i]) * acc_t'(param_value(13, j * F1IN + i));
      h[j] = activate(requant(s), ACT_RELU);
    end
    for (int j = 0; j < NCLS; j++) begin
      s = bias_acc(param_value(bias_seed(14), j));
      for (int i = 0; i < HID; i++) s += acc_t'(h[i]) * acc_t'(param_value(14, j * HID + i));
      expd[n][j] = requant(s);
    end
  endtask

  initial begin
    for (int n = 0; n < NIMG; n++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++)
          for (int c = 0; c < IC; c++) img[n][y][x][c] = data_t'($urandom_range(0, 255));
      reference(n);
    end
    s_valid = 1'b0;
    s_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NIMG; n++) begin
      if (n == 1) full_rate = 1'b1;
      for (int i = 0; i < NEL; i++) begin
        if (!full_rate) begin
          while ($urandom_range(0, 3) == 0) begin
            s_valid <= 1'b0;
            @(posedge clk);
          end
        end
        s_valid <= 1'b1;
        s_data  <= img[n][i / (IW * IC)][(i / IC) % IW][i % IC];
        @(posedge clk);
        while (!s_ready) @(posedge clk);
      end
    end
    s_valid <= 1'b0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    m_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n) begin
      if (!s_valid)                      gaps++;
      if (m_valid && !m_ready)           backpressure++;
      if (s_valid && s_ready && m_valid) overlap++;
    end
  end

  initial begin
    int n, j;
    n = 0;
    j = 0;
    m_ready = 1'b0;
    @(posedge rst_n);
    while (n < NIMG) begin
      @(posedge clk);
      if (m_valid && m_ready) begin
        checks++;
        if (m_data !== expd[n][j]) begin
          failures++;
          $display("image %0d class %0d: got %0d expected %0d", n, j, m_data, expd[n][j]);
        end
        checks++;
        if (m_last !== (j == NCLS - 1)) failures++;
        if (j == NCLS - 1) begin
          last_t[n] = cycle;
          j = 0;
          n++;
        end else j++;
      end
    end
    $display("first image done at cycle %0d", last_t[0]);
    for (int i = 2; i < NIMG; i++) begin
      $display("interval image %0d: %0d cycles", i, last_t[i] - last_t[i-1]);
      checks++;
      if (last_t[i] - last_t[i-1] > 12810) begin
        failures++;
        $display("steady-state interval above 12810 cycles");
      end
    end
    $display("events: input gaps %0d, output back-pressure %0d, overlap %0d", gaps, backpressure, overlap);
    checks += 3;
    if (gaps == 0)         failures++;
    if (backpressure == 0) failures++;
    if (overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
