// tb_cnn_usps: end-to-end test of the USPS network at its full size.
//
// A batch of NIMG random 16x16 images is streamed through the network. The
// expected class scores are computed here by a plain loop-nest model of the
// network (convolution, ReLU, max-pooling, convolution, ReLU, linear layer) in
// the same fixed-point arithmetic, using the same design-time weight tables
// (cnn_pkg::param_value). The first half of the batch is sent with random gaps
// on the input and random back-pressure on the output; the second half at
// full rate, which is used to measure the steady-state interval between
// images of the high-level pipeline. Counted and required to happen: input
// gaps, output back-pressure, back-pressure reaching the input port, and
// overlap of one image's input with an earlier image's results (several
// images in flight). The steady-state interval must not exceed the 5.8 us
// per image (580 cycles at 100 MHz) reported for this network.
module tb_cnn_usps;
  import cnn_pkg::*;

  localparam int IMG_W = 16, IMG_H = 16, K = 5, C1 = 6, C2 = 16, NCLS = 10;
  localparam int C1W = IMG_W - K + 1, C1H = IMG_H - K + 1;
  localparam int PW = C1W / 2, PH = C1H / 2;
  localparam int C2W = PW - K + 1, C2H = PH - K + 1;
  localparam int FCIN = C2W * C2H * C2;
  localparam int NIMG = 8;
  localparam int NPIX = IMG_W * IMG_H;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  data_t s_data;
  logic  s_valid, s_ready;
  data_t m_data;
  logic  m_valid, m_last, m_ready;

  always #5 clk = ~clk;

  cnn_usps dut (
    .clk(clk), .rst_n(rst_n),
    .s_data(s_data), .s_valid(s_valid), .s_ready(s_ready),
    .m_data(m_data), .m_valid(m_valid), .m_last(m_last), .m_ready(m_ready)
  );

  int    checks = 0, failures = 0;
  data_t img [NIMG][NPIX];
  data_t expd [NIMG][NCLS];
  int    cycle = 0;
  int    gaps = 0, backpressure = 0, input_stall = 0, overlap = 0;
  int    last_t [NIMG];
  bit    full_rate = 1'b0;

  // ---------------- reference model ----------------
  task automatic reference(int n);
    data_t a1 [C1][C1H][C1W];
    data_t p1 [C1][PH][PW];
    data_t a2 [C2][C2H][C2W];
    data_t flat [FCIN];
    acc_t  s;
    for (int k = 0; k < C1; k++)
      for (int y = 0; y < C1H; y++)
        for (int x = 0; x < C1W; x++) begin
          s = bias_acc(param_value(bias_seed(1), k));
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++)
              s += acc_t'(img[n][(y + r) * IMG_W + x + c]) *
                   acc_t'(param_value(1, (k * K + r) * K + c));
          a1[k][y][x] = activate(requant(s), ACT_RELU);
        end
    for (int k = 0; k < C1; k++)
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PW; x++) begin
          data_t m;
          m = a1[k][2*y][2*x];
          if (a1[k][2*y][2*x+1]   > m) m = a1[k][2*y][2*x+1];
          if (a1[k][2*y+1][2*x]   > m) m = a1[k][2*y+1][2*x];
          if (a1[k][2*y+1][2*x+1] > m) m = a1[k][2*y+1][2*x+1];
          p1[k][y][x] = m;
        end
    for (int k = 0; k < C2; k++)
      for (int y = 0; y < C2H; y++)
        for (int x = 0; x < C2W; x++) begin
          s = bias_acc(param_value(bias_seed(2), k));
          for (int f = 0; f < C1; f++)
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                s += acc_t'(p1[f][y + r][x + c]) *
                     acc_t'(param_value(2, ((k * C1 + f) * K + r) * K + c));
          a2[k][y][x] = activate(requant(s), ACT_RELU);
        end
    for (int y = 0; y < C2H; y++)
      for (int x = 0; x < C2W; x++)
        for (int k = 0; k < C2; k++) flat[(y * C2W + x) * C2 + k] = a2[k][y][x];
    for (int j = 0; j < NCLS; j++) begin
      s = bias_acc(param_value(bias_seed(3), j));
      for (int i = 0; i < FCIN; i++)
        s += acc_t'(flat[i]) * acc_t'(param_value(3, j * FCIN + i));
      expd[n][j] = requant(s);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    for (int n = 0; n < NIMG; n++) begin
      for (int i = 0; i < NPIX; i++) img[n][i] = data_t'($urandom_range(0, 511));
      reference(n);
    end
    s_valid = 1'b0;
    s_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NIMG; n++) begin
      if (n == NIMG / 2) full_rate = 1'b1;
      for (int i = 0; i < NPIX; i++) begin
        if (!full_rate) begin
          while ($urandom_range(0, 3) == 0) begin
            s_valid <= 1'b0;
            @(posedge clk);
          end
        end
        s_valid <= 1'b1;
        s_data  <= img[n][i];
        @(posedge clk);
        while (!s_ready) @(posedge clk);
      end
    end
    s_valid <= 1'b0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!full_rate) m_ready <= ($urandom_range(0, 2) != 0);
    else            m_ready <= 1'b1;
    if (rst_n) begin
      if (!s_valid)             gaps++;
      if (m_valid && !m_ready)  backpressure++;
      if (s_valid && !s_ready)  input_stall++;
      if (s_valid && s_ready && m_valid) overlap++;
    end
  end

  // ---------------- checking ----------------
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
        if (m_last !== (j == NCLS - 1)) begin
          failures++;
          $display("image %0d class %0d: wrong last flag", n, j);
        end
        if (j == NCLS - 1) begin
          last_t[n] = cycle;
          j = 0;
          n++;
        end else begin
          j++;
        end
      end
    end
    $display("first image done at cycle %0d", last_t[0]);
    for (int i = NIMG / 2 + 1; i < NIMG; i++) begin
      int iv;
      iv = last_t[i] - last_t[i-1];
      $display("interval image %0d: %0d cycles", i, iv);
      checks++;
      if (iv > 580 || iv < NPIX) begin
        failures++;
        $display("steady-state interval %0d outside [%0d, 580]", iv, NPIX);
      end
    end
    $display("events: input gaps %0d, output back-pressure %0d, input stalls %0d, overlap %0d",
             gaps, backpressure, input_stall, overlap);
    checks += 4;
    if (gaps == 0)         failures++;
    if (backpressure == 0) failures++;
    if (input_stall == 0)  failures++;
    if (overlap == 0)      failures++;
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
