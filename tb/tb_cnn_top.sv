// tb_cnn_top: end-to-end test of the whole design at its default size, both
// networks running at the same time.
//
// USPS: NU random 16x16 images, the first half with random input gaps and
// output back-pressure, the second half at full rate. CIFAR-10: NC random
// 32x32 RGB images, the first with input gaps, the rest at full rate, with
// random output back-pressure throughout. Every class score is compared with a loop-nest model of the network
// written here (same fixed-point arithmetic and design-time weights), and
// the last flag is checked. The steady-state interval between images must
// stay within the document's figures: 5.8 us (580 cycles) per USPS image and
// 128.1 us (12810 cycles) per CIFAR-10 image at 100 MHz. Mechanisms counted,
// each required to occur: input gaps, output back-pressure, back-pressure
// reaching the input port (stall), images overlapping in the pipeline (an
// image entering while an earlier one's scores leave), for each network.
module tb_cnn_top;
  import cnn_pkg::*;

  // USPS network sizes
  localparam int IMG_W = 16, IMG_H = 16, K = 5, C1 = 6, C2 = 16, NCLS = 10;
  localparam int C1W = IMG_W - K + 1, C1H = IMG_H - K + 1;
  localparam int PW = C1W / 2, PH = C1H / 2;
  localparam int C2W = PW - K + 1, C2H = PH - K + 1;
  localparam int FCIN = C2W * C2H * C2;
  localparam int NPIX = IMG_W * IMG_H;
  localparam int NU = 6;
  // CIFAR-10 network sizes
  localparam int IW = 32, IH = 32, IC = 3, CC1 = 12, CC2 = 36, HID = 64;
  localparam int CC1W = IW - K + 1, P1W = CC1W / 2, CC2W = P1W - K + 1, P2W = CC2W / 2;
  localparam int F1IN = P2W * P2W * CC2;
  localparam int NEL = IW * IH * IC;
  localparam int NC = 3;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  data_t us_data, um_data, cs_data, cm_data;
  logic  us_valid, us_ready, um_valid, um_last, um_ready;
  logic  cs_valid, cs_ready, cm_valid, cm_last, cm_ready;

  always #5 clk = ~clk;

  cnn_top dut (
    .clk(clk), .rst_n(rst_n),
    .usps_s_data(us_data), .usps_s_valid(us_valid), .usps_s_ready(us_ready),
    .usps_m_data(um_data), .usps_m_valid(um_valid), .usps_m_last(um_last), .usps_m_ready(um_ready),
    .cifar_s_data(cs_data), .cifar_s_valid(cs_valid), .cifar_s_ready(cs_ready),
    .cifar_m_data(cm_data), .cifar_m_valid(cm_valid), .cifar_m_last(cm_last), .cifar_m_ready(cm_ready)
  );

  int    checks = 0, failures = 0, cycle = 0;
  data_t u_img [NU][NPIX];
  data_t u_exp [NU][NCLS];
  data_t c_img [NC][IH][IW][IC];
  data_t c_exp [NC][NCLS];
  int    u_last_t [NU];
  int    c_last_t [NC];
  bit    u_full = 1'b0, c_full = 1'b0;
  bit    u_done = 1'b0, c_done = 1'b0;
  int    u_gaps = 0, u_bp = 0, u_stall = 0, u_ovl = 0;
  int    c_gaps = 0, c_bp = 0, c_stall = 0, c_ovl = 0;

  task automatic ref_usps(int n);
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
              s += acc_t'(u_img[n][(y + r) * IMG_W + x + c]) *
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
      u_exp[n][j] = requant(s);
    end
  endtask

  task automatic ref_cifar(int n);
    data_t a1 [CC1][CC1W][CC1W];
    data_t p1 [CC1][P1W][P1W];
    data_t a2 [CC2][CC2W][CC2W];
    data_t p2 [F1IN];
    data_t h  [HID];
    acc_t  s;
    for (int k = 0; k < CC1; k++)
      for (int y = 0; y < CC1W; y++)
        for (int x = 0; x < CC1W; x++) begin
          s = bias_acc(param_value(bias_seed(11), k));
          for (int f = 0; f < IC; f++)
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                s += acc_t'(c_img[n][y + r][x + c][f]) *
                     acc_t'(param_value(11, ((k * IC + f) * K + r) * K + c));
          a1[k][y][x] = activate(requant(s), ACT_RELU);
        end
    for (int k = 0; k < CC1; k++)
      for (int y = 0; y < P1W; y++)
        for (int x = 0; x < P1W; x++) begin
          data_t m;
          m = a1[k][2*y][2*x];
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++) if (a1[k][2*y + r][2*x + c] > m) m = a1[k][2*y + r][2*x + c];
          p1[k][y][x] = m;
        end
    for (int k = 0; k < CC2; k++)
      for (int y = 0; y < CC2W; y++)
        for (int x = 0; x < CC2W; x++) begin
          s = bias_acc(param_value(bias_seed(12), k));
          for (int f = 0; f < CC1; f++)
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                s += acc_t'(p1[f][y + r][x + c]) *
                     acc_t'(param_value(12, ((k * CC1 + f) * K + r) * K + c));
          a2[k][y][x] = activate(requant(s), ACT_RELU);
        end
    for (int y = 0; y < P2W; y++)
      for (int x = 0; x < P2W; x++)
        for (int k = 0; k < CC2; k++) begin
          data_t m;
          m = a2[k][2*y][2*x];
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++) if (a2[k][2*y + r][2*x + c] > m) m = a2[k][2*y + r][2*x + c];
          p2[(y * P2W + x) * CC2 + k] = m;
        end
    for (int j = 0; j < HID; j++) begin
      s = bias_acc(param_value(bias_seed(13), j));
      for (int i = 0; i < F1IN; i++) s += acc_t'(p2[i]) * acc_t'(param_value(13, j * F1IN + i));
      h[j] = activate(requant(s), ACT_RELU);
    end
    for (int j = 0; j < NCLS; j++) begin
      s = bias_acc(param_value(bias_seed(14), j));
      for (int i = 0; i < HID; i++) s += acc_t'(h[i]) * acc_t'(param_value(14, j * HID + i));
      c_exp[n][j] = requant(s);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    for (int n = 0; n < NU; n++) begin
      for (int i = 0; i < NPIX; i++) u_img[n][i] = data_t'($urandom_range(0, 511));
      ref_usps(n);
    end
    for (int n = 0; n < NC; n++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++)
          for (int c = 0; c < IC; c++) c_img[n][y][x][c] = data_t'($urandom_range(0, 255));
      ref_cifar(n);
    end
  end

  initial begin
    us_valid = 1'b0;
    us_data  = '0;
    @(posedge rst_n);
    for (int n = 0; n < NU; n++) begin
      if (n == NU / 2) u_full = 1'b1;
      for (int i = 0; i < NPIX; i++) begin
        if (!u_full) while ($urandom_range(0, 3) == 0) begin
          us_valid <= 1'b0;
          @(posedge clk);
        end
        us_valid <= 1'b1;
        us_data  <= u_img[n][i];
        @(posedge clk);
        while (!us_ready) @(posedge clk);
      end
    end
    us_valid <= 1'b0;
  end

  initial begin
    cs_valid = 1'b0;
    cs_data  = '0;
    @(posedge rst_n);
    for (int n = 0; n < NC; n++) begin
      if (n == 1) c_full = 1'b1;
      for (int i = 0; i < NEL; i++) begin
        if (!c_full) while ($urandom_range(0, 3) == 0) begin
          cs_valid <= 1'b0;
          @(posedge clk);
        end
        cs_valid <= 1'b1;
        cs_data  <= c_img[n][i / (IW * IC)][(i / IC) % IW][i % IC];
        @(posedge clk);
        while (!cs_ready) @(posedge clk);
      end
    end
    cs_valid <= 1'b0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    um_ready <= u_full ? 1'b1 : ($urandom_range(0, 2) != 0);
    cm_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n) begin
      if (!us_valid)                        u_gaps++;
      if (um_valid && !um_ready)            u_bp++;
      if (us_valid && !us_ready)            u_stall++;
      if (us_valid && us_ready && um_valid) u_ovl++;
      if (!cs_valid)                        c_gaps++;
      if (cm_valid && !cm_ready)            c_bp++;
      if (cs_valid && !cs_ready)            c_stall++;
      if (cs_valid && cs_ready && cm_valid) c_ovl++;
    end
  end

  // ---------------- checking ----------------
  initial begin
    int n, j;
    n = 0;
    j = 0;
    @(posedge rst_n);
    while (n < NU) begin
      @(posedge clk);
      if (um_valid && um_ready) begin
        checks += 2;
        if (um_data !== u_exp[n][j]) begin
          failures++;
          $display("USPS image %0d class %0d: got %0d expected %0d", n, j, um_data, u_exp[n][j]);
        end
        if (um_last !== (j == NCLS - 1)) failures++;
        if (j == NCLS - 1) begin
          u_last_t[n] = cycle;
          j = 0;
          n++;
        end else j++;
      end
    end
    u_done = 1'b1;
  end

  initial begin
    int n, j;
    n = 0;
    j = 0;
    @(posedge rst_n);
    while (n < NC) begin
      @(posedge clk);
      if (cm_valid && cm_ready) begin
        checks += 2;
        if (cm_data !== c_exp[n][j]) begin
          failures++;
          $display("CIFAR image %0d class %0d: got %0d expected %0d", n, j, cm_data, c_exp[n][j]);
        end
        if (cm_last !== (j == NCLS - 1)) failures++;
        if (j == NCLS - 1) begin
          c_last_t[n] = cycle;
          j = 0;
          n++;
        end else j++;
      end
    end
    c_done = 1'b1;
  end

  initial begin
    um_ready = 1'b0;
    cm_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (u_done && c_done);
    for (int i = NU / 2 + 1; i < NU; i++) begin
      checks++;
      $display("USPS interval image %0d: %0d cycles", i, u_last_t[i] - u_last_t[i-1]);
      if (u_last_t[i] - u_last_t[i-1] > 580) failures++;
    end
    for (int i = 2; i < NC; i++) begin
      checks++;
      $display("CIFAR-10 interval image %0d: %0d cycles", i, c_last_t[i] - c_last_t[i-1]);
      if (c_last_t[i] - c_last_t[i-1] > 12810) failures++;
    end
    $display("USPS events: gaps %0d, back-pressure %0d, input stalls %0d, overlap %0d",
             u_gaps, u_bp, u_stall, u_ovl);
    $display("CIFAR-10 events: gaps %0d, back-pressure %0d, input stalls %0d, overlap %0d",
             c_gaps, c_bp, c_stall, c_ovl);
    checks += 8;
    if (u_gaps == 0)  failures++;
    if (u_bp == 0)    failures++;
    if (u_stall == 0) failures++;
    if (u_ovl == 0)   failures++;
    if (c_gaps == 0)  failures++;
    if (c_bp == 0)    failures++;
    if (c_stall == 0) failures++;
    if (c_ovl == 0)   failures++;
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
