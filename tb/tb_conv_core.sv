// tb_conv_core: computation core with 2 input ports carrying 4 input maps,
// 6 output maps on 2 output ports, 2x2 windows, ReLU. Random window groups
// are presented for a series of output positions; the expected outputs are
// computed here from Eq. (1) with the same weight tables, requantisation and
// ReLU, and checked per port in the order map k on port k % 2, beat k / 2.
// A first run uses random input gaps and random per-port back-pressure; a
// second run at full rate checks that a new position is accepted every
// max(OUT_FM/OUT_PORTS, IN_FM/IN_PORTS) = 3 cycles (Eq. (4)).
module tb_conv_core;
  import cnn_pkg::*;
  localparam int IP = 2, IFM = 4, OP = 2, OFM = 6, K = 2, NT = K * K, SEED = 11;
  localparam int G = IFM / IP, II = 3;
  localparam int NPOS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t win_data [IP][NT];
  logic  win_valid, win_ready;
  data_t out_data [OP];
  logic  out_valid [OP];
  logic  out_ready [OP];

  int checks = 0, failures = 0;
  data_t x [NPOS][IFM][NT];
  data_t expq [OP][$];
  int pos = 0, grp = 0;
  bit full_rate = 0;
  int done_t [$];
  int cyc = 0;

  always #5 clk = ~clk;

  conv_core #(.IN_PORTS(IP), .IN_FM(IFM), .OUT_PORTS(OP), .OUT_FM(OFM),
              .KH(K), .KW(K), .ACT(ACT_RELU), .SEED(SEED)) dut (.*);

  initial begin
    for (int p = 0; p < NPOS; p++) begin
      for (int f = 0; f < IFM; f++)
        for (int t = 0; t < NT; t++) x[p][f][t] = data_t'($urandom_range(0, 1200)) - 16'sd600;
      for (int k = 0; k < OFM; k++) begin
        acc_t s;
        s = bias_acc(param_value(bias_seed(SEED), k));
        for (int f = 0; f < IFM; f++)
          for (int t = 0; t < NT; t++)
            s += acc_t'(x[p][f][t]) * acc_t'(param_value(SEED, (k * IFM + f) * NT + t));
        expq[k % OP].push_back(activate(requant(s), ACT_RELU));
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      win_valid = (pos < NPOS) && (full_rate || $urandom_range(0, 3) != 0);
      for (int p = 0; p < IP; p++)
        for (int t = 0; t < NT; t++)
          win_data[p][t] = (pos < NPOS) ? x[pos][grp * IP + p][t] : '0;
      for (int q = 0; q < OP; q++) out_ready[q] = full_rate || ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (win_valid && win_ready) begin
        if (grp == G - 1) begin
          grp = 0;
          pos++;
          if (full_rate) done_t.push_back(cyc);
        end else grp++;
      end
      for (int q = 0; q < OP; q++)
        if (out_valid[q] && out_ready[q]) begin
          checks++;
          if (expq[q].size() == 0 || out_data[q] !== expq[q][0]) begin
            failures++;
            $display("port %0d: got %0d expected %0d", q, out_data[q],
                     expq[q].size() ? expq[q][0] : 0);
          end
          if (expq[q].size()) void'(expq[q].pop_front());
        end
    end
  end

  initial begin
    win_valid = 0;
    for (int q = 0; q < OP; q++) out_ready[q] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (pos == NPOS / 2);
    @(negedge clk);
    full_rate = 1'b1;
    wait (pos == NPOS && expq[0].size() == 0 && expq[1].size() == 0);
    repeat (2) @(posedge clk);
    for (int i = 3; i < done_t.size(); i++) begin
      checks++;
      if (done_t[i] - done_t[i-1] != II) begin
        failures++;
        $display("position interval %0d, expected %0d", done_t[i] - done_t[i-1], II);
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
