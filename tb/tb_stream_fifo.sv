// tb_stream_fifo: random pushes and pops on a 5-deep FIFO (not a power of
// two). A queue model checks the order and value of every word read, that
// in_ready drops exactly when DEPTH words are stored, and that a full-rate
// stream passes at one word per cycle.
module tb_stream_fifo;
  localparam int W = 16, D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int phase = 0, moved = 0, cyc = 0;

  always #5 clk = ~clk;

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid  = (phase == 1) ? 1'b1 : ($urandom_range(0, 1) == 1);
      in_data   = W'($urandom);
      out_ready = (phase == 1) ? 1'b1 : (phase == 2 ? 1'b0 : ($urandom_range(0, 2) != 0));
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready !== (model.size() < D)) begin
        failures++;
        $display("in_ready %0b with %0d words stored", in_ready, model.size());
      end
      checks++;
      if (out_valid !== (model.size() > 0)) begin
        failures++;
        $display("out_valid %0b with %0d words stored", out_valid, model.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== model[0]) begin
          failures++;
          $display("read %h expected %h", out_data, model[0]);
        end
        void'(model.pop_front());
        if (phase == 1) moved++;
      end
      if (in_valid && in_ready) model.push_back(in_data);
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    phase = 2;                       // fill to full
    repeat (20) @(posedge clk);
    phase = 1;                       // full rate
    cyc = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (moved < 99) begin
      failures++;
      $display("full-rate stream moved %0d words in 100 cycles", moved);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
