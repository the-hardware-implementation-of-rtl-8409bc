// tb_sliding_sum_tree: random differences, one every 4 clocks as in the
// demodulator; each output must equal the direct sum of the last N inputs
// (zeros before reset) and arrive log2(N) clocks after its input.
module tb_sliding_sum_tree;
  localparam int unsigned W = 7;
  localparam int unsigned N = 16;
  localparam int unsigned NB = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] d;
  logic d_valid;
  logic signed [W+NB-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;
  int hist [$];
  int expq [$];
  int tq [$];
  int cyc = 0;
  int acc;

  sliding_sum_tree #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (int'(y) != expq[0]) begin
          failures++;
          $display("got %0d want %0d", y, expq[0]);
        end
        checks++;
        if (cyc - tq[0] != NB) begin
          failures++;
          $display("latency %0d", cyc - tq[0]);
        end
        void'(expq.pop_front());
        void'(tq.pop_front());
      end
    end
  end

  initial begin
    d = '0;
    d_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      d       <= (i % 50 < 10) ? -(2 ** (W - 1)) : W'($urandom);  // runs at the extreme value
      d_valid <= 1'b1;
      @(negedge clk);
      hist.push_back(int'(d));
      acc = 0;
      for (int j = 0; j < N && j < hist.size(); j++) acc += hist[hist.size() - 1 - j];
      expq.push_back(acc);
      tq.push_back(cyc);
      @(posedge clk);
      d_valid <= 1'b0;
      repeat (2) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
