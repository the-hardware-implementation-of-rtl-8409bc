// tb_basic_processor: feeds carriers of random phase and amplitude (plus
// random samples) and checks every response against the defining formula
//   y0_i = sum_{j<N} (s1 - s3)_(i-j),  y1_i = sum_{j<N} (s2 - s4)_(i-j)
// computed directly from the samples, one response per 4 clocks, and the
// latency of 2 + log2(N) clocks from the last sample of a period.
module tb_basic_processor;
  localparam int unsigned R = 10;
  localparam int unsigned N = 8;
  localparam int unsigned NB = $clog2(N);
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc;
  logic signed [R+NB:0] y0, y1;
  logic y_valid;
  int checks = 0, failures = 0;
  int smp [$];
  int e0q [$], e1q [$], tq [$];
  int cyc = 0, last_v = -1;
  real ph, amp;
  bit  done = 1'b0;

  basic_processor #(.R(R), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && y_valid && !(done && e0q.size() == 0)) begin
      checks++;
      if (e0q.size() == 0) begin
        failures++;
        $display("unexpected response");
      end else begin
        if (int'(y0) != e0q[0] || int'(y1) != e1q[0]) begin
          failures++;
          $display("got %0d %0d want %0d %0d", y0, y1, e0q[0], e1q[0]);
        end
        checks++;
        if (cyc - tq[0] != 2 + NB) begin
          failures++;
          $display("latency %0d", cyc - tq[0]);
        end
        void'(e0q.pop_front()); void'(e1q.pop_front()); void'(tq.pop_front());
      end
      if (last_v >= 0) begin
        checks++;
        if (cyc - last_v != 4) begin
          failures++;
          $display("rate: %0d clocks between responses", cyc - last_v);
        end
      end
      last_v = cyc;
    end
  end

  initial begin
    adc = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int blk = 0; blk < 60; blk++) begin
      ph  = 2.0 * PI * real'($urandom % 360) / 360.0;
      amp = real'($urandom % 500);
      for (int p = 0; p < 5; p++) begin
        for (int q = 0; q < 4; q++) begin
          if (blk % 7 == 3) adc <= R'($urandom);
          else adc <= R'($rtoi(amp * $cos(PI / 2.0 * q + ph)));
          @(posedge clk);
          smp.push_back(int'(adc));
        end
        // period complete: reference responses
        begin
          int a0, a1, np, b;
          a0 = 0; a1 = 0;
          np = smp.size() / 4;
          for (int j = 0; j < N && j < np; j++) begin
            b = (np - 1 - j) * 4;
            a0 += smp[b] - smp[b + 2];
            a1 += smp[b + 1] - smp[b + 3];
          end
          e0q.push_back(a0); e1q.push_back(a1); tq.push_back(cyc);
        end
      end
    end
    adc <= '0;
    done = 1'b1;
    repeat (20) @(posedge clk);
    checks++;
    if (e0q.size() != 0) begin
      failures++;
      $display("%0d responses missing", e0q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
