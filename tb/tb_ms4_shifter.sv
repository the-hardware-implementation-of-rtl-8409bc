// tb_ms4_shifter: checks that the four-cell shifter presents the four samples
// of each carrier period, in order, with one strobe every 4 clocks.
module tb_ms4_shifter;
  localparam int unsigned R = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc;
  logic signed [R-1:0] s [4];
  logic s_valid;
  int checks = 0, failures = 0;
  logic signed [R-1:0] hist [$];
  int last_strobe = -1, cyc = 0;

  ms4_shifter #(.R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adc = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      adc <= R'($urandom);
      @(posedge clk);
      cyc++;
      hist.push_back(adc);
      if (s_valid) begin
        // the strobe shows the four samples captured before the last clock
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (s[j] !== hist[hist.size() - 5 + j]) begin
            failures++;
            $display("period mismatch cell %0d: got %0d want %0d", j, s[j], hist[hist.size()-5+j]);
          end
        end
        // the strobe must fall on the period grid counted from reset
        checks++;
        if ((hist.size() - 1) % 4 != 0) begin
          failures++;
          $display("strobe off the period grid after %0d samples", hist.size() - 1);
        end
        if (last_strobe >= 0) begin
          checks++;
          if (cyc - last_strobe != 4) begin
            failures++;
            $display("strobe spacing %0d", cyc - last_strobe);
          end
        end else begin
          checks++;
          if (hist.size() - 1 != 4) begin   // first strobe right after 4 samples
            failures++;
            $display("first strobe after %0d samples", hist.size() - 1);
          end
        end
        last_strobe = cyc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
