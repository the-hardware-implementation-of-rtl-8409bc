// tb_quad_subtractor: random sample quadruples; checks d0 = s1 - s3 and
// d1 = s2 - s4 one clock after each strobe, and that d_valid follows s_valid.
module tb_quad_subtractor;
  localparam int unsigned R = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] s [4];
  logic s_valid;
  logic signed [R:0] d0, d1;
  logic d_valid;
  int checks = 0, failures = 0;
  int e0, e1;
  logic ev;

  quad_subtractor #(.R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) s[j] = '0;
    s_valid = 1'b0;
    ev = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 600; i++) begin
      for (int j = 0; j < 4; j++) s[j] <= R'($urandom);
      s_valid <= ($urandom % 3) != 0;
      @(posedge clk);
      #1;
      checks++;
      if (d_valid !== s_valid) begin
        failures++;
        $display("valid mismatch");
      end
      if (s_valid) begin
        e0 = int'(s[0]) - int'(s[2]);
        e1 = int'(s[1]) - int'(s[3]);
        checks++;
        if (int'(d0) != e0 || int'(d1) != e1) begin
          failures++;
          $display("got %0d %0d want %0d %0d", d0, d1, e0, e1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
