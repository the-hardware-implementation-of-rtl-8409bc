// tb_qam_decoder: every level pair for 16 positions (two bits per axis); the
// code must be the per-axis Gray code, in-phase bits above, from a table
// written out here.
module tb_qam_decoder;
  localparam int unsigned LB = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [LB-1:0] word0, word1;
  logic word_valid;
  logic [2*LB-1:0] code;
  logic code_valid;
  int checks = 0, failures = 0;
  // Gray code of levels 0..3
  int gray [4] = '{0, 1, 3, 2};
  int e;

  qam_decoder #(.LB(LB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word0 = '0; word1 = '0; word_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      word0 <= LB'(i); word1 <= LB'(i >> 2);
      word_valid <= 1'b1;
      @(posedge clk);
      e = gray[word0] * 4 + gray[word1];
      #1;
      checks++;
      if (!code_valid || int'(code) != e) begin
        failures++;
        $display("levels %0d %0d: got %0d want %0d", word0, word1, code, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
