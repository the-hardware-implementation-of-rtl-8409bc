// tb_qam_resolver: random level pairs every clock and random strobes; the
// outputs must hold the pair present at the last strobe and flag it once.
module tb_qam_resolver;
  localparam int unsigned LB = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [LB-1:0] lvl0, lvl1, word0, word1;
  logic strobe, word_valid;
  int checks = 0, failures = 0;
  logic [LB-1:0] h0, h1;

  qam_resolver #(.LB(LB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lvl0 = '0; lvl1 = '0; strobe = 1'b0; h0 = '0; h1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      lvl0 <= LB'($urandom); lvl1 <= LB'($urandom);
      strobe <= ($urandom % 4) == 0;
      @(posedge clk);
      if (strobe) begin h0 = lvl0; h1 = lvl1; end
      #1;
      checks++;
      if (word_valid !== strobe || word0 !== h0 || word1 !== h1) begin
        failures++;
        $display("got %0d %0d v%0d want %0d %0d v%0d", word0, word1, word_valid, h0, h1, strobe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
