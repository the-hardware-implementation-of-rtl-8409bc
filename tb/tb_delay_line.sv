// tb_delay_line: random words written on random strobes; at each strobe the
// output must be the word written DEPTH strobes earlier (zero before that).
module tb_delay_line;
  localparam int unsigned W = 12;
  localparam int unsigned DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [W-1:0] din, dout, d1out;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  logic [W-1:0] exp_w;

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.*);
  // a single-cell line is the stage-1 register of the summation tree
  delay_line #(.W(W), .DEPTH(1)) dut1 (.clk, .rst_n, .en, .din, .dout(d1out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 800; i++) begin
      en  <= ($urandom % 2) == 0;
      din <= W'($urandom);
      #1;
      @(negedge clk);
      if (en) begin
        exp_w = (hist.size() >= DEPTH) ? hist[hist.size() - DEPTH] : '0;
        checks++;
        if (dout !== exp_w) begin
          failures++;
          $display("depth %0d: got %h want %h", DEPTH, dout, exp_w);
        end
        exp_w = (hist.size() >= 1) ? hist[hist.size() - 1] : '0;
        checks++;
        if (d1out !== exp_w) begin
          failures++;
          $display("depth 1: got %h want %h", d1out, exp_w);
        end
        hist.push_back(din);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
