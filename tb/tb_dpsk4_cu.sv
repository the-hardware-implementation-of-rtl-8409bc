// tb_dpsk4_cu: random responses; checks both CU outputs against the formulas
// z0 = y0 y0d + y1 y1d + y1 y0d - y0 y1d, z1 = y0 y0d + y1 y1d - y1 y0d + y0 y1d
// one clock after each strobe.
module tb_dpsk4_cu;
  localparam int unsigned W = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] y0, y1, y0d, y1d;
  logic in_valid;
  logic signed [2*W+1:0] z0, z1;
  logic z_valid;
  int checks = 0, failures = 0;
  longint e0, e1;

  dpsk4_cu #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {y0, y1, y0d, y1d} = '0;
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 800; i++) begin
      y0 <= W'($urandom); y1 <= W'($urandom); y0d <= W'($urandom); y1d <= W'($urandom);
      if (i == 0) begin
        y0 <= -(2 ** (W-1)); y1 <= -(2 ** (W-1)); y0d <= -(2 ** (W-1)); y1d <= 2 ** (W-1) - 1;
      end
      in_valid <= 1'b1;
      @(posedge clk);
      e0 = longint'(y0) * y0d + longint'(y1) * y1d + longint'(y1) * y0d - longint'(y0) * y1d;
      e1 = longint'(y0) * y0d + longint'(y1) * y1d - longint'(y1) * y0d + longint'(y0) * y1d;
      #1;
      checks++;
      if (!z_valid || longint'(z0) != e0 || longint'(z1) != e1) begin
        failures++;
        $display("got %0d %0d want %0d %0d", z0, z1, e0, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
