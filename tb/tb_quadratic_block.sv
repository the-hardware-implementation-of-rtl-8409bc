// tb_quadratic_block: z = a^2 + b^2 for random and extreme inputs, compared
// with 64-bit integer arithmetic.
module tb_quadratic_block;
  localparam int unsigned W = 17;
  logic clk = 1'b0;
  logic signed [W-1:0] a, b;
  logic [2*W:0] z;
  int checks = 0, failures = 0;
  longint e;

  quadratic_block #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin a = -(2 ** (W - 1)); b = -(2 ** (W - 1)); end
        1: begin a = 2 ** (W - 1) - 1; b = -(2 ** (W - 1)); end
        2: begin a = '0; b = '0; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      @(posedge clk);
      e = longint'(a) * longint'(a) + longint'(b) * longint'(b);
      checks++;
      if (longint'(z) != e) begin
        failures++;
        $display("a=%0d b=%0d got %0d want %0d", a, b, z, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
