// tb_magnitude_unit: z must satisfy z^2 <= u0^2 + u1^2 < (z+1)^2 for random
// and extreme inputs.
module tb_magnitude_unit;
  localparam int unsigned W = 21;
  logic clk = 1'b0;
  logic signed [W-1:0] u0, u1;
  logic [W-1:0] z;
  int checks = 0, failures = 0;
  longint s, zz;

  magnitude_unit #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin u0 = -(2 ** (W - 1)); u1 = -(2 ** (W - 1)); end
        1: begin u0 = '0; u1 = '0; end
        2: begin u0 = 3; u1 = 4; end
        default: begin
          u0 = W'($urandom);
          u1 = (i % 3 == 0) ? W'($urandom % 64) : W'($urandom);
        end
      endcase
      @(posedge clk);
      s  = longint'(u0) * u0 + longint'(u1) * u1;
      zz = longint'(z);
      checks++;
      if (!(zz * zz <= s && (zz + 1) * (zz + 1) > s)) begin
        failures++;
        $display("u0=%0d u1=%0d got %0d", u0, u1, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
