// tb_max_choice: five random responses (with forced ties); the index of the
// first largest one and its value must appear one clock after the strobe.
module tb_max_choice;
  localparam int unsigned W = 10;
  localparam int unsigned M = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] z [M];
  logic z_valid;
  logic [$clog2(M)-1:0] idx;
  logic [W-1:0] zmax;
  logic idx_valid;
  int checks = 0, failures = 0;
  int bi, bz;

  max_choice #(.W(W), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z_valid = 1'b0;
    for (int m = 0; m < M; m++) z[m] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1000; i++) begin
      for (int m = 0; m < M; m++) z[m] <= (i % 4 == 0) ? W'($urandom % 4) : W'($urandom);
      z_valid <= 1'b1;
      @(posedge clk);
      bi = 0; bz = int'(z[0]);
      for (int m = 1; m < M; m++) if (int'(z[m]) > bz) begin bi = m; bz = int'(z[m]); end
      #1;
      checks++;
      if (!idx_valid || int'(idx) != bi || int'(zmax) != bz) begin
        failures++;
        $display("got %0d/%0d want %0d/%0d", idx, zmax, bi, bz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
