// tb_dpsk4_demod: a four-position DPSK signal (random phase steps of 0, 90,
// 180, 270 degrees, random carrier phase, small noise) at reduced N. At every
// symbol end the two decided bits must match the step by the Gray mapping
// 0 -> 11, 90 -> 10, 180 -> 00, 270 -> 01; every step must have occurred.
module tb_dpsk4_demod;
  localparam int unsigned R = 8;
  localparam int unsigned N = 8;
  localparam int unsigned NSYM = 80;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc;
  logic [1:0] sym;
  logic sym_valid, sym_end;
  int checks = 0, failures = 0;
  int steps [NSYM];
  int map [4] = '{3, 2, 0, 1};
  int seen [4] = '{0, 0, 0, 0};
  int nend = 0, cyc = 0, last_v = -1;
  real ph;

  dpsk4_demod #(.R(R), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NSYM * N * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && sym_valid) begin
      if (last_v >= 0 && nend < NSYM) begin
        checks++;
        if (cyc - last_v != 4) begin failures++; $display("rate %0d", cyc - last_v); end
      end
      last_v = cyc;
      if (sym_end) begin
        if (nend >= 1 && nend < NSYM) begin
          checks++;
          seen[steps[nend]]++;
          if (int'(sym) != map[steps[nend]]) begin
            failures++;
            $display("symbol %0d step %0d: got %b want %b", nend, steps[nend] * 90, sym, 2'(map[steps[nend]]));
          end
        end
        nend++;
      end
    end
  end

  initial begin
    adc = '0;
    ph  = 2.0 * PI * real'($urandom % 360) / 360.0;
    for (int j = 0; j < NSYM; j++) steps[j] = $urandom % 4;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int j = 0; j < NSYM; j++) begin
      ph += PI / 2.0 * steps[j];
      for (int p = 0; p < N; p++)
        for (int q = 0; q < 4; q++) begin
          adc <= R'($rtoi(100.0 * $cos(PI / 2.0 * q + ph)) + int'($urandom % 7) - 3);
          @(posedge clk);
        end
    end
    repeat (30) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("step %0d never sent", s * 90); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
