// tb_dpsk2_demod: a binary DPSK signal (random bits as 0/180 degree phase
// steps, random carrier phase, small noise) at reduced N. Every per-period
// z0 - z1 is compared with a reference computed from the samples by the
// defining formulas, and at every symbol end the decided bit must equal the
// transmitted one. Decisions arrive one per 4 clocks.
module tb_dpsk2_demod;
  localparam int unsigned R = 8;
  localparam int unsigned N = 8;
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned NSYM = 60;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc;
  logic sym, sym_valid, sym_end;
  logic signed [2*(R+NB+2)+1:0] z_diff;
  int checks = 0, failures = 0;
  int d0 [$], d1 [$];
  longint ezq [$];
  int bits [NSYM];
  int nend = 0, cyc = 0, last_v = -1, n0 = 0, n1 = 0;
  real ph;

  dpsk2_demod #(.R(R), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NSYM * N * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ysum(ref int d [$], input int p);
    int a = 0;
    for (int j = 0; j < N; j++) if (p - j >= 0) a += d[p - j];
    return a;
  endfunction

  always @(negedge clk) begin
    if (rst_n && sym_valid && ezq.size() > 0) begin
      checks++;
      if (longint'(z_diff) != ezq[0]) begin
        failures++;
        $display("z_diff got %0d want %0d", z_diff, ezq[0]);
      end
      void'(ezq.pop_front());
      if (last_v >= 0) begin
        checks++;
        if (cyc - last_v != 4) begin failures++; $display("rate %0d", cyc - last_v); end
      end
      last_v = cyc;
      if (sym_end) begin
        if (nend >= 1 && nend < NSYM) begin
          checks++;
          if (int'(sym) != bits[nend]) begin
            failures++;
            $display("symbol %0d: got %0d sent %0d", nend, sym, bits[nend]);
          end
          if (bits[nend] == 1) n1++; else n0++;
        end
        nend++;
      end
    end
  end

  initial begin
    adc = '0;
    ph  = 2.0 * PI * real'($urandom % 360) / 360.0;
    for (int j = 0; j < NSYM; j++) bits[j] = $urandom % 2;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int j = 0; j < NSYM; j++) begin
      if (bits[j] == 1) ph += PI;
      for (int p = 0; p < N; p++) begin
        int smp [4];
        for (int q = 0; q < 4; q++) begin
          smp[q] = $rtoi(100.0 * $cos(PI / 2.0 * q + ph)) + int'($urandom % 7) - 3;
          adc <= R'(smp[q]);
          @(posedge clk);
        end
        d0.push_back(smp[0] - smp[2]);
        d1.push_back(smp[1] - smp[3]);
        begin
          int i;
          longint a0, a1, b0, b1;
          i  = d0.size() - 1;
          a0 = ysum(d0, i); a1 = ysum(d1, i);
          b0 = (i >= N) ? ysum(d0, i - N) : 0;
          b1 = (i >= N) ? ysum(d1, i - N) : 0;
          ezq.push_back((a0 + b0) * (a0 + b0) + (a1 + b1) * (a1 + b1)
                        - (a0 - b0) * (a0 - b0) - (a1 - b1) * (a1 - b1));
        end
      end
    end
    repeat (30) @(posedge clk);
    checks++;
    if (nend < NSYM || n0 == 0 || n1 == 0) begin
      failures++;
      $display("symbol ends %0d, zeros %0d, ones %0d", nend, n0, n1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
