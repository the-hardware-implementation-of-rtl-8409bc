// tb_qam_nsd: responses of a 16-position QAM signal (four levels per axis)
// whose symbols start OFF periods after reset, built here as N-period sums of
// per-period contributions. After a settling time the synchronizer must have
// chosen the phase where the sum spans exactly one symbol, strobe once per N
// responses at that phase, and give a threshold spacing within 15 % of the
// true 2A. Repeated for several offsets.
module tb_qam_nsd;
  localparam int unsigned W = 14;
  localparam int unsigned N = 8;
  localparam int unsigned L = 4;
  localparam int A = 20;                       // per-period amplitude step
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] y0, y1;
  logic y_valid;
  logic [W-1:0] unit;
  logic sym_strobe;
  logic [$clog2(N)-1:0] phase;
  int checks = 0, failures = 0;

  qam_nsd #(.W(W), .N(N), .L(L), .AVG_SHIFT(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int off);
    int c0 [$], c1 [$];
    int lv0, lv1, a0, a1, nstrobe, want_ph;
    rst_n <= 1'b0;
    y_valid <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    nstrobe = 0;
    want_ph = (off + N - 1) % N;
    lv0 = 0; lv1 = 0;
    for (int p = 0; p < 120 * N; p++) begin
      if ((p - off) % N == 0 || p == 0) begin
        lv0 = 2 * int'($urandom % L) - L + 1;
        lv1 = 2 * int'($urandom % L) - L + 1;
      end
      c0.push_back(lv0 * A);
      c1.push_back(lv1 * A);
      a0 = 0; a1 = 0;
      for (int j = 0; j < N && j <= p; j++) begin
        a0 += c0[p - j];
        a1 += c1[p - j];
      end
      y0 <= W'(a0); y1 <= W'(a1); y_valid <= 1'b1;
      @(negedge clk);
      if (p >= 100 * N) begin
        if (sym_strobe) begin
          nstrobe++;
          checks++;
          if (p % N != want_ph) begin failures++; $display("off %0d: strobe at phase %0d want %0d", off, p % N, want_ph); end
        end
      end
      @(posedge clk);
      y_valid <= 1'b0;
      repeat (2) @(posedge clk);
    end
    checks += 3;
    if (nstrobe != 20) begin failures++; $display("off %0d: %0d strobes", off, nstrobe); end
    if (int'(phase) != want_ph) begin failures++; $display("off %0d: phase %0d want %0d", off, phase, want_ph); end
    if (int'(unit) < 2 * N * A * 85 / 100 || int'(unit) > 2 * N * A * 115 / 100) begin
      failures++; $display("off %0d: unit %0d want about %0d", off, unit, 2 * N * A);
    end
  endtask

  initial begin
    y0 = '0; y1 = '0; y_valid = 1'b0;
    run(0);
    run(3);
    run(5);
    run(int'($urandom % N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
