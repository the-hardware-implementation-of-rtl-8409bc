// tb_qam_demod: coherent QAM at reduced N, 16 positions and 4 positions side
// by side. Symbols start OFF periods after reset, so the synchronizer has to
// find the symbol timing; the amplitude is arbitrary, so the thresholds have
// to be formed from the signal. After settling, every decoded code must equal
// {gray(I level), gray(Q level)} of the symbol sent, one code per symbol.
module tb_qam_demod;
  localparam int unsigned R = 10;
  localparam int unsigned N = 8;
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned NSYM = 200;
  localparam int unsigned SETTLE = 80;
  localparam int unsigned OFF = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc16, adc4;
  logic [3:0] code16;
  logic [1:0] code4;
  logic v16, v4;
  logic [NB-1:0] ph16, ph4;
  int checks = 0, failures = 0;
  int cyc = 0, n16 = 0, n4 = 0;
  int symq16 [$], symq4 [$];     // expected code of each sample's symbol, per clock
  int gray [4] = '{0, 1, 3, 2};
  int seen16 [16];

  qam_demod #(.R(R), .N(N), .POSITIONS(16)) dut16 (
    .clk, .rst_n, .adc(adc16), .code(code16), .code_valid(v16), .sync_phase(ph16));
  qam_demod #(.R(R), .N(N), .POSITIONS(4)) dut4 (
    .clk, .rst_n, .adc(adc4), .code(code4), .code_valid(v4), .sync_phase(ph4));

  always #5 clk = ~clk;

  initial begin
    repeat ((NSYM + 2) * N * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A code leaves the decoder NB + 4 clocks after the last sample of its
  // symbol; compare with the symbol of the sample NB + 6 clocks back.
  always @(negedge clk) begin
    if (rst_n && v16) begin
      if (n16 >= SETTLE && cyc - NB - 6 >= 0 && cyc - NB - 6 < symq16.size()) begin
        checks++;
        seen16[code16]++;
        if (int'(code16) != symq16[cyc - NB - 6]) begin
          failures++;
          $display("16-QAM symbol %0d: got %0d want %0d", n16, code16, symq16[cyc - NB - 6]);
        end
      end
      n16++;
    end
    if (rst_n && v4) begin
      if (n4 >= SETTLE && cyc - NB - 6 >= 0 && cyc - NB - 6 < symq4.size()) begin
        checks++;
        if (int'(code4) != symq4[cyc - NB - 6]) begin
          failures++;
          $display("4-QAM symbol %0d: got %0d want %0d", n4, code4, symq4[cyc - NB - 6]);
        end
      end
      n4++;
    end
  end

  initial begin
    int li, lq, mi, mq, a16, a4;
    adc16 = '0; adc4 = '0;
    a16 = 9 + int'($urandom % 4);              // per-sample amplitude step
    a4  = 20 + int'($urandom % 20);
    li = 0; lq = 0; mi = 0; mq = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int p = 0; p < (NSYM + 1) * N; p++) begin
      if (p == 0 || (p >= OFF && (p - OFF) % N == 0)) begin
        li = $urandom % 4; lq = $urandom % 4;
        mi = $urandom % 2; mq = $urandom % 2;
      end
      for (int q = 0; q < 4; q++) begin
        int ai, aq, bi, bq;
        ai = (2 * li - 3) * a16; aq = (2 * lq - 3) * a16;
        bi = (2 * mi - 1) * a4;  bq = (2 * mq - 1) * a4;
        case (q)
          0: begin adc16 <= R'(ai);  adc4 <= R'(bi);  end
          1: begin adc16 <= R'(aq);  adc4 <= R'(bq);  end
          2: begin adc16 <= R'(-ai); adc4 <= R'(-bi); end
          default: begin adc16 <= R'(-aq); adc4 <= R'(-bq); end
        endcase
        symq16.push_back(gray[li] * 4 + gray[lq]);
        symq4.push_back(mi * 2 + mq);
        @(posedge clk);
        cyc++;
        @(negedge clk);
      end
    end
    checks += 3;
    if (n16 < NSYM - 5 || n4 < NSYM - 5) begin failures++; $display("codes %0d %0d", n16, n4); end
    if (int'(ph16) != (OFF + N - 1) % N || int'(ph4) != (OFF + N - 1) % N) begin
      failures++; $display("sync phase %0d %0d", ph16, ph4);
    end
    begin
      int nz = 0;
      for (int c = 0; c < 16; c++) if (seen16[c] == 0) nz++;
      if (nz != 0) begin failures++; $display("%0d codes never received", nz); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
