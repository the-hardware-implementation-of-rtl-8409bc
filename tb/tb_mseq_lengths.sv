// tb_mseq_lengths: the two shorter M-sequence configurations, K = 15 and
// K = 31 elements, two words each, at N = 64 carrier periods per element and a
// 12-bit ADC (the K = 63 configuration runs in the full-design testbench).
// Random words at random carrier phases with noise; every decision at a word
// end must be the word sent, both words must occur, and word ends must come
// every K*N periods.
module tb_mseq_lengths;
  import demod_pkg::*;
  localparam int unsigned R = 12;
  localparam int unsigned N = 64;
  localparam int NW = 6;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc15, adc31;
  logic [0:0] w15, w31;
  logic v15, v31, e15, e31;
  logic [R+6+4:0] r15;
  logic [R+6+5:0] r31;
  int checks = 0, failures = 0, cyc = 0;
  int s15 [NW], s31 [NW];
  int n15 = 0, n31 = 0, l15 = -1, l31 = -1;
  int seen15 [2] = '{0, 0};
  int seen31 [2] = '{0, 0};
  int q15 [15], q31 [31];

  pit_demod #(.R(R), .N(N), .M(2), .K(15), .CODE(MSEQ)) dut15 (
    .clk, .rst_n, .adc(adc15), .word(w15), .word_valid(v15), .word_end(e15), .word_resp(r15));
  pit_demod #(.R(R), .N(N), .M(2), .K(31), .CODE(MSEQ)) dut31 (
    .clk, .rst_n, .adc(adc31), .word(w31), .word_valid(v31), .word_end(e31), .word_resp(r31));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NW * 31 * N * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && e15) begin
      if (n15 < NW) begin
        checks++;
        seen15[s15[n15]]++;
        if (int'(w15) != s15[n15]) begin failures++; $display("K=15 word %0d: got %0d sent %0d", n15, w15, s15[n15]); end
        if (l15 >= 0) begin
          checks++;
          if (cyc - l15 != 15 * N * 4) begin failures++; $display("K=15 spacing %0d", cyc - l15); end
        end
      end
      l15 = cyc;
      n15++;
    end
    if (rst_n && e31) begin
      if (n31 < NW) begin
        checks++;
        seen31[s31[n31]]++;
        if (int'(w31) != s31[n31]) begin failures++; $display("K=31 word %0d: got %0d sent %0d", n31, w31, s31[n31]); end
        if (l31 >= 0) begin
          checks++;
          if (cyc - l31 != 31 * N * 4) begin failures++; $display("K=31 spacing %0d", cyc - l31); end
        end
      end
      l31 = cyc;
      n31++;
    end
  end

  task automatic tx15();
    for (int w = 0; w < NW; w++) begin
      real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
      s15[w] = (w < 2) ? w : int'($urandom % 2);
      for (int k = 14; k >= 0; k--) begin
        real pk = ph + (q15[(k + 7 * s15[w]) % 15] ? PI : 0.0);
        for (int p = 0; p < N; p++)
          for (int q = 0; q < 4; q++) begin
            adc15 <= R'($rtoi(800.0 * $cos(PI / 2.0 * q + pk)) + int'($urandom % 201) - 100);
            @(posedge clk);
          end
      end
    end
  endtask

  task automatic tx31();
    for (int w = 0; w < NW; w++) begin
      real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
      s31[w] = (w < 2) ? 1 - w : int'($urandom % 2);
      for (int k = 30; k >= 0; k--) begin
        real pk = ph + (q31[(k + 15 * s31[w]) % 31] ? PI : 0.0);
        for (int p = 0; p < N; p++)
          for (int q = 0; q < 4; q++) begin
            adc31 <= R'($rtoi(800.0 * $cos(PI / 2.0 * q + pk)) + int'($urandom % 201) - 100);
            @(posedge clk);
          end
      end
    end
  endtask

  initial begin
    // K = 15: a[t+4] = a[t+3] ^ a[t]; K = 31: a[t+5] = a[t+3] ^ a[t]; both from 1,0,...
    int a [40];
    for (int t = 0; t < 40; t++) a[t] = 0;
    a[0] = 1;
    for (int t = 0; t + 4 < 40; t++) a[t + 4] = a[t + 3] ^ a[t];
    for (int t = 0; t < 15; t++) q15[t] = a[t];
    for (int t = 0; t < 40; t++) a[t] = 0;
    a[0] = 1;
    for (int t = 0; t + 5 < 40; t++) a[t + 5] = a[t + 3] ^ a[t];
    for (int t = 0; t < 31; t++) q31[t] = a[t];
    adc15 = '0; adc31 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      tx15();
      tx31();
    join
    repeat (30) @(posedge clk);
    checks++;
    if (n15 < NW || n31 < NW) begin failures++; $display("word ends %0d %0d", n15, n31); end
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (seen15[m] == 0 || seen31[m] == 0) begin failures++; $display("word %0d missing", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
