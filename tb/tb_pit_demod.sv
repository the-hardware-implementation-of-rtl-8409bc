// tb_pit_demod: code words phase-shift keyed in toto, at reduced N. Two
// demodulators: four Walsh words of four elements, and two 15-element
// M-sequence words. The transmitter sends random words, element K-1 first,
// each element N carrier periods at phase phi or phi + 180 degrees, with a new
// random carrier phase phi per word and small noise. At every word end the
// chosen word must be the one sent, and every word must have been sent.
module tb_pit_demod;
  import demod_pkg::*;
  localparam int unsigned R = 10;
  localparam int unsigned N = 4;
  localparam int unsigned NW = 40;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [R-1:0] adc_w, adc_m;
  logic [1:0] word_w;
  logic [0:0] word_m;
  logic vw, vm, ew, em;
  logic [R+$clog2(N)+2:0] resp_w;
  logic [R+$clog2(N)+4:0] resp_m;
  int checks = 0, failures = 0;
  int sent_w [NW], sent_m [NW];
  int seen_w [4] = '{0, 0, 0, 0};
  int seen_m [2] = '{0, 0};
  int nw = 0, nm = 0, cyc = 0, lastw = -1;
  // 15-element M-sequence, recurrence a[t+4] = a[t+3] ^ a[t], from 1,0,0,0
  int mseq [15] = '{1, 0, 0, 0, 1, 1, 1, 1, 0, 1, 0, 1, 1, 0, 0};

  pit_demod #(.R(R), .N(N), .M(4), .K(4), .CODE(WALSH)) dut_w (
    .clk, .rst_n, .adc(adc_w), .word(word_w), .word_valid(vw), .word_end(ew), .word_resp(resp_w));
  pit_demod #(.R(R), .N(N), .M(2), .K(15), .CODE(MSEQ)) dut_m (
    .clk, .rst_n, .adc(adc_m), .word(word_m), .word_valid(vm), .word_end(em), .word_resp(resp_m));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NW * 15 * N * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && ew) begin
      // one Walsh word is K * N periods of 4 clocks
      if (lastw >= 0 && nw < NW) begin
        checks++;
        if (cyc - lastw != 4 * 4 * N) begin failures++; $display("word spacing %0d", cyc - lastw); end
      end
      lastw = cyc;
      if (nw < NW) begin
        checks++;
        seen_w[sent_w[nw]]++;
        if (int'(word_w) != sent_w[nw]) begin
          failures++;
          $display("walsh word %0d: got %0d sent %0d", nw, word_w, sent_w[nw]);
        end
      end
      nw++;
    end
    if (rst_n && em) begin
      if (nm < NW) begin
        checks++;
        seen_m[sent_m[nm]]++;
        if (int'(word_m) != sent_m[nm]) begin
          failures++;
          $display("mseq word %0d: got %0d sent %0d", nm, word_m, sent_m[nm]);
        end
      end
      nm++;
    end
  end

  task automatic send_walsh();
    for (int w = 0; w < NW; w++) begin
      real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
      sent_w[w] = $urandom % 4;
      for (int k = 3; k >= 0; k--) begin
        real pk = ph + (($countones(sent_w[w] & k) % 2) ? PI : 0.0);
        for (int p = 0; p < N; p++)
          for (int q = 0; q < 4; q++) begin
            adc_w <= R'($rtoi(200.0 * $cos(PI / 2.0 * q + pk)) + int'($urandom % 21) - 10);
            @(posedge clk);
          end
      end
    end
    adc_w <= '0;
  endtask

  task automatic send_mseq();
    for (int w = 0; w < NW; w++) begin
      real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
      sent_m[w] = $urandom % 2;
      for (int k = 14; k >= 0; k--) begin
        real pk = ph + (mseq[(k + 7 * sent_m[w]) % 15] ? PI : 0.0);
        for (int p = 0; p < N; p++)
          for (int q = 0; q < 4; q++) begin
            adc_m <= R'($rtoi(200.0 * $cos(PI / 2.0 * q + pk)) + int'($urandom % 21) - 10);
            @(posedge clk);
          end
      end
    end
    adc_m <= '0;
  endtask

  initial begin
    adc_w = '0;
    adc_m = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      send_walsh();
      send_mseq();
    join
    repeat (30) @(posedge clk);
    checks++;
    if (nw < NW || nm < NW) begin failures++; $display("word ends %0d %0d", nw, nm); end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen_w[m] == 0) begin failures++; $display("walsh word %0d never sent", m); end
    end
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (seen_m[m] == 0) begin failures++; $display("mseq word %0d never sent", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
