// tb_demod_top: end-to-end run of all five demodulators at their default
// sizes, in parallel, each fed its own synthesized IF signal sampled at 4*f0:
//   binary DPSK (N = 128): random bits as 0/180 degree steps;
//   4-DPSK (N = 128): random steps of 0/90/180/270 degrees;
//   4-QAM (N = 64): coherent carrier, symbols starting 23 periods after reset,
//     so the synchronizer has to find the symbol timing;
//   Walsh words (N = 64, K = 4) and 63-element M-sequence words (N = 64),
//     each word at a new random carrier phase.
// Every decision at a symbol or word end is compared with what was sent, and
// every mechanism must occur at least once: phase held and reversed, all four
// 4-DPSK steps, all four QAM codes with timing acquired off the reset phase,
// all Walsh words, both M-sequence words.
module tb_demod_top;
  localparam real PI = 3.14159265358979;
  localparam int NDPSK = 16, NQPSK = 20, NQAM = 140, QAM_SETTLE = 60, NWAL = 12, NMS = 4;
  localparam int QAM_OFF = 23;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0]  dpsk_adc, qpsk_adc;
  logic signed [11:0] qam_adc, wal_adc, ms_adc;
  logic dpsk_sym, dpsk_valid, dpsk_end;
  logic signed [35:0] dpsk_zdiff;
  logic [1:0] qpsk_sym;
  logic qpsk_valid, qpsk_end;
  logic [1:0] qam_code;
  logic qam_valid;
  logic [5:0] qam_phase;
  logic [1:0] wal_word;
  logic wal_valid, wal_end;
  logic [20:0] wal_resp;
  logic [0:0] ms_word;
  logic ms_valid, ms_end;
  logic [24:0] ms_resp;

  int checks = 0, failures = 0, cyc = 0;
  int dbits [NDPSK], qsteps [NQPSK], wsent [NWAL], msent [NMS];
  int ndp = 0, nqp = 0, nqam = 0, nwal = 0, nms = 0;
  int qmap [4] = '{3, 2, 0, 1};
  int seen_hold = 0, seen_rev = 0, seen_q [4], seen_qam [4], seen_w [4], seen_m [2];
  int qamq [$];
  int mseq [63];

  demod_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- decisions ----------------
  always @(negedge clk) begin
    if (rst_n && dpsk_end) begin
      if (ndp >= 1 && ndp < NDPSK) begin
        checks++;
        if (dbits[ndp]) seen_rev++; else seen_hold++;
        if (int'(dpsk_sym) != dbits[ndp]) begin failures++; $display("DPSK %0d: got %0d sent %0d", ndp, dpsk_sym, dbits[ndp]); end
      end
      ndp++;
    end
    if (rst_n && qpsk_end) begin
      if (nqp >= 1 && nqp < NQPSK) begin
        checks++;
        seen_q[qsteps[nqp]]++;
        if (int'(qpsk_sym) != qmap[qsteps[nqp]]) begin failures++; $display("4-DPSK %0d: got %b", nqp, qpsk_sym); end
      end
      nqp++;
    end
    if (rst_n && qam_valid) begin
      // the code leaves log2(N) + 4 clocks after the last sample of its symbol;
      // qamq starts 3 clocks (the reset) after cyc, so look 16 clocks back
      if (nqam >= QAM_SETTLE && cyc - 16 >= 0 && cyc - 16 < qamq.size()) begin
        checks++;
        seen_qam[qam_code]++;
        if (int'(qam_code) != qamq[cyc - 16]) begin failures++; $display("QAM %0d: got %0d want %0d", nqam, qam_code, qamq[cyc - 16]); end
      end
      nqam++;
    end
    if (rst_n && wal_end) begin
      if (nwal < NWAL) begin
        checks++;
        seen_w[wsent[nwal]]++;
        if (int'(wal_word) != wsent[nwal]) begin failures++; $display("Walsh %0d: got %0d sent %0d", nwal, wal_word, wsent[nwal]); end
      end
      nwal++;
    end
    if (rst_n && ms_end) begin
      if (nms < NMS) begin
        checks++;
        seen_m[msent[nms]]++;
        if (int'(ms_word) != msent[nms]) begin failures++; $display("M-seq %0d: got %0d sent %0d", nms, ms_word, msent[nms]); end
      end
      nms++;
    end
  end

  // ---------------- transmitters ----------------
  function automatic int carrier(real amp, int q, real ph, int noise);
    return $rtoi(amp * $cos(PI / 2.0 * q + ph)) + int'($urandom % (2 * noise + 1)) - noise;
  endfunction

  task automatic tx_dpsk();
    real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
    for (int j = 0; j < NDPSK; j++) begin
      dbits[j] = (j == 1) ? 0 : (j == 2) ? 1 : int'($urandom % 2);
      if (dbits[j] != 0) ph += PI;
      for (int p = 0; p < 128; p++)
        for (int q = 0; q < 4; q++) begin
          dpsk_adc <= 8'(carrier(100.0, q, ph, 3));
          @(posedge clk);
        end
    end
  endtask

  task automatic tx_qpsk();
    real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
    for (int j = 0; j < NQPSK; j++) begin
      qsteps[j] = (j >= 1 && j <= 4) ? j - 1 : int'($urandom % 4);
      ph += PI / 2.0 * qsteps[j];
      for (int p = 0; p < 128; p++)
        for (int q = 0; q < 4; q++) begin
          qpsk_adc <= 8'(carrier(100.0, q, ph, 3));
          @(posedge clk);
        end
    end
  endtask

  task automatic tx_qam();
    int mi = 0, mq = 0, a;
    a = 900;
    for (int p = 0; p < (NQAM + 1) * 64; p++) begin
      if (p == 0 || (p >= QAM_OFF && (p - QAM_OFF) % 64 == 0)) begin
        mi = $urandom % 2;
        mq = $urandom % 2;
      end
      for (int q = 0; q < 4; q++) begin
        int ai, aq, v;
        ai = (2 * mi - 1) * a + int'($urandom % 21) - 10;
        aq = (2 * mq - 1) * a + int'($urandom % 21) - 10;
        v = (q == 0) ? ai : (q == 1) ? aq : (q == 2) ? -ai : -aq;
        qam_adc <= 12'(v);
        qamq.push_back(mi * 2 + mq);
        @(posedge clk);
      end
    end
  endtask

  task automatic tx_walsh();
    for (int w = 0; w < NWAL; w++) begin
      real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
      wsent[w] = (w < 4) ? w : int'($urandom % 4);
      for (int k = 3; k >= 0; k--) begin
        real pk = ph + (($countones(wsent[w] & k) % 2) ? PI : 0.0);
        for (int p = 0; p < 64; p++)
          for (int q = 0; q < 4; q++) begin
            wal_adc <= 12'(carrier(1000.0, q, pk, 30));
            @(posedge clk);
          end
      end
    end
  endtask

  task automatic tx_mseq();
    for (int w = 0; w < NMS; w++) begin
      real ph = 2.0 * PI * real'($urandom % 360) / 360.0;
      msent[w] = (w < 2) ? w : int'($urandom % 2);
      for (int k = 62; k >= 0; k--) begin
        real pk = ph + (mseq[(k + 31 * msent[w]) % 63] ? PI : 0.0);
        for (int p = 0; p < 64; p++)
          for (int q = 0; q < 4; q++) begin
            ms_adc <= 12'(carrier(1000.0, q, pk, 30));
            @(posedge clk);
          end
      end
    end
  endtask

  initial begin
    // 63-element M-sequence: a[t+6] = a[t+5] xor a[t], from 1,0,0,0,0,0
    int a [69];
    for (int t = 0; t < 69; t++) a[t] = 0;
    a[0] = 1;
    for (int t = 0; t + 6 < 69; t++) a[t + 6] = a[t + 5] ^ a[t];
    for (int t = 0; t < 63; t++) mseq[t] = a[t];
    for (int i = 0; i < 4; i++) begin seen_q[i] = 0; seen_qam[i] = 0; seen_w[i] = 0; end
    seen_m[0] = 0; seen_m[1] = 0;
    dpsk_adc = '0; qpsk_adc = '0; qam_adc = '0; wal_adc = '0; ms_adc = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      tx_dpsk();
      tx_qpsk();
      tx_qam();
      tx_walsh();
      tx_mseq();
    join
    repeat (40) @(posedge clk);
    // every mechanism must have happened
    checks++; if (seen_hold == 0 || seen_rev == 0) begin failures++; $display("DPSK hold %0d reversal %0d", seen_hold, seen_rev); end
    for (int i = 0; i < 4; i++) begin
      checks += 3;
      if (seen_q[i] == 0)   begin failures++; $display("4-DPSK step %0d never seen", i * 90); end
      if (seen_qam[i] == 0) begin failures++; $display("QAM code %0d never seen", i); end
      if (seen_w[i] == 0)   begin failures++; $display("Walsh word %0d never seen", i); end
    end
    checks++; if (seen_m[0] == 0 || seen_m[1] == 0) begin failures++; $display("M-sequence words %0d %0d", seen_m[0], seen_m[1]); end
    checks++; if ((int'(qam_phase) - (QAM_OFF + 63)) % 64 > 1 && (QAM_OFF + 63 - int'(qam_phase)) % 64 > 1) begin
      failures++; $display("QAM symbol timing at phase %0d, expected %0d", qam_phase, (QAM_OFF + 63) % 64);
    end
    checks++; if (ndp < NDPSK || nqp < NQPSK || nwal < NWAL || nms < NMS || nqam < NQAM - 5) begin
      failures++; $display("decisions: %0d %0d %0d %0d %0d", ndp, nqp, nqam, nwal, nms);
    end
    $display("mechanisms: DPSK hold %0d reversal %0d; 4-DPSK steps %0d/%0d/%0d/%0d; QAM codes %0d/%0d/%0d/%0d at phase %0d; Walsh words %0d/%0d/%0d/%0d; M-seq words %0d/%0d",
             seen_hold, seen_rev, seen_q[0], seen_q[1], seen_q[2], seen_q[3],
             seen_qam[0], seen_qam[1], seen_qam[2], seen_qam[3], qam_phase,
             seen_w[0], seen_w[1], seen_w[2], seen_w[3], seen_m[0], seen_m[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
