// demod_top: the family of fast digital demodulators, side by side.
//
// All of them share one idea: sample the IF signal at four times the carrier
// centre frequency, take s1 - s3 and s2 - s4 of every carrier period as the
// quadrature components, and sum them over N periods with log2(N) adders per
// channel (basic_processor). On top of these responses each demodulator adds
// a small decision stage:
//   dpsk2 : binary DPSK, noncoherent (dpsk2_demod), R = 8, N = 128
//   qpsk  : four-position DPSK, noncoherent (dpsk4_demod), R = 8, N = 128
//   qam   : coherent QAM with threshold devices and symbol synchronizer
//           (qam_demod), R = 12, N = 64, four positions
//   wal   : PSK in toto coded by four Walsh words of four elements
//           (pit_demod), R = 12, N = 64
//   ms    : PSK in toto coded by two M-sequence words of 63 elements
//           (pit_demod), R = 12, N = 64
// Each has its own ADC input and its own front end, since each is a receiver
// of its own; they share only clk (the 4*f0 sample clock) and rst_n
// (synchronous, active low). Binary DPSK sizes and the Walsh design's sizes
// are the published ones; the rest (4-DPSK sizes, QAM sizes, the M-sequence design's
// R and N) reuse those where the description is silent. Per-demodulator timing is
// described in each module.
module demod_top
  import demod_pkg::*;
#(
  parameter int unsigned DPSK_R        = 8,
  parameter int unsigned DPSK_N        = 128,
  parameter int unsigned QPSK_R        = 8,
  parameter int unsigned QPSK_N        = 128,
  parameter int unsigned QAM_R         = 12,
  parameter int unsigned QAM_N         = 64,
  parameter int unsigned QAM_POSITIONS = 4,
  parameter int unsigned WAL_R         = 12,
  parameter int unsigned WAL_N         = 64,
  parameter int unsigned WAL_M         = 4,
  parameter int unsigned WAL_K         = 4,
  parameter int unsigned MS_R          = 12,
  parameter int unsigned MS_N          = 64,
  parameter int unsigned MS_M          = 2,
  parameter int unsigned MS_K          = 63
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // binary DPSK
  input  logic signed [DPSK_R-1:0]          dpsk_adc,
  output logic                              dpsk_sym,
  output logic                              dpsk_valid,
  output logic                              dpsk_end,
  output logic signed [2*(DPSK_R+$clog2(DPSK_N)+2)+1:0] dpsk_zdiff,   // z0 - z1
  // four-position DPSK
  input  logic signed [QPSK_R-1:0]          qpsk_adc,
  output logic [1:0]                        qpsk_sym,
  output logic                              qpsk_valid,
  output logic                              qpsk_end,
  // QAM
  input  logic signed [QAM_R-1:0]           qam_adc,
  output logic [$clog2(QAM_POSITIONS)-1:0]  qam_code,
  output logic                              qam_valid,
  output logic [$clog2(QAM_N)-1:0]          qam_phase,
  // PSK in toto, Walsh words
  input  logic signed [WAL_R-1:0]           wal_adc,
  output logic [$clog2(WAL_M)-1:0]          wal_word,
  output logic                              wal_valid,
  output logic                              wal_end,
  output logic [WAL_R+$clog2(WAL_N)+$clog2(WAL_K):0] wal_resp,      // z of chosen word
  // PSK in toto, M-sequence words
  input  logic signed [MS_R-1:0]            ms_adc,
  output logic [$clog2(MS_M)-1:0]           ms_word,
  output logic                              ms_valid,
  output logic                              ms_end,
  output logic [MS_R+$clog2(MS_N)+$clog2(MS_K):0] ms_resp           // z of chosen word
);
  dpsk2_demod #(.R(DPSK_R), .N(DPSK_N)) u_dpsk2 (
    .clk, .rst_n, .adc(dpsk_adc), .sym(dpsk_sym), .z_diff(dpsk_zdiff),
    .sym_valid(dpsk_valid), .sym_end(dpsk_end)
  );

  dpsk4_demod #(.R(QPSK_R), .N(QPSK_N)) u_dpsk4 (
    .clk, .rst_n, .adc(qpsk_adc), .sym(qpsk_sym), .sym_valid(qpsk_valid),
    .sym_end(qpsk_end)
  );

  qam_demod #(.R(QAM_R), .N(QAM_N), .POSITIONS(QAM_POSITIONS)) u_qam (
    .clk, .rst_n, .adc(qam_adc), .code(qam_code), .code_valid(qam_valid),
    .sync_phase(qam_phase)
  );

  pit_demod #(.R(WAL_R), .N(WAL_N), .M(WAL_M), .K(WAL_K), .CODE(WALSH)) u_walsh (
    .clk, .rst_n, .adc(wal_adc), .word(wal_word), .word_valid(wal_valid),
    .word_end(wal_end), .word_resp(wal_resp)
  );

  pit_demod #(.R(MS_R), .N(MS_N), .M(MS_M), .K(MS_K), .CODE(MSEQ)) u_mseq (
    .clk, .rst_n, .adc(ms_adc), .word(ms_word), .word_valid(ms_valid),
    .word_end(ms_end), .word_resp(ms_resp)
  );
endmodule
