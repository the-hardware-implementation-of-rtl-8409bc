// qam_demod: coherent demodulator of square QAM signals.
//
// A symbol lasts N carrier periods and carries one of L amplitude levels
// (2l - L + 1)*A on each of the in-phase and quadrature carriers,
// POSITIONS = L*L. The basic algorithm (basic_processor) gives the responses
// y0, y1 summed over N periods. They go to the two threshold devices TD0, TD1
// and to the normalizing and synchronizing device (qam_nsd), which finds the
// symbol timing and forms the threshold spacing. At the symbol strobe the
// resolver (qam_resolver) latches the two level indices and the decoder
// (qam_decoder) turns them into the symbol's bits.
// The signal reaching the ADC is taken to be phase-locked to the sampling
// clock (coherent reception): s(t) = aI*cos(w0 t) + aQ*sin(w0 t), sampled at
// w0 t = 0, 90, 180, 270 degrees, so y0 = 2N*aI and y1 = 2N*aQ. Carrier
// recovery is outside this block. The symbol bits are
// code = {gray(level_I), gray(level_Q)}.
// Timing: the code appears 2 clocks after the strobe period's y_valid; one
// code per symbol once the synchronizer has settled (a few tens of symbols).
module qam_demod #(
  parameter int unsigned R         = 12,       // ADC width
  parameter int unsigned N         = 64,       // periods per symbol
  parameter int unsigned POSITIONS = 4         // QAM positions, L*L
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic signed [R-1:0]               adc,
  output logic [$clog2(POSITIONS)-1:0]      code,
  output logic                              code_valid,
  output logic [$clog2(N)-1:0]              sync_phase   // period phase taken as symbol end
);
  localparam int unsigned LB = $clog2(POSITIONS) / 2;
  localparam int unsigned L  = 2 ** LB;
  localparam int unsigned YW = R + $clog2(N) + 1;

  logic signed [YW-1:0]      y0, y1;
  logic                      y_valid;
  logic [YW-1:0]             unit;
  logic                      sym_strobe;
  logic [LB-1:0]             lvl0, lvl1, word0, word1;
  logic                      word_valid;

  basic_processor #(.R(R), .N(N)) u_basic (
    .clk, .rst_n, .adc, .y0, .y1, .y_valid
  );

  qam_nsd #(.W(YW), .N(N), .L(L)) u_nsd (
    .clk, .rst_n, .y0, .y1, .y_valid, .unit, .sym_strobe, .phase(sync_phase)
  );

  threshold_device #(.W(YW), .L(L)) u_td0 (.y(y0), .unit, .level(lvl0));
  threshold_device #(.W(YW), .L(L)) u_td1 (.y(y1), .unit, .level(lvl1));

  qam_resolver #(.LB(LB)) u_rs (
    .clk, .rst_n, .lvl0, .lvl1, .strobe(sym_strobe), .word0, .word1, .word_valid
  );

  qam_decoder #(.LB(LB)) u_dc (
    .clk, .rst_n, .word0, .word1, .word_valid, .code, .code_valid
  );
endmodule
