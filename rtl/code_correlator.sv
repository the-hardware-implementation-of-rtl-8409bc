// code_correlator: computing unit (CU0 or CU1) of the demodulator of signals
// phase-shift keyed in toto.
//
// A code combination is K elements long, each element N carrier periods of
// carrier with phase 0 or 180 degrees (a_mk = +1 or -1). For one quadrature
// channel the unit keeps the responses of the last K elements,
// y(i), y(i-N), ..., y(i-(K-1)N), in a chain of K-1 N-cell shifters, and forms
// for every code word m
//   u_m = sum_{k=0}^{K-1} a_mk * y(i-kN)
// (k = 0 is the most recent element). The code words are fixed at elaboration
// by demod_pkg::code_neg (Walsh or M-sequence). All M sums are formed in
// parallel, once per carrier period.
// Timing: registered, u_valid follows y_valid by one clock. Output words are
// W + ceil(log2 K) bits, exact.
module code_correlator
  import demod_pkg::*;
#(
  parameter int unsigned W    = 19,            // response width
  parameter int unsigned N    = 64,            // periods per code element
  parameter int unsigned K    = 4,             // elements per code word
  parameter int unsigned M    = 4,             // code words
  parameter code_kind_e  CODE = WALSH
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic signed [W-1:0]                 y,
  input  logic                                y_valid,
  output logic signed [W+$clog2(K)-1:0]       u [M],
  output logic                                u_valid
);
  localparam int unsigned UW = W + $clog2(K);

  logic [W-1:0] tap [K];

  assign tap[0] = y;

  for (genvar k = 1; k < K; k++) begin : g_tap
    delay_line #(.W(W), .DEPTH(N)) u_mr (
      .clk, .rst_n, .en(y_valid), .din(tap[k-1]), .dout(tap[k])
    );
  end

  for (genvar m = 0; m < M; m++) begin : g_word
    logic signed [UW-1:0] term [K];             // a_mk * y(i-kN)
    logic signed [UW-1:0] acc;

    for (genvar k = 0; k < K; k++) begin : g_elem
      localparam bit NEG = code_neg(CODE, K, m, k);
      assign term[k] = NEG ? -UW'($signed(tap[k])) : UW'($signed(tap[k]));
    end

    always_comb begin
      acc = '0;
      for (int unsigned k = 0; k < K; k++) acc = acc + term[k];
    end

    always_ff @(posedge clk) begin
      if (!rst_n)       u[m] <= '0;
      else if (y_valid) u[m] <= acc;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) u_valid <= 1'b0;
    else        u_valid <= y_valid;
  end
endmodule
