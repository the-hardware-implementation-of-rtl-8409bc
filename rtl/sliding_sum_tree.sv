// sliding_sum_tree: one quadrature channel of the basic algorithm.
//
// It forms y_i = d_i + d_(i-1) + ... + d_(i-N+1), the sum of the last
// N = 2^n sample differences, with only n adders. Stage k (k = 1..n) adds its
// input to the same input delayed by 2^(k-1) periods (shift register MR_k and
// summator SUM_k): stage 1 gives sums of two differences, stage 2 of four, and
// so on, so the last stage yields the sum over N periods.
// Timing: each stage is registered and advances on its input strobe; a new
// value is accepted once per period and y_valid follows d_valid by n clocks.
// Every stage widens by one bit, so the result is exact (W + n bits).
module sliding_sum_tree #(
  parameter int unsigned W = 13,               // input width
  parameter int unsigned N = 64                // summation length, power of 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [W-1:0]         d,
  input  logic                        d_valid,
  output logic signed [W+$clog2(N)-1:0] y,
  output logic                        y_valid
);
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned YW = W + NB;

  logic signed [YW-1:0] x [NB+1];              // stage inputs, sign-extended
  logic                 v [NB+1];

  assign x[0] = YW'(d);
  assign v[0] = d_valid;

  for (genvar k = 0; k < NB; k++) begin : g_stage
    logic [YW-1:0] xd;                          // x[k] delayed by 2^k periods
    delay_line #(.W(YW), .DEPTH(2 ** k)) u_mr (
      .clk, .rst_n, .en(v[k]), .din(x[k]), .dout(xd)
    );
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        x[k+1] <= '0;
        v[k+1] <= 1'b0;
      end else begin
        v[k+1] <= v[k];
        if (v[k]) x[k+1] <= x[k] + $signed(xd);
      end
    end
  end

  assign y       = x[NB];
  assign y_valid = v[NB];
endmodule
