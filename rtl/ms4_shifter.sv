// ms4_shifter: the multi-bit four-cell shifter (MS4) at the head of every
// demodulator.
//
// The ADC runs at four times the carrier centre frequency, so one carrier
// period T0 = 1/f0 gives four samples s1..s4. Every clock the four cells shift
// by one and take the new sample; a 2-bit counter marks the fourth sample of a
// period, and one clock later s_valid is high for a single cycle while the
// cells hold s1..s4 of that period (s[0] = s1 ... s[3] = s4).
// Timing: one strobe every 4 clocks, the first 4 clocks after reset.
// Which sample opens a period is not fixed by the published description; here the first sample
// after reset is s1.
module ms4_shifter #(
  parameter int unsigned R = 12                // ADC width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [R-1:0] adc,             // one sample per clock
  output logic signed [R-1:0] s [4],           // s1..s4 of the last period
  output logic                s_valid          // one cycle per period
);
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      s_valid <= 1'b0;
      for (int i = 0; i < 4; i++) s[i] <= '0;
    end else begin
      s[0]    <= s[1];
      s[1]    <= s[2];
      s[2]    <= s[3];
      s[3]    <= adc;
      cnt     <= cnt + 2'd1;
      s_valid <= (cnt == 2'd3);
    end
  end
endmodule
