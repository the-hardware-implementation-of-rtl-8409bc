// qam_resolver: resolver (RS) of the QAM demodulator.
//
// The threshold devices deliver a level index on every carrier period, but
// only the one at the symbol strobe of the normalizing and synchronizing
// device belongs to a whole symbol. The resolver latches the pair of level
// indices (in-phase word0, quadrature word1) at that strobe and flags it with
// word_valid for one clock.
// Timing: registered, one clock after the strobe.
module qam_resolver #(
  parameter int unsigned LB = 1                // bits per level index
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LB-1:0] lvl0,
  input  logic [LB-1:0] lvl1,
  input  logic          strobe,
  output logic [LB-1:0] word0,
  output logic [LB-1:0] word1,
  output logic          word_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word0      <= '0;
      word1      <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= strobe;
      if (strobe) begin
        word0 <= lvl0;
        word1 <= lvl1;
      end
    end
  end
endmodule
