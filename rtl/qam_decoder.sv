// qam_decoder: decoder (DC) of the QAM demodulator.
//
// Turns the pair of level indices into the binary code of the received
// symbol. Each axis is Gray-coded (g = l xor (l >> 1)), so neighbouring levels
// differ in one bit, and the in-phase bits sit above the quadrature bits:
// code = {gray(word0), gray(word1)}. The mapping is this design's choice; the
// text only says that the decoder forms the binary code of the symbol.
// Timing: registered, code_valid one clock after word_valid.
module qam_decoder #(
  parameter int unsigned LB = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LB-1:0]   word0,
  input  logic [LB-1:0]   word1,
  input  logic            word_valid,
  output logic [2*LB-1:0] code,
  output logic            code_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= word_valid;
      if (word_valid) code <= {word0 ^ (word0 >> 1), word1 ^ (word1 >> 1)};
    end
  end
endmodule
