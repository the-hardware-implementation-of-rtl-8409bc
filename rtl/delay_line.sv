// delay_line: a multi-bit multi-cell shifter (the MR registers of the basic
// algorithm and the N-cell shifters of the DPSK and code-word demodulators).
//
// The line advances once per strobe, not once per clock. It is built as a
// circular buffer of DEPTH words with one write pointer: while en is high,
// dout shows the word written DEPTH strobes earlier, and at the clock edge
// din is written over it. Until DEPTH words have been written, dout is zero,
// as if the cells had been cleared at reset (the buffer itself is not
// cleared, so it can map onto a RAM with asynchronous read).
// Timing: dout is combinational from the pointer and memory; the enclosing
// stage registers the result.
module delay_line #(
  parameter int unsigned W     = 16,           // word width
  parameter int unsigned DEPTH = 128           // cells (delay in strobes)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] ptr;
  logic          filled;

  assign dout = filled ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else if (en) begin
      if (ptr == PW'(DEPTH - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end
endmodule
