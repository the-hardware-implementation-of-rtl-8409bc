// qam_nsd: normalizing and synchronizing device (NSD) of the QAM demodulator.
//
// Clock synchronization. The basic algorithm delivers a response every
// carrier period, summed over the last N periods; only at one phase of the
// N-period symbol does the sum cover a single symbol, and there its magnitude
// is largest on average. The device counts the period phase 0..N-1 and keeps,
// for every phase, a leaky average of e = |y0| + |y1| in an N-word memory
// (E += e - E/2^AVG_SHIFT, in fixed point with AVG_SHIFT fraction bits; the
// first pass after reset loads e directly). During each pass over the N phases
// it tracks the phase with the largest average and adopts it at the end of the
// pass. sym_strobe is then high together with y_valid at that phase, so the
// responses presented with it are the ones to decide on.
// Normalization. At each strobe a second leaky average follows e; with equally
// likely levels it settles at L*A for amplitude step A, and the threshold
// spacing for the threshold devices is unit = 2A = 2*avg/L.
// Timing: both outputs change one clock after the y_valid that updates them;
// sym_strobe is combinational from y_valid and the phase counter.
// The published description states only what the device is for; this way of doing it is the
// design's own.
module qam_nsd #(
  parameter int unsigned W         = 19,       // response width
  parameter int unsigned N         = 64,       // periods per symbol
  parameter int unsigned L         = 2,        // levels per axis
  parameter int unsigned AVG_SHIFT = 4         // averaging time constant 2^AVG_SHIFT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [W-1:0]   y0,
  input  logic signed [W-1:0]   y1,
  input  logic                  y_valid,
  output logic        [W-1:0]   unit,
  output logic                  sym_strobe,
  output logic [$clog2(N)-1:0]  phase
);
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned LB = $clog2(L);
  localparam int unsigned EW = W + 1 + AVG_SHIFT;   // e scaled by 2^AVG_SHIFT

  logic [EW-1:0] emem [N];
  logic [NB-1:0] ph, best_ph;
  logic [EW-1:0] best_val, amp_acc;
  logic          first_pass;
  logic [W:0]    e;
  logic [EW-1:0] e_old, e_new, amp_new;

  function automatic logic [W-1:0] absval(logic signed [W-1:0] v);
    return v[W-1] ? W'(-v) : W'(v);
  endfunction

  always_comb begin
    e       = (W+1)'(absval(y0)) + (W+1)'(absval(y1));
    e_old   = emem[ph];
    e_new   = first_pass ? (EW'(e) << AVG_SHIFT)
                         : e_old - (e_old >> AVG_SHIFT) + EW'(e);
    amp_new = amp_acc - (amp_acc >> AVG_SHIFT) + EW'(e);
  end

  assign sym_strobe = y_valid && (ph == phase);
  // unit = 2 * (amp_acc / 2^AVG_SHIFT) / L
  assign unit = W'(amp_acc >> (AVG_SHIFT + LB - 1));

  always_ff @(posedge clk) begin
    if (y_valid) emem[ph] <= e_new;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph         <= '0;
      best_ph    <= '0;
      best_val   <= '0;
      phase      <= NB'(N - 1);
      amp_acc    <= '0;
      first_pass <= 1'b1;
    end else if (y_valid) begin
      ph <= ph + 1'b1;
      if (ph == '0 || e_new > best_val) begin
        best_val <= e_new;
        best_ph  <= ph;
      end
      if (ph == NB'(N - 1)) begin
        first_pass <= 1'b0;
        phase      <= (ph == '0 || e_new > best_val) ? ph : best_ph;
      end
      if (sym_strobe) amp_acc <= amp_new;
    end
  end
endmodule
