// max_choice: maximum choice device (MCD).
//
// Picks the code word whose response z_m is largest and outputs its index
// (ties go to the lowest index) together with the largest value. A linear
// scan over the M inputs, registered.
// Timing: idx_valid follows z_valid by one clock.
module max_choice #(
  parameter int unsigned W = 22,
  parameter int unsigned M = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [W-1:0]          z [M],
  input  logic                  z_valid,
  output logic [$clog2(M)-1:0]  idx,
  output logic [W-1:0]          zmax,
  output logic                  idx_valid
);
  localparam int unsigned MB = $clog2(M);

  logic [MB-1:0] best_i;
  logic [W-1:0]  best_z;

  always_comb begin
    best_i = '0;
    best_z = z[0];
    for (int unsigned m = 1; m < M; m++) begin
      if (z[m] > best_z) begin
        best_i = MB'(m);
        best_z = z[m];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx       <= '0;
      zmax      <= '0;
      idx_valid <= 1'b0;
    end else begin
      idx_valid <= z_valid;
      if (z_valid) begin
        idx  <= best_i;
        zmax <= best_z;
      end
    end
  end
endmodule
