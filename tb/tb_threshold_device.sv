// tb_threshold_device: for L = 4 and L = 8 levels, random responses and
// spacings; the level must be the number of thresholds j*unit at or below y,
// worked out here as a clamped floor division.
module tb_threshold_device;
  localparam int unsigned W = 12;
  logic clk = 1'b0;
  logic signed [W-1:0] y;
  logic [W-1:0] unit;
  logic [1:0] lvl4;
  logic [2:0] lvl8;
  int checks = 0, failures = 0;

  threshold_device #(.W(W), .L(4)) dut4 (.y, .unit, .level(lvl4));
  threshold_device #(.W(W), .L(8)) dut8 (.y, .unit, .level(lvl8));

  always #5 clk = ~clk;

  // level = clamp(floor(y / unit) + L/2, 0, L-1)
  function automatic int ref_level(int yy, int uu, int L);
    int q;
    if (uu == 0) return (yy >= 0) ? L - 1 : 0;
    q = (yy >= 0) ? yy / uu : -((-yy + uu - 1) / uu);
    q = q + L / 2;
    if (q < 0) q = 0;
    if (q > L - 1) q = L - 1;
    return q;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      unit = W'($urandom % 400);
      y    = W'($urandom);
      if (i % 5 == 0) y = W'(int'(unit) * (int'($urandom % 9) - 4));   // exactly on a threshold
      @(posedge clk);
      checks += 2;
      if (int'(lvl4) != ref_level(int'(y), int'(unit), 4)) begin
        failures++;
        $display("L4 y=%0d unit=%0d got %0d", y, unit, lvl4);
      end
      if (int'(lvl8) != ref_level(int'(y), int'(unit), 8)) begin
        failures++;
        $display("L8 y=%0d unit=%0d got %0d", y, unit, lvl8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
