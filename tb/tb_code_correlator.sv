// tb_code_correlator: random responses, one every 4 clocks. Two units run
// side by side: four Walsh words of four elements and two M-sequence words of
// seven elements. Every output u_m is compared with sum_k a_mk y(i-kN) worked
// out here from the stored inputs and from code tables written out here:
// Walsh a_mk = (-1)^popcount(m&k); the 7-element M-sequence 1,0,0,1,1,1,0
// (1 = -1) and its cyclic shift by 3.
module tb_code_correlator;
  import demod_pkg::*;
  localparam int unsigned W = 9;
  localparam int unsigned N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] y;
  logic y_valid;
  logic signed [W+1:0] uw [4];
  logic signed [W+2:0] um [2];
  logic uw_valid, um_valid;
  int checks = 0, failures = 0;
  int hist [$];
  int mseq [7] = '{1, 0, 0, 1, 1, 1, 0};

  code_correlator #(.W(W), .N(N), .K(4), .M(4), .CODE(WALSH)) dut_w (
    .clk, .rst_n, .y, .y_valid, .u(uw), .u_valid(uw_valid));
  code_correlator #(.W(W), .N(N), .K(7), .M(2), .CODE(MSEQ)) dut_m (
    .clk, .rst_n, .y, .y_valid, .u(um), .u_valid(um_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap(int k);
    int p = hist.size() - 1 - k * N;
    return (p >= 0) ? hist[p] : 0;
  endfunction

  initial begin
    y = '0;
    y_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      y <= W'($urandom);
      y_valid <= 1'b1;
      @(posedge clk);
      y_valid <= 1'b0;
      hist.push_back(int'(y));
      #1;
      for (int m = 0; m < 4; m++) begin
        int e;
        e = 0;
        for (int k = 0; k < 4; k++) e += ($countones(m & k) % 2) ? -tap(k) : tap(k);
        checks++;
        if (!uw_valid || int'(uw[m]) != e) begin
          failures++;
          $display("walsh word %0d: got %0d want %0d", m, uw[m], e);
        end
      end
      for (int m = 0; m < 2; m++) begin
        int e;
        e = 0;
        for (int k = 0; k < 7; k++) e += mseq[(k + 3 * m) % 7] ? -tap(k) : tap(k);
        checks++;
        if (!um_valid || int'(um[m]) != e) begin
          failures++;
          $display("mseq word %0d: got %0d want %0d", m, um[m], e);
        end
      end
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
