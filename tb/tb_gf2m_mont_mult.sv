// tb_gf2m_mont_mult: end-to-end test of the multiplier at three field sizes:
// m = 5 (the smallest worked example size), m = 7 and m = 163 (the smallest
// NIST binary field). Each instance runs a stream of random products through
// tb_mont_env, which checks every result and its latency of (m+7)/2 clocks.
// The test also requires that each mechanism of the design was exercised:
// input stalls while the C half of a product is being issued, products
// issued on consecutive free slots so D and C tokens of different products
// fill the array back to back, and field polynomials other than the
// standard ones, and idle gaps between bursts that leave bubbles in the
// array.
module tb_gf2m_mont_mult;
  logic clk = 1'b0, rst_n = 1'b0;

  localparam int NENV = 3;
  logic done  [NENV];
  int   checks_e [NENV], failures_e [NENV], stalls_e [NENV], b2b_e [NENV], rnd_e [NENV], gap_e [NENV];
  int   checks = 0, failures = 0;

  tb_mont_env #(.M(5),   .NOPS(300)) u_m5   (.clk, .rst_n, .done(done[0]), .checks(checks_e[0]),
    .failures(failures_e[0]), .stalls(stalls_e[0]), .back_to_back(b2b_e[0]), .random_polys(rnd_e[0]),
    .gaps(gap_e[0]));
  tb_mont_env #(.M(7),   .NOPS(300)) u_m7   (.clk, .rst_n, .done(done[1]), .checks(checks_e[1]),
    .failures(failures_e[1]), .stalls(stalls_e[1]), .back_to_back(b2b_e[1]), .random_polys(rnd_e[1]),
    .gaps(gap_e[1]));
  tb_mont_env #(.M(163), .NOPS(100)) u_m163 (.clk, .rst_n, .done(done[2]), .checks(checks_e[2]),
    .failures(failures_e[2]), .stalls(stalls_e[2]), .back_to_back(b2b_e[2]), .random_polys(rnd_e[2]),
    .gaps(gap_e[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int e = 0; e < NENV; e++) begin
      checks   += checks_e[e] + 3;
      failures += failures_e[e];
      $display("instance %0d: %0d results, %0d stalls, %0d back-to-back issues, %0d idle gaps, %0d random G",
               e, checks_e[e], stalls_e[e], b2b_e[e], gap_e[e], rnd_e[e]);
      if (stalls_e[e] == 0) begin failures++; $display("FAIL instance %0d never stalled", e); end
      if (b2b_e[e] == 0)    begin failures++; $display("FAIL instance %0d never issued back to back", e); end
      if (gap_e[e] == 0)    begin failures++; $display("FAIL instance %0d never had an idle gap", e); end
      if (rnd_e[e] == 0)    begin failures++; $display("FAIL instance %0d never used a random G", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
