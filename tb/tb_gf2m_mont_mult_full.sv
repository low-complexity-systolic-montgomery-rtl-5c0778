// tb_gf2m_mont_mult_full: the multiplier at its default size, m = 571
// (NIST field x^571 + x^10 + x^5 + x^2 + 1), 286 rows of 571 cells.
// Runs a short stream of products: a burst of back-to-back operand sets
// (the second and later ones stall for one clock each, then fill the array
// with D and C tokens of different products on consecutive clocks), an idle
// gap, and a final product with a random G. Each result is compared with
// the reference Montgomery product A B x^-285 mod G and must appear 289 =
// (m+7)/2 clocks after its operands were accepted.
module tb_gf2m_mont_mult_full;
  import mmm_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int M = DEFAULT_M;
  localparam int LATENCY = (M + 7) / 2;
  localparam int NOPS = 6;

  typedef struct {
    int    accepted;
    poly_t want;
  } job_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  logic [M-1:0] a = '0, b = '0, g = '0, t;
  int checks = 0, failures = 0, cycle = 0, stalls = 0, results = 0;
  job_t q[$];

  gf2m_mont_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) begin
        job_t j;
        j.accepted = cycle;
        j.want     = mont(poly_t'(a), poly_t'(b), poly_t'(g), M);
        q.push_back(j);
      end
      if (out_valid) begin
        job_t j;
        checks++;
        results++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          j = q.pop_front();
          if (t !== M'(j.want) || cycle - j.accepted != LATENCY) begin
            failures++;
            $display("FAIL result %0d wrong or late: latency %0d, expected %0d",
                     results, cycle - j.accepted, LATENCY);
          end
        end
      end
    end
  end

  // Whether the operands shown before the last clock edge were taken.
  logic acc_last = 1'b0;
  always @(posedge clk) acc_last <= in_valid && in_ready;

  // Called at a falling edge: present one operand set and hold it until the
  // falling edge after its acceptance.
  task automatic issue(input bit random_g);
    in_valid = 1'b1;
    a = M'(rand_poly(M));
    b = M'(rand_poly(M));
    g = M'(field_g(M, random_g));
    do @(negedge clk); while (!acc_last);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int n = 0; n < NOPS - 1; n++) issue(1'b0);
    in_valid = 1'b0;
    repeat (7) @(negedge clk);
    issue(1'b1);
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    checks++;
    if (results != NOPS || stalls == 0) begin
      failures++;
      $display("FAIL %0d of %0d results, %0d stalls", results, NOPS, stalls);
    end
    $display("%0d products at m=%0d, %0d input stalls", results, M, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
