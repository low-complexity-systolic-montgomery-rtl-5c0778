// tb_mmm_issue: checks the operand latch and token issue for m = 7.
// Operands arrive with random valid gaps and are held valid through stalls.
// For every accepted set the next two clocks must carry, in this order, the
// D token (A and G reversed, multiplier bits b_0..b_(m-3)/2 then 0) and the
// C token (A, G as given, multiplier bits b_(m-1) down to b_(m-1)/2);
// in_ready must be low in the clock after each acceptance.
module tb_mmm_issue;
  import mmm_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int M = 7;
  localparam int R = (M + 1) / 2;
  localparam int H = (M - 1) / 2;

  typedef struct packed {
    tok_kind_e    kind;
    logic [M-1:0] a;
    logic [M-1:0] g;
    logic [R-1:0] bvec;
  } tok_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [M-1:0] a = '0, b = '0, g = '0;
  logic tok_valid;
  tok_kind_e tok_kind;
  logic [M-1:0] tok_a, tok_g;
  logic [R-1:0] tok_bvec;

  int checks = 0, failures = 0, stalls = 0, accepted = 0;
  tok_t exp_q[$];

  mmm_issue #(.M(M)) dut (.*);

  // Whether the operands shown at the last edge were taken.
  logic in_ready_at_edge = 1'b0;
  always @(posedge clk) in_ready_at_edge <= in_valid && in_ready;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: each edge, compare the issued token with the expected one.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    // in_ready must be low exactly in the clock after an acceptance.
    checks++;
    if (in_ready !== !in_ready_at_edge) begin
      failures++;
      $display("FAIL in_ready=%b one clock after acceptance=%b", in_ready, in_ready_at_edge);
    end
    if (tok_valid) begin
      tok_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected token");
      end else begin
        e = exp_q.pop_front();
        if (tok_kind !== e.kind || tok_a !== e.a || tok_g !== e.g || tok_bvec !== e.bvec) begin
          failures++;
          $display("FAIL token kind=%0d a=%b g=%b bvec=%b exp kind=%0d a=%b g=%b bvec=%b",
                   tok_kind, tok_a, tok_g, tok_bvec, e.kind, e.a, e.g, e.bvec);
        end
      end
    end
    // Expected tokens of an operand set accepted at this edge.
    if (in_valid && in_ready) begin
      poly_t pa, pb, pg;
      tok_t d, c;
      accepted++;
      pa = poly_t'(a); pb = poly_t'(b); pg = poly_t'(g);
      d.kind = TOK_D;
      d.a    = M'(rev(pa, M));
      d.g    = M'(rev(full_g(pg, M) >> 1, M));
      d.bvec = R'(pb & ((poly_t'(1) << H) - 1));
      c.kind = TOK_C;
      c.a    = a;
      c.g    = g;
      c.bvec = R'(rev(pb, M));
      exp_q.push_back(d);
      exp_q.push_back(c);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (!in_valid || in_ready_at_edge) begin
        in_valid = ($urandom % 3) != 0;
        a = M'($urandom); b = M'($urandom); g = M'($urandom) | M'(1);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || stalls == 0 || accepted < 50) begin
      failures++;
      $display("FAIL %0d tokens never issued, %0d stalls, %0d accepted", exp_q.size(), stalls, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
