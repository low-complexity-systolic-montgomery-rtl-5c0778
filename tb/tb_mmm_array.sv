// tb_mmm_array: checks the shared array alone for m = 7 (4 rows).
// A random token, C or D, is presented every clock, with occasional idle
// clocks. Each must leave the bottom exactly (m+1)/2 clocks later carrying
//   C token: sum_i bvec[i-1] A x^(R-i) mod G, computed by polynomial
//            multiplication and reduction;
//   D token: the bit-reversal of sum_i bvec[i-1] A x^-(R-i) mod G, computed
//            with repeated division by x,
// where the D token itself carries A and G in reversed order as mmm_issue
// prepares them.
module tb_mmm_array;
  import mmm_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int M = 7;
  localparam int R = (M + 1) / 2;

  typedef struct packed {
    int           due;
    tok_kind_e    kind;
    logic [M-1:0] p;
  } exp_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0, valid_out;
  tok_kind_e kind_in = TOK_C, kind_out;
  logic [M-1:0] a_in = '0, g_in = '0, p_out;
  logic [R-1:0] bvec_in = '0;

  int checks = 0, failures = 0, cycle = 0, n_c = 0, n_d = 0;
  exp_t exp_q[$];

  mmm_array #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid_out) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (e.due != cycle || kind_out !== e.kind || p_out !== e.p) begin
          failures++;
          $display("FAIL cycle %0d (due %0d) kind=%0d p=%b exp kind=%0d p=%b",
                   cycle, e.due, kind_out, p_out, e.kind, e.p);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 300; n++) begin
      poly_t a, g, acc, term;
      logic [R-1:0] bv;
      exp_t e;
      @(negedge clk);
      valid_in = ($urandom % 5) != 0;
      a  = rand_poly(M);
      g  = field_g(M, n % 2 == 1);
      bv = R'($urandom);
      acc = '0;
      if ($urandom % 2) begin
        kind_in = TOK_C;
        a_in = M'(a); g_in = M'(g);
        for (int i = 1; i <= R; i++)
          if (bv[i-1]) acc ^= mulmod(a, poly_t'(1) << (R - i), g, M);
        e.p = M'(acc);
      end else begin
        kind_in = TOK_D;
        a_in = M'(rev(a, M));
        g_in = M'(rev(full_g(g, M) >> 1, M));
        for (int i = 1; i <= R; i++)
          if (bv[i-1]) acc ^= mul_xinv_n(a, g, M, R - i);
        e.p = M'(rev(acc, M));
      end
      bvec_in = bv;
      e.kind = kind_in;
      e.due  = cycle + R;   // cycle counts edges; this token is taken at edge 'cycle'
      if (valid_in) begin
        exp_q.push_back(e);
        if (kind_in == TOK_C) n_c++; else n_d++;
      end
    end
    @(negedge clk) valid_in = 1'b0;
    repeat (R + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_c == 0 || n_d == 0) begin
      failures++;
      $display("FAIL %0d results missing (C tokens %0d, D tokens %0d)", exp_q.size(), n_c, n_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
