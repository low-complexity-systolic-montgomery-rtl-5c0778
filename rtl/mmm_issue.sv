// mmm_issue: operand latch and token issue for the shared array.
//
// One accepted operand set (A, B, G) becomes two consecutive array tokens:
//   clock 1, D token (LSB-first half, multiplication by x^-1):
//     a'[k] = a[m-1-k], g'[k] = g[m-k] (g[m] = 1), multiplier bits
//     b_0, b_1, ..., b_(m-3)/2 for rows 1..(m-1)/2 and 0 for the last row,
//     which performs only the final x^-1 step;
//   clock 2, C token (MSB-first half, multiplication by x):
//     a, g unchanged, multiplier bits b_(m-1), b_(m-2), ..., b_(m-1)/2 for
//     rows 1..(m+1)/2.
// Reversing the bit order of A, G and D is what turns the x^-1 recurrence
// into the same cell equation as the x recurrence, so both halves run on
// the same cells. The D token goes first, so D leaves the array one clock
// before C.
//
// Interface: valid/ready handshake on the input. in_ready is low for the
// clock after an acceptance, while the C token of that operand set is still
// to be issued, so one multiplication can be accepted every second clock
// and the array receives a token every clock. The operands are latched at
// acceptance; the token outputs are a multiplexer on that latch, showing
// the D token in the clock after acceptance and the C token in the next.
// g is given without its leading coefficient g_m, which is always 1; g_0
// must be 1 as for any irreducible polynomial.
// D-before-C ordering and the zero multiplier bit of the last D row follow
// the published algorithm; the bit-reversal mapping, the handshake and the
// one-product-per-two-clocks rate are choices of this implementation.
module mmm_issue
  import mmm_pkg::*;
#(
  parameter int unsigned M = DEFAULT_M,
  parameter int unsigned R = (M + 1) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M-1:0]  a,        // Montgomery residue A
  input  logic [M-1:0]  b,        // Montgomery residue B
  input  logic [M-1:0]  g,        // g_(m-1) .. g_0 of the field polynomial
  output logic          tok_valid,
  output tok_kind_e     tok_kind,
  output logic [M-1:0]  tok_a,
  output logic [M-1:0]  tok_g,
  output logic [R-1:0]  tok_bvec
);

  localparam int unsigned H = (M - 1) / 2;   // index of the middle bit of B

  logic [M-1:0] a_q, b_q, g_q;   // input latch
  logic         pend_d;          // operands latched, D token not yet issued
  logic         pend_c;          // D token issued, C token not yet issued

  logic [M-1:0] d_a, d_g;
  logic [R-1:0] d_bvec, c_bvec;

  assign in_ready = !pend_d;

  always_comb begin
    for (int k = 0; k < M; k++) begin
      d_a[k] = a_q[M-1-k];
      d_g[k] = (k == 0) ? 1'b1 : g_q[M-k];
    end
    for (int i = 0; i < R; i++) begin
      d_bvec[i] = (i < H) ? b_q[i] : 1'b0;   // b_(m-1)/2 is not part of D
      c_bvec[i] = b_q[M-1-i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_d <= 1'b0;
      pend_c <= 1'b0;
    end else begin
      pend_d <= in_valid && in_ready;
      pend_c <= pend_d;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      a_q <= a;
      b_q <= b;
      g_q <= g;
    end
  end

  // Token multiplexer: the D token in the first clock after acceptance,
  // the C token in the second.
  always_comb begin
    tok_valid = pend_d || pend_c;
    if (pend_d) begin
      tok_kind = TOK_D;
      tok_a    = d_a;
      tok_g    = d_g;
      tok_bvec = d_bvec;
    end else begin
      tok_kind = TOK_C;
      tok_a    = a_q;
      tok_g    = g_q;
      tok_bvec = c_bvec;
    end
  end

endmodule
