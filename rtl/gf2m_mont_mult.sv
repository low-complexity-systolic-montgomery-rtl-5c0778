// gf2m_mont_mult: semi-systolic Montgomery multiplier over GF(2^m), m odd.
//
// Computes T = A * B * x^-(m-1)/2 mod G for polynomial-basis operands A, B
// and a general irreducible G (g_m = g_0 = 1). The product is split into
//   C = A(b_(m-1)/2 + b_(m+1)/2 x + ... + b_(m-1) x^(m-1)/2) mod G   (MSB-first)
//   D = A(b_(m-3)/2 x^-1 + ... + b_0 x^-(m-1)/2) mod G               (LSB-first)
// which need (m+1)/2 iterations each and do not depend on each other. One
// array of (m+1)/2 x m cells computes both: the D half enters one clock
// before the C half and they follow each other down the rows. T = C + D.
//
// Pipeline, in clock edges after the edge that accepts the operands
// (in_valid && in_ready), where they are latched in mmm_issue:
//   1            D token latched by the first row
//   2            C token latched by the first row
//   (m+1)/2      D latched by the bottom row
//   (m+1)/2 + 1  C latched by the bottom row, D moved to the hold latch
//                of mmm_combine
//   (m+1)/2 + 2  T latched, out_valid = 1
// Counting the input latch, the (m+1)/2 rows, the one clock that C trails D
// and the output latch, a result appears (m+1)/2 + 3 clocks after its
// operands were presented: an input sampled at clock edge N is answered by
// an output sampled at edge N + (m+7)/2. A new multiplication is accepted
// every second clock (in_ready drops for one clock after each acceptance),
// since each one occupies the shared array for two clocks.
// Operands are held in mmm_issue, so the caller may change them right after
// the handshake.
// The split into C and D, the shared array and the latency follow the
// published architecture; the valid/ready interface and the two-clock
// issue interval are this implementation's choices.
module gf2m_mont_mult
  import mmm_pkg::*;
#(
  parameter int unsigned M = DEFAULT_M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M-1:0]  a,
  input  logic [M-1:0]  b,
  input  logic [M-1:0]  g,         // g_(m-1) .. g_0; g_m = 1 is implied
  output logic          out_valid,
  output logic [M-1:0]  t
);

  localparam int unsigned R = (M + 1) / 2;

  logic         tok_valid, arr_valid;
  tok_kind_e    tok_kind, arr_kind;
  logic [M-1:0] tok_a, tok_g, arr_p;
  logic [R-1:0] tok_bvec;

  mmm_issue #(.M(M), .R(R)) u_issue (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .a        (a),
    .b        (b),
    .g        (g),
    .tok_valid(tok_valid),
    .tok_kind (tok_kind),
    .tok_a    (tok_a),
    .tok_g    (tok_g),
    .tok_bvec (tok_bvec)
  );

  mmm_array #(.M(M), .R(R)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (tok_valid),
    .kind_in  (tok_kind),
    .a_in     (tok_a),
    .g_in     (tok_g),
    .bvec_in  (tok_bvec),
    .valid_out(arr_valid),
    .kind_out (arr_kind),
    .p_out    (arr_p)
  );

  mmm_combine #(.M(M)) u_combine (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_in(arr_valid),
    .kind_in (arr_kind),
    .p_in    (arr_p),
    .t_valid (out_valid),
    .t       (t)
  );

endmodule
