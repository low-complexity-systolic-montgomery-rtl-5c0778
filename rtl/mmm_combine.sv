// mmm_combine: final addition T = C + D.
//
// The D half of a product leaves the array one clock ahead of its C half.
// This block latches the D result for that clock, restores its natural bit
// order (the array computes D with reversed coefficients), adds C with m
// two-input XOR gates and latches T. Timing: t_valid rises one clock after
// the C token leaves the array, i.e. two clocks after the D token.
// An assertion checks that every C result directly follows its D result.
// The m XOR2 adder and the one-clock D hold follow the published design;
// the output latch is placed here to give the published latency.
module mmm_combine
  import mmm_pkg::*;
#(
  parameter int unsigned M = DEFAULT_M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_in,
  input  tok_kind_e     kind_in,
  input  logic [M-1:0]  p_in,      // bottom row of the array
  output logic          t_valid,
  output logic [M-1:0]  t          // T = A B x^-(m-1)/2 mod G
);

  logic [M-1:0] d_q;       // D result in natural bit order
  logic         d_valid_q;
  logic [M-1:0] d_nat;

  always_comb
    for (int k = 0; k < M; k++) d_nat[k] = p_in[M-1-k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid_q <= 1'b0;
      t_valid   <= 1'b0;
    end else begin
      d_valid_q <= valid_in && (kind_in == TOK_D);
      t_valid   <= valid_in && (kind_in == TOK_C);
    end
  end

  always_ff @(posedge clk) begin
    if (valid_in && kind_in == TOK_D) d_q <= d_nat;
    if (valid_in && kind_in == TOK_C) t   <= p_in ^ d_q;
  end

  a_c_follows_d: assert property (@(posedge clk)
    (valid_in && kind_in == TOK_C) |-> d_valid_q)
    else $error("C result without a D result one clock before it");

endmodule
