// mmm_array: the unified semi-systolic array, (m+1)/2 rows of m cells.
//
// A token entering at the top carries A', G' and the (m+1)/2 multiplier bits
// of one half of a Montgomery product (see mmm_issue). Row i computes step i
// of the recurrence P_i = P_(i-1) x mod G' + b_i A' from P_0 = 0, so after
// (m+1)/2 rows the bottom holds C_(m+1)/2 for a C token or, bit-reversed,
// D_(m+1)/2 for a D token. Rows are separated by latches only, every cell
// works on a different token each clock, and a new token may enter every
// clock. The critical path is one AND2 followed by one XOR3 plus the MSB
// broadcast along a row (the array is semi-systolic: the MSB and the row's
// b bit are broadcast, everything else moves between neighbours).
//
// Timing: a token presented at the top with valid_in = 1 appears at the
// bottom (valid_out = 1) exactly R = (m+1)/2 clocks later.
// The row count, cell count and data flow follow the published unified
// array; it is built here in plain row-pipelined form, one latch level per
// row, without further retiming.
module mmm_array
  import mmm_pkg::*;
#(
  parameter int unsigned M = DEFAULT_M,
  parameter int unsigned R = (M + 1) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_in,
  input  tok_kind_e     kind_in,
  input  logic [M-1:0]  a_in,
  input  logic [M-1:0]  g_in,
  input  logic [R-1:0]  bvec_in,
  output logic          valid_out,
  output tok_kind_e     kind_out,
  output logic [M-1:0]  p_out
);

  // Stage r holds the token after r rows; stage 0 is the array input.
  logic         valid_s [R+1];
  tok_kind_e    kind_s  [R+1];
  logic [M-1:0] p_s     [R+1];
  logic [M-1:0] a_s     [R+1];
  logic [M-1:0] g_s     [R+1];
  logic [R-1:0] bvec_s  [R+1];

  assign valid_s[0] = valid_in;
  assign kind_s[0]  = kind_in;
  assign p_s[0]     = '0;       // C_0 = D_0 = 0
  assign a_s[0]     = a_in;
  assign g_s[0]     = g_in;
  assign bvec_s[0]  = bvec_in;

  for (genvar r = 0; r < R; r++) begin : g_row
    mmm_row #(.M(M), .R(R)) u_row (
      .clk      (clk),
      .rst_n    (rst_n),
      .valid_in (valid_s[r]),
      .kind_in  (kind_s[r]),
      .p_in     (p_s[r]),
      .a_in     (a_s[r]),
      .g_in     (g_s[r]),
      .bvec_in  (bvec_s[r]),
      .valid_out(valid_s[r+1]),
      .kind_out (kind_s[r+1]),
      .p_out    (p_s[r+1]),
      .a_out    (a_s[r+1]),
      .g_out    (g_s[r+1]),
      .bvec_out (bvec_s[r+1])
    );
  end

  assign valid_out = valid_s[R];
  assign kind_out  = kind_s[R];
  assign p_out     = p_s[R];

endmodule
