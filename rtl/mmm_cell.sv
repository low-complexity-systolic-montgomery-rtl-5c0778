// mmm_cell: one bit-slice (i,k) of the semi-systolic Montgomery array.
//
// Each row of the array performs one step of the recurrence
//   P_i = P_(i-1) * x mod G' + b * A'
// written bit by bit as
//   p_i[k] = p_(i-1)[k-1] ^ (p_(i-1)[m-1] & g'[k]) ^ (b & a'[k]).
// For the C half (MSB-first) P, A', G' are C, A, G in natural order; for the
// D half (LSB-first, multiplication by x^-1) they are D, A and G with their
// bit order reversed, which turns the x^-1 recurrence into the same form.
// The cell therefore holds two AND2 gates and one XOR3 (here three-input XOR),
// exactly as the published cell, and a latch on the new partial bit. The
// a' and g' bits move down to the next row through latches of their own, so
// the coefficients stay with the token they belong to; this is what lets
// the D and C halves share one array on alternate clocks.
//
// Interface: c_in is p_(i-1)[k-1] from the previous row's neighbour (0 for
// k = 0), msb_in is the previous row's MSB broadcast along the row, b_in is
// the row's multiplier bit broadcast from the left edge. All outputs are
// registered: one clock from inputs to c_out/a_out/g_out. No reset: the data
// path is qualified by the valid bit that travels alongside in mmm_row.
// The gates and the data movement follow the published cell; using
// flip-flops for its latches and leaving them without reset are choices
// of this implementation.
module mmm_cell (
  input  logic clk,
  input  logic c_in,    // partial-product bit from cell (i-1, k-1)
  input  logic msb_in,  // p_(i-1)[m-1], broadcast along the row
  input  logic a_in,    // a'[k] from cell (i-1, k)
  input  logic g_in,    // g'[k] from cell (i-1, k)
  input  logic b_in,    // multiplier bit of this row
  output logic c_out,   // p_i[k], latched
  output logic a_out,   // a'[k], latched for row i+1
  output logic g_out    // g'[k], latched for row i+1
);

  logic c_next;

  // Two AND2 and one XOR3: the cell's critical path.
  always_comb c_next = c_in ^ (msb_in & g_in) ^ (b_in & a_in);

  always_ff @(posedge clk) begin
    c_out <= c_next;
    a_out <= a_in;
    g_out <= g_in;
  end

endmodule
