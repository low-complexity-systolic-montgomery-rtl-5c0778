// mmm_row: one row of the semi-systolic array, m cells plus the latches for
// the token's control (valid, D/C kind) and its remaining multiplier bits.
//
// Row i takes the latched partial result P_(i-1) of the row above, feeds
// bit k-1 into cell k (a zero into cell 0), broadcasts the MSB P_(i-1)[m-1]
// to every cell and broadcasts its multiplier bit bvec_in[0] from the left.
// The multiplier bits for the rows below are shifted down one place and
// latched, so row i+1 sees its bit one clock after row i saw its own: this is
// the one-clock skew between successive b inputs of the published array.
// Latency: one clock from any input to the matching output.
// The broadcasts and the one-clock skew follow the published array; the
// valid and kind latches that tag each token are this implementation's.
module mmm_row
  import mmm_pkg::*;
#(
  parameter int unsigned M = DEFAULT_M,
  parameter int unsigned R = (M + 1) / 2   // rows in the array = bits carried
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_in,
  input  tok_kind_e     kind_in,
  input  logic [M-1:0]  p_in,     // P_(i-1)
  input  logic [M-1:0]  a_in,     // A' of the token
  input  logic [M-1:0]  g_in,     // G' of the token
  input  logic [R-1:0]  bvec_in,  // bvec_in[0] is this row's multiplier bit
  output logic          valid_out,
  output tok_kind_e     kind_out,
  output logic [M-1:0]  p_out,    // P_i, latched
  output logic [M-1:0]  a_out,
  output logic [M-1:0]  g_out,
  output logic [R-1:0]  bvec_out
);

  logic         msb;
  logic [M-1:0] shifted;

  assign msb     = p_in[M-1];
  assign shifted = {p_in[M-2:0], 1'b0};

  for (genvar k = 0; k < M; k++) begin : g_cell
    mmm_cell u_cell (
      .clk   (clk),
      .c_in  (shifted[k]),
      .msb_in(msb),
      .a_in  (a_in[k]),
      .g_in  (g_in[k]),
      .b_in  (bvec_in[0]),
      .c_out (p_out[k]),
      .a_out (a_out[k]),
      .g_out (g_out[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
  end

  always_ff @(posedge clk) begin
    kind_out <= kind_in;
    bvec_out <= bvec_in >> 1;
  end

endmodule
