// mmm_pkg: types and constants shared by the semi-systolic GF(2^m) Montgomery
// multiplier. A multiplication travels through the array as two tokens: the
// LSB-first D half (the x^-1 recurrence) and, one clock later, the MSB-first C
// half (the x recurrence). tok_kind_e tags which half a row currently holds.
// The default field size is m = 571, the NIST field used for the complexity
// analysis; any odd m >= 3 works.
package mmm_pkg;

  // Which half of the Montgomery product a token carries.
  typedef enum logic {
    TOK_D = 1'b0,   // D = A(b0 x^-(m-1)/2 + ... + b(m-3)/2 x^-1), issued first
    TOK_C = 1'b1    // C = A(b(m-1)/2 + ... + b(m-1) x^(m-1)/2), issued second
  } tok_kind_e;

  localparam int unsigned DEFAULT_M = 571;

  // Number of array rows, i.e. iterations of each recurrence: (m+1)/2.
  function automatic int unsigned num_rows(input int unsigned m);
    return (m + 1) / 2;
  endfunction

endpackage
