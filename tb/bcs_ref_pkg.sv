// bcs_ref_pkg: reference helpers for the BCS filter testbenches. The digit
// coding here is found by search (try every odd term and shift until one
// gives the digit), a different route from the shift loop in the design.
package bcs_ref_pkg;

  typedef struct {
    bit zero;
    int term;
    int shift;
  } ref_digit_t;

  function automatic ref_digit_t ref_encode(input int d);
    ref_digit_t r;
    r.zero  = (d == 0);
    r.term  = 0;
    r.shift = 0;
    for (int k = 0; k < 8; k++)
      for (int s = 0; s < 4; s++)
        if (!r.zero && ((2 * k + 1) * (1 << s)) == d) begin
          r.term  = k;
          r.shift = s;
        end
    return r;
  endfunction

endpackage
