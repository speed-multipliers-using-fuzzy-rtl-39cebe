// bcs_pkg: types and helpers shared by the Binary Common Subexpression (BCS)
// FIR filter.
//
// A coefficient magnitude is cut into 4-bit digits. Every non-zero 4-bit
// digit d is an odd "BCS term" shifted left: d = t << s, where t is one of
// the eight odd values 1, 3, 5, 7, 9, 11, 13, 15 (binary 1, 11, 101, 111,
// 1001, 1011, 1101, 1111) and s is 0..3. Digits 0011, 0110 and 1100 all use
// the term 11; digits 0101 and 1010 both use the term 101. A coded digit
// stores the term index (t-1)/2, the shift s, and a zero flag.
// Using 4-bit digits and the odd-term/shift code follows the filter's
// description; the field layout is this design's own.
package bcs_pkg;

  localparam int DIGIT_W   = 4;   // bits of coefficient magnitude per digit
  localparam int NUM_TERMS = 8;   // odd BCS terms 1,3,...,15
  localparam int TERM_IDX_W = 3;
  localparam int SHIFT_W   = 2;
  localparam int TERM_GROW = 4;   // 15*x needs 4 more bits than x

  typedef struct packed {
    logic                  zero;   // digit is 0000: no partial product
    logic [TERM_IDX_W-1:0] term;   // index k of the odd term 2k+1
    logic [SHIFT_W-1:0]    shift;  // left shift applied to the term
  } bcs_digit_t;

  // Code one 4-bit digit as (term, shift).
  function automatic bcs_digit_t encode_digit(input logic [DIGIT_W-1:0] d);
    bcs_digit_t c;
    logic [DIGIT_W-1:0] odd;
    c   = '0;
    odd = d;
    if (d == '0) begin
      c.zero = 1'b1;
    end else begin
      for (int s = 0; s < 3; s++) begin
        if (odd[0] == 1'b0) begin
          odd     = odd >> 1;
          c.shift = c.shift + 1'b1;
        end
      end
      c.term = odd[DIGIT_W-1:1];   // (odd - 1) / 2
    end
    return c;
  endfunction

  // Value that a coded digit stands for (used by checks and testbenches).
  function automatic int unsigned digit_value(input bcs_digit_t c);
    return c.zero ? 0 : ((2 * int'(c.term) + 1) << c.shift);
  endfunction

endpackage
