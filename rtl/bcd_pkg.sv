// bcd_pkg: types and reference helpers shared by the BCD digit units.
//
// A BCD digit is a 4-bit code holding 0..9; codes 10..15 are invalid and the
// digit units treat them as don't cares. The package holds the digit type,
// the two-digit product type and a validity check for callers that must
// filter codes 10..15 before they reach a unit. Treating those codes as don't
// cares follows the published design; the types are this design's own.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  // Two BCD digits: tens in the upper nibble, units in the lower one.
  typedef struct packed {
    bcd_digit_t tens;
    bcd_digit_t units;
  } bcd_pair_t;

  function automatic logic is_bcd(input bcd_digit_t d);
    return d <= 4'd9;
  endfunction

endpackage
