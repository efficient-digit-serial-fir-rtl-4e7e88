// ds_fir_pkg: types and helpers shared by the digit-serial FIR filter.
//
// A sample word of W bits is handled as a frame of 2W/N digit cycles: the
// first W/N cycles carry the operand digits (least significant first), the
// second W/N cycles carry zeros so that the high half of each product can
// drain out.  The controller (ds_ctrl) decodes the digit position inside the
// frame into the four control signals named Control-1 .. Control-4 plus the
// padding strobe; they travel together in ds_ctrl_t.
package ds_fir_pkg;

  typedef struct packed {
    logic clr_mul;   // Control-1: first digit of a frame, multiplier state is cleared
    logic neg_msd;   // Control-2: sign digit of the multiplier operand, Block-B adds -A
    logic sign_ext;  // Control-3: last (most significant) digit, adders sign-extend
    logic acc_cin;   // Control-4: 0 on the first digit (carry-in cleared), 1 otherwise
    logic pad_zero;  // high half of the frame: operand digits are forced to zero
  } ds_ctrl_t;

  // Bits needed for a sum of `terms` N-bit digits (unsigned digits or
  // two's-complement sign digits alike).
  function automatic int sum_width(input int n, input int terms);
    return n + $clog2(terms);
  endfunction

endpackage
