// mult_pkg: types shared by the C-testable multipliers.
//
// mcs_test_pins_t bundles the seven test-control inputs of the modified
// carry-save multiplier with a carry-propagate row (MCS/CP).  In every test
// pattern all even-indexed bits of a row-0 c or d vector carry one value and all
// odd-indexed bits another, so one pin per parity is enough; the same holds for
// the c inputs of the leftmost diagonal.  The seventh pin is the carry-in of the
// carry-propagate row.  All seven are 0 during multiplication.
//
// bw_cell2_variant_t selects the A or B form of the Baugh-Wooley type 2 cell;
// the two forms alternate down the leftmost diagonal, starting with A.
package mult_pkg;

  typedef struct packed {
    logic c0_even;  // c(0,j), j even
    logic c0_odd;   // c(0,j), j odd
    logic d0_even;  // d(0,j), j even
    logic d0_odd;   // d(0,j), j odd
    logic cl_even;  // c(i,n-1), i even
    logic cl_odd;   // c(i,n-1), i odd
    logic cin;      // carry-in of the carry-propagate row
  } mcs_test_pins_t;

  typedef enum logic {BW2_A = 1'b0, BW2_B = 1'b1} bw_cell2_variant_t;

  // Replicate an even/odd pin pair over an n-bit vector: bit k takes
  // ev when k is even and od when k is odd.
  function automatic logic [63:0] parity_fill(input logic ev, input logic od);
    logic [63:0] v;
    for (int k = 0; k < 64; k++) v[k] = (k % 2 == 0) ? ev : od;
    return v;
  endfunction

endpackage
