// sara_pkg: shared sizes of the simple accuracy reconfigurable adder (SARA).
//
// The adder is 32 bits wide and is cut into 4-bit sub-adders, as the
// published design does (a 32-bit adder with a 33-bit sum, built from the
// 4-bit sub-adders of the carry-prediction structure). The accuracy select
// encoding (1 = accurate, 0 = approximate) is this design's own choice.
package sara_pkg;

  // Default operand width of the adder.
  localparam int unsigned SARA_N = 32;

  // Default width of one sub-adder.
  localparam int unsigned SARA_SUB_W = 4;

  // Accuracy select values on the adder's sel input.
  typedef enum logic {
    SARA_APPROX   = 1'b0,  // predicted carries on the enabled sub-adder boundaries
    SARA_ACCURATE = 1'b1   // every carry ripples; the sum is exact
  } sara_mode_e;

endpackage
