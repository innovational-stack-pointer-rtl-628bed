// stack_pkg: constants shared by the LFSR stack-pointer design.
//
// The address generator is a 4-stage LFSR whose characteristic polynomial
// is x^4 + x + 1 when counting up (PUSH) and the reciprocal x^4 + x^3 + 1
// when counting down (POP). A polynomial is written as a vector of its
// coefficients, bit i holding the coefficient of x^i, so x^4 + x + 1 is
// 5'b1_0011. The 4 stages and the polynomial follow the document's example;
// the 8-bit data word is this design's own choice.
package stack_pkg;
  localparam int unsigned    LFSR_STAGES  = 4;
  localparam logic [4:0]     LFSR_POLY    = 5'b1_0011;   // x^4 + x + 1
  localparam int unsigned    STACK_DATA_W = 8;
  // Direction values of the up_dn control signal.
  localparam logic           DIR_UP       = 1'b0;        // normal sequence, PUSH
  localparam logic           DIR_DOWN     = 1'b1;        // reversed sequence, POP
endpackage
