// rev_xor: reversible XOR in the feedback path of the up-down LFSR.
//
// The gate sits on the ring wire and XORs its side input into whatever
// passes through it, in both directions: with up_dn = 0 the signal enters
// from the left and leaves to the right, with up_dn = 1 it enters from the
// right and leaves to the left. The original circuit steers a single XOR
// with tri-state buffers; here the two directions are separate wires and
// the output whose direction is off is driven to 0. In the address
// generator the side input is the NOR term that inserts the all-zero
// state, which must be applied whichever way the register shifts.
// Purely combinational.
module rev_xor (
  input  logic up_dn,   // 0: left-to-right, 1: right-to-left
  input  logic l_in,
  input  logic r_in,
  input  logic side,    // value XORed into the passing signal
  output logic l_out,
  output logic r_out
);
  assign r_out = ~up_dn & (l_in ^ side);
  assign l_out =  up_dn & (r_in ^ side);
endmodule
