// oneway_xor: XOR that is in the path in one direction only.
//
// Like rev_xor it passes the ring signal left-to-right when up_dn = 0 and
// right-to-left when up_dn = 1, but it XORs its side input into the signal
// only when up_dn equals XOR_WHEN; in the other direction the signal
// bypasses the gate unchanged. The up-down LFSR uses XOR_WHEN = 0 for the
// taps of the normal polynomial (the gates next to the first stage) and
// XOR_WHEN = 1 for the taps of the reciprocal polynomial (the gates next
// to the last stage). As in rev_xor, the tri-state steering of the
// original circuit is replaced by separate wires per direction, with the
// output of the inactive direction driven to 0. Purely combinational.
module oneway_xor #(
  parameter logic XOR_WHEN = 1'b0   // up_dn value at which the XOR is used
) (
  input  logic up_dn,
  input  logic l_in,
  input  logic r_in,
  input  logic side,
  output logic l_out,
  output logic r_out
);
  logic active;
  assign active = (up_dn == XOR_WHEN);

  assign r_out = ~up_dn & (l_in ^ (active & side));
  assign l_out =  up_dn & (r_in ^ (active & side));
endmodule
