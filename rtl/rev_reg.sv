// rev_reg: one stage of the reversible shift register.
//
// The stage sits in a ring of reversible parts and can shift in either
// direction. With up_dn = 0 it loads the value arriving from its left
// neighbour (l_in) and passes its own value on to the right (r_out); with
// up_dn = 1 it loads from its right neighbour (r_in) and passes its value
// on to the left (l_out). In the original circuit this is a flip-flop
// between two pairs of opposite tri-state buffers on bidirectional ports;
// here each bidirectional port is split into an input and an output, the
// tri-state buffer pairs become a 2:1 multiplexer on the D input, and an
// output whose buffer would be off is driven to 0.
//
// D_INV = 1 puts an inversion on the boundary at the register's left
// side: going right it loads the complement of what arrives from the
// left, going left it sends its complemented value. This is the Q / Q-bar
// output choice (parameter Di) of the general mixed-type LFSR, placed so
// that it acts on the same ring segment in both directions.
//
// Timing: d is the value loaded at the next rising clk edge when en = 1.
// q is always available as a tap for the feedback logic. rst_n is an
// asynchronous active-low reset to RESET_VAL (the reset is this design's
// own choice).
module rev_reg #(
  parameter logic RESET_VAL = 1'b0,
  parameter logic D_INV     = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic up_dn,   // 0: shift left-to-right, 1: right-to-left
  input  logic l_in,    // from the left neighbour
  input  logic r_in,    // from the right neighbour
  output logic l_out,   // to the left neighbour, driven when up_dn = 1
  output logic r_out,   // to the right neighbour, driven when up_dn = 0
  output logic d,       // next state of this stage
  output logic q        // present state of this stage
);
  assign d = up_dn ? r_in : (l_in ^ D_INV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (en) q <= d;
  end

  assign r_out = ~up_dn & q;
  assign l_out =  up_dn & (q ^ D_INV);
endmodule
