// qsd_pkg: types shared by the quaternary signed digit (QSD) datapath.
//
// A QSD digit takes a value from -3 to 3 and is carried on three wires as a
// 3-bit two's complement code (the code 3'b100, i.e. -4, never occurs).
// The carry that the first addition step passes to the next digit takes a
// value from -1 to 1 and is carried as a 2-bit two's complement code
// (2'b10 never occurs). Both encodings are the ones the adder is defined
// with; the package only gives them names.
package qsd_pkg;

  typedef logic signed [2:0] qsd_digit_t;  // -3 .. 3
  typedef logic signed [1:0] qsd_carry_t;  // -1 .. 1

endpackage
