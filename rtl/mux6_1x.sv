// mux6_1x: one-bit 6:1 multiplexer slice of the coin-value datapath.
//
// Selects one of six data inputs u, v, w, x, y, z with the 3-bit code s:
// 000 -> u, 001 -> v, 010 -> w, 011 -> x, 100 -> y, 101 -> z. Like the
// full-custom slice it models, it takes the select in both polarities, s and
// its complement sb, so that no inverters are needed inside the slice; the
// caller must drive sb = ~s. The codes 110 and 111 select no input; this model
// drives 0 for them (the design leaves them undefined). Purely combinational.
// The port names and the six-input structure follow the design; the
// behaviour for 110/111 is this implementation's choice.
module mux6_1x (
  input  logic       u,
  input  logic       v,
  input  logic       w,
  input  logic       x,
  input  logic       y,
  input  logic       z,
  input  logic [2:0] s,
  input  logic [2:0] sb,
  output logic       f
);

  logic low_half;   // s = 0xx: one of u, v, w, x
  logic high_half;  // s = 10x: one of y, z

  always_comb begin
    low_half  = (sb[1] & sb[0] & u) | (sb[1] & s[0] & v) |
                (s[1]  & sb[0] & w) | (s[1]  & s[0] & x);
    high_half = (sb[0] & y) | (s[0] & z);
    f = (sb[2] & low_half) | (s[2] & sb[1] & high_half);
  end

endmodule
