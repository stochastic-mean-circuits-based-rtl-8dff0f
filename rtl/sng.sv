// sng: comparator of a stochastic number generator.
//
// Each cycle the binary number b is compared with the random number r and
// s is 1 when b > r. With r uniform over 0..2^K-1, s is 1 with probability
// b/2^K. b is K+1 bits wide so that 2^K (probability 1) can be expressed.
// Purely combinational; the random number source sits outside so that
// several SNGs can share it. The comparison rule follows the published circuit.
module sng
  import sc_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic [K:0]   b,
  input  logic [K-1:0] r,
  output logic         s
);

  assign s = (b > {1'b0, r});

endmodule
