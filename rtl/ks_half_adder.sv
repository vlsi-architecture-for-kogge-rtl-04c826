// ks_half_adder: one-bit half adder, the input stage of every adder bit.
//
// p = a ^ b is the half sum, which doubles as the bit's carry-propagate
// signal; g = a & b is the half carry, which doubles as the bit's
// carry-generate signal. Two of these sit at the input of each 2-bit
// Kogge-Stone cell. Purely combinational, no clock.
module ks_half_adder (
  input  logic a,
  input  logic b,
  output logic p,   // a xor b: half sum / propagate
  output logic g    // a and b: half carry / generate
);

  always_comb begin
    p = a ^ b;
    g = a & b;
  end

endmodule
