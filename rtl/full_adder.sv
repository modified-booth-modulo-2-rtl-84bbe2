// One-bit full adder, the (3,2) compressor of the partial product reduction.
// s = x ^ y ^ z, c = majority(x, y, z); the gate form is left to synthesis.
// Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
