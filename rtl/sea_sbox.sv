// sea_sbox: the SEA substitution layer for one half block.
//
// The 3-bit S box S = {0,5,6,7,4,3,1,2} is applied bitwise to every group of
// three consecutive words (x0 = word 3g, x1 = word 3g+1, x2 = word 3g+2): bit
// j of x2,x1,x0 forms the 3-bit input value, with x0 as its least significant
// bit. It is computed in bit-sliced form with three AND/OR-XOR steps, each
// using the result of the step before:
//   x0' = (x2 & x1) ^ x0;  x1' = (x2 & x0') ^ x1;  x2' = (x0' | x1') ^ x2
// which yields exactly the table above. Purely combinational.
//
// Parameters: NB words of B bits per half block (NB a multiple of 3).
// The table follows the text; the bit-sliced form and the mapping of the
// three words onto input bits are the standard SEA definition, not spelled
// out in the text.
module sea_sbox #(
  parameter int NB = 9,
  parameter int B  = 7
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  always_comb begin
    logic [B-1:0] a0, a1, a2;
    y = x;
    for (int g = 0; g < NB / 3; g++) begin
      a0 = x[(3*g)*B   +: B];
      a1 = x[(3*g+1)*B +: B];
      a2 = x[(3*g+2)*B +: B];
      a0 = (a2 & a1) ^ a0;
      a1 = (a2 & a0) ^ a1;
      a2 = (a0 | a1) ^ a2;
      y[(3*g)*B   +: B] = a0;
      y[(3*g+1)*B +: B] = a1;
      y[(3*g+2)*B +: B] = a2;
    end
  end

endmodule
