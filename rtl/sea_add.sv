// sea_add: word-wise addition modulo 2^B of two half blocks.
//
// Each of the NB words of a is added to the word of k in the same position;
// the carry out of a word is dropped, so no carry crosses a word boundary.
// In SEA this is where the round key (or the round constant) enters the
// round. Purely combinational.
//
// The modulo-2^b addition is the text's; applying it word by word, without
// carries between words, is the standard SEA reading.
module sea_add #(
  parameter int NB = 9,
  parameter int B  = 7
) (
  input  logic [NB*B-1:0] a,
  input  logic [NB*B-1:0] k,
  output logic [NB*B-1:0] s
);

  always_comb begin
    for (int i = 0; i < NB; i++)
      s[i*B +: B] = a[i*B +: B] + k[i*B +: B];
  end

endmodule
