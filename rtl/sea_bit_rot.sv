// sea_bit_rot: bit rotation r inside the words of a half block.
//
// In every group of three words, word 3g is rotated right by one bit,
// word 3g+1 is left as it is and word 3g+2 is rotated left by one bit.
// Pure wiring, no logic. The rotation amounts and directions are the
// standard SEA definition; the text only names the block.
module sea_bit_rot #(
  parameter int NB = 9,
  parameter int B  = 7
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  always_comb begin
    logic [B-1:0] w0, w2;
    y = x;
    for (int g = 0; g < NB / 3; g++) begin
      w0 = x[(3*g)*B   +: B];
      w2 = x[(3*g+2)*B +: B];
      y[(3*g)*B   +: B] = {w0[0], w0[B-1:1]};
      y[(3*g+2)*B +: B] = {w2[B-2:0], w2[B-1]};
    end
  end

endmodule
