// sea_word_rot: word rotation R (or its inverse) of a half block.
//
// INV = 0: R moves word i to position i+1 and the top word to position 0,
//          i.e. the half block is rotated left by B bits.
// INV = 1: the inverse rotation, right by B bits; the decryption round needs
//          it to undo the R of the encryption round.
// Pure wiring, no logic. The direction of R is the standard SEA definition;
// the text only names the block.
module sea_word_rot #(
  parameter int NB  = 9,
  parameter int B   = 7,
  parameter bit INV = 1'b0
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  if (NB == 1) begin : g_one
    assign y = x;
  end else if (!INV) begin : g_fwd
    assign y = {x[(NB-1)*B-1:0], x[NB*B-1 -: B]};
  end else begin : g_inv
    assign y = {x[B-1:0], x[NB*B-1:B]};
  end

endmodule
