// sea_key_round: one round of the SEA key schedule (FK).
//
//   kr_out = kl_in ^ R(r(S(kr_in + C)))
//   kl_out = kr_in
// C is the round constant: a half block whose word 0 holds c and whose other
// words are zero; "+" is the word-wise addition modulo 2^B. Purely
// combinational.
//
// The FK equation and figure are the text's. The shape of the constant
// (the round index in the least significant word) is the standard SEA
// definition; the text only names it Ci.
module sea_key_round #(
  parameter int NB = 9,
  parameter int B  = 7
) (
  input  logic [NB*B-1:0] kl_in,
  input  logic [NB*B-1:0] kr_in,
  input  logic [B-1:0]    c,
  output logic [NB*B-1:0] kl_out,
  output logic [NB*B-1:0] kr_out
);

  logic [NB*B-1:0] cvec, sum, sub, brot, wrot;

  assign cvec = {{(NB-1)*B{1'b0}}, c};

  sea_add      #(.NB(NB), .B(B))              u_add (.a(kr_in), .k(cvec), .s(sum));
  sea_sbox     #(.NB(NB), .B(B))              u_sbox(.x(sum),  .y(sub));
  sea_bit_rot  #(.NB(NB), .B(B))              u_brot(.x(sub),  .y(brot));
  sea_word_rot #(.NB(NB), .B(B), .INV(1'b0))  u_wrot(.x(brot), .y(wrot));

  assign kr_out = kl_in ^ wrot;
  assign kl_out = kr_in;

endmodule
