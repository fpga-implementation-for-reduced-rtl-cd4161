// sea_round: one SEA Feistel round, encryption (FE) or decryption (FD).
//
// The round function f(X, K) = r(S(X + K)) adds the round key word-wise
// modulo 2^B, passes the sum through the S box layer and then through the
// bit rotation r.
//   encrypt = 1 (FE):  l_out = r_in
//                      r_out = R(l_in) ^ f(r_in, rk)
//   encrypt = 0 (FD):  l_out = R^-1(r_in ^ f(l_in, rk))
//                      r_out = l_in
// FD is the exact inverse of FE with the same round key. Two multiplexers
// driven by encrypt choose which half feeds f and which result is written
// back, so both directions share one adder and one S box layer.
// Purely combinational; the caller holds the state in registers.
//
// Follows the text: the FE/FD equations and figures, and the two
// encrypt-controlled multiplexers. This design's own choice: the decryption
// path uses the inverse word rotation R^-1, which is what makes FD undo FE.
module sea_round #(
  parameter int NB = 9,
  parameter int B  = 7
) (
  input  logic            encrypt,
  input  logic [NB*B-1:0] l_in,
  input  logic [NB*B-1:0] r_in,
  input  logic [NB*B-1:0] rk,
  output logic [NB*B-1:0] l_out,
  output logic [NB*B-1:0] r_out
);

  logic [NB*B-1:0] f_in, sum, sub, f_out;
  logic [NB*B-1:0] l_rot, dec_x, dec_rot;

  // Encrypt multiplexer 1: the half that enters the round function.
  assign f_in = encrypt ? r_in : l_in;

  sea_add     #(.NB(NB), .B(B)) u_add (.a(f_in), .k(rk), .s(sum));
  sea_sbox    #(.NB(NB), .B(B)) u_sbox(.x(sum), .y(sub));
  sea_bit_rot #(.NB(NB), .B(B)) u_brot(.x(sub), .y(f_out));

  sea_word_rot #(.NB(NB), .B(B), .INV(1'b0)) u_wrot (.x(l_in),  .y(l_rot));
  sea_word_rot #(.NB(NB), .B(B), .INV(1'b1)) u_wroti(.x(dec_x), .y(dec_rot));

  assign dec_x = r_in ^ f_out;

  // Encrypt multiplexer 2: which path is written back.
  always_comb begin
    if (encrypt) begin
      l_out = r_in;
      r_out = l_rot ^ f_out;
    end else begin
      l_out = dec_rot;
      r_out = l_in;
    end
  end

endmodule
