// sea_key_sched: the on-the-fly SEA key schedule with its two multiplexer
// pairs.
//
// Two NB*B-bit registers hold the left (KL) and right (KR) key halves.
//   load   : KL,KR <= key[2H-1:H], key[H-1:0]        (H = NB*B)
//   step   : KL,KR <= FK(switch_i ? {KR,KL} : {KL,KR}, c)
// The Switch multiplexers exchange the two halves in front of the key round
// in the middle round; the Half Exec multiplexer hands the round function
// KR during the first half of the execution and KL after the switch:
//   rk = half_i ? KL : KR        (combinational from the registers)
// Used with the sequence from sea_ctrl, the key schedule walks forward for
// the first half and then back through the same states (with their halves
// exchanged), so the round keys form a symmetric sequence; no round key is
// ever stored.
//
// The Switch and Half Exec multiplexers follow the text. Placing the switch
// in front of the key round of the middle round, and the synchronous
// active-low reset, are this design's own choices.
module sea_key_sched #(
  parameter int NB = 9,
  parameter int B  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [2*NB*B-1:0] key,
  input  logic              step,
  input  logic              switch_i,
  input  logic              half_i,
  input  logic [B-1:0]      c,
  output logic [NB*B-1:0]   rk
);

  localparam int H = NB * B;

  logic [H-1:0] kl_q, kr_q;
  logic [H-1:0] kl_sw, kr_sw, kl_nx, kr_nx;

  // Switch multiplexers.
  assign kl_sw = switch_i ? kr_q : kl_q;
  assign kr_sw = switch_i ? kl_q : kr_q;

  sea_key_round #(.NB(NB), .B(B)) u_fk (
    .kl_in(kl_sw), .kr_in(kr_sw), .c(c), .kl_out(kl_nx), .kr_out(kr_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kl_q <= '0;
      kr_q <= '0;
    end else if (load) begin
      kl_q <= key[2*H-1:H];
      kr_q <= key[H-1:0];
    end else if (step) begin
      kl_q <= kl_nx;
      kr_q <= kr_nx;
    end
  end

  // Half Exec multiplexer.
  assign rk = half_i ? kl_q : kr_q;

endmodule
