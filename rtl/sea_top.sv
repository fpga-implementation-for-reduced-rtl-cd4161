// sea_top: SEA(N,B) encryption/decryption core, loop architecture.
//
// SEA is a Feistel block cipher for small devices whose block size N, key
// size (also N) and word size B are parameters. This core keeps one block in
// two half-block registers (L, R) and the key in two more (KL, KR) and
// executes one cipher round and one key-schedule round per clock cycle, in
// parallel. Rounds and round keys are never stored: the key schedule runs
// forward for the first half of the rounds, exchanges its halves (Switch)
// and runs backward for the second half, handing the round function KR
// before and KL after the switch (Half Exec).
//
// Interface and timing:
//   start, encrypt, din, key  sampled together when the core is idle; that
//                             edge loads L,R <= din[N-1:N/2], din[N/2-1:0]
//                             and KL,KR <= key[N-1:N/2], key[N/2-1:0].
//   busy                      high during the NR round cycles.
//   done                      one-cycle pulse on the NR-th edge after the
//                             load edge; dout is then valid and holds its
//                             value until the next load.
//   dout = {L, R} after the last round, with no final swap of the halves.
// Decryption takes the ciphertext as din and the same key: with NR odd the
// round keys form a symmetric sequence, so running the same key schedule
// with the inverse round (FD) undoes encryption.
//
// Follows the text: the loop architecture with the round function and the
// key schedule side by side, one round per cycle, the Switch, Half Exec and
// Encrypt multiplexers, and the recommended round count. This design's own
// choices: NR rounded up to an odd number (sea_pkg), the round constants, no
// final half swap, the handshake and the synchronous active-low reset.
module sea_top #(
  parameter int N  = 126,
  parameter int B  = 7,
  parameter int NR = sea_pkg::sea_default_nr(N, B)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         encrypt,
  input  logic [N-1:0] din,
  input  logic [N-1:0] key,
  output logic [N-1:0] dout,
  output logic         busy,
  output logic         done
);

  localparam int NB = N / (2 * B);
  localparam int H  = NB * B;
  localparam int CW = sea_pkg::sea_cnt_w(NR);

  if (N % (6 * B) != 0) begin : g_bad_n
    $error("sea_top: N must be a multiple of 6*B");
  end
  if (NR % 2 != 1) begin : g_bad_nr
    $error("sea_top: NR must be odd");
  end

  logic          load, step, sw, half;
  logic [CW-1:0] round;
  logic [B-1:0]  cidx;
  logic [H-1:0]  rk;
  logic          enc_q;
  logic [H-1:0]  l_q, r_q, l_nx, r_nx;

  sea_ctrl #(.NR(NR), .B(B)) u_ctrl (
    .clk, .rst_n, .start, .load, .step, .busy,
    .round_o(round), .switch_o(sw), .half_o(half), .c_o(cidx), .done
  );

  sea_key_sched #(.NB(NB), .B(B)) u_ks (
    .clk, .rst_n, .load, .key, .step,
    .switch_i(sw), .half_i(half), .c(cidx), .rk
  );

  sea_round #(.NB(NB), .B(B)) u_round (
    .encrypt(enc_q), .l_in(l_q), .r_in(r_q), .rk,
    .l_out(l_nx), .r_out(r_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l_q   <= '0;
      r_q   <= '0;
      enc_q <= 1'b1;
    end else if (load) begin
      l_q   <= din[N-1:H];
      r_q   <= din[H-1:0];
      enc_q <= encrypt;
    end else if (step) begin
      l_q <= l_nx;
      r_q <= r_nx;
    end
  end

  assign dout = {l_q, r_q};

  // The round counter is only observed by the assertion below.
  assert property (@(posedge clk) disable iff (!rst_n)
                   step |-> (round >= CW'(1) && round <= CW'(NR)))
    else $error("sea_top: round counter out of range");

endmodule
