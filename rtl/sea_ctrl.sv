// sea_ctrl: control part of the SEA loop core.
//
// A round counter runs from 1 to NR, one round per clock cycle. With
// HM = (NR+1)/2 the middle round, it drives for round i:
//   switch_o = (i == HM)                 exchange the key halves once
//   half_o   = (i >  HM)                 round key from KL after the switch
//   c_o      = (i <  HM) ? i : NR - i    round constant, modulo 2^B
// so the key schedule runs forward with constants 1..HM-1, switches, and
// runs back with constants HM-1..0.
//
// Timing: start is taken in the IDLE state; that cycle is the load cycle
// (load = 1). The NR following cycles are the rounds (step = 1). done is a
// one-cycle registered pulse that rises on the NR-th clock edge after the
// edge that took start, together with the last round's result. start is
// ignored while busy.
//
// The text gives the signals Switch and Half Exec and a control part that
// counts nr rounds; the counter, the constant sequence and this timing are
// this design's own. NR must be odd (see sea_pkg). Assertions at the end
// state the handshake rules.
module sea_ctrl #(
  parameter int NR = 119,
  parameter int B  = 7
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             load,
  output logic                             step,
  output logic                             busy,
  output logic [sea_pkg::sea_cnt_w(NR)-1:0] round_o,
  output logic                             switch_o,
  output logic                             half_o,
  output logic [B-1:0]                     c_o,
  output logic                             done
);

  localparam int CW = sea_pkg::sea_cnt_w(NR);
  localparam logic [CW-1:0] HM   = CW'((NR + 1) / 2);
  localparam logic [CW-1:0] LAST = CW'(NR);

  typedef enum logic {IDLE, RUN} state_e;

  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic [CW-1:0] cidx;

  assign busy     = (state_q == RUN);
  assign load     = (state_q == IDLE) && start;
  assign step     = busy;
  assign round_o  = cnt_q;
  assign switch_o = busy && (cnt_q == HM);
  assign half_o   = busy && (cnt_q > HM);
  assign cidx     = (cnt_q < HM) ? cnt_q : LAST - cnt_q;
  assign c_o      = B'(cidx);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          state_q <= RUN;
          cnt_q   <= CW'(1);
        end
        RUN: begin
          if (cnt_q == LAST) begin
            state_q <= IDLE;
            cnt_q   <= '0;
            done    <= 1'b1;
          end else begin
            cnt_q <= cnt_q + CW'(1);
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // Handshake rules: done only ends a run, Switch comes once per run in the
  // middle round, and a load never happens while rounds are running.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("sea_ctrl: done while busy");
  assert property (@(posedge clk) disable iff (!rst_n) switch_o |-> round_o == HM)
    else $error("sea_ctrl: Switch outside the middle round");
  assert property (@(posedge clk) disable iff (!rst_n) !(load && step))
    else $error("sea_ctrl: load during a run");

endmodule
