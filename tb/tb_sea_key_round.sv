// tb_sea_key_round: checks one key-schedule round FK against the reference
// for random key halves and every round-constant value.
module tb_sea_key_round;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7, H = NB * B;
  logic [H-1:0] kl_in, kr_in, kl_out, kr_out;
  logic [B-1:0] c;
  int checks = 0, failures = 0;

  sea_key_round #(.NB(NB), .B(B)) dut (.kl_in, .kr_in, .c, .kl_out, .kr_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t el, er;
    for (int t = 0; t < 512; t++) begin
      c = B'(t);
      kl_in = rand_half(NB, B)[H-1:0];
      kr_in = rand_half(NB, B)[H-1:0];
      #1;
      el = half_t'(kl_in);
      er = half_t'(kr_in);
      ref_fk(el, er, t % (1 << B), NB, B);
      checks++;
      if (kl_out != el[H-1:0] || kr_out != er[H-1:0]) begin
        failures++;
        $display("FAIL c=%0d kl=%h kr=%h exp %h %h", c, kl_out, kr_out, el[H-1:0], er[H-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
