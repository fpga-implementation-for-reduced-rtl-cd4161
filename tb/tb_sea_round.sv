// tb_sea_round: checks one encryption round (FE) and one decryption round
// (FD) against the reference, and that FD with the same key undoes FE.
module tb_sea_round;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7, H = NB * B;
  logic         encrypt;
  logic [H-1:0] l_in, r_in, rk, l_out, r_out;
  logic [H-1:0] l2, r2;
  int checks = 0, failures = 0;

  sea_round #(.NB(NB), .B(B)) dut (.encrypt, .l_in, .r_in, .rk, .l_out, .r_out);
  // Second copy in decryption mode, fed with the first copy's output.
  sea_round #(.NB(NB), .B(B)) dut_inv (.encrypt(1'b0), .l_in(l_out), .r_in(r_out),
                                       .rk, .l_out(l2), .r_out(r2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t el, er;
    for (int t = 0; t < 600; t++) begin
      encrypt = t[0];
      l_in = rand_half(NB, B)[H-1:0];
      r_in = rand_half(NB, B)[H-1:0];
      rk   = rand_half(NB, B)[H-1:0];
      #1;
      el = half_t'(l_in);
      er = half_t'(r_in);
      if (encrypt) ref_fe(el, er, half_t'(rk), NB, B);
      else         ref_fd(el, er, half_t'(rk), NB, B);
      checks++;
      if (l_out != el[H-1:0] || r_out != er[H-1:0]) begin
        failures++;
        $display("FAIL enc=%0b l=%h r=%h", encrypt, l_out, r_out);
      end
      if (encrypt) begin
        checks++;
        if (l2 != l_in || r2 != r_in) begin
          failures++;
          $display("FAIL FD(FE(x)) != x");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
