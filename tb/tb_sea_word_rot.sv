// tb_sea_word_rot: checks the word rotation R and its inverse.
// Each word is given a distinct value so a misplaced word is visible; random
// inputs are compared with the reference, and R^-1(R(x)) must return x.
module tb_sea_word_rot;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7;
  logic [NB*B-1:0] x, y, yi, yy;
  int checks = 0, failures = 0;

  sea_word_rot #(.NB(NB), .B(B), .INV(1'b0)) dut_f (.x(x), .y(y));
  sea_word_rot #(.NB(NB), .B(B), .INV(1'b1)) dut_i (.x(x), .y(yi));
  sea_word_rot #(.NB(NB), .B(B), .INV(1'b1)) dut_b (.x(y), .y(yy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    half_t ef, ei;
    #1;
    ef = ref_wrot(half_t'(x), NB, B, 1'b0);
    ei = ref_wrot(half_t'(x), NB, B, 1'b1);
    checks += 3;
    if (y != ef[NB*B-1:0]) begin
      failures++; $display("FAIL R x=%h y=%h exp=%h", x, y, ef[NB*B-1:0]);
    end
    if (yi != ei[NB*B-1:0]) begin
      failures++; $display("FAIL R^-1 x=%h y=%h exp=%h", x, yi, ei[NB*B-1:0]);
    end
    if (yy != x) begin
      failures++; $display("FAIL R^-1(R(x)) != x");
    end
  endtask

  initial begin
    for (int i = 0; i < NB; i++) x[i*B +: B] = B'(i + 1);
    check();
    // Word 0 of R(x) must be the top word of x.
    checks++;
    if (y[B-1:0] != B'(NB)) begin
      failures++; $display("FAIL word 0 of R(x) = %0d", y[B-1:0]);
    end
    repeat (300) begin
      x = rand_half(NB, B)[NB*B-1:0];
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
