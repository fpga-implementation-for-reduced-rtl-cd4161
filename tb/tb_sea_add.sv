// tb_sea_add: checks the word-wise modulo-2^B adder.
// Random operands, plus all-ones + one in every word (each word must wrap to
// zero without a carry into its neighbour), compared with the reference.
module tb_sea_add;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7;
  logic [NB*B-1:0] a, k, s;
  int checks = 0, failures = 0;

  sea_add #(.NB(NB), .B(B)) dut (.a, .k, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    half_t exp;
    #1;
    exp = ref_add(half_t'(a), half_t'(k), NB, B);
    checks++;
    if (s != exp[NB*B-1:0]) begin
      failures++;
      $display("FAIL a=%h k=%h s=%h exp=%h", a, k, s, exp[NB*B-1:0]);
    end
  endtask

  initial begin
    a = '1;
    for (int i = 0; i < NB; i++) k[i*B +: B] = B'(1);
    check();
    checks++;
    if (s != '0) begin
      failures++;
      $display("FAIL carry crossed a word boundary: %h", s);
    end
    repeat (500) begin
      a = rand_half(NB, B)[NB*B-1:0];
      k = rand_half(NB, B)[NB*B-1:0];
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
