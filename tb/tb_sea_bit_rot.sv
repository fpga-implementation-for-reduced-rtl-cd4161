// tb_sea_bit_rot: checks the bit rotation r inside the words.
// Single set bits walked through every position show where each bit goes;
// random inputs are compared with the reference.
module tb_sea_bit_rot;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7;
  logic [NB*B-1:0] x, y;
  int checks = 0, failures = 0;

  sea_bit_rot #(.NB(NB), .B(B)) dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    half_t e;
    #1;
    e = ref_brot(half_t'(x), NB, B);
    checks++;
    if (y != e[NB*B-1:0]) begin
      failures++; $display("FAIL x=%h y=%h exp=%h", x, y, e[NB*B-1:0]);
    end
  endtask

  initial begin
    for (int i = 0; i < NB * B; i++) begin
      x = '0;
      x[i] = 1'b1;
      check();
    end
    repeat (300) begin
      x = rand_half(NB, B)[NB*B-1:0];
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
