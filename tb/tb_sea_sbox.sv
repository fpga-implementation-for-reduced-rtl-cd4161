// tb_sea_sbox: checks the S box layer against a table lookup.
// Random half blocks at the default size (9 words of 7 bits) are compared
// with the reference, and every 3-bit input value is also driven on all bit
// columns at once and checked against S = {0,5,6,7,4,3,1,2}.
module tb_sea_sbox;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7;
  logic [NB*B-1:0] x, y;
  int checks = 0, failures = 0;

  sea_sbox #(.NB(NB), .B(B)) dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t exp;
    // Every table entry, on all columns of every word group.
    for (int v = 0; v < 8; v++) begin
      for (int g = 0; g < NB / 3; g++) begin
        x[(3*g)*B   +: B] = {B{v[0]}};
        x[(3*g+1)*B +: B] = {B{v[1]}};
        x[(3*g+2)*B +: B] = {B{v[2]}};
      end
      #1;
      for (int g = 0; g < NB / 3; g++) begin
        int unsigned s;
        s = SBOX[v];
        checks++;
        if (y[(3*g)*B +: B] != {B{s[0]}} || y[(3*g+1)*B +: B] != {B{s[1]}} ||
            y[(3*g+2)*B +: B] != {B{s[2]}}) begin
          failures++;
          $display("FAIL table v=%0d group %0d", v, g);
        end
      end
    end
    repeat (500) begin
      x = rand_half(NB, B)[NB*B-1:0];
      #1;
      exp = ref_sbox(half_t'(x), NB, B);
      checks++;
      if (y != exp[NB*B-1:0]) begin
        failures++;
        $display("FAIL x=%h y=%h exp=%h", x, y, exp[NB*B-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
