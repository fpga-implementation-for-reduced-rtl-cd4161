// tb_sea_key_sched: runs the key schedule through full executions, driving
// load/step/switch/half/constant the way the controller does for NR = 119
// rounds, and compares every round key with the reference list (forward key
// states, then the same states in reverse order).
module tb_sea_key_sched;
  import sea_ref_pkg::*;
  localparam int NB = 9, B = 7, H = NB * B, NR = 119, HM = (NR + 1) / 2;
  logic           clk = 1'b0, rst_n = 1'b0;
  logic           load = 1'b0, step = 1'b0, switch_i = 1'b0, half_i = 1'b0;
  logic [2*H-1:0] key;
  logic [B-1:0]   c;
  logic [H-1:0]   rk;
  int checks = 0, failures = 0;

  sea_key_sched #(.NB(NB), .B(B)) dut (.clk, .rst_n, .load, .key, .step,
                                       .switch_i, .half_i, .c, .rk);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_list_t ks;
    logic [H-1:0] held;
    key = '0;
    c   = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 5; run++) begin
      key = {rand_half(NB, B)[H-1:0], rand_half(NB, B)[H-1:0]};
      ks  = ref_round_keys(half_t'(key[2*H-1:H]), half_t'(key[H-1:0]), NB, B, NR);
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 1; i <= NR; i++) begin
        step     = 1'b1;
        switch_i = (i == HM);
        half_i   = (i > HM);
        c        = B'((i < HM) ? i : NR - i);
        #1;
        checks++;
        if (rk != ks[i][H-1:0]) begin
          failures++;
          $display("FAIL run %0d round %0d rk=%h exp=%h", run, i, rk, ks[i][H-1:0]);
        end
        @(negedge clk);
      end
      step = 1'b0;
      switch_i = 1'b0;
      half_i = 1'b0;
      // Holding step low must freeze the key registers.
      #1;
      held = rk;
      repeat (3) @(negedge clk);
      checks++;
      if (rk != held) begin
        failures++;
        $display("FAIL key registers moved without step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
