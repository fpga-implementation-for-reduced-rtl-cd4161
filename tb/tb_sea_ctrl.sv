// tb_sea_ctrl: checks the controller's sequence at its default size
// (NR = 119, B = 7): the load pulse, the round index, Switch once in the
// middle round, Half Exec after it, the round-constant sequence, the done
// pulse exactly NR clock edges after the load edge, and that start is ignored
// while a run is in progress.
module tb_sea_ctrl;
  localparam int NR = 119, B = 7, HM = (NR + 1) / 2, CW = $clog2(NR + 1);
  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          load, step, busy, sw, half, done;
  logic [CW-1:0] round;
  logic [B-1:0]  c;
  int checks = 0, failures = 0;

  sea_ctrl #(.NR(NR), .B(B)) dut (.clk, .rst_n, .start, .load, .step, .busy,
                                  .round_o(round), .switch_o(sw), .half_o(half),
                                  .c_o(c), .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int nsw;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      expect_eq("idle busy", int'(busy), 0);
      start = 1'b1;
      #1;
      expect_eq("load", int'(load), 1);
      @(negedge clk);            // the load edge has passed
      start = (run == 1);        // keep start high in run 1: must be ignored
      nsw = 0;
      for (int i = 1; i <= NR; i++) begin
        #1;
        expect_eq("busy", int'(busy), 1);
        expect_eq("step", int'(step), 1);
        expect_eq("load while busy", int'(load), 0);
        expect_eq("round", int'(round), i);
        expect_eq("switch", int'(sw), int'(i == HM));
        expect_eq("half", int'(half), int'(i > HM));
        expect_eq("constant", int'(c), ((i < HM) ? i : NR - i) % (1 << B));
        expect_eq("early done", int'(done), 0);
        nsw += sw;
        @(negedge clk);
      end
      #1;
      expect_eq("done after NR edges", int'(done), 1);
      expect_eq("switch count", nsw, 1);
      start = 1'b0;
      @(negedge clk);
      #1;
      expect_eq("done is one cycle", int'(done), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
