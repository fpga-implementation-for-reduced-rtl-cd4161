// tb_sea_workloads: runs every (n, b) parameter set of the implementation
// results table whose half block divides into groups of three words, each
// on its own core with the recommended (odd-rounded) number of rounds:
// encryption against the reference, latency, and decryption round trip.
// (128, 8) is not run: its 8 words per half cannot be grouped in threes for
// the S box.
module tb_sea_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  localparam int NCFG = 13;
  localparam int CFG_N [NCFG] = '{48, 48, 72, 72, 72, 96, 108, 126, 132, 144, 144, 144, 144};
  localparam int CFG_B [NCFG] = '{ 4,  8,  4,  6, 12,  4,   6,   7,  11,   4,   6,   8,  12};

  int   chk [NCFG];
  int   fail[NCFG];
  logic fin [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    sea_tb_runner #(.N(CFG_N[g]), .B(CFG_B[g]), .RUNS(4)) u_run (
      .clk, .rst_n, .checks(chk[g]), .failures(fail[g]), .finished(fin[g]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < NCFG; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
