// tb_sea_top: end-to-end test of the SEA core at its default size,
// SEA(126,7) with 119 rounds, with no parameter overridden.
//
// Each run encrypts a random block under a random key, checks the
// ciphertext against the reference model and the latency (done exactly NR
// clock edges after the load edge, one round per cycle), then decrypts the
// core's own ciphertext with the same key and checks that the plaintext
// comes back. Some runs hold start high during the whole run (it must be
// ignored while busy), and the inputs are scrambled after the load edge
// (they must not matter). The test counts how often each mechanism
// occurred (Switch, Half Exec rounds, encryption, decryption, ignored start)
// and counts a failure for any that never did.
module tb_sea_top;
  import sea_ref_pkg::*;
  localparam int N = 126, B = 7, NB = N / (2 * B), H = N / 2;
  localparam int NR = sea_pkg::sea_default_nr(N, B);
  localparam int RUNS = 12;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, encrypt = 1'b1;
  logic [N-1:0] din = '0, key = '0, dout;
  logic         busy, done;
  int checks = 0, failures = 0;
  int n_switch = 0, n_half = 0, n_enc = 0, n_dec = 0, n_ignored = 0;

  sea_top dut (.clk, .rst_n, .start, .encrypt, .din, .key, .dout, .busy, .done);

  always #5 clk = ~clk;

  // Mechanism counters, sampled on the clock.
  always @(posedge clk) begin
    if (dut.sw)            n_switch++;
    if (dut.half)          n_half++;
    if (busy && start)     n_ignored++;
  end

  initial begin
    repeat (40 * (NR + 4) * RUNS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation: drive the inputs, wait for done, check the latency.
  task automatic run_op(input logic enc, input logic [N-1:0] data,
                        input logic [N-1:0] k, input bit hold_start,
                        output logic [N-1:0] result);
    int edges = 0;
    @(negedge clk);
    encrypt = enc;
    din     = data;
    key     = k;
    start   = 1'b1;
    @(negedge clk);        // load edge passed
    start   = hold_start;
    din     = ~data;       // inputs must be ignored after the load edge
    key     = ~k;
    encrypt = ~enc;
    edges   = 0;       // clock edges since the load edge
    while (!done) begin
      @(negedge clk);
      edges++;
    end
    start = 1'b0;
    checks++;
    if (edges != NR) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", edges, NR);
    end
    result = dout;
    if (enc) n_enc++; else n_dec++;
  endtask

  initial begin
    logic [N-1:0] p, k, ct, pt;
    half_t l, r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      p = {rand_half(NB, B)[H-1:0], rand_half(NB, B)[H-1:0]};
      k = {rand_half(NB, B)[H-1:0], rand_half(NB, B)[H-1:0]};
      if (run == 0) begin p = '0; k = '0; end
      run_op(1'b1, p, k, run % 3 == 1, ct);
      l = half_t'(p[N-1:H]);
      r = half_t'(p[H-1:0]);
      ref_encrypt(l, r, half_t'(k[N-1:H]), half_t'(k[H-1:0]), NB, B, NR);
      checks++;
      if (ct != {l[H-1:0], r[H-1:0]}) begin
        failures++;
        $display("FAIL run %0d encrypt: got %h expected %h", run, ct, {l[H-1:0], r[H-1:0]});
      end
      // dout must hold while idle.
      repeat (2) @(negedge clk);
      checks++;
      if (dout != ct) begin
        failures++;
        $display("FAIL dout changed while idle");
      end
      // Decrypt the core's own ciphertext with the same key.
      run_op(1'b0, ct, k, run % 3 == 2, pt);
      checks++;
      if (pt != p) begin
        failures++;
        $display("FAIL run %0d decrypt: got %h expected %h", run, pt, p);
      end
    end
    if (n_switch == 0)  begin failures++; $display("FAIL no Switch seen"); end
    if (n_half == 0)    begin failures++; $display("FAIL no Half Exec round seen"); end
    if (n_enc == 0)     begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)     begin failures++; $display("FAIL no decryption"); end
    if (n_ignored == 0) begin failures++; $display("FAIL start never ignored"); end
    checks += 5;
    $display("mechanisms: switch=%0d half_exec_rounds=%0d encrypt=%0d decrypt=%0d start_ignored=%0d",
             n_switch, n_half, n_enc, n_dec, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
