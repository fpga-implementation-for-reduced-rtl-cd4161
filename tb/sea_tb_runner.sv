// sea_tb_runner: testbench helper that exercises one SEA(N,B) core.
//
// It instantiates sea_top with the given block and word size (round count
// left at its default), encrypts RUNS random blocks under random keys,
// compares each ciphertext with the reference model and the latency with
// NR, decrypts the core's ciphertext again and checks that the plaintext
// comes back. checks/failures count the comparisons; finished rises when
// all runs are over.
module sea_tb_runner #(
  parameter int N    = 48,
  parameter int B    = 4,
  parameter int RUNS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import sea_ref_pkg::*;
  localparam int NB = N / (2 * B), H = N / 2;
  localparam int NR = sea_pkg::sea_default_nr(N, B);

  logic         start = 1'b0, encrypt = 1'b1, busy, done;
  logic [N-1:0] din = '0, key = '0, dout;

  sea_top #(.N(N), .B(B)) dut (.clk, .rst_n, .start, .encrypt, .din, .key,
                               .dout, .busy, .done);

  task automatic run_op(input logic enc, input logic [N-1:0] data,
                        input logic [N-1:0] k, output logic [N-1:0] result);
    int edges;
    @(negedge clk);
    encrypt = enc;
    din     = data;
    key     = k;
    start   = 1'b1;
    @(negedge clk);
    start   = 1'b0;
    edges   = 0;
    while (!done) begin
      @(negedge clk);
      edges++;
    end
    checks++;
    if (edges != NR) begin
      failures++;
      $display("FAIL SEA(%0d,%0d) latency %0d, expected %0d", N, B, edges, NR);
    end
    result = dout;
  endtask

  initial begin
    logic [N-1:0] p, k, ct, pt;
    half_t l, r;
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    @(posedge rst_n);
    for (int run = 0; run < RUNS; run++) begin
      p = {rand_half(NB, B)[H-1:0], rand_half(NB, B)[H-1:0]};
      k = {rand_half(NB, B)[H-1:0], rand_half(NB, B)[H-1:0]};
      run_op(1'b1, p, k, ct);
      l = half_t'(p[N-1:H]);
      r = half_t'(p[H-1:0]);
      ref_encrypt(l, r, half_t'(k[N-1:H]), half_t'(k[H-1:0]), NB, B, NR);
      checks++;
      if (ct != {l[H-1:0], r[H-1:0]}) begin
        failures++;
        $display("FAIL SEA(%0d,%0d) encrypt got %h expected %h", N, B, ct,
                 {l[H-1:0], r[H-1:0]});
      end
      run_op(1'b0, ct, k, pt);
      checks++;
      if (pt != p) begin
        failures++;
        $display("FAIL SEA(%0d,%0d) decrypt got %h expected %h", N, B, pt, p);
      end
    end
    $display("SEA(%0d,%0d) nr=%0d: %0d checks, %0d failures", N, B, NR, checks, failures);
    finished = 1'b1;
  end
endmodule
