// Self-checking testbench of rsa_coprocessor at its full 512-bit width.
//
// Drives the co-processor only through its Avalon window, as the processor's
// driver would, and checks against the reference arithmetic:
//   - a Montgomery product X*R*2^-512 mod M;
//   - X^17 mod M (the public exponent used by the system);
//   - X^E mod M with a random 512-bit exponent;
//   - the cycle count of each exponentiation against the core's formula
//     (plus at most one status-poll round trip);
//   - that the status poll saw the co-processor busy.
module tb_rsa_coprocessor;
  import crypto_pkg::*;
  import tb_bignum_pkg::*;

  localparam int unsigned N = 512;
  localparam int unsigned P = N + 3;

  logic    clk = 1'b0, rst_n = 1'b0;
  av_req_t avs_req;
  av_rsp_t avs_rsp;
  logic    busy, done;

  int checks = 0, failures = 0;

  rsa_coprocessor #(.N(N)) dut (.*);
  tb_rsa_sw #(.N(N), .BASE(32'h0)) sw (.clk, .req(avs_req), .rsp(avs_rsp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int core_cycles(big_t e);
    int t = -1, k = 0;
    for (int i = N - 1; i >= 0; i--) if (e[i]) begin t = i; break; end
    for (int i = 0; i < t; i++) if (e[i]) k++;
    return 1 + P + (N - t) + (t + 1) + (t + k) * P + P;
  endfunction

  task automatic modexp(big_t m, big_t x, big_t e);
    big_t got, exp_v;
    int   cycles;
    sw.operand(OP_M, m);
    sw.operand(OP_R, pow2mod(2 * N, m));
    sw.operand(OP_X, x);
    sw.operand(OP_E, e);
    sw.run(CMD_MODEXP, cycles);
    sw.result(got);
    exp_v = powmod(x, e, m);
    check(got == exp_v, $sformatf("X^E mod M mismatch\n  got=%h\n  exp=%h", got, exp_v));
    // the poll that sees done comes within one poll (2 cycles) of done rising
    check(cycles >= core_cycles(e) && cycles <= core_cycles(e) + 3,
          $sformatf("exponentiation took %0d cycles, core needs %0d", cycles, core_cycles(e)));
    $display("modexp: exponent of %0d bits, %0d cycles", $clog2(e + 1), cycles);
  endtask

  initial begin
    big_t m, x, r, got;
    int   cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    m = rand_modulus(N);
    x = rand_below(m, N);
    r = rand_below(m, N);
    sw.operand(OP_M, m);
    sw.operand(OP_X, x);
    sw.operand(OP_R, r);
    sw.run(CMD_MONMULT, cycles);
    sw.result(got);
    check(got < m && mulmod(got, pow2mod(N, m), m) == mulmod(x, r, m),
          "Montgomery product mismatch");

    modexp(m, x, big_t'(17));
    m = rand_modulus(N);
    modexp(m, rand_below(m, N), rand_bits(N));

    check(sw.busy_polls > 0, "status never showed busy");
    check(sw.wait_states == 0, "wait states on the co-processor window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
