// Self-checking testbench of rsa_core.
//
// Runs the core at a reduced width (N = 128, to keep long exponents quick)
// through:
//   - single Montgomery products (CMD_MONMULT), checked as P*2^N = X*R mod M;
//   - modular exponentiations (CMD_MODEXP) with random and corner-case
//     exponents (0, 1, 17, all ones, random), checked against the reference
//     square-and-multiply, with R = 2^(2N) mod M loaded as the processor
//     would;
//   - the exact cycle count of each operation against the formula in the
//     header of rsa_core;
//   - operand writes attempted while busy, which must not change the result.
module tb_rsa_core;
  import crypto_pkg::*;
  import tb_bignum_pkg::*;

  localparam int unsigned N  = 128;
  localparam int unsigned NW = N / 32;
  localparam int unsigned IW = $clog2(NW);
  localparam int unsigned P  = N + 3;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0;
  rsa_operand_e  wr_sel = OP_M;
  logic [IW-1:0] wr_idx = '0, rd_idx = '0;
  logic [31:0]   wr_data = '0, rd_data;
  logic          start = 1'b0;
  rsa_cmd_e      cmd = CMD_MODEXP;
  logic          busy, done;

  int checks = 0, failures = 0;

  rsa_core #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(rsa_operand_e sel, big_t v);
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_sel = sel; wr_idx = IW'(w); wr_data = v[w*32 +: 32];
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic read_result(output big_t v);
    v = '0;
    for (int w = 0; w < NW; w++) begin
      rd_idx = IW'(w);
      #1 v[w*32 +: 32] = rd_data;
    end
  endtask

  // Starts cmd, optionally scribbles over the operands while busy, and
  // returns the clock edges from the start edge until done reads high.
  task automatic run(rsa_cmd_e c, bit scribble, output int edges);
    int t0;
    @(negedge clk);
    cmd = c; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    t0 = cyc;
    if (scribble) begin
      check(busy, "busy after start");
      load(OP_X, '1);
      load(OP_E, '0);
    end
    while (!done) begin
      @(posedge clk);
      #1;
    end
    edges = cyc - t0;
  endtask

  function automatic int expected_modexp(big_t e);
    int t = -1, k = 0;
    for (int i = N - 1; i >= 0; i--) if (e[i]) begin t = i; break; end
    if (t < 0) return 1 + P + (N + 1) + P + P;
    for (int i = 0; i < t; i++) if (e[i]) k++;
    return 1 + P + (N - t) + (t + 1) + (t + k) * P + P;
  endfunction

  task automatic test_modexp(big_t m, big_t x, big_t e, bit scribble);
    int   edges;
    big_t got, exp_v;
    load(OP_M, m);
    load(OP_R, pow2mod(2 * N, m));
    load(OP_X, x);
    load(OP_E, e);
    run(CMD_MODEXP, scribble, edges);
    read_result(got);
    exp_v = powmod(x, e, m);
    check(got == exp_v, $sformatf("modexp mismatch\n  M=%h X=%h E=%h\n  got=%h\n  exp=%h",
                                  m, x, e, got, exp_v));
    check(edges == expected_modexp(e),
          $sformatf("modexp took %0d edges, expected %0d", edges, expected_modexp(e)));
  endtask

  initial begin
    big_t m, x, r, e, got;
    int   edges;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!busy && !done, "idle after reset");

    // single Montgomery products
    for (int i = 0; i < 6; i++) begin
      m = rand_modulus(N);
      x = rand_below(m, N);
      r = rand_below(m, N);
      load(OP_M, m); load(OP_X, x); load(OP_R, r);
      run(CMD_MONMULT, 1'b0, edges);
      read_result(got);
      check(got < m && mulmod(got, pow2mod(N, m), m) == mulmod(x, r, m),
            "Montgomery product mismatch");
      check(edges == 1 + P, $sformatf("monmult took %0d edges, expected %0d", edges, 1 + P));
    end

    // modular exponentiation: corner-case and random exponents
    m = rand_modulus(N);
    x = rand_below(m, N);
    test_modexp(m, x, '0, 1'b0);
    test_modexp(m, x, big_t'(1), 1'b0);
    test_modexp(m, x, big_t'(17), 1'b0);
    test_modexp(m, x, (big_t'(1) << N) - 1, 1'b0);
    test_modexp(m, '0, big_t'(5), 1'b0);
    for (int i = 0; i < 6; i++) begin
      m = rand_modulus(N - (i % 2));
      x = rand_below(m, N);
      e = rand_below((big_t'(1) << N), N);
      test_modexp(m, x, e, i == 0);     // first one also writes while busy
    end
    check(done, "done stays set after the operation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
