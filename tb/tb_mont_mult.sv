// Self-checking testbench of mont_mult at its full 512-bit width.
//
// For random odd 512-bit moduli M and operands A, B < M (plus the corner
// cases A = 0, B = 1 and A = B = M-1) it checks that the product P is below M
// and that P * 2^512 = A * B (mod M), both sides computed by the reference
// shift-and-add arithmetic. It also checks that every product takes exactly
// N+1 clock edges from the start edge to done, and that busy is high in
// between.
module tb_mont_mult;
  import tb_bignum_pkg::*;

  localparam int unsigned N = 512;
  localparam int unsigned NCASES = 24;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0, m = '0;
  logic         busy, done;
  logic [N-1:0] result;

  int checks = 0, failures = 0;

  mont_mult #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCASES * (N + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_case(big_t mm, big_t aa, big_t bb);
    int   edges = 0;
    bit   busy_ok = 1;
    big_t r2n, lhs, rhs;
    @(negedge clk);
    m = mm[N-1:0]; a = aa[N-1:0]; b = bb[N-1:0];
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    do begin
      @(posedge clk);
      #1 edges++;
      if (!done && !busy) busy_ok = 0;
    end while (!done && edges < N + 10);
    check(edges == N + 1, $sformatf("latency %0d edges, expected %0d", edges, N + 1));
    check(busy_ok, "busy low during a product");
    check(!busy, "busy high together with done");
    r2n = pow2mod(N, mm);
    lhs = mulmod(big_t'(result) % mm, r2n, mm);
    rhs = mulmod(aa, bb, mm);
    check(big_t'(result) < mm, "result not reduced below M");
    check(lhs == rhs, $sformatf("P*2^N != A*B mod M\n  A=%h\n  B=%h\n  M=%h\n  P=%h",
                                aa[N-1:0], bb[N-1:0], mm[N-1:0], result));
  endtask

  initial begin
    big_t mm, aa, bb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!busy && !done, "idle after reset");
    for (int i = 0; i < NCASES; i++) begin
      mm = rand_modulus(N - (i % 3));       // also moduli below 2^(N-1)
      aa = rand_below(mm, N);
      bb = rand_below(mm, N);
      if (i == 0) aa = '0;
      if (i == 1) bb = big_t'(1);
      if (i == 2) begin aa = mm - 1; bb = mm - 1; end
      run_case(mm, aa, bb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
