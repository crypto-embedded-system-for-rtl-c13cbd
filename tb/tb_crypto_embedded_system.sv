// End-to-end testbench of crypto_embedded_system at its default parameters
// (512-bit co-processor, 256-word on-chip RAM).
//
// The testbench plays the processor software on the data-master port and
// runs the system's main jobs with a fixed 1024-bit RSA key (public exponent
// 17, primes p and q of 512 bits, generated offline):
//   1. encryption in software: C = M^17 mod n (reference arithmetic);
//   2. the ciphertext is received into on-chip RAM and read back from it;
//   3. decryption with the Chinese Remainder Theorem: the co-processor
//      computes C^dp mod p and C^dq mod q; software recombines them and the
//      plaintext must equal M; the plaintext is sent out byte by byte to the
//      UART transmit register;
//   4. signing of a random 1024-bit digest the same way, verified in
//      software with the public exponent;
//   5. a single Montgomery product command.
// Each private-key operation must fit the 111 ms (3,699,630 cycles at
// 33.33 MHz) the system is specified for. Mechanisms that must each occur at
// least once: on-chip RAM read stalls, co-processor busy polls, both
// co-processor commands, an operand write and a start ignored while busy,
// transfers routed to the UART, timer, external SRAM and external flash
// ports, and a decode error on an unmapped address.
module tb_crypto_embedded_system;
  import crypto_pkg::*;
  import tb_bignum_pkg::*;

  localparam int unsigned N = 512;
  localparam int unsigned P = N + 3;
  localparam int CYCLES_111MS = 3_699_630;

  // 1024-bit test key, e = 17
  localparam big_t KEY_P = big_t'(512'hf5959aaf57de62929baef7b68083c221893a8ee2a33f213314b5bdd4b6c91a1ec499254eb191ff890dcfccfe611938ce37682883c12d89312d39c3f04ec15a55);
  localparam big_t KEY_Q = big_t'(512'hf2e9d8697b585de31bd951e2a74f0cfcb3ef6e07373149e8164804b879f91e46f813ab6c26651d6a6ca33b4f8496ce28ed3229bbeebb9ea9a9a9a6231064d31d);
  localparam big_t KEY_DP = big_t'(512'h651f7bedd8e31987a98447e1bc727d1cde272bc6bbb0953326a5300c4b43bf7614b787d51bf0d2a1d882bdd227fb53a034eea7454f8b387da935e744d522707d);
  localparam big_t KEY_DQ = big_t'(512'h6405efb2f68dcc4e74e10399902f9bef956296b7ad5087d8092cb6a6505784f00bcbdd2c8847c0d17806fa4deb4d27b67fc95c7a8f7a6e8218af4468ca83de75);
  localparam big_t KEY_QINV = big_t'(512'h3003058628411c2060393b0c6386ddd54e360a24c631832d3a6d149ba4ea215e34493ac3fbe598f4e193bf6d30f34524d8b303bfd363a2f97f50f3a2ccbd42a3);
  localparam big_t KEY_E = big_t'(17);

  logic    clk = 1'b0, rst_n = 1'b0;
  av_req_t m_req;
  av_rsp_t m_rsp;
  av_req_t uart_req, timer_req, extram_req, flash_req;
  av_rsp_t uart_rsp, timer_rsp, extram_rsp, flash_rsp;
  logic    decode_error, rsa_busy, rsa_done;

  int checks = 0, failures = 0;

  crypto_embedded_system dut (.*);

  tb_rsa_sw #(.N(N), .BASE(RSA_BASE)) sw (.clk, .req(m_req), .rsp(m_rsp));

  tb_av_slave_model #(.WORDS(8),  .WAITS(0), .BYTE_LOG_OFFSET(4)) uart   (.clk, .req(uart_req),   .rsp(uart_rsp));
  tb_av_slave_model #(.WORDS(8),  .WAITS(0)) timer  (.clk, .req(timer_req),  .rsp(timer_rsp));
  tb_av_slave_model #(.WORDS(64), .WAITS(2)) extram (.clk, .req(extram_req), .rsp(extram_rsp));
  tb_av_slave_model #(.WORDS(64), .WAITS(3)) flash  (.clk, .req(flash_req),  .rsp(flash_rsp));

  always #5 clk = ~clk;

  // mechanism counters
  int n_ram_stall = 0, n_decode_err = 0, n_modexp = 0, n_monmult = 0;
  int n_ignored_write = 0, n_ignored_start = 0;
  always @(posedge clk) begin
    if (dut.u_onchip.avs_req.read && dut.u_onchip.avs_rsp.waitrequest) n_ram_stall++;
    if (decode_error) n_decode_err++;
    if (dut.u_rsa.u_if.avs_req.write && dut.u_rsa.u_if.word == RSA_REG_DATA && rsa_busy)
      n_ignored_write++;
    if (dut.u_rsa.u_if.avs_req.write && dut.u_rsa.u_if.word == RSA_REG_CTRL &&
        dut.u_rsa.u_if.avs_req.writedata[0] && rsa_busy)
      n_ignored_start++;
    if (dut.u_rsa.u_core.start && dut.u_rsa.u_core.state_q == dut.u_rsa.u_core.S_IDLE) begin
      if (dut.u_rsa.u_core.cmd == CMD_MODEXP) n_modexp++;
      else n_monmult++;
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
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

  // One 512-bit exponentiation on the co-processor, operands loaded as the
  // driver does; R = 2^1024 mod m is computed in software.
  task automatic hw_modexp(big_t x, big_t e, big_t m, output big_t y);
    int cycles;
    sw.operand(OP_M, m);
    sw.operand(OP_R, pow2mod(2 * N, m));
    sw.operand(OP_X, x);
    sw.operand(OP_E, e);
    sw.run(CMD_MODEXP, cycles);
    sw.result(y);
    check(cycles >= core_cycles(e) && cycles <= core_cycles(e) + 3,
          $sformatf("exponentiation took %0d cycles, core needs %0d", cycles, core_cycles(e)));
  endtask

  // 1024-bit private-key operation y = x^d mod n by CRT on two 512-bit
  // exponentiations; returns the cycles it took.
  task automatic crt_private(big_t x, output big_t y, output int cycles);
    big_t m1, m2, h, n;
    int   t0 = cyc;
    n = mulmod(KEY_P, KEY_Q, (big_t'(1) << 1030));
    hw_modexp(x % KEY_P, KEY_DP, KEY_P, m1);
    hw_modexp(x % KEY_Q, KEY_DQ, KEY_Q, m2);
    h = mulmod(KEY_QINV, addmod(m1, KEY_P - (m2 % KEY_P), KEY_P), KEY_P);
    y = m2 + mulmod(h, KEY_Q, n);
    cycles = cyc - t0;
  endtask

  initial begin
    big_t        n, msg, c, c_back, plain, digest, sig, x, r, got;
    logic [31:0] d, unused_d;
    int          cycles, waits, ram_stalls;
    bit          text_ok;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n = KEY_P * KEY_Q;
    check(n[1023] == 1'b1 && n < (big_t'(1) << 1024), "1024-bit modulus");

    // peripherals: timer and flash reads, SRAM write/read, through the bus
    sw.bfm.write(TIMER_BASE + 8, 32'h0000_1234);
    sw.bfm.read(TIMER_BASE + 8, d, waits);
    check(d == 32'h0000_1234, "timer register round trip");
    sw.bfm.read(FLASH_BASE + 32'h100, d, waits);
    check(d == 32'hC0DE_0000 && waits == 3, "flash read with 3 wait states");
    sw.bfm.write(EXTRAM_BASE + 32'h3FFFC, 32'hFEED_F00D);
    sw.bfm.read(EXTRAM_BASE + 32'h3FFFC, d, waits);
    check(d == 32'hFEED_F00D && waits == 2, "external SRAM round trip");
    sw.bfm.read(32'h0020_0000, unused_d, waits);     // unmapped

    // 1. encryption in software
    msg = rand_below(n, 1024);
    c   = powmod(msg, KEY_E, n);

    // 2. ciphertext through on-chip RAM
    for (int w = 0; w < 32; w++) sw.bfm.write(ONCHIP_BASE + 32'(w * 4), c[w*32 +: 32]);
    c_back = '0;
    ram_stalls = 0;
    for (int w = 0; w < 32; w++) begin
      sw.bfm.read(ONCHIP_BASE + 32'(w * 4), d, waits);
      c_back[w*32 +: 32] = d;
      ram_stalls += waits;
    end
    check(c_back == c, "ciphertext through on-chip RAM");
    check(ram_stalls == 32, "one wait state per on-chip RAM read");

    // 3. CRT decryption
    crt_private(c_back, plain, cycles);
    check(plain == msg, $sformatf("decryption\n  got=%h\n  exp=%h", plain, msg));
    check(cycles <= CYCLES_111MS, $sformatf("decryption took %0d cycles", cycles));
    $display("decryption (CRT, 2 x 512-bit exponentiations): %0d cycles = %0d us at 33.33 MHz",
             cycles, cycles * 3 / 100);
    for (int b = 0; b < 128; b++)
      sw.bfm.write(UART_BASE + 4, {24'd0, plain[b*8 +: 8]}, 4'b0001);
    text_ok = (uart.log_q.size() == 128);
    if (text_ok) for (int b = 0; b < 128; b++) if (uart.log_q[b] != plain[b*8 +: 8]) text_ok = 0;
    check(text_ok, "plaintext bytes at the UART");

    // 4. signing and software verification
    digest = rand_below(n, 1024);
    crt_private(digest, sig, cycles);
    check(powmod(sig, KEY_E, n) == digest, "signature does not verify");
    check(cycles <= CYCLES_111MS, $sformatf("signing took %0d cycles", cycles));

    // 5. Montgomery product command; a start and an operand write while busy
    x = rand_below(KEY_P, 512);
    r = rand_below(KEY_P, 512);
    sw.operand(OP_M, KEY_P);
    sw.operand(OP_X, x);
    sw.operand(OP_R, r);
    sw.bfm.write(RSA_BASE + 4 * RSA_REG_CTRL, {30'd0, CMD_MONMULT, 1'b1});
    sw.bfm.write(RSA_BASE + 4 * RSA_REG_CTRL, {30'd0, CMD_MODEXP, 1'b1});   // ignored
    sw.bfm.write(RSA_BASE + 4 * RSA_REG_SEL, 32'(OP_X));
    sw.bfm.write(RSA_BASE + 4 * RSA_REG_DATA, 32'hFFFF_FFFF);                // ignored
    do sw.status(d); while (!d[1] || d[0]);
    sw.result(got);
    check(mulmod(got, pow2mod(N, KEY_P), KEY_P) == mulmod(x, r, KEY_P), "Montgomery product");

    // mechanisms
    check(n_ram_stall > 0,      "on-chip RAM stall never happened");
    check(sw.busy_polls > 0,    "busy poll never happened");
    check(n_modexp == 4,        $sformatf("%0d exponentiations started", n_modexp));
    check(n_monmult == 1,       "Montgomery product command");
    check(n_ignored_write > 0,  "operand write while busy never happened");
    check(n_ignored_start > 0,  "start while busy never happened");
    check(n_decode_err > 0,     "decode error never happened");
    check(uart.writes > 0 && timer.reads > 0 && timer.writes > 0 &&
          extram.reads > 0 && extram.writes > 0 && flash.reads > 0, "peripheral port unused");
    $display("mechanisms: ram_stall=%0d busy_polls=%0d modexp=%0d monmult=%0d ignored_write=%0d ignored_start=%0d decode_error=%0d uart_writes=%0d",
             n_ram_stall, sw.busy_polls, n_modexp, n_monmult, n_ignored_write, n_ignored_start,
             n_decode_err, uart.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
