// Self-checking testbench of avalon_bus.
//
// Each of the six slave ports is served by a small responder that answers
// reads with a tag of its slave number and the offset it was given, and
// stalls with a slave-specific number of wait states. For addresses at the
// first and last byte of every window (and just outside), the test checks
// that exactly the right slave is selected, that it receives the rebased
// offset and the write data, that the master sees that slave's read data and
// wait states, and that unmapped addresses raise decode_error and read 0.
module tb_avalon_bus;
  import crypto_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  av_req_t m_req;
  av_rsp_t m_rsp;
  av_req_t s_req [NUM_SLAVES];
  av_rsp_t s_rsp [NUM_SLAVES];
  logic    decode_error;

  int checks = 0, failures = 0;

  avalon_bus dut (.*);
  tb_av_master bfm (.clk, .req(m_req), .rsp(m_rsp));

  always #5 clk = ~clk;

  // responders: slave i stalls i cycles, then answers {i, offset[23:0]}
  int          stall  [NUM_SLAVES];
  int          nwrite [NUM_SLAVES];
  logic [31:0] last_wdata [NUM_SLAVES];
  logic [31:0] last_addr  [NUM_SLAVES];
  for (genvar i = 0; i < NUM_SLAVES; i++) begin : g_resp
    initial begin stall[i] = 0; nwrite[i] = 0; end
    always_comb begin
      s_rsp[i].waitrequest = (s_req[i].read || s_req[i].write) && stall[i] < i;
      s_rsp[i].readdata    = {8'(i), s_req[i].address[23:0]};
    end
    always @(posedge clk) begin
      if (s_req[i].read || s_req[i].write) begin
        if (stall[i] < i) stall[i] <= stall[i] + 1;
        else begin
          stall[i] <= 0;
          if (s_req[i].write) begin
            nwrite[i]     <= nwrite[i] + 1;
            last_wdata[i] <= s_req[i].writedata;
            last_addr[i]  <= s_req[i].address;
          end
        end
      end
    end
  end

  // decode errors seen by the master
  int nerr = 0;
  always @(posedge clk) if (decode_error) nerr <= nerr + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic probe(logic [31:0] addr, int exp_slave);
    logic [31:0] d, off;
    int          waits, nerr0, nw0;
    off   = (exp_slave >= 0) ? addr - SLAVE_BASE[exp_slave] : 0;
    nerr0 = nerr;
    bfm.read(addr, d, waits);
    if (exp_slave >= 0) begin
      check(d == {8'(exp_slave), off[23:0]}, $sformatf("read %h got %h", addr, d));
      check(waits == exp_slave, $sformatf("read %h had %0d wait states", addr, waits));
      nw0 = nwrite[exp_slave];
      bfm.write(addr, addr ^ 32'h5A5A_5A5A);
      @(negedge clk);
      check(nwrite[exp_slave] == nw0 + 1 && last_wdata[exp_slave] == (addr ^ 32'h5A5A_5A5A)
            && last_addr[exp_slave] == off, $sformatf("write %h not delivered", addr));
      check(nerr == nerr0, "decode_error on a mapped address");
    end else begin
      check(d == 0 && waits == 0, $sformatf("unmapped read %h got %h", addr, d));
      bfm.write(addr, 32'h1234_5678);
      @(negedge clk);
      check(nerr == nerr0 + 2, $sformatf("decode_error missing for %h", addr));
    end
  endtask

  initial begin
    int total_writes;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      probe(SLAVE_BASE[i], i);
      probe(SLAVE_BASE[i] + SLAVE_SPAN[i] - 4, i);
      probe(SLAVE_BASE[i] + (SLAVE_SPAN[i] / 2 & ~32'h3), i);
    end
    probe(32'h0000_0420, -1);           // between UART and timer
    probe(32'h0000_0460, -1);           // after the timer
    probe(32'h0008_0000, -1);           // just after the external SRAM
    probe(32'h0090_08FC, -1);           // just before the RSA window
    probe(32'h0090_0940, -1);           // just after the RSA window
    probe(32'hFFFF_FFFC, -1);
    total_writes = 0;
    for (int i = 0; i < NUM_SLAVES; i++) total_writes += nwrite[i];
    check(total_writes == 3 * NUM_SLAVES, "a write reached more than one slave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
