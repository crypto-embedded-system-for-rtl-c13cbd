// Self-checking testbench of onchip_mem.
//
// Fills the RAM with random words, overwrites random bytes and half-words
// through byteenable, and reads everything back against a model array.
// Checks that every read has exactly one wait state and every write none.
module tb_onchip_mem;
  import crypto_pkg::*;

  localparam int unsigned WORDS = 256;

  logic    clk = 1'b0, rst_n = 1'b0;
  av_req_t avs_req;
  av_rsp_t avs_rsp;

  int checks = 0, failures = 0;

  onchip_mem #(.WORDS(WORDS)) dut (.*);
  tb_av_master bfm (.clk, .req(avs_req), .rsp(avs_rsp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] model [WORDS];

  initial begin
    logic [31:0] d, v;
    logic [3:0]  be;
    int          waits, w, kind;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      bfm.write(32'(i * 4), model[i]);
    end
    // byte and half-word writes
    for (int i = 0; i < 200; i++) begin
      w  = $urandom_range(WORDS - 1);
      v  = $urandom;
      kind = $urandom_range(3);
      unique case (kind)
        0: be = 4'b0001 << $urandom_range(3);
        1: be = ($urandom_range(1) == 0) ? 4'b0011 : 4'b1100;
        2: be = 4'b1111;
        default: be = 4'(1 + $urandom_range(14));
      endcase
      bfm.write(32'(w * 4), v, be);
      for (int b = 0; b < 4; b++) if (be[b]) model[w][b*8 +: 8] = v[b*8 +: 8];
    end
    for (int i = 0; i < WORDS; i++) begin
      bfm.read(32'(i * 4), d, waits);
      check(d == model[i], $sformatf("word %0d read %h expected %h", i, d, model[i]));
      check(waits == 1, $sformatf("read had %0d wait states", waits));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
