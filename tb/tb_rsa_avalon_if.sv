// Self-checking testbench of rsa_avalon_if on its own.
//
// A small model of the core side (operand store, result words, busy/done)
// sits behind the interface. The test checks, through Avalon transfers:
// operand words land in the selected operand at auto-incrementing indices,
// writing SEL rewinds the indices, the result port returns successive words,
// STATUS reflects busy/done, CTRL starts the core with the right command
// exactly once, starts and operand writes are ignored while busy, reserved
// offsets read 0, and no transfer has a wait state.
module tb_rsa_avalon_if;
  import crypto_pkg::*;

  localparam int unsigned N  = 128;
  localparam int unsigned NW = N / 32;
  localparam int unsigned IW = $clog2(NW);

  logic          clk = 1'b0, rst_n = 1'b0;
  av_req_t       avs_req;
  av_rsp_t       avs_rsp;
  logic          core_wr_en, core_start;
  rsa_operand_e  core_wr_sel;
  logic [IW-1:0] core_wr_idx, core_rd_idx;
  logic [31:0]   core_wr_data, core_rd_data;
  rsa_cmd_e      core_cmd;
  logic          core_busy = 1'b0, core_done = 1'b0;

  int checks = 0, failures = 0;

  rsa_avalon_if #(.N(N)) dut (.*);
  tb_av_master bfm (.clk, .req(avs_req), .rsp(avs_rsp));

  always #5 clk = ~clk;

  // core model: operand store and a result whose word w is 32'hA000_0000 + w
  logic [31:0] store [4][NW];
  int          starts = 0;
  rsa_cmd_e    last_cmd;
  always @(posedge clk) begin
    if (core_wr_en) store[core_wr_sel][core_wr_idx] <= core_wr_data;
    if (core_start) begin starts <= starts + 1; last_cmd <= core_cmd; end
  end
  assign core_rd_data = 32'hA000_0000 + 32'(core_rd_idx);

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

  function automatic logic [31:0] reg_addr(logic [3:0] word);
    return {26'd0, word, 2'b00};
  endfunction

  task automatic rd(logic [3:0] word, output logic [31:0] d);
    int waits;
    bfm.read(reg_addr(word), d, waits);
    check(waits == 0, "wait state on the RSA window");
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // load all four operands
    for (int op = 0; op < 4; op++) begin
      bfm.write(reg_addr(RSA_REG_SEL), 32'(op));
      for (int w = 0; w < NW; w++) bfm.write(reg_addr(RSA_REG_DATA), 32'(op * 256 + w + 1));
    end
    for (int op = 0; op < 4; op++)
      for (int w = 0; w < NW; w++)
        check(store[op][w] == 32'(op * 256 + w + 1), $sformatf("operand %0d word %0d", op, w));

    // SEL readback: index wrapped to 0 after NW words of operand X
    rd(RSA_REG_SEL, d);
    check(d[1:0] == 2'(OP_X) && d[11:8] == 0 && d[19:16] == 0, $sformatf("SEL readback %h", d));

    // rewinding in the middle of an operand
    bfm.write(reg_addr(RSA_REG_SEL), 32'(OP_E));
    bfm.write(reg_addr(RSA_REG_DATA), 32'h1111_1111);
    rd(RSA_REG_SEL, d);
    check(d[11:8] == 1, "write index advanced");
    bfm.write(reg_addr(RSA_REG_SEL), 32'(OP_E));
    bfm.write(reg_addr(RSA_REG_DATA), 32'h2222_2222);
    check(store[OP_E][0] == 32'h2222_2222, "SEL rewinds the write index");

    // start a Montgomery product
    bfm.write(reg_addr(RSA_REG_CTRL), 32'h3);
    check(starts == 1 && last_cmd == CMD_MONMULT, "start with CMD_MONMULT");
    rd(RSA_REG_CTRL, d);
    check(d[1] == 1'b1, "CTRL reads back the command");
    // CTRL write without bit0 does not start
    bfm.write(reg_addr(RSA_REG_CTRL), 32'h2);
    check(starts == 1, "CTRL write without start bit");

    // busy: status, ignored start and ignored operand write
    core_busy = 1'b1;
    rd(RSA_REG_STATUS, d);
    check(d[1:0] == 2'b01, "STATUS busy");
    bfm.write(reg_addr(RSA_REG_CTRL), 32'h1);
    check(starts == 1, "start ignored while busy");
    bfm.write(reg_addr(RSA_REG_SEL), 32'(OP_M));
    bfm.write(reg_addr(RSA_REG_DATA), 32'hDEAD_BEEF);
    check(store[OP_M][0] == 32'(0 * 256 + 1), "operand write ignored while busy");
    core_busy = 1'b0;
    core_done = 1'b1;
    rd(RSA_REG_STATUS, d);
    check(d[1:0] == 2'b10, "STATUS done");

    // a modular exponentiation start
    bfm.write(reg_addr(RSA_REG_CTRL), 32'h1);
    check(starts == 2 && last_cmd == CMD_MODEXP, "start with CMD_MODEXP");

    // result words in order, then wrap
    bfm.write(reg_addr(RSA_REG_SEL), 32'(OP_M));
    for (int w = 0; w < NW + 1; w++) begin
      rd(RSA_REG_RESULT, d);
      check(d == 32'hA000_0000 + 32'(w % NW), $sformatf("result word %0d = %h", w, d));
    end

    // reserved offsets
    for (int w = 5; w < 16; w++) begin
      rd(4'(w), d);
      check(d == 0, "reserved offset reads 0");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
