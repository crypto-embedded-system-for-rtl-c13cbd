// Processor-side driver model of the RSA co-processor, for the testbenches.
//
// Plays the role of the processor's co-processor driver: it owns an Avalon
// master (tb_av_master) and offers one task per driver call, each a sequence
// of 32-bit Avalon transfers to the co-processor window at BASE:
//   operand(sel, v)   select operand M/E/R/X and write its N/32 words
//   run(cmd, cycles)  start a command, poll STATUS until done; returns the
//                     clock cycles from the start write to the done poll
//   result(v)         rewind and read the N/32 result words
// It counts status polls that found the co-processor busy.
module tb_rsa_sw
  import crypto_pkg::*;
  import tb_bignum_pkg::*;
#(
  parameter int unsigned N    = 512,
  parameter logic [31:0] BASE = 32'h0
) (
  input  logic    clk,
  output av_req_t req,
  input  av_rsp_t rsp
);

  localparam int unsigned NW = N / 32;

  tb_av_master bfm (.clk, .req, .rsp);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int busy_polls = 0;
  int wait_states = 0;

  function automatic logic [31:0] reg_addr(logic [3:0] word);
    return BASE + {26'd0, word, 2'b00};
  endfunction

  task automatic operand(rsa_operand_e sel, big_t v);
    bfm.write(reg_addr(RSA_REG_SEL), 32'(sel));
    for (int w = 0; w < NW; w++) bfm.write(reg_addr(RSA_REG_DATA), v[w*32 +: 32]);
  endtask

  task automatic status(output logic [31:0] s);
    int waits;
    bfm.read(reg_addr(RSA_REG_STATUS), s, waits);
    wait_states += waits;
  endtask

  task automatic run(rsa_cmd_e cmd, output int cycles);
    logic [31:0] s;
    int          t0;
    bfm.write(reg_addr(RSA_REG_CTRL), {30'd0, cmd, 1'b1});
    t0 = cyc;
    forever begin
      status(s);
      if (s[1] && !s[0]) break;
      busy_polls++;
    end
    cycles = cyc - t0;
  endtask

  task automatic result(output big_t v);
    logic [31:0] d;
    int          waits;
    v = '0;
    bfm.write(reg_addr(RSA_REG_SEL), 32'(OP_M));
    for (int w = 0; w < NW; w++) begin
      bfm.read(reg_addr(RSA_REG_RESULT), d, waits);
      wait_states += waits;
      v[w*32 +: 32] = d;
    end
  endtask

endmodule
