// Avalon slave interface of the RSA co-processor.
//
// The co-processor occupies a 64-byte window (16 words) of the system address
// map, at 0x00900900..0x0090093F. A 512-bit operand is as large as the whole
// window, so operands and the result are moved through data ports rather
// than mapped flat. Word offsets in the window:
//   0 CTRL    W: bit0 = 1 starts an operation, bit1 = command
//                (0 modular exponentiation, 1 Montgomery product)
//             R: bit1 = last command
//   1 STATUS  R: bit0 busy, bit1 done (done stays set until the next start)
//   2 SEL     W: bits1:0 select operand M, E, R or X (0..3) and rewind the
//                operand-write and result-read word indices to 0
//             R: bits1:0 selection, bits11:8 write index, bits19:16 read index
//   3 DATA    W: next 32-bit word of the selected operand, least significant
//                word first; the write index advances (ignored while busy)
//   4 RESULT  R: next 32-bit word of the result, least significant first;
//                each read advances the read index
//   other offsets read as 0 and ignore writes.
// Transfers complete with no wait states: waitrequest is always low and
// readdata is combinational from the registers. byteenable is ignored; the
// processor driver is expected to use 32-bit transfers on this window.
//
// The window base and size follow the system configuration; the register
// layout itself is this design's choice.
module rsa_avalon_if
  import crypto_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Avalon slave port (address is the byte offset in the window)
  input  av_req_t                 avs_req,
  output av_rsp_t                 avs_rsp,
  // RSA core side
  output logic                    core_wr_en,
  output rsa_operand_e            core_wr_sel,
  output logic [$clog2(N/32)-1:0] core_wr_idx,
  output logic [31:0]             core_wr_data,
  output logic [$clog2(N/32)-1:0] core_rd_idx,
  input  logic [31:0]             core_rd_data,
  output logic                    core_start,
  output rsa_cmd_e                core_cmd,
  input  logic                    core_busy,
  input  logic                    core_done
);

  localparam int unsigned IW = $clog2(N / 32);

  rsa_operand_e   sel_q;
  logic [IW-1:0]  widx_q, ridx_q;
  rsa_cmd_e       cmd_q;
  logic [3:0]     word;

  assign word = avs_req.address[5:2];

  logic wr_ctrl, wr_sel, wr_data, rd_result;
  always_comb begin
    wr_ctrl   = avs_req.write && (word == RSA_REG_CTRL);
    wr_sel    = avs_req.write && (word == RSA_REG_SEL);
    wr_data   = avs_req.write && (word == RSA_REG_DATA) && !core_busy;
    rd_result = avs_req.read  && (word == RSA_REG_RESULT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= OP_M;
      widx_q <= '0;
      ridx_q <= '0;
      cmd_q  <= CMD_MODEXP;
    end else begin
      if (wr_ctrl && avs_req.writedata[0] && !core_busy)
        cmd_q <= rsa_cmd_e'(avs_req.writedata[1]);
      if (wr_sel) begin
        sel_q  <= rsa_operand_e'(avs_req.writedata[1:0]);
        widx_q <= '0;
        ridx_q <= '0;
      end else begin
        if (wr_data)   widx_q <= widx_q + 1'b1;
        if (rd_result) ridx_q <= ridx_q + 1'b1;
      end
    end
  end

  always_comb begin
    core_wr_en   = wr_data;
    core_wr_sel  = sel_q;
    core_wr_idx  = widx_q;
    core_wr_data = avs_req.writedata;
    core_rd_idx  = ridx_q;
    core_start   = wr_ctrl && avs_req.writedata[0] && !core_busy;
    core_cmd     = rsa_cmd_e'(avs_req.writedata[1]);
  end

  always_comb begin
    avs_rsp.waitrequest = 1'b0;
    avs_rsp.readdata    = '0;
    if (avs_req.read) begin
      unique case (word)
        RSA_REG_CTRL:   avs_rsp.readdata = {30'd0, cmd_q, 1'b0};
        RSA_REG_STATUS: avs_rsp.readdata = {30'd0, core_done, core_busy};
        RSA_REG_SEL:    avs_rsp.readdata = {12'd0, 4'(ridx_q), 4'd0, 4'(widx_q), 6'd0, sel_q};
        RSA_REG_RESULT: avs_rsp.readdata = core_rd_data;
        default:        avs_rsp.readdata = '0;
      endcase
    end
  end

  // Avalon rule: a master never reads and writes in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(avs_req.read && avs_req.write));

endmodule
