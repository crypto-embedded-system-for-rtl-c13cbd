// RSA co-processor: the Avalon slave interface in front of the RSA core.
//
// The processor loads the 512-bit operands M, E, R and X through the
// co-processor's 16-word Avalon window, starts a modular exponentiation or a
// single Montgomery product, polls the status word and reads the result back
// (see rsa_avalon_if for the register map and rsa_core for the operation and
// its cycle count). A 1024-bit private-key operation is run by the processor
// as two 512-bit exponentiations, one per prime, recombined with the Chinese
// Remainder Theorem in software.
//
// Interface: one Avalon slave port (av_req_t / av_rsp_t from crypto_pkg,
// address = byte offset in the window), plus busy/done for observation.
// The split into an Avalon interface and an RSA core follows the system's
// architecture; everything inside is this design's own.
module rsa_coprocessor
  import crypto_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t avs_req,
  output av_rsp_t avs_rsp,
  output logic    busy,
  output logic    done
);

  localparam int unsigned IW = $clog2(N / 32);

  logic          wr_en, start;
  rsa_operand_e  wr_sel;
  logic [IW-1:0] wr_idx, rd_idx;
  logic [31:0]   wr_data, rd_data;
  rsa_cmd_e      cmd;

  rsa_avalon_if #(.N(N)) u_if (
    .clk, .rst_n,
    .avs_req,
    .avs_rsp,
    .core_wr_en  (wr_en),
    .core_wr_sel (wr_sel),
    .core_wr_idx (wr_idx),
    .core_wr_data(wr_data),
    .core_rd_idx (rd_idx),
    .core_rd_data(rd_data),
    .core_start  (start),
    .core_cmd    (cmd),
    .core_busy   (busy),
    .core_done   (done)
  );

  rsa_core #(.N(N)) u_core (
    .clk, .rst_n,
    .wr_en,
    .wr_sel,
    .wr_idx,
    .wr_data,
    .rd_idx,
    .rd_data,
    .start,
    .cmd,
    .busy,
    .done
  );

endmodule
