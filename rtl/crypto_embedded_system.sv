// Crypto embedded system: RSA co-processor on an Avalon system bus.
//
// The system speeds up 1024-bit RSA private-key operations (decryption and
// signing) on a small FPGA. A 32-bit processor runs the control-heavy parts
// in software: public-key encryption/verification, SHA-1, splitting a
// 1024-bit private-key operation into two 512-bit exponentiations by the
// Chinese Remainder Theorem and recombining them, and the host-link driver.
// The 512-bit modular exponentiations run on the RSA co-processor.
//
// This module is the hardware around the processor: the Avalon bus, the RSA
// co-processor at 0x00900900 and an on-chip RAM at 0x00000000. The processor
// is not part of it: its data master enters on m_req/m_rsp. The UART
// (0x00000400), timer (0x00000440), external SRAM (0x00040000, 256 KiB) and
// external flash (0x00100000, 1 MiB) are vendor or off-chip parts; their
// Avalon slave ports are brought out as *_req/*_rsp, with the address already
// rebased to the offset inside their window.
//
// Interface: all ports use av_req_t/av_rsp_t of crypto_pkg. decode_error
// flags a transfer to an unmapped address (it completes at once, reads 0).
// rsa_busy/rsa_done mirror the co-processor status word.
// Timing: see avalon_bus (combinational), onchip_mem (one read wait state),
// rsa_avalon_if (no wait states) and rsa_core (cycle count per operation).
module crypto_embedded_system
  import crypto_pkg::*;
#(
  parameter int unsigned RSA_WIDTH    = 512,
  parameter int unsigned ONCHIP_WORDS = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  // processor data master
  input  av_req_t m_req,
  output av_rsp_t m_rsp,
  // vendor / off-chip slaves
  output av_req_t uart_req,
  input  av_rsp_t uart_rsp,
  output av_req_t timer_req,
  input  av_rsp_t timer_rsp,
  output av_req_t extram_req,
  input  av_rsp_t extram_rsp,
  output av_req_t flash_req,
  input  av_rsp_t flash_rsp,
  // status
  output logic    decode_error,
  output logic    rsa_busy,
  output logic    rsa_done
);

  av_req_t s_req [NUM_SLAVES];
  av_rsp_t s_rsp [NUM_SLAVES];

  avalon_bus u_bus (
    .clk, .rst_n,
    .m_req,
    .m_rsp,
    .s_req,
    .s_rsp,
    .decode_error
  );

  onchip_mem #(.WORDS(ONCHIP_WORDS)) u_onchip (
    .clk, .rst_n,
    .avs_req(s_req[SLV_ONCHIP]),
    .avs_rsp(s_rsp[SLV_ONCHIP])
  );

  rsa_coprocessor #(.N(RSA_WIDTH)) u_rsa (
    .clk, .rst_n,
    .avs_req(s_req[SLV_RSA]),
    .avs_rsp(s_rsp[SLV_RSA]),
    .busy   (rsa_busy),
    .done   (rsa_done)
  );

  assign uart_req           = s_req[SLV_UART];
  assign s_rsp[SLV_UART]    = uart_rsp;
  assign timer_req          = s_req[SLV_TIMER];
  assign s_rsp[SLV_TIMER]   = timer_rsp;
  assign extram_req         = s_req[SLV_EXTRAM];
  assign s_rsp[SLV_EXTRAM]  = extram_rsp;
  assign flash_req          = s_req[SLV_FLASH];
  assign s_rsp[SLV_FLASH]   = flash_rsp;

endmodule
