// Behavioural Avalon slave for the testbenches: a WORDS x 32-bit register
// file with byte enables that stalls every transfer for WAITS cycles.
// It stands in for the vendor and off-chip slaves of the system (UART, timer,
// external SRAM, external flash). Byte writes to offset BYTE_LOG_OFFSET are
// also appended to a byte log, modelling a transmit-data register.
module tb_av_slave_model
  import crypto_pkg::*;
#(
  parameter int unsigned WORDS           = 16,
  parameter int unsigned WAITS           = 0,
  parameter int unsigned BYTE_LOG_OFFSET = 32'hFFFF_FFFF
) (
  input  logic    clk,
  input  av_req_t req,
  output av_rsp_t rsp
);

  logic [31:0] mem [WORDS];
  int          stall = 0;
  int          reads = 0, writes = 0;
  byte         log_q [$];

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hC0DE_0000 + 32'(i);

  always_comb begin
    rsp.waitrequest = (req.read || req.write) && stall < int'(WAITS);
    rsp.readdata    = mem[(req.address >> 2) % WORDS];
  end

  always @(posedge clk) begin
    if (req.read || req.write) begin
      if (stall < int'(WAITS)) stall <= stall + 1;
      else begin
        stall <= 0;
        if (req.read) reads <= reads + 1;
        if (req.write) begin
          writes <= writes + 1;
          for (int b = 0; b < 4; b++)
            if (req.byteenable[b]) mem[(req.address >> 2) % WORDS][b*8 +: 8] <= req.writedata[b*8 +: 8];
          if (req.address == BYTE_LOG_OFFSET) log_q.push_back(req.writedata[7:0]);
        end
      end
    end
  end

endmodule
