// On-chip RAM on the Avalon bus.
//
// A WORDS x 32-bit synchronous RAM with byte enables, so byte, half-word and
// word transfers all work. Writes complete in the cycle they are presented
// (no wait state). A read takes one wait state: in its first cycle the word
// is fetched into a register and waitrequest is high; in the second cycle
// waitrequest is low and readdata holds the word.
//
// The system has an on-chip memory but its size and place in the map are not
// published. This RAM fills the 1 KiB (256-word) gap below the UART at
// 0x00000400; size, timing and byte-enable behaviour are this design's own.
// Contents are not initialised.
module onchip_mem
  import crypto_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t avs_req,
  output av_rsp_t avs_rsp
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [31:0]   rdata_q;
  logic          rvalid_q;
  logic [AW-1:0] widx;

  assign widx = avs_req.address[AW+1:2];

  always_ff @(posedge clk) begin
    if (avs_req.write) begin
      for (int b = 0; b < 4; b++)
        if (avs_req.byteenable[b]) mem[widx][b*8 +: 8] <= avs_req.writedata[b*8 +: 8];
    end
    rdata_q <= mem[widx];
  end

  // rvalid_q marks the second cycle of a read, when rdata_q holds the word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid_q <= 1'b0;
    else        rvalid_q <= avs_req.read && !rvalid_q;
  end

  always_comb begin
    avs_rsp.waitrequest = avs_req.read && !rvalid_q;
    avs_rsp.readdata    = rvalid_q ? rdata_q : '0;
  end

endmodule
