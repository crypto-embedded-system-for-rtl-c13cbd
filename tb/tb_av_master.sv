// Avalon master bus-functional model for the testbenches.
//
// Drives one transfer at a time on an av_req_t port: the request is set up
// after a falling edge, held while waitrequest is high, and the transfer
// completes at the next rising edge once waitrequest is low (readdata is
// taken just before that edge). Between transfers read and write are low.
// The tasks return the number of wait states seen, so testbenches can check
// a slave's timing.
module tb_av_master
  import crypto_pkg::*;
(
  input  logic    clk,
  output av_req_t req,
  input  av_rsp_t rsp
);

  initial req = '0;

  task automatic xfer(input logic is_write, input logic [31:0] addr, input logic [31:0] wdata,
                      input logic [3:0] be, output logic [31:0] rdata, output int waits);
    @(negedge clk);
    req.address    = addr;
    req.read       = !is_write;
    req.write      = is_write;
    req.writedata  = wdata;
    req.byteenable = be;
    waits = 0;
    #1;
    while (rsp.waitrequest) begin
      waits++;
      @(negedge clk);
      #1;
    end
    rdata = rsp.readdata;
    @(posedge clk);
    #1;
    req.read  = 1'b0;
    req.write = 1'b0;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] wdata,
                       input logic [3:0] be = 4'hF);
    logic [31:0] unused_rdata;
    int          unused_waits;
    xfer(1'b1, addr, wdata, be, unused_rdata, unused_waits);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] rdata, output int waits);
    xfer(1'b0, addr, '0, 4'hF, rdata, waits);
  endtask

endmodule
