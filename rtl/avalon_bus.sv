// Single-master Avalon system bus.
//
// Connects the processor's data master to the six slaves of the system:
// on-chip RAM, UART, timer, external SRAM, external flash and the RSA
// co-processor, decoded by the address windows of crypto_pkg (bases and
// sizes of the UART, timer, SRAM, flash and RSA windows follow the system's
// memory map). The bus is purely combinational:
//   - the addressed slave gets the master's read/write (acting as its chip
//     select) and the address rebased to an offset inside its window; the
//     other slaves see read = write = 0;
//   - the master gets the addressed slave's readdata and waitrequest, so a
//     slave with wait states stalls the master until it is ready.
// An address outside every window completes at once, reads as 0 and raises
// decode_error for that cycle.
// The clock and reset only serve the bus-protocol assertions.
module avalon_bus
  import crypto_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t m_req,
  output av_rsp_t m_rsp,
  output av_req_t s_req [NUM_SLAVES],
  input  av_rsp_t s_rsp [NUM_SLAVES],
  output logic    decode_error
);

  logic [NUM_SLAVES-1:0] hit;

  always_comb begin
    for (int i = 0; i < NUM_SLAVES; i++) begin
      hit[i] = (m_req.address >= SLAVE_BASE[i]) &&
               (m_req.address - SLAVE_BASE[i] < SLAVE_SPAN[i]);
    end
  end

  always_comb begin
    m_rsp        = '{readdata: '0, waitrequest: 1'b0};
    decode_error = (m_req.read || m_req.write) && (hit == '0);
    for (int i = 0; i < NUM_SLAVES; i++) begin
      s_req[i]         = m_req;
      s_req[i].address = m_req.address - SLAVE_BASE[i];
      s_req[i].read    = m_req.read  && hit[i];
      s_req[i].write   = m_req.write && hit[i];
      if (hit[i]) m_rsp = s_rsp[i];
    end
  end

  // The windows of the memory map do not overlap.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit));
  // A master never reads and writes in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(m_req.read && m_req.write));
  // While a transfer is stalled the master holds it unchanged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_req.read || m_req.write) && m_rsp.waitrequest |=> $stable(m_req));

endmodule
