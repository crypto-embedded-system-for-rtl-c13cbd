// Shared types and constants of the crypto embedded system.
//
// The system is a single-master Avalon bus: one processor master reaches the
// RSA co-processor, an on-chip RAM and four vendor/off-chip peripherals.
// This package holds the Avalon request/response bundle used on every port,
// the system memory map and the register map of the RSA co-processor.
//
// The memory-map bases and sizes of the UART, timer, external SRAM, external
// flash and RSA co-processor follow the system's generated SDK header; the
// RSA window 0x00900900..0x0090093F follows the system configuration. The
// UART/timer spans, the on-chip RAM window and the co-processor register map
// are this design's own choices.
package crypto_pkg;

  // Avalon transfers are 32 bits wide; byteenable selects byte, half-word or
  // word transfers.
  localparam int unsigned AV_ADDR_W = 32;
  localparam int unsigned AV_DATA_W = 32;
  localparam int unsigned AV_BE_W   = AV_DATA_W / 8;

  // Master -> slave half of an Avalon port. read/write double as chip select:
  // the bus raises them only towards the addressed slave, whose address is
  // then the byte offset inside its own window.
  typedef struct packed {
    logic [AV_ADDR_W-1:0] address;
    logic                 read;
    logic                 write;
    logic [AV_DATA_W-1:0] writedata;
    logic [AV_BE_W-1:0]   byteenable;
  } av_req_t;

  // Slave -> master half. A transfer completes in the first cycle in which
  // read or write is high and waitrequest is low; readdata is valid then.
  typedef struct packed {
    logic [AV_DATA_W-1:0] readdata;
    logic                 waitrequest;
  } av_rsp_t;

  // ---------------------------------------------------------------- memory map
  typedef enum logic [2:0] {
    SLV_ONCHIP = 3'd0,
    SLV_UART   = 3'd1,
    SLV_TIMER  = 3'd2,
    SLV_EXTRAM = 3'd3,
    SLV_FLASH  = 3'd4,
    SLV_RSA    = 3'd5
  } slave_e;

  localparam int unsigned NUM_SLAVES = 6;

  typedef logic [AV_ADDR_W-1:0] addr_t;

  localparam addr_t ONCHIP_BASE = 32'h0000_0000;
  localparam addr_t ONCHIP_SPAN = 32'h0000_0400;
  localparam addr_t UART_BASE   = 32'h0000_0400;
  localparam addr_t UART_SPAN   = 32'h0000_0020;
  localparam addr_t TIMER_BASE  = 32'h0000_0440;
  localparam addr_t TIMER_SPAN  = 32'h0000_0020;
  localparam addr_t EXTRAM_BASE = 32'h0004_0000;
  localparam addr_t EXTRAM_SPAN = 32'h0004_0000;
  localparam addr_t FLASH_BASE  = 32'h0010_0000;
  localparam addr_t FLASH_SPAN  = 32'h0010_0000;
  localparam addr_t RSA_BASE    = 32'h0090_0900;
  localparam addr_t RSA_SPAN    = 32'h0000_0040;

  localparam addr_t SLAVE_BASE [NUM_SLAVES] = '{ONCHIP_BASE, UART_BASE, TIMER_BASE,
                                                EXTRAM_BASE, FLASH_BASE, RSA_BASE};
  localparam addr_t SLAVE_SPAN [NUM_SLAVES] = '{ONCHIP_SPAN, UART_SPAN, TIMER_SPAN,
                                                EXTRAM_SPAN, FLASH_SPAN, RSA_SPAN};

  // ------------------------------------------------- RSA co-processor registers
  // Word offsets inside the 16-word RSA window.
  localparam logic [3:0] RSA_REG_CTRL   = 4'd0;  // W: bit0 start, bit1 command
  localparam logic [3:0] RSA_REG_STATUS = 4'd1;  // R: bit0 busy, bit1 done
  localparam logic [3:0] RSA_REG_SEL    = 4'd2;  // W: operand select, rewinds indices
  localparam logic [3:0] RSA_REG_DATA   = 4'd3;  // W: next word of selected operand
  localparam logic [3:0] RSA_REG_RESULT = 4'd4;  // R: next word of the result

  // Operand registers of the RSA core.
  typedef enum logic [1:0] {
    OP_M = 2'd0,   // modulus (odd)
    OP_E = 2'd1,   // exponent
    OP_R = 2'd2,   // Montgomery constant 2^(2n) mod M (for exponentiation)
    OP_X = 2'd3    // base / multiplicand
  } rsa_operand_e;

  // Operations of the RSA core.
  typedef enum logic {
    CMD_MODEXP  = 1'b0,  // result = X^E mod M
    CMD_MONMULT = 1'b1   // result = X * R * 2^-n mod M
  } rsa_cmd_e;

endpackage
