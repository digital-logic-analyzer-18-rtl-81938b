// dla_pkg: types and constants shared by the logic analyzer.
//
// A time-edge packet is the unit every sampling channel produces: bits
// [31:1] are the sample number (time) at which an edge was seen, bit [0]
// is the level of the line after that sample (1 = rising edge, 0 = falling
// edge).  The configuration bus is the write-only broadcast bus driven by
// the CPU interface: a register number and a 32-bit payload, valid for one
// cycle.  Register numbers are the CPU byte address offset divided by 4;
// the base numbers below follow the system register map (memory interface
// at 0x000, sampler at 0x180, sampler interface at 0x200, I2C/SPI/UART
// analysis modules 2 registers each from 0x380, XMEM at 0x3E0, sample clock
// at 0x3E8).  The functional-input numbering (which of the 47 routed inputs
// belongs to which analysis module) is this design's own choice.
package dla_pkg;

  localparam int NUM_CHANNELS   = 32;   // sampling channels
  localparam int NUM_FUNC_IN    = 47;   // routed functional-channel inputs
  localparam int NUM_GROUPS     = 8;    // trigger groups
  localparam int NUM_MEM_CH     = 14;   // memory channels
  localparam int NUM_AXI        = 8;    // AXI masters into the crossbar

  typedef logic [30:0] stime_t;         // sample number

  typedef struct packed {
    stime_t time_;                      // sample number of the edge
    logic   level;                      // line level after the edge
  } time_edge_t;

  typedef struct packed {
    logic        valid;
    logic [7:0]  regnum;
    logic [31:0] data;
  } cfg_bus_t;

  // Register numbers (byte offset / 4)
  localparam logic [7:0] REG_MEM_BASE     = 8'd0;    // 4 per memory channel
  localparam logic [7:0] REG_MEM_ISR      = 8'd56;   // interrupt status (0xE0)
  localparam logic [7:0] REG_SAMPLER_BASE = 8'd96;   // 0x180
  localparam logic [7:0] REG_SI_BASE      = 8'd128;  // 0x200
  localparam logic [7:0] REG_I2C_BASE     = 8'd224;  // 0x380, 2 each
  localparam logic [7:0] REG_SPI_BASE     = 8'd232;  // 0x3A0, 2 each
  localparam logic [7:0] REG_UART_BASE    = 8'd240;  // 0x3C0, 2 each
  localparam logic [7:0] REG_XMEM_BASE    = 8'd248;  // 0x3E0
  localparam logic [7:0] REG_SCLK_CFG     = 8'd250;  // 0x3E8

  // Sampler register offsets (from REG_SAMPLER_BASE)
  localparam int SREG_VAL_HI   = 0;     // 8 registers
  localparam int SREG_VAL_LO   = 8;     // 8 registers
  localparam int SREG_EN       = 16;    // 8 registers
  localparam int SREG_TRIG_CTL = 24;
  localparam int SREG_MAX_NUM  = 25;
  localparam int SREG_MAX_AGE  = 26;
  localparam int SREG_CHAN_EN  = 27;

  // Sampler interface register offsets (from REG_SI_BASE)
  localparam int SIREG_INSEL   = 0;     // 47 registers: input channel of signal n
  localparam int SIREG_DEST    = 47;    // 32 registers: destination signal of channel n

  // Functional input numbering
  localparam int FI_I2C  = 0;           // I2C k: SCL = 2k, SDA = 2k+1
  localparam int FI_SPI  = 8;           // SPI k: 8+4k+{SCLK,MOSI,MISO,SS}
  localparam int FI_UART = 24;          // UART k: 24+k
  localparam int FI_XMEM = 28;          // data[7:0], addr[15:8], rd_n, wr_n, ale
  localparam int FI_NONE = 127;         // destination "memory only"

  // Interrupt status register bits
  localparam int ISR_OVERFLOW   = 0;
  localparam int ISR_WRITE_DONE = 14;
  localparam int ISR_BUTTON1    = 15;
  localparam int ISR_CLK_STABLE = 16;

  // AXI3 write-only master bundle (address, data and response channels),
  // as driven by an AXI master towards the crossbar / ACP port.
  typedef struct packed {
    logic [2:0]  awid;
    logic [31:0] awaddr;
    logic [3:0]  awlen;
    logic [2:0]  awsize;
    logic [1:0]  awburst;
    logic [3:0]  awcache;
    logic        awvalid;
    logic [2:0]  wid;
    logic [63:0] wdata;
    logic [7:0]  wstrb;
    logic        wlast;
    logic        wvalid;
    logic        bready;
  } axi_wr_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [2:0]  bid;
    logic [1:0]  bresp;
    logic        bvalid;
  } axi_wr_rsp_t;

  // Returns a < b for two sample times
  function automatic logic time_before(stime_t a, stime_t b);
    return a < b;
  endfunction

endpackage
