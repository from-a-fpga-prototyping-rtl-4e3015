// Shared types and constants of the MANGO FPGA shell.
//
// The shell turns a prototyping FPGA (Kintex UltraScale XCKU115 with one 2 GB
// DDR4 bank and a PCIe link) into an OpenCL-style accelerator. The host sees it
// as a memory-mapped device with two address spaces: a high-throughput AXI4
// data space and a low-throughput AXI4-Lite control space. The address map
// below is the published one; bus widths are this design's own choice, since
// the published platform leaves them open.
//
// AXI buses are carried as one request struct (master to slave) and one
// response struct (slave to master), so that a whole port is two signals.
package mango_pkg;

  // ---------------- widths (design choices) ----------------
  localparam int unsigned AXI_ADDR_W  = 64;   // data space uses 64-bit addresses (0x20_0000_0000 window)
  localparam int unsigned AXI_DATA_W  = 256;  // DMA data path width
  localparam int unsigned AXI_ID_W    = 4;
  localparam int unsigned AXI_STRB_W  = AXI_DATA_W / 8;
  localparam int unsigned AXIL_ADDR_W = 32;
  localparam int unsigned AXIL_DATA_W = 32;
  localparam int unsigned AXIL_STRB_W = AXIL_DATA_W / 8;

  // ---------------- AXI response codes ----------------
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // ---------------- AXI4-Lite ----------------
  typedef struct packed {
    logic [AXIL_ADDR_W-1:0] aw_addr;
    logic                   aw_valid;
    logic [AXIL_DATA_W-1:0] w_data;
    logic [AXIL_STRB_W-1:0] w_strb;
    logic                   w_valid;
    logic                   b_ready;
    logic [AXIL_ADDR_W-1:0] ar_addr;
    logic                   ar_valid;
    logic                   r_ready;
  } axil_req_t;

  typedef struct packed {
    logic                   aw_ready;
    logic                   w_ready;
    axi_resp_e              b_resp;
    logic                   b_valid;
    logic                   ar_ready;
    logic [AXIL_DATA_W-1:0] r_data;
    axi_resp_e              r_resp;
    logic                   r_valid;
  } axil_rsp_t;

  // ---------------- AXI4 (full, bursts) ----------------
  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;    // beats - 1
    logic [2:0]            size;   // log2(bytes per beat)
    logic [1:0]            burst;  // 01 = INCR
  } axi_ax_t;

  typedef struct packed {
    axi_ax_t               aw;
    logic                  aw_valid;
    logic [AXI_DATA_W-1:0] w_data;
    logic [AXI_STRB_W-1:0] w_strb;
    logic                  w_last;
    logic                  w_valid;
    logic                  b_ready;
    axi_ax_t               ar;
    logic                  ar_valid;
    logic                  r_ready;
  } axi_req_t;

  typedef struct packed {
    logic                  aw_ready;
    logic                  w_ready;
    logic [AXI_ID_W-1:0]   b_id;
    axi_resp_e             b_resp;
    logic                  b_valid;
    logic                  ar_ready;
    logic [AXI_ID_W-1:0]   r_id;
    logic [AXI_DATA_W-1:0] r_data;
    axi_resp_e             r_resp;
    logic                  r_last;
    logic                  r_valid;
  } axi_rsp_t;

  // ---------------- address map (published) ----------------
  // AXI4-MM data interface
  localparam logic [AXI_ADDR_W-1:0] DATA_DDR_BASE   = 64'h0000_0000_0000_0000;
  localparam logic [AXI_ADDR_W-1:0] DATA_TRACE_BASE = 64'h0000_0020_0000_0000;
  localparam logic [AXI_ADDR_W-1:0] DATA_WIN_SIZE   = 64'h0000_0000_8000_0000; // 2G each

  // AXI4-Lite control interface: slave index, base, size
  localparam int unsigned CTRL_NSLV = 9;
  typedef enum logic [3:0] {
    CTRL_OCL      = 4'd0,  // OpenCL region            0x0000_0000 128K
    CTRL_GPIO_ISO = 4'd1,  // GPIO for PR isolation    0x0003_0000 4K
    CTRL_GPIO_FID = 4'd2,  // GPIO for feature ID      0x0003_1000 4K
    CTRL_DDR_CAL  = 4'd3,  // DDR4 calibration status  0x0003_2000 4K
    CTRL_CLKW2    = 4'd4,  // Clock Wizard kernel 2    0x0005_0000 4K
    CTRL_CLKW1    = 4'd5,  // Clock Wizard kernel      0x0005_1000 4K
    CTRL_DDR_CTL  = 4'd6,  // DDR4 controller          0x0006_0000 128K
    CTRL_APM      = 4'd7,  // AXI performance monitor  0x0010_0000 64K
    CTRL_TRACE    = 4'd8   // trace offload FIFO       0x0011_0000 4K
  } ctrl_slv_e;

  localparam logic [CTRL_NSLV-1:0][AXIL_ADDR_W-1:0] CTRL_BASE = '{
    32'h0011_0000, 32'h0010_0000, 32'h0006_0000, 32'h0005_1000, 32'h0005_0000,
    32'h0003_2000, 32'h0003_1000, 32'h0003_0000, 32'h0000_0000 };
  localparam logic [CTRL_NSLV-1:0][AXIL_ADDR_W-1:0] CTRL_SIZE = '{
    32'h0000_1000, 32'h0001_0000, 32'h0002_0000, 32'h0000_1000, 32'h0000_1000,
    32'h0000_1000, 32'h0000_1000, 32'h0000_1000, 32'h0002_0000 };

  // Trace record layout (design choice): bit 63 marks a valid record, so a
  // read of an empty FIFO returns all zeros.
  typedef struct packed {
    logic        valid;     // 63
    logic        is_write;  // 62
    logic [1:0]  rsvd;      // 61:60
    logic [3:0]  id;        // 59:56
    logic [7:0]  len;       // 55:48
    logic [47:0] timestamp; // 47:0, shell clock cycles
  } trace_rec_t;

endpackage
