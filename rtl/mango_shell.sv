// MANGO FPGA shell: the static partition of an OpenCL-style hardware platform.
//
// The shell turns one prototyping FPGA into a compute device that a host can
// program and feed over PCIe. The host sees two memory-mapped address spaces:
//   data (AXI4, from the DMA engine):  DDR4 at 0x0 (2 GB), trace FIFO at
//                                      0x20_0000_0000 (2 GB window)
//   control (AXI4-Lite):               OpenCL region 0x0000_0000 (128K),
//     GPIO PR isolation 0x0003_0000, GPIO feature ID 0x0003_1000, DDR4
//     calibration status 0x0003_2000, clock wizard 2 0x0005_0000, clock
//     wizard 1 0x0005_1000, DDR4 controller 0x0006_0000 (128K), performance
//     monitor 0x0010_0000 (64K), trace FIFO 0x0011_0000 (all others 4K).
// The address map and the set of blocks follow the published platform. The
// PCIe endpoint, the DMA engine, the DDR4 controller, the clock wizards and
// the kernels themselves are vendor or user IP: their ports are brought out.
//
// Inside: reset synchroniser; AXI4-Lite crossbar to the nine control slaves;
// AXI4 demux to DDR and trace FIFO; three GPIO blocks; performance monitor
// watching the DMA data port and feeding the trace FIFO; PR isolation
// sequencer that blocks the DDR4 data window, the DDR4 controller's control
// window and the OpenCL region while they are reconfigured.
//
// GPIO use (design choice): PR isolation GPIO out bit0 = isolate request,
// in bit0 = decoupled; feature ID GPIO in = FEATURE_ID; DDR calibration GPIO
// in bit0 = ddr_calib_done.
module mango_shell
  import mango_pkg::*;
#(
  parameter logic [31:0] FEATURE_ID  = 32'h4D41_0115,  // design choice: "MA", KU115
  parameter int unsigned TRACE_DEPTH = 512
) (
  input  logic                clk,
  input  logic                rst_n_i,
  // from the PCIe DMA engine
  input  axil_req_t           s_axil_req,
  output axil_rsp_t           s_axil_rsp,
  input  axi_req_t            s_axi_req,
  output axi_rsp_t            s_axi_rsp,
  // to the DDR4 controller (reconfigurable partition)
  output axi_req_t            m_axi_ddr_req,
  input  axi_rsp_t            m_axi_ddr_rsp,
  output axil_req_t           m_axil_ddr_req,
  input  axil_rsp_t           m_axil_ddr_rsp,
  input  logic                ddr_calib_done,
  // to the clock wizards: [0] kernel clock, [1] kernel clock 2
  output axil_req_t [1:0]     m_axil_clkw_req,
  input  axil_rsp_t [1:0]     m_axil_clkw_rsp,
  // to the OpenCL region (reconfigurable partition)
  output axil_req_t           m_axil_ocl_req,
  input  axil_rsp_t           m_axil_ocl_rsp,
  output logic                region_rst_n,
  output logic                region_decoupled
);

  logic rst_n;
  reset_sync u_rst (.clk, .rst_n_i, .rst_n_o(rst_n));

  // ---------------- control crossbar ----------------
  axil_req_t [CTRL_NSLV-1:0] c_req;
  axil_rsp_t [CTRL_NSLV-1:0] c_rsp;
  logic      [CTRL_NSLV-1:0] c_blocked, c_busy;
  logic                      block, isolate;

  always_comb begin
    c_blocked               = '0;
    c_blocked[CTRL_OCL]     = block;
    c_blocked[CTRL_DDR_CTL] = block;
  end

  axil_xbar u_ctrl_xbar (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .m_req(c_req), .m_rsp(c_rsp), .blocked(c_blocked), .busy(c_busy)
  );

  assign m_axil_ocl_req      = c_req[CTRL_OCL];
  assign c_rsp[CTRL_OCL]     = m_axil_ocl_rsp;
  assign m_axil_ddr_req      = c_req[CTRL_DDR_CTL];
  assign c_rsp[CTRL_DDR_CTL] = m_axil_ddr_rsp;
  assign m_axil_clkw_req[0]  = c_req[CTRL_CLKW1];
  assign c_rsp[CTRL_CLKW1]   = m_axil_clkw_rsp[0];
  assign m_axil_clkw_req[1]  = c_req[CTRL_CLKW2];
  assign c_rsp[CTRL_CLKW2]   = m_axil_clkw_rsp[1];

  // ---------------- GPIOs ----------------
  axil_gpio #(.OUT_W(1), .IN_W(1)) u_gpio_iso (
    .clk, .rst_n, .s_req(c_req[CTRL_GPIO_ISO]), .s_rsp(c_rsp[CTRL_GPIO_ISO]),
    .gpio_out(isolate), .gpio_in(region_decoupled)
  );

  logic unused_fid_out, unused_cal_out;

  axil_gpio #(.OUT_W(1), .IN_W(32)) u_gpio_fid (
    .clk, .rst_n, .s_req(c_req[CTRL_GPIO_FID]), .s_rsp(c_rsp[CTRL_GPIO_FID]),
    .gpio_out(unused_fid_out), .gpio_in(FEATURE_ID)
  );

  axil_gpio #(.OUT_W(1), .IN_W(1)) u_gpio_cal (
    .clk, .rst_n, .s_req(c_req[CTRL_DDR_CAL]), .s_rsp(c_rsp[CTRL_DDR_CAL]),
    .gpio_out(unused_cal_out), .gpio_in(ddr_calib_done)
  );

  // ---------------- data demux ----------------
  axi_req_t [1:0] d_req;
  axi_rsp_t [1:0] d_rsp;
  logic     [1:0] d_busy;

  axi_demux u_data_demux (
    .clk, .rst_n, .s_req(s_axi_req), .s_rsp(s_axi_rsp),
    .m_req(d_req), .m_rsp(d_rsp), .blocked({1'b0, block}), .busy(d_busy)
  );

  assign m_axi_ddr_req = d_req[0];
  assign d_rsp[0]      = m_axi_ddr_rsp;

  // ---------------- PR isolation ----------------
  pr_decoupler u_decoupler (
    .clk, .rst_n, .isolate,
    .ctrl_busy(c_busy[CTRL_OCL] || c_busy[CTRL_DDR_CTL]),
    .data_busy(d_busy[0]),
    .block, .decoupled(region_decoupled), .region_rst_n
  );

  // ---------------- profiling ----------------
  logic       trace_valid;
  trace_rec_t trace_rec;

  axi_perf_monitor u_apm (
    .clk, .rst_n, .s_req(c_req[CTRL_APM]), .s_rsp(c_rsp[CTRL_APM]),
    .mon_req(s_axi_req), .mon_rsp(s_axi_rsp),
    .trace_valid, .trace_rec
  );

  trace_fifo #(.DEPTH(TRACE_DEPTH)) u_trace (
    .clk, .rst_n, .trace_valid, .trace_rec,
    .s_axi_req(d_req[1]), .s_axi_rsp(d_rsp[1]),
    .s_axil_req(c_req[CTRL_TRACE]), .s_axil_rsp(c_rsp[CTRL_TRACE])
  );

endmodule
