// End-to-end testbench of the MANGO shell at its default parameters.
//
// Stands in for the host side (DMA engine data port and control port) with
// two bus-functional models, and for the vendor/user IP around the shell with
// behavioural models: a DDR4 memory, register files for the DDR4 controller,
// the two clock wizards and the OpenCL region. One complete operation: boot
// checks (feature ID, DDR calibration), register access to every control
// slave, a DMA write/read of a buffer to DDR with profiling switched on, the
// performance counters and trace records read back (control and data
// windows), trace FIFO overflow, a partial-reconfiguration isolation cycle
// with accesses refused and the partition held in reset, and unmapped
// accesses. Every mechanism is counted and must have happened.
module tb_mango_shell;
  import mango_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;   // 250 MHz

  axil_req_t       s_axil_req;  axil_rsp_t       s_axil_rsp;
  axi_req_t        s_axi_req;   axi_rsp_t        s_axi_rsp;
  axi_req_t        ddr_req;     axi_rsp_t        ddr_rsp;
  axil_req_t       ddrc_req;    axil_rsp_t       ddrc_rsp;
  axil_req_t [1:0] clkw_req;    axil_rsp_t [1:0] clkw_rsp;
  axil_req_t       ocl_req;     axil_rsp_t       ocl_rsp;
  logic            calib, region_rst_n, region_decoupled;

  mango_shell dut (
    .clk, .rst_n_i(rst_n),
    .s_axil_req, .s_axil_rsp, .s_axi_req, .s_axi_rsp,
    .m_axi_ddr_req(ddr_req), .m_axi_ddr_rsp(ddr_rsp),
    .m_axil_ddr_req(ddrc_req), .m_axil_ddr_rsp(ddrc_rsp),
    .ddr_calib_done(calib),
    .m_axil_clkw_req(clkw_req), .m_axil_clkw_rsp(clkw_rsp),
    .m_axil_ocl_req(ocl_req), .m_axil_ocl_rsp(ocl_rsp),
    .region_rst_n, .region_decoupled
  );

  axil_master_bfm ctl (.clk, .req(s_axil_req), .rsp(s_axil_rsp));
  axi_master_bfm  dma (.clk, .req(s_axi_req),  .rsp(s_axi_rsp));

  axi_mem_model  #(.RAND_READY(1'b1)) u_ddr  (.clk, .rst_n(region_rst_n), .req(ddr_req), .rsp(ddr_rsp));
  axil_reg_model #(.RAND_DELAY(1'b1)) u_ddrc (.clk, .rst_n(region_rst_n), .req(ddrc_req), .rsp(ddrc_rsp));
  axil_reg_model #(.RAND_DELAY(1'b1)) u_clk1 (.clk, .rst_n, .req(clkw_req[0]), .rsp(clkw_rsp[0]));
  axil_reg_model #(.RAND_DELAY(1'b1)) u_clk2 (.clk, .rst_n, .req(clkw_req[1]), .rsp(clkw_rsp[1]));
  axil_reg_model #(.RAND_DELAY(1'b1)) u_ocl  (.clk, .rst_n(region_rst_n), .req(ocl_req), .rsp(ocl_rsp));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_route, n_decerr, n_blocked, n_region_reset, n_dma_beats, n_trace_rec,
      n_trace_drain, n_overflow, n_apm, n_calib;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cw(input logic [31:0] a, input logic [31:0] d, output axi_resp_e r);
    ctl.write(a, d, 4'hF, r);
  endtask
  task automatic cr(input logic [31:0] a, output logic [31:0] d, output axi_resp_e r);
    ctl.read(a, d, r);
  endtask

  function automatic logic [255:0] pat(input int unsigned i);
    return {8{i * 32'h0101_0101 ^ 32'hC0DE_0000}};
  endfunction

  always @(posedge clk) if (rst_n && !region_rst_n) n_region_reset++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, lo, hi;
    axi_resp_e   r;
    int unsigned nbeats, occ;
    n_route = 0; n_decerr = 0; n_blocked = 0; n_region_reset = 0; n_dma_beats = 0;
    n_trace_rec = 0; n_trace_drain = 0; n_overflow = 0; n_apm = 0; n_calib = 0;
    calib = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);

    // ---- boot: feature ID and DDR calibration status ----
    cr(32'h0003_1008, d, r);
    check(d == 32'h4D41_0115 && r == RESP_OKAY, $sformatf("feature ID %h", d));
    cr(32'h0003_2008, d, r);
    check(d == 0, "DDR not calibrated yet");
    calib = 1;
    repeat (3) @(posedge clk);
    cr(32'h0003_2008, d, r);
    check(d == 1, "DDR calibrated");
    if (d == 1) n_calib++;

    // ---- every control slave outside the shell is reachable ----
    cw(32'h0000_0010, 32'h0000_00AA, r); check(r == RESP_OKAY && u_ocl.regs[4]  == 32'hAA, "OpenCL region write");
    cw(32'h0005_1004, 32'h0000_0011, r); check(r == RESP_OKAY && u_clk1.regs[1] == 32'h11, "clock wizard 1 write");
    cw(32'h0005_0004, 32'h0000_0022, r); check(r == RESP_OKAY && u_clk2.regs[1] == 32'h22, "clock wizard 2 write");
    cw(32'h0006_0008, 32'h0000_0033, r); check(r == RESP_OKAY && u_ddrc.regs[2] == 32'h33, "DDR controller write");
    cr(32'h0005_1004, d, r); check(d == 32'h11, "clock wizard 1 read");
    cr(32'h0005_0004, d, r); check(d == 32'h22, "clock wizard 2 read");
    n_route += 6;

    // ---- profiling on: counters and trace ----
    cw(32'h0010_0000, 32'h3, r); check(r == RESP_OKAY, "APM enable");
    n_route++;

    // ---- DMA: write a 16 KB buffer to DDR in 4 KB bursts, read it back ----
    nbeats = 0;
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 128; i++) dma.wbuf[i] = pat(b * 128 + i);
      dma.write_burst(64'h1000_0000 + 64'(b * 4096), 8'd127, 4'(b), r);
      check(r == RESP_OKAY, "DMA write burst");
      nbeats += 128;
    end
    for (int b = 0; b < 4; b++) begin
      dma.read_burst(64'h1000_0000 + 64'(b * 4096), 8'd127, 4'(b));
      check(dma.rresp_all == RESP_OKAY && dma.rlast_ok, "DMA read burst");
      for (int i = 0; i < 128; i++)
        check(dma.rbuf[i] == pat(b * 128 + i), $sformatf("DMA data %0d.%0d", b, i));
      nbeats += 128;
    end
    n_dma_beats = nbeats;
    cw(32'h0010_0000, 32'h0, r);   // stop counting

    // ---- performance counters ----
    cr(32'h0010_0010, d, r); check(d == 4, $sformatf("APM write transactions %0d", d));
    cr(32'h0010_0014, d, r); check(d == 512, $sformatf("APM write beats %0d", d));
    cr(32'h0010_0018, lo, r); cr(32'h0010_001C, hi, r);
    check({hi, lo} == 64'd16384, "APM write bytes");
    cr(32'h0010_0020, d, r); check(d == 4, "APM read transactions");
    cr(32'h0010_0024, d, r); check(d == 512, "APM read beats");
    cr(32'h0010_0028, lo, r); cr(32'h0010_002C, hi, r);
    check({hi, lo} == 64'd16384, "APM read bytes");
    cr(32'h0010_0008, lo, r);
    check(lo > 512, $sformatf("APM enabled cycles %0d", lo));
    n_apm += 7;

    // ---- trace records: 8 (4 writes then 4 reads) ----
    cr(32'h0011_0000, d, r); check(d == 8, $sformatf("trace occupancy %0d", d));
    n_trace_rec = d;
    dma.read_burst(64'h0000_0020_0000_0000, 8'd8, 4'd9);
    for (int i = 0; i < 8; i++) begin
      trace_rec_t t;
      t = trace_rec_t'(dma.rbuf[i][63:0]);
      check(t.valid && t.is_write == (i < 4) && t.len == 8'd127 && t.id == 4'(i % 4),
            $sformatf("trace record %0d", i));
      if (i > 0) check(t.timestamp > dma.rbuf[i-1][47:0], "timestamps increase");
      n_trace_drain++;
    end
    check(dma.rbuf[8] == '0, "empty trace beat");
    cr(32'h0011_0000, d, r); check(d == 0, "trace drained");

    // ---- trace overflow: 520 single-beat reads with tracing only ----
    cw(32'h0010_0000, 32'h2, r);
    for (int i = 0; i < 520; i++) dma.read_burst(64'h1000_0000, 8'd0, 4'd1);
    cw(32'h0010_0000, 32'h0, r);
    cr(32'h0011_0000, d, r); check(d == 512, $sformatf("trace full %0d", d));
    cr(32'h0011_0004, d, r); check(d == 8, $sformatf("trace dropped %0d", d));
    n_overflow = d;
    cw(32'h0011_0008, 32'h1, r);
    cr(32'h0011_0000, d, r); check(d == 0, "trace flushed");

    // ---- partial reconfiguration: isolate, refuse, reset, release ----
    cw(32'h0003_0000, 32'h1, r);             // isolate
    repeat (2) @(posedge clk);
    cr(32'h0003_0008, d, r);
    check(d == 1 && region_decoupled && !region_rst_n, "partition decoupled and in reset");
    cw(32'h0000_0010, 32'h55, r); check(r == RESP_SLVERR, "OpenCL region refused"); n_blocked++;
    cr(32'h0006_0008, d, r);      check(r == RESP_SLVERR, "DDR controller refused"); n_blocked++;
    dma.wbuf[0] = '1;
    dma.write_burst(64'h1000_0000, 8'd0, 4'd2, r);
    check(r == RESP_SLVERR, "DDR data write refused"); n_blocked++;
    dma.read_burst(64'h1000_0000, 8'd3, 4'd2);
    check(dma.rresp_all == RESP_SLVERR && dma.rlast_ok, "DDR data read refused"); n_blocked++;
    cr(32'h0005_1004, d, r); check(d == 32'h11 && r == RESP_OKAY, "static side still reachable");
    cw(32'h0003_0000, 32'h0, r);             // release
    repeat (2) @(posedge clk);
    check(region_rst_n && !region_decoupled, "partition released");
    check(u_ocl.regs[4] == 0, "OpenCL region was reset");
    cw(32'h0000_0010, 32'h66, r); check(r == RESP_OKAY && u_ocl.regs[4] == 32'h66, "OpenCL region back");
    n_route++;

    // ---- unmapped accesses ----
    cr(32'h0004_0000, d, r); check(r == RESP_DECERR, "control hole"); n_decerr++;
    dma.read_burst(64'h0000_0001_0000_0000, 8'd1, 4'd3);
    check(dma.rresp_all == RESP_DECERR, "data hole"); n_decerr++;

    // ---- every mechanism happened ----
    check(n_calib > 0,        "mechanism: DDR calibration status");
    check(n_route > 0,        "mechanism: control routing");
    check(n_dma_beats > 0,    "mechanism: DMA bursts");
    check(n_apm > 0,          "mechanism: performance counters");
    check(n_trace_rec > 0,    "mechanism: trace records");
    check(n_trace_drain > 0,  "mechanism: trace drain over data window");
    check(n_overflow > 0,     "mechanism: trace overflow");
    check(n_blocked > 0,      "mechanism: PR isolation refusal");
    check(n_region_reset > 0, "mechanism: partition reset");
    check(n_decerr > 0,       "mechanism: decode error");
    $display("mechanisms: calib=%0d route=%0d dma_beats=%0d apm=%0d trace=%0d drain=%0d overflow=%0d blocked=%0d region_reset_cycles=%0d decerr=%0d",
             n_calib, n_route, n_dma_beats, n_apm, n_trace_rec, n_trace_drain, n_overflow,
             n_blocked, n_region_reset, n_decerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
