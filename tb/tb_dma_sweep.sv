// Workload testbench: DMA transfer-size sweep through the shell to local DDR.
//
// Repeats the host-to-FPGA and FPGA-to-host bandwidth experiment over data
// sizes from 64 B to 32 MB (doubling). Each transfer is split into bursts of
// at most 4 KB, as a DMA engine does (AXI bursts may not cross 4 KB), written
// to the DDR window and read back, and every beat is compared. The number
// of shell clock cycles per transfer gives the bandwidth the shell sustains;
// at the assumed 250 MHz shell clock and 32-byte data path the ceiling is
// 8 GB/s. For transfers of 4 KB and more the shell must sustain at least 90 %
// of one beat per cycle, so it is never the bottleneck of a PCIe Gen3 x4
// (4 GB/s) or x8 (8 GB/s) link. The DDR model here is always ready, so the
// numbers measure the shell alone.
module tb_dma_sweep;
  import mango_pkg::*;

  localparam longint unsigned MAX_BYTES = 64'd32 * 1024 * 1024;
  localparam real             CLK_MHZ   = 250.0;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  axil_req_t       s_axil_req;  axil_rsp_t       s_axil_rsp;
  axi_req_t        s_axi_req;   axi_rsp_t        s_axi_rsp;
  axi_req_t        ddr_req;     axi_rsp_t        ddr_rsp;
  axil_req_t       ddrc_req;    axil_rsp_t       ddrc_rsp;
  axil_req_t [1:0] clkw_req;    axil_rsp_t [1:0] clkw_rsp;
  axil_req_t       ocl_req;     axil_rsp_t       ocl_rsp;
  logic            region_rst_n, region_decoupled;

  mango_shell dut (
    .clk, .rst_n_i(rst_n),
    .s_axil_req, .s_axil_rsp, .s_axi_req, .s_axi_rsp,
    .m_axi_ddr_req(ddr_req), .m_axi_ddr_rsp(ddr_rsp),
    .m_axil_ddr_req(ddrc_req), .m_axil_ddr_rsp(ddrc_rsp),
    .ddr_calib_done(1'b1),
    .m_axil_clkw_req(clkw_req), .m_axil_clkw_rsp(clkw_rsp),
    .m_axil_ocl_req(ocl_req), .m_axil_ocl_rsp(ocl_rsp),
    .region_rst_n, .region_decoupled
  );

  axil_master_bfm ctl (.clk, .req(s_axil_req), .rsp(s_axil_rsp));
  axi_master_bfm  dma (.clk, .req(s_axi_req),  .rsp(s_axi_rsp));
  axi_mem_model  #(.RAND_READY(1'b0)) u_ddr (.clk, .rst_n(region_rst_n), .req(ddr_req), .rsp(ddr_rsp));
  axil_reg_model #(.RAND_DELAY(1'b0)) u_ddrc (.clk, .rst_n, .req(ddrc_req), .rsp(ddrc_rsp));
  axil_reg_model #(.RAND_DELAY(1'b0)) u_clk1 (.clk, .rst_n, .req(clkw_req[0]), .rsp(clkw_rsp[0]));
  axil_reg_model #(.RAND_DELAY(1'b0)) u_clk2 (.clk, .rst_n, .req(clkw_req[1]), .rsp(clkw_rsp[1]));
  axil_reg_model #(.RAND_DELAY(1'b0)) u_ocl  (.clk, .rst_n, .req(ocl_req), .rsp(ocl_rsp));

  int checks = 0, failures = 0;
  longint unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] pat(input longint unsigned beat, input int tag);
    return {4{64'(beat) ^ {32'(tag), 32'hA5A5_0000}}};
  endfunction

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    axi_resp_e r;
    int        tag;
    cyc = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    tag = 0;
    for (longint unsigned size = 64; size <= MAX_BYTES; size *= 2) begin
      longint unsigned beats, t0, tw, tr, bad;
      beats = size / 32;
      tag++;
      bad = 0;
      // write (host to FPGA)
      t0 = cyc;
      for (longint unsigned b = 0; b < beats; b += 128) begin
        longint unsigned n;
        n = (beats - b < 128) ? beats - b : 128;
        for (int i = 0; i < int'(n); i++) dma.wbuf[i] = pat(b + i, tag);
        dma.write_burst(64'(b * 32), 8'(n - 1), 4'd1, r);
        if (r != RESP_OKAY) bad++;
      end
      tw = cyc - t0;
      // read (FPGA to host)
      t0 = cyc;
      for (longint unsigned b = 0; b < beats; b += 128) begin
        longint unsigned n;
        n = (beats - b < 128) ? beats - b : 128;
        dma.read_burst(64'(b * 32), 8'(n - 1), 4'd2);
        if (dma.rresp_all != RESP_OKAY || !dma.rlast_ok) bad++;
        for (int i = 0; i < int'(n); i++) if (dma.rbuf[i] != pat(b + i, tag)) bad++;
      end
      tr = cyc - t0;
      check(bad == 0, $sformatf("%0d B transfer: %0d errors", size, bad));
      $display("size %9d B  write %9d cycles %7.1f MB/s  read %9d cycles %7.1f MB/s",
               size, tw, real'(size) * CLK_MHZ / real'(tw), tr, real'(size) * CLK_MHZ / real'(tr));
      if (size >= 4096) begin
        check(tw * 9 <= beats * 10, $sformatf("%0d B write at >= 90%% of a beat per cycle", size));
        check(tr * 9 <= beats * 10, $sformatf("%0d B read at >= 90%% of a beat per cycle", size));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
