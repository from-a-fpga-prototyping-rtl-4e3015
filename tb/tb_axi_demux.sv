// Self-checking testbench for axi_demux with the shell's data address map:
// bursts to the DDR window and the trace window land in the right memory,
// read data returns intact, unmapped addresses get DECERR with the right
// number of read beats, blocked windows get SLVERR without reaching the
// slave, and with always-ready slaves a burst of N beats streams at one beat
// per cycle.
module tb_axi_demux;
  import mango_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t       req;
  axi_rsp_t       rsp;
  axi_req_t [1:0] m_req;
  axi_rsp_t [1:0] m_rsp;
  logic     [1:0] blocked, busy;
  bit             rand_slaves;
  int checks = 0, failures = 0;

  axi_demux dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .m_req, .m_rsp, .blocked, .busy);
  axi_master_bfm bfm (.clk, .req, .rsp);
  axi_mem_model #(.RAND_READY(1'b1)) u_ddr   (.clk, .rst_n, .req(m_req[0]), .rsp(m_rsp[0]));
  axi_mem_model #(.RAND_READY(1'b0)) u_trace (.clk, .rst_n, .req(m_req[1]), .rsp(m_rsp[1]));

  localparam logic [63:0] DDR   = 64'h0000_0000_0000_0000;
  localparam logic [63:0] TRACE = 64'h0000_0020_0000_0000;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] pattern(input logic [63:0] a, input int beat);
    return {4{a ^ 64'(beat * 32'h9E37_79B9)}};
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    axi_resp_e r;
    int        n0, n1;
    blocked = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // bursts to both windows, random lengths, random master gaps
    for (int i = 0; i < 60; i++) begin
      logic [63:0] base, a;
      logic [7:0]  len;
      bit          t;
      t    = $urandom_range(1);
      base = t ? TRACE : DDR;
      a    = base + 64'({$urandom_range(0, 1023), 5'b0}) + (t ? 64'h0 : 64'h7FF0_0000);
      len  = 8'($urandom_range(0, 31));
      bfm.gaps = $urandom_range(1);
      for (int b = 0; b <= len; b++) bfm.wbuf[b] = pattern(a, b);
      bfm.write_burst(a, len, 4'(i), r);
      check(r == RESP_OKAY, "write burst OKAY");
      bfm.read_burst(a, len, 4'(i + 1));
      check(bfm.rresp_all == RESP_OKAY && bfm.rlast_ok, "read burst OKAY, last and id");
      for (int b = 0; b <= len; b++)
        check(bfm.rbuf[b] == pattern(a, b), $sformatf("data beat %0d of burst %0d", b, i));
      // data went to the right memory (word index is address / 32)
      if (t) check(u_trace.mem.exists(a >> 5) && !u_ddr.mem.exists(a >> 5), "landed in trace window");
      else   check(u_ddr.mem.exists(a >> 5) && !u_trace.mem.exists(a >> 5), "landed in DDR window");
    end
    // streaming rate: 16-beat write and read to the always-ready trace slave
    bfm.gaps = 0;
    for (int b = 0; b < 16; b++) bfm.wbuf[b] = pattern(TRACE, b);
    bfm.write_burst(TRACE, 8'd15, 4'd3, r);
    // AW 1 cycle, 16 W beats, model answers B two cycles after the last beat
    check(bfm.last_cycles <= 16 + 4, $sformatf("16-beat write took %0d cycles", bfm.last_cycles));
    bfm.read_burst(TRACE, 8'd15, 4'd4);
    check(bfm.last_cycles <= 16 + 3, $sformatf("16-beat read took %0d cycles", bfm.last_cycles));
    // unmapped: just above the DDR window and just above the trace window
    n0 = u_ddr.n_aw + u_trace.n_aw + u_ddr.n_ar + u_trace.n_ar;
    bfm.wbuf[0] = '1; bfm.wbuf[1] = '1; bfm.wbuf[2] = '1;
    bfm.write_burst(64'h0000_0000_8000_0000, 8'd2, 4'd5, r);
    check(r == RESP_DECERR, "write above DDR window DECERR");
    bfm.read_burst(64'h0000_0020_8000_0000, 8'd6, 4'd6);
    check(bfm.rresp_all == RESP_DECERR && bfm.rlast_ok, "read above trace window DECERR, 7 beats, last");
    bfm.read_burst(64'h0000_0010_0000_0000, 8'd0, 4'd7);
    check(bfm.rresp_all == RESP_DECERR && bfm.rlast_ok, "read in the hole DECERR");
    // blocked DDR window
    blocked = 2'b01;
    bfm.write_burst(DDR, 8'd3, 4'd8, r);
    check(r == RESP_SLVERR, "blocked DDR write SLVERR");
    bfm.read_burst(DDR + 64'h100, 8'd3, 4'd9);
    check(bfm.rresp_all == RESP_SLVERR && bfm.rlast_ok, "blocked DDR read SLVERR, 4 beats");
    bfm.read_burst(TRACE, 8'd0, 4'd10);
    check(bfm.rresp_all == RESP_OKAY, "trace window still open");
    n1 = u_ddr.n_aw + u_trace.n_aw + u_ddr.n_ar + u_trace.n_ar;
    check(n1 == n0 + 1, $sformatf("only the allowed access reached a slave (%0d)", n1 - n0));
    blocked = '0;
    // busy follows the DDR access
    fork
      begin
        bfm.read_burst(DDR, 8'd7, 4'd11);
      end
      begin
        int seen = 0;
        repeat (6) begin @(posedge clk); if (busy[0]) seen++; end
        check(seen > 0 && !busy[1], "busy marks the DDR port during its burst");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
