// Self-checking testbench for trace_fifo (DEPTH reduced to 16): records
// drained in order through AXI4 read bursts, empty beats read as zero,
// occupancy and drop counters, overflow, flush, writes to the data window
// refused, and records arriving while a burst drains.
module tb_trace_fifo;
  import mango_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  lreq;
  axil_rsp_t  lrsp;
  axi_req_t   req;
  axi_rsp_t   rsp;
  logic       trace_valid;
  trace_rec_t trace_rec;
  int checks = 0, failures = 0;
  int unsigned seq_in, seq_out;

  trace_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .trace_valid, .trace_rec,
    .s_axi_req(req), .s_axi_rsp(rsp), .s_axil_req(lreq), .s_axil_rsp(lrsp));
  axil_master_bfm lbfm (.clk, .req(lreq), .rsp(lrsp));
  axi_master_bfm  bfm  (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic trace_rec_t mk(input int unsigned seq);
    trace_rec_t t;
    t = '0;
    t.valid = 1; t.is_write = seq[0]; t.id = 4'(seq); t.len = 8'(seq * 3);
    t.timestamp = 48'(seq);
    return t;
  endfunction

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      trace_valid <= 1'b1;
      trace_rec   <= mk(seq_in);
      seq_in++;
      @(posedge clk);
    end
    trace_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic reg_rd(input logic [31:0] a, output logic [31:0] d);
    axi_resp_e r;
    lbfm.read(a, d, r);
  endtask

  // expect n records in order, then z empty beats
  task automatic drain(input int n, input int z);
    bfm.read_burst(64'h0000_0020_0000_0000, 8'(n + z - 1), 4'd2);
    check(bfm.rresp_all == RESP_OKAY && bfm.rlast_ok, "drain burst OKAY and last");
    for (int b = 0; b < n; b++) begin
      check(bfm.rbuf[b] == {192'h0, mk(seq_out)}, $sformatf("record %0d", seq_out));
      seq_out++;
    end
    for (int b = n; b < n + z; b++) check(bfm.rbuf[b] == '0, "empty beat reads zero");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    axi_resp_e   r;
    trace_valid = 0; trace_rec = '0; seq_in = 0; seq_out = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    reg_rd(32'h0, d); check(d == 0, "empty after reset");
    reg_rd(32'hC, d); check(d == DEPTH, "depth register");
    push(10);
    reg_rd(32'h0, d); check(d == 10, $sformatf("occupancy 10: %0d", d));
    drain(4, 0);
    check(bfm.last_cycles == 5, $sformatf("4-beat drain in %0d cycles", bfm.last_cycles));
    reg_rd(32'h0, d); check(d == 6, "occupancy 6");
    drain(6, 2);
    reg_rd(32'h0, d); check(d == 0, "occupancy 0");
    // overflow
    push(DEPTH + 4);
    reg_rd(32'h0, d); check(d == DEPTH, "full");
    reg_rd(32'h4, d); check(d == 4, $sformatf("dropped 4: %0d", d));
    drain(DEPTH, 0);
    seq_out = seq_in;     // the four dropped records are gone
    // flush
    push(5);
    lbfm.write(32'h8, 32'h1, 4'hF, r);
    reg_rd(32'h0, d); check(d == 0, "flushed");
    reg_rd(32'h4, d); check(d == 0, "dropped cleared by flush");
    seq_out = seq_in;
    drain(0, 1);
    // writes to the data window are refused
    bfm.wbuf[0] = '1; bfm.wbuf[1] = '1;
    bfm.write_burst(64'h0000_0020_0000_0000, 8'd1, 4'd1, r);
    check(r == RESP_SLVERR, "write to trace window SLVERR");
    reg_rd(32'h0, d); check(d == 0, "write did not fill the FIFO");
    // records keep arriving while a long burst drains
    push(3);
    fork
      push(8);
      begin repeat (2) @(posedge clk); bfm.read_burst(64'h0000_0020_0000_0000, 8'd30, 4'd5); end
    join
    begin
      int got;
      got = 0;
      for (int b = 0; b < 31; b++) begin
        if (bfm.rbuf[b][63]) begin
          check(bfm.rbuf[b] == {192'h0, mk(seq_out)}, "ordered record while filling");
          seq_out++; got++;
        end
      end
      reg_rd(32'h0, d);
      check(got + int'(d) == 11, $sformatf("no record lost or duplicated (%0d + %0d)", got, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
