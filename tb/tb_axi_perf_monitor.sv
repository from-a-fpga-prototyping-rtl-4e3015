// Self-checking testbench for axi_perf_monitor: random handshake traffic on
// the watched port is counted by an independent model in the testbench and
// compared with the counter registers; trace records are compared one by one
// (type, id, len, spacing of timestamps); enable, trace enable, clear and
// the lost-record counter are exercised.
module tb_axi_perf_monitor;
  import mango_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  req;
  axil_rsp_t  rsp;
  axi_req_t   mon_req;
  axi_rsp_t   mon_rsp;
  logic       trace_valid;
  trace_rec_t trace_rec;
  int checks = 0, failures = 0;

  axi_perf_monitor dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .mon_req, .mon_rsp,
                        .trace_valid, .trace_rec);
  axil_master_bfm bfm (.clk, .req, .rsp);

  // traffic generator and reference model
  bit          traffic;      // generate random handshakes
  bit          counting;     // model: count enabled
  bit          tracing;      // model: trace enabled
  longint unsigned cyc;      // free-running cycle count of the testbench
  longint unsigned m_wtx, m_wb, m_wby, m_rtx, m_rb, m_rby, m_cyc;
  bit          quiet;        // no address handshake allowed this cycle
  typedef struct { bit w; logic [3:0] id; logic [7:0] len; longint unsigned c; } ev_t;
  ev_t exp_q [$];
  ev_t got_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    mon_req = '0;
    mon_rsp = '0;
    if (traffic) begin
      bit aw, ar;
      aw = !quiet && ($urandom_range(3) == 0);
      ar = !quiet && ($urandom_range(3) == 0);
      mon_req.aw_valid = aw || ($urandom_range(7) == 0);
      mon_rsp.aw_ready = aw;
      mon_req.aw       = '{id: 4'($urandom), addr: 64'($urandom), len: 8'($urandom),
                           size: 3'($urandom_range(5)), burst: 2'b01};
      mon_req.ar_valid = ar;
      mon_rsp.ar_ready = ar || ($urandom_range(7) == 0);
      mon_req.ar       = '{id: 4'($urandom), addr: 64'($urandom), len: 8'($urandom),
                           size: 3'($urandom_range(5)), burst: 2'b01};
      mon_req.w_valid  = $urandom_range(1);
      mon_rsp.w_ready  = $urandom_range(1);
      mon_rsp.r_valid  = $urandom_range(1);
      mon_req.r_ready  = $urandom_range(1);
      quiet = aw && ar;   // after a collision keep one cycle free
    end else begin
      quiet = 0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (counting) begin
        m_cyc++;
        if (mon_req.aw_valid && mon_rsp.aw_ready) begin
          m_wtx++; m_wby += longint'({1'b0, mon_req.aw.len} + 9'd1) << mon_req.aw.size;
        end
        if (mon_req.ar_valid && mon_rsp.ar_ready) begin
          m_rtx++; m_rby += longint'({1'b0, mon_req.ar.len} + 9'd1) << mon_req.ar.size;
        end
        if (mon_req.w_valid && mon_rsp.w_ready) m_wb++;
        if (mon_rsp.r_valid && mon_req.r_ready) m_rb++;
      end
      if (tracing) begin
        if (mon_req.aw_valid && mon_rsp.aw_ready)
          exp_q.push_back('{1, mon_req.aw.id, mon_req.aw.len, cyc});
        if (mon_req.ar_valid && mon_rsp.ar_ready)
          exp_q.push_back('{0, mon_req.ar.id, mon_req.ar.len, cyc});
      end
      if (trace_valid)
        got_q.push_back('{trace_rec.is_write, trace_rec.id, trace_rec.len, longint'(trace_rec.timestamp)});
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    axi_resp_e r;
    bfm.read(a, d, r);
  endtask

  task automatic compare_counters(input string tag);
    logic [31:0] lo, hi;
    rd(32'h08, lo); rd(32'h0C, hi);
    check({hi, lo} == m_cyc, $sformatf("%s cycles %0d vs %0d", tag, {hi, lo}, m_cyc));
    rd(32'h10, lo); check(lo == 32'(m_wtx), $sformatf("%s wr txn %0d vs %0d", tag, lo, m_wtx));
    rd(32'h14, lo); check(lo == 32'(m_wb),  $sformatf("%s wr beats %0d vs %0d", tag, lo, m_wb));
    rd(32'h18, lo); rd(32'h1C, hi);
    check({hi, lo} == m_wby, $sformatf("%s wr bytes %0d vs %0d", tag, {hi, lo}, m_wby));
    rd(32'h20, lo); check(lo == 32'(m_rtx), $sformatf("%s rd txn %0d vs %0d", tag, lo, m_rtx));
    rd(32'h24, lo); check(lo == 32'(m_rb),  $sformatf("%s rd beats %0d vs %0d", tag, lo, m_rb));
    rd(32'h28, lo); rd(32'h2C, hi);
    check({hi, lo} == m_rby, $sformatf("%s rd bytes %0d vs %0d", tag, {hi, lo}, m_rby));
  endtask

  initial begin
    axi_resp_e   r;
    logic [31:0] d;
    traffic = 0; counting = 0; tracing = 0; cyc = 0;
    m_wtx = 0; m_wb = 0; m_wby = 0; m_rtx = 0; m_rb = 0; m_rby = 0; m_cyc = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // counters are zero and disabled after reset
    traffic = 1;
    repeat (50) @(posedge clk);
    traffic = 0;
    @(posedge clk);
    compare_counters("disabled");
    check(got_q.size() == 0, "no trace while disabled");
    // enable counting and tracing; the register write takes effect at the
    // edge where wr_en is high, which is the BFM's first edge
    fork
      bfm.write(32'h0, 32'h3, 4'hF, r);
      begin @(posedge clk); counting = 1; tracing = 1; end
    join
    traffic = 1;
    repeat (2000) @(posedge clk);
    traffic = 0;
    fork
      bfm.write(32'h0, 32'h0, 4'hF, r);
      begin @(posedge clk); counting = 0; tracing = 0; end
    join
    repeat (3) @(posedge clk);
    compare_counters("enabled");
    check(m_wtx > 100 && m_rtx > 100, "traffic was generated");
    // trace records
    check(got_q.size() == exp_q.size(), $sformatf("trace records %0d vs %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++) begin
      check(got_q[i].w == exp_q[i].w && got_q[i].id == exp_q[i].id && got_q[i].len == exp_q[i].len,
            $sformatf("trace record %0d", i));
      if (i > 0)
        check(got_q[i].c - got_q[i-1].c == exp_q[i].c - exp_q[i-1].c,
              $sformatf("timestamp spacing of record %0d", i));
    end
    rd(32'h0, d);
    check(d == 0, "control reads back disabled");
    rd(32'h30, d);
    check(d == 0, "no record lost");
    // two back-to-back collisions lose one record
    fork
      bfm.write(32'h0, 32'h3, 4'hF, r);
    join
    @(negedge clk);
    repeat (2) begin
      @(negedge clk);
      #1;
      mon_req.aw_valid = 1; mon_rsp.aw_ready = 1; mon_req.ar_valid = 1; mon_rsp.ar_ready = 1;
    end
    @(negedge clk);
    rd(32'h30, d);
    check(d == 1, $sformatf("lost records %0d", d));
    // clear
    bfm.write(32'h0, 32'h8000_0000, 4'hF, r);
    rd(32'h10, d); check(d == 0, "clear wr txn");
    rd(32'h20, d); check(d == 0, "clear rd txn");
    rd(32'h30, d); check(d == 0, "clear lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
