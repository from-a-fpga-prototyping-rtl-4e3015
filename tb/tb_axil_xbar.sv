// Self-checking testbench for axil_xbar with the shell's control address
// map: every window routes to its own slave (and only to it), window edges,
// unmapped holes answer DECERR, blocked slaves answer SLVERR without being
// touched, and busy marks the slave being accessed.
module tb_axil_xbar;
  import mango_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t                 req;
  axil_rsp_t                 rsp;
  axil_req_t [CTRL_NSLV-1:0] m_req;
  axil_rsp_t [CTRL_NSLV-1:0] m_rsp;
  logic      [CTRL_NSLV-1:0] blocked, busy;
  int checks = 0, failures = 0;
  int busy_seen [CTRL_NSLV];

  axil_xbar dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .m_req, .m_rsp, .blocked, .busy);
  axil_master_bfm bfm (.clk, .req, .rsp);

  for (genvar i = 0; i < CTRL_NSLV; i++) begin : g_slv
    axil_reg_model #(.RAND_DELAY(1'b1)) u_slv (.clk, .rst_n, .req(m_req[i]), .rsp(m_rsp[i]));
  end

  // expected map, written out independently of the package
  localparam logic [31:0] EXP_BASE [9] = '{32'h0000_0000, 32'h0003_0000, 32'h0003_1000,
    32'h0003_2000, 32'h0005_0000, 32'h0005_1000, 32'h0006_0000, 32'h0010_0000, 32'h0011_0000};
  localparam logic [31:0] EXP_SIZE [9] = '{32'h2_0000, 32'h1000, 32'h1000, 32'h1000,
    32'h1000, 32'h1000, 32'h2_0000, 32'h1_0000, 32'h1000};

  always @(posedge clk) for (int i = 0; i < CTRL_NSLV; i++) if (busy[i]) busy_seen[i]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int total_wr();
    int t = 0;
    t += g_slv[0].u_slv.n_wr + g_slv[1].u_slv.n_wr + g_slv[2].u_slv.n_wr;
    t += g_slv[3].u_slv.n_wr + g_slv[4].u_slv.n_wr + g_slv[5].u_slv.n_wr;
    t += g_slv[6].u_slv.n_wr + g_slv[7].u_slv.n_wr + g_slv[8].u_slv.n_wr;
    return t;
  endfunction
  function automatic int total_rd();
    int t = 0;
    t += g_slv[0].u_slv.n_rd + g_slv[1].u_slv.n_rd + g_slv[2].u_slv.n_rd;
    t += g_slv[3].u_slv.n_rd + g_slv[4].u_slv.n_rd + g_slv[5].u_slv.n_rd;
    t += g_slv[6].u_slv.n_rd + g_slv[7].u_slv.n_rd + g_slv[8].u_slv.n_rd;
    return t;
  endfunction
  function automatic logic [31:0] slave_reg(input int s, input int idx);
    case (s)
      0: return g_slv[0].u_slv.regs[idx];
      1: return g_slv[1].u_slv.regs[idx];
      2: return g_slv[2].u_slv.regs[idx];
      3: return g_slv[3].u_slv.regs[idx];
      4: return g_slv[4].u_slv.regs[idx];
      5: return g_slv[5].u_slv.regs[idx];
      6: return g_slv[6].u_slv.regs[idx];
      7: return g_slv[7].u_slv.regs[idx];
      default: return g_slv[8].u_slv.regs[idx];
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    axi_resp_e   r;
    int          w0, r0;
    blocked = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // each window: write a distinct value at base and at the top word
    for (int s = 0; s < 9; s++) begin
      logic [31:0] lo_a, hi_a;
      lo_a = EXP_BASE[s] + 32'h8;
      hi_a = EXP_BASE[s] + EXP_SIZE[s] - 4;      // regs index 15
      bfm.write(lo_a, 32'hA000_0000 + s, 4'hF, r);
      check(r == RESP_OKAY, $sformatf("write slave %0d resp", s));
      bfm.write(hi_a, 32'hB000_0000 + s, 4'hF, r);
      check(r == RESP_OKAY, $sformatf("write top of slave %0d resp", s));
    end
    for (int s = 0; s < 9; s++) begin
      check(slave_reg(s, 2) == 32'hA000_0000 + s, $sformatf("slave %0d got its write", s));
      check(slave_reg(s, 15) == 32'hB000_0000 + s, $sformatf("slave %0d got its top write", s));
      bfm.read(EXP_BASE[s] + 32'h8, d, r);
      check(d == 32'hA000_0000 + s && r == RESP_OKAY, $sformatf("read slave %0d: %h", s, d));
      check(busy_seen[s] > 0, $sformatf("busy seen for slave %0d", s));
    end
    check(total_wr() == 18 && total_rd() == 9, "each access reached exactly one slave");
    // holes in the map
    begin
      logic [31:0] holes [6];
      holes = '{32'h0002_0000, 32'h0003_3000, 32'h0004_FFFC,
                                 32'h0005_2000, 32'h0008_0000, 32'h0011_1000};
      w0 = total_wr(); r0 = total_rd();
      foreach (holes[h]) begin
        bfm.write(holes[h], 32'h1, 4'hF, r);
        check(r == RESP_DECERR, $sformatf("hole %h write DECERR", holes[h]));
        check(bfm.last_cycles == 2, "DECERR write answered in 2 cycles");
        bfm.read(holes[h], d, r);
        check(r == RESP_DECERR && d == 0, $sformatf("hole %h read DECERR", holes[h]));
      end
      check(total_wr() == w0 && total_rd() == r0, "holes reach no slave");
    end
    // blocked slaves
    blocked[CTRL_OCL]     = 1'b1;
    blocked[CTRL_DDR_CTL] = 1'b1;
    w0 = total_wr(); r0 = total_rd();
    bfm.write(32'h0000_0010, 32'h77, 4'hF, r);
    check(r == RESP_SLVERR, "blocked OpenCL region write SLVERR");
    bfm.read(32'h0006_0010, d, r);
    check(r == RESP_SLVERR, "blocked DDR controller read SLVERR");
    bfm.write(32'h0003_0000, 32'h1, 4'hF, r);
    check(r == RESP_OKAY, "unblocked slave still reachable");
    check(total_wr() == w0 + 1 && total_rd() == r0, "blocked slaves untouched");
    blocked = '0;
    // random traffic
    for (int i = 0; i < 200; i++) begin
      int s, k;
      logic [31:0] v;
      s = $urandom_range(8); k = $urandom_range(15); v = $urandom;
      bfm.write(EXP_BASE[s] + 32'(k * 4), v, 4'hF, r);
      bfm.read(EXP_BASE[s] + 32'(k * 4), d, r);
      check(d == v && slave_reg(s, k) == v, "random write/read-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
