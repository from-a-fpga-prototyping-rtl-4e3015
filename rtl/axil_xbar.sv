// AXI4-Lite control interconnect: one master, NSLV slaves.
//
// The host reaches every control and status register of the shell through a
// single AXI4-Lite port; this block decodes the address against a table of
// base/size windows (by default the published control address map) and steers
// the transaction to one slave. An address outside every window is answered
// locally with DECERR, so the host never hangs on a stray access.
//
// Timing: one write and one read may be in flight at a time, each handled by
// its own small state machine. A write is accepted once both AW and W are
// valid (1 cycle), forwarded to the slave until it has taken AW and W, and the
// slave's B response is registered and returned (>= 3 cycles end to end). A
// read is accepted, forwarded, and the R beat registered in the same way.
// A slave whose `blocked` bit is set (the OpenCL region while it is being
// partially reconfigured) is not forwarded to; the access gets SLVERR. `busy`
// tells which slave has a transaction in flight, so isolation can wait for it.
// Slave addresses are passed on unchanged (full address); slaves decode only
// their low bits. The one-at-a-time policy and register stages are design
// choices: control traffic is low-throughput by definition.
module axil_xbar
  import mango_pkg::*;
#(
  parameter int unsigned NSLV = CTRL_NSLV,
  parameter logic [NSLV-1:0][AXIL_ADDR_W-1:0] BASE = CTRL_BASE,
  parameter logic [NSLV-1:0][AXIL_ADDR_W-1:0] SIZE = CTRL_SIZE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axil_req_t            s_req,
  output axil_rsp_t            s_rsp,
  output axil_req_t [NSLV-1:0] m_req,
  input  axil_rsp_t [NSLV-1:0] m_rsp,
  input  logic      [NSLV-1:0] blocked,  // slave isolated: answer SLVERR locally
  output logic      [NSLV-1:0] busy      // a transaction is in flight at that slave
);

  localparam int unsigned SEL_W = (NSLV > 1) ? $clog2(NSLV) : 1;

  // address decode: returns hit flag and index
  function automatic logic [SEL_W:0] decode(input logic [AXIL_ADDR_W-1:0] a);
    logic [SEL_W:0] r;
    r = '0;
    for (int unsigned i = 0; i < NSLV; i++) begin
      if (a >= BASE[i] && a < BASE[i] + SIZE[i]) begin
        r = {1'b1, SEL_W'(i)};
      end
    end
    return r;
  endfunction

  typedef enum logic [1:0] {IDLE, FWD, RESP} st_e;

  // ---------------- write path ----------------
  st_e                    wst;
  logic [SEL_W-1:0]       wsel;
  logic [AXIL_ADDR_W-1:0] waddr;
  logic [AXIL_DATA_W-1:0] wdata;
  logic [AXIL_STRB_W-1:0] wstrb;
  logic                   aw_done, w_done;
  axi_resp_e              bresp;
  logic [SEL_W:0]         wdec;

  assign wdec = decode(s_req.aw_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst     <= IDLE;
      wsel    <= '0;
      waddr   <= '0;
      wdata   <= '0;
      wstrb   <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      bresp   <= RESP_OKAY;
    end else begin
      unique case (wst)
        IDLE: if (s_req.aw_valid && s_req.w_valid) begin
          waddr   <= s_req.aw_addr;
          wdata   <= s_req.w_data;
          wstrb   <= s_req.w_strb;
          wsel    <= wdec[SEL_W-1:0];
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (wdec[SEL_W] && blocked[wdec[SEL_W-1:0]]) begin
            bresp <= RESP_SLVERR;
            wst   <= RESP;
          end else if (wdec[SEL_W]) begin
            wst <= FWD;
          end else begin
            bresp <= RESP_DECERR;
            wst   <= RESP;
          end
        end
        FWD: begin
          if (m_rsp[wsel].aw_ready) aw_done <= 1'b1;
          if (m_rsp[wsel].w_ready)  w_done  <= 1'b1;
          if ((aw_done || m_rsp[wsel].aw_ready) && (w_done || m_rsp[wsel].w_ready)
              && m_rsp[wsel].b_valid) begin
            bresp <= m_rsp[wsel].b_resp;
            wst   <= RESP;
          end
        end
        RESP: if (s_req.b_ready) wst <= IDLE;
        default: wst <= IDLE;
      endcase
    end
  end

  // ---------------- read path ----------------
  st_e                    rdst;
  logic [SEL_W-1:0]       rsel;
  logic [AXIL_ADDR_W-1:0] raddr;
  logic                   ar_done;
  logic [AXIL_DATA_W-1:0] rdata;
  axi_resp_e              rresp;
  logic [SEL_W:0]         rdec;

  assign rdec = decode(s_req.ar_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdst     <= IDLE;
      rsel    <= '0;
      raddr   <= '0;
      ar_done <= 1'b0;
      rdata   <= '0;
      rresp   <= RESP_OKAY;
    end else begin
      unique case (rdst)
        IDLE: if (s_req.ar_valid) begin
          raddr   <= s_req.ar_addr;
          rsel    <= rdec[SEL_W-1:0];
          ar_done <= 1'b0;
          if (rdec[SEL_W] && blocked[rdec[SEL_W-1:0]]) begin
            rdata <= '0;
            rresp <= RESP_SLVERR;
            rdst  <= RESP;
          end else if (rdec[SEL_W]) begin
            rdst <= FWD;
          end else begin
            rdata <= '0;
            rresp <= RESP_DECERR;
            rdst   <= RESP;
          end
        end
        FWD: begin
          if (m_rsp[rsel].ar_ready) ar_done <= 1'b1;
          if ((ar_done || m_rsp[rsel].ar_ready) && m_rsp[rsel].r_valid) begin
            rdata <= m_rsp[rsel].r_data;
            rresp <= m_rsp[rsel].r_resp;
            rdst   <= RESP;
          end
        end
        RESP: if (s_req.r_ready) rdst <= IDLE;
        default: rdst <= IDLE;
      endcase
    end
  end

  // ---------------- outputs ----------------
  always_comb begin
    for (int unsigned i = 0; i < NSLV; i++) begin
      busy[i]           = (wst == FWD && wsel == SEL_W'(i)) || (rdst == FWD && rsel == SEL_W'(i));
      m_req[i]          = '0;
      m_req[i].aw_addr  = waddr;
      m_req[i].w_data   = wdata;
      m_req[i].w_strb   = wstrb;
      m_req[i].ar_addr  = raddr;
      if (wst == FWD && wsel == SEL_W'(i)) begin
        m_req[i].aw_valid = !aw_done;
        m_req[i].w_valid  = !w_done;
        m_req[i].b_ready  = (aw_done || m_rsp[i].aw_ready) && (w_done || m_rsp[i].w_ready);
      end
      if (rdst == FWD && rsel == SEL_W'(i)) begin
        m_req[i].ar_valid = !ar_done;
        m_req[i].r_ready  = ar_done || m_rsp[i].ar_ready;
      end
    end
    s_rsp          = '0;
    s_rsp.aw_ready = (wst == IDLE) && s_req.aw_valid && s_req.w_valid;
    s_rsp.w_ready  = (wst == IDLE) && s_req.aw_valid && s_req.w_valid;
    s_rsp.b_valid  = (wst == RESP);
    s_rsp.b_resp   = bresp;
    s_rsp.ar_ready = (rdst == IDLE);
    s_rsp.r_valid  = (rdst == RESP);
    s_rsp.r_data   = rdata;
    s_rsp.r_resp   = rresp;
  end

  // AXI rule: a valid, once raised, stays until its handshake.
  for (genvar i = 0; i < NSLV; i++) begin : g_chk
    a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
      m_req[i].aw_valid && !m_rsp[i].aw_ready |=> m_req[i].aw_valid);
    a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
      m_req[i].ar_valid && !m_rsp[i].ar_ready |=> m_req[i].ar_valid);
  end

endmodule
