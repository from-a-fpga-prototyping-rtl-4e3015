// AXI4 data interconnect: one master, NSLV slaves, decoded by address.
//
// The DMA engine's memory-mapped data port reaches the DDR4 memory and the
// trace offload FIFO through this block; by default the windows are the
// published data address map (DDR4 at 0x0, trace FIFO at 0x20_0000_0000, 2 GB
// each). Bursts are forwarded unchanged with full addresses.
//
// How it works: the write and read directions are independent and each
// carries one transaction at a time. The address beat is steered
// combinationally to the decoded slave; after its handshake the data beats
// (W, or R) flow straight through between master and that slave at one beat
// per cycle until the last beat, then the B response is passed back. An
// address that hits no window is accepted locally and answered with DECERR
// (write data is drained, len+1 read beats are generated). A window whose
// `blocked` bit is set is answered the same way with SLVERR: this keeps the
// DMA from touching the DDR controller while the reconfigurable partition
// is held in reset. `busy` tells which slave has a transaction in flight.
//
// Timing: zero added latency on every beat; one idle cycle between the end of
// one transaction and the next address beat in the same direction.
module axi_demux
  import mango_pkg::*;
#(
  parameter int unsigned NSLV = 2,
  parameter logic [NSLV-1:0][AXI_ADDR_W-1:0] BASE = {DATA_TRACE_BASE, DATA_DDR_BASE},
  parameter logic [NSLV-1:0][AXI_ADDR_W-1:0] SIZE = {DATA_WIN_SIZE, DATA_WIN_SIZE}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axi_req_t            s_req,
  output axi_rsp_t            s_rsp,
  output axi_req_t [NSLV-1:0] m_req,
  input  axi_rsp_t [NSLV-1:0] m_rsp,
  input  logic     [NSLV-1:0] blocked,
  output logic     [NSLV-1:0] busy
);

  localparam int unsigned SEL_W = (NSLV > 1) ? $clog2(NSLV) : 1;

  function automatic logic [SEL_W:0] decode(input logic [AXI_ADDR_W-1:0] a);
    logic [SEL_W:0] r;
    r = '0;
    for (int unsigned i = 0; i < NSLV; i++) begin
      if (a >= BASE[i] && a < BASE[i] + SIZE[i]) r = {1'b1, SEL_W'(i)};
    end
    return r;
  endfunction

  typedef enum logic [1:0] {A_IDLE, A_DATA, A_RESP} st_e;

  // ---------------- write ----------------
  st_e                 wst;
  logic [SEL_W-1:0]    wsel;
  logic                wloc;      // answered locally
  axi_resp_e           wloc_resp;
  logic [AXI_ID_W-1:0] wid;
  logic [SEL_W:0]      wdec;
  logic                wdec_loc;

  assign wdec     = decode(s_req.aw.addr);
  assign wdec_loc = !wdec[SEL_W] || blocked[wdec[SEL_W-1:0]];

  // ---------------- read ----------------
  st_e                 rdst;
  logic [SEL_W-1:0]    rsel;
  logic                rloc;
  axi_resp_e           rloc_resp;
  logic [AXI_ID_W-1:0] rid;
  logic [7:0]          rlen, rcnt;
  logic [SEL_W:0]      rdec;
  logic                rdec_loc;

  assign rdec     = decode(s_req.ar.addr);
  assign rdec_loc = !rdec[SEL_W] || blocked[rdec[SEL_W-1:0]];

  always_comb begin
    s_rsp = '0;
    for (int unsigned i = 0; i < NSLV; i++) begin
      m_req[i]        = '0;
      m_req[i].aw     = s_req.aw;
      m_req[i].w_data = s_req.w_data;
      m_req[i].w_strb = s_req.w_strb;
      m_req[i].w_last = s_req.w_last;
      m_req[i].ar     = s_req.ar;
      busy[i] = (wst != A_IDLE && !wloc && wsel == SEL_W'(i))
             || (rdst != A_IDLE && !rloc && rsel == SEL_W'(i));
    end

    // write address
    if (wst == A_IDLE && s_req.aw_valid) begin
      if (wdec_loc) begin
        s_rsp.aw_ready = 1'b1;
      end else begin
        m_req[wdec[SEL_W-1:0]].aw_valid = 1'b1;
        s_rsp.aw_ready = m_rsp[wdec[SEL_W-1:0]].aw_ready;
      end
    end
    // write data
    if (wst == A_DATA) begin
      if (wloc) begin
        s_rsp.w_ready = 1'b1;
      end else begin
        m_req[wsel].w_valid = s_req.w_valid;
        s_rsp.w_ready       = m_rsp[wsel].w_ready;
      end
    end
    // write response
    if (wst == A_RESP) begin
      if (wloc) begin
        s_rsp.b_valid = 1'b1;
        s_rsp.b_resp  = wloc_resp;
        s_rsp.b_id    = wid;
      end else begin
        m_req[wsel].b_ready = s_req.b_ready;
        s_rsp.b_valid       = m_rsp[wsel].b_valid;
        s_rsp.b_resp        = m_rsp[wsel].b_resp;
        s_rsp.b_id          = m_rsp[wsel].b_id;
      end
    end

    // read address
    if (rdst == A_IDLE && s_req.ar_valid) begin
      if (rdec_loc) begin
        s_rsp.ar_ready = 1'b1;
      end else begin
        m_req[rdec[SEL_W-1:0]].ar_valid = 1'b1;
        s_rsp.ar_ready = m_rsp[rdec[SEL_W-1:0]].ar_ready;
      end
    end
    // read data
    if (rdst == A_DATA) begin
      if (rloc) begin
        s_rsp.r_valid = 1'b1;
        s_rsp.r_resp  = rloc_resp;
        s_rsp.r_id    = rid;
        s_rsp.r_last  = (rcnt == rlen);
      end else begin
        m_req[rsel].r_ready = s_req.r_ready;
        s_rsp.r_valid       = m_rsp[rsel].r_valid;
        s_rsp.r_resp        = m_rsp[rsel].r_resp;
        s_rsp.r_id          = m_rsp[rsel].r_id;
        s_rsp.r_data        = m_rsp[rsel].r_data;
        s_rsp.r_last        = m_rsp[rsel].r_last;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst       <= A_IDLE;
      wsel      <= '0;
      wloc      <= 1'b0;
      wloc_resp <= RESP_OKAY;
      wid       <= '0;
      rdst      <= A_IDLE;
      rsel      <= '0;
      rloc      <= 1'b0;
      rloc_resp <= RESP_OKAY;
      rid       <= '0;
      rlen      <= '0;
      rcnt      <= '0;
    end else begin
      unique case (wst)
        A_IDLE: if (s_req.aw_valid && s_rsp.aw_ready) begin
          wsel      <= wdec[SEL_W-1:0];
          wloc      <= wdec_loc;
          wloc_resp <= wdec[SEL_W] ? RESP_SLVERR : RESP_DECERR;
          wid       <= s_req.aw.id;
          wst       <= A_DATA;
        end
        A_DATA: if (s_req.w_valid && s_rsp.w_ready && s_req.w_last) wst <= A_RESP;
        A_RESP: if (s_rsp.b_valid && s_req.b_ready) wst <= A_IDLE;
        default: wst <= A_IDLE;
      endcase

      unique case (rdst)
        A_IDLE: if (s_req.ar_valid && s_rsp.ar_ready) begin
          rsel      <= rdec[SEL_W-1:0];
          rloc      <= rdec_loc;
          rloc_resp <= rdec[SEL_W] ? RESP_SLVERR : RESP_DECERR;
          rid       <= s_req.ar.id;
          rlen      <= s_req.ar.len;
          rcnt      <= '0;
          rdst      <= A_DATA;
        end
        A_DATA: if (s_rsp.r_valid && s_req.r_ready) begin
          rcnt <= rcnt + 8'd1;
          if (s_rsp.r_last) rdst <= A_IDLE;
        end
        default: rdst <= A_IDLE;
      endcase
    end
  end

  // AXI rule: the master must hold a valid address until it is accepted.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.aw_valid && !s_rsp.aw_ready |=> s_req.aw_valid);
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.ar_valid && !s_rsp.ar_ready |=> s_req.ar_valid);

endmodule
