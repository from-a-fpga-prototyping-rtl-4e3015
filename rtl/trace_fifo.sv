// Trace offload FIFO for application profiling.
//
// Profiling records (from the AXI performance monitor) are buffered here and
// drained by the host through the DMA data window at 0x20_0000_0000, so that
// large traces can be read with ordinary DMA bursts instead of register
// reads. The host checks the fill level over the control interface first.
//
// Data side (AXI4 slave, read-only): every R beat of a read burst pops one
// 64-bit record into r_data[63:0] (upper bits zero). If the FIFO is empty the
// beat returns zero, which the host recognises by bit 63 (record valid) being
// clear. Writes to the data window are drained and answered with SLVERR.
// One R beat per cycle; the first beat comes one cycle after AR is accepted.
//
// Control side (AXI4-Lite, byte offsets; a design choice):
//   0x0 OCCUPANCY  records held        0x4 DROPPED  records lost to a full FIFO
//   0x8 CTRL       write bit0=1 to flush the FIFO and clear DROPPED
//   0xC DEPTH      capacity in records
// DEPTH is this design's choice (512 records); the platform does not fix it.
module trace_fifo
  import mango_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  // records in
  input  logic       trace_valid,
  input  trace_rec_t trace_rec,
  // data window
  input  axi_req_t   s_axi_req,
  output axi_rsp_t   s_axi_rsp,
  // control registers
  input  axil_req_t  s_axil_req,
  output axil_rsp_t  s_axil_rsp
);

  localparam int unsigned AW = 12;

  // ---------------- control registers ----------------
  logic                   wr_en, rd_en;
  logic [AW-1:0]          wr_addr, rd_addr;
  logic [AXIL_DATA_W-1:0] wr_data, rd_data;
  logic [AXIL_STRB_W-1:0] wr_strb;

  axil_regif #(.ADDR_W(AW)) u_if (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  logic                   flush, full, empty, pop;
  logic [$clog2(DEPTH):0] count;
  logic [63:0]            head;
  logic [31:0]            dropped;

  assign flush = wr_en && wr_addr[AW-1:2] == 10'd2 && wr_strb[0] && wr_data[0];

  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .flush,
    .wr_en(trace_valid), .wr_data(trace_rec),
    .rd_en(pop), .rd_data(head),
    .full, .empty, .count
  );

  always_ff @(posedge clk) begin
    if (!rst_n || flush)          dropped <= '0;
    else if (trace_valid && full) dropped <= dropped + 32'd1;
  end

  always_comb begin
    unique case (rd_addr[AW-1:2])
      10'd0:   rd_data = 32'(count);
      10'd1:   rd_data = dropped;
      10'd3:   rd_data = 32'(DEPTH);
      default: rd_data = '0;
    endcase
  end

  // ---------------- data window ----------------
  typedef enum logic [1:0] {D_IDLE, D_RDATA, D_WDATA, D_WRESP} dst_e;
  dst_e                dst_q;
  logic [AXI_ID_W-1:0] rid, wid;
  logic [7:0]          rlen, rcnt;

  assign pop   = (dst_q == D_RDATA) && s_axi_req.r_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dst_q <= D_IDLE;
      rid   <= '0;
      wid   <= '0;
      rlen  <= '0;
      rcnt  <= '0;
    end else begin
      unique case (dst_q)
        D_IDLE: begin
          if (s_axi_req.ar_valid) begin
            rid   <= s_axi_req.ar.id;
            rlen  <= s_axi_req.ar.len;
            rcnt  <= '0;
            dst_q <= D_RDATA;
          end else if (s_axi_req.aw_valid) begin
            wid   <= s_axi_req.aw.id;
            dst_q <= D_WDATA;
          end
        end
        D_RDATA: if (s_axi_req.r_ready) begin
          rcnt <= rcnt + 8'd1;
          if (rcnt == rlen) dst_q <= D_IDLE;
        end
        D_WDATA: if (s_axi_req.w_valid && s_axi_req.w_last) dst_q <= D_WRESP;
        D_WRESP: if (s_axi_req.b_ready) dst_q <= D_IDLE;
        default: dst_q <= D_IDLE;
      endcase
    end
  end

  always_comb begin
    s_axi_rsp          = '0;
    s_axi_rsp.ar_ready = (dst_q == D_IDLE);
    s_axi_rsp.aw_ready = (dst_q == D_IDLE) && !s_axi_req.ar_valid;
    s_axi_rsp.w_ready  = (dst_q == D_WDATA);
    s_axi_rsp.b_valid  = (dst_q == D_WRESP);
    s_axi_rsp.b_resp   = RESP_SLVERR;
    s_axi_rsp.b_id     = wid;
    s_axi_rsp.r_valid  = (dst_q == D_RDATA);
    s_axi_rsp.r_id     = rid;
    s_axi_rsp.r_resp   = RESP_OKAY;
    s_axi_rsp.r_last   = (rcnt == rlen);
    s_axi_rsp.r_data   = empty ? '0 : AXI_DATA_W'(head);
  end


endmodule
