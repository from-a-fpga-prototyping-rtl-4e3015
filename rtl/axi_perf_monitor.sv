// AXI performance monitor for the DMA data port.
//
// Watches (never drives) an AXI4 request/response pair and counts, while
// enabled: write and read transactions (address handshakes), write and read
// data beats, and bytes requested ((len+1) << size at each address
// handshake), plus the number of enabled cycles. When tracing is enabled it
// also emits one trace record per address handshake, stamped with a
// free-running 48-bit cycle counter, towards the trace offload FIFO.
//
// Register map (AXI4-Lite, byte offsets; layout is a design choice):
//   0x00 CTRL      bit0 count enable, bit1 trace enable; writing bit31=1
//                  clears all counters (self-clearing)
//   0x08/0x0C CYCLES lo/hi   enabled cycles (64 bit)
//   0x10 WR_TXN   0x14 WR_BEATS   0x18/0x1C WR_BYTES lo/hi
//   0x20 RD_TXN   0x24 RD_BEATS   0x28/0x2C RD_BYTES lo/hi
//   0x30 TRACE_LOST  records lost because a write and a read record
//                    collided twice in a row
// Timing: counters update the cycle after the handshake they count. A trace
// record leaves one cycle after its handshake; when a write and a read
// address handshake fall in the same cycle the read record follows one
// cycle later.
module axi_perf_monitor
  import mango_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_req,
  output axil_rsp_t  s_rsp,
  input  axi_req_t   mon_req,
  input  axi_rsp_t   mon_rsp,
  output logic       trace_valid,
  output trace_rec_t trace_rec
);

  localparam int unsigned AW = 16;

  logic                   wr_en, rd_en;
  logic [AW-1:0]          wr_addr, rd_addr;
  logic [AXIL_DATA_W-1:0] wr_data, rd_data;
  logic [AXIL_STRB_W-1:0] wr_strb;

  axil_regif #(.ADDR_W(AW)) u_if (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  logic        cnt_en, trc_en, clr;
  logic [63:0] cycles, wr_bytes, rd_bytes;
  logic [31:0] wr_txn, wr_beats, rd_txn, rd_beats, trace_lost;
  logic [47:0] tstamp;
  logic        aw_hs, w_hs, ar_hs, r_hs;
  logic        pend_v;
  trace_rec_t  pend_rec, aw_rec, ar_rec;

  assign aw_hs = mon_req.aw_valid && mon_rsp.aw_ready;
  assign w_hs  = mon_req.w_valid  && mon_rsp.w_ready;
  assign ar_hs = mon_req.ar_valid && mon_rsp.ar_ready;
  assign r_hs  = mon_rsp.r_valid  && mon_req.r_ready;
  assign clr   = wr_en && wr_addr[AW-1:2] == '0 && wr_strb[3] && wr_data[31];

  function automatic logic [63:0] burst_bytes(input axi_ax_t ax);
    return 64'({1'b0, ax.len} + 9'd1) << ax.size;
  endfunction

  always_comb begin
    aw_rec           = '0;
    aw_rec.valid     = 1'b1;
    aw_rec.is_write  = 1'b1;
    aw_rec.id        = mon_req.aw.id;
    aw_rec.len       = mon_req.aw.len;
    aw_rec.timestamp = tstamp;
    ar_rec           = '0;
    ar_rec.valid     = 1'b1;
    ar_rec.is_write  = 1'b0;
    ar_rec.id        = mon_req.ar.id;
    ar_rec.len       = mon_req.ar.len;
    ar_rec.timestamp = tstamp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_en      <= 1'b0;
      trc_en      <= 1'b0;
      cycles      <= '0;
      wr_bytes    <= '0;
      rd_bytes    <= '0;
      wr_txn      <= '0;
      wr_beats    <= '0;
      rd_txn      <= '0;
      rd_beats    <= '0;
      trace_lost  <= '0;
      tstamp      <= '0;
      pend_v      <= 1'b0;
      pend_rec    <= '0;
      trace_valid <= 1'b0;
      trace_rec   <= '0;
    end else begin
      tstamp <= tstamp + 48'd1;
      if (wr_en && wr_addr[AW-1:2] == '0 && wr_strb[0]) begin
        cnt_en <= wr_data[0];
        trc_en <= wr_data[1];
      end
      if (clr) begin
        cycles     <= '0;
        wr_bytes   <= '0;
        rd_bytes   <= '0;
        wr_txn     <= '0;
        wr_beats   <= '0;
        rd_txn     <= '0;
        rd_beats   <= '0;
        trace_lost <= '0;
      end else if (cnt_en) begin
        cycles <= cycles + 64'd1;
        if (aw_hs) begin
          wr_txn   <= wr_txn + 32'd1;
          wr_bytes <= wr_bytes + burst_bytes(mon_req.aw);
        end
        if (ar_hs) begin
          rd_txn   <= rd_txn + 32'd1;
          rd_bytes <= rd_bytes + burst_bytes(mon_req.ar);
        end
        if (w_hs) wr_beats <= wr_beats + 32'd1;
        if (r_hs) rd_beats <= rd_beats + 32'd1;
        if (trc_en && aw_hs && ar_hs && pend_v) trace_lost <= trace_lost + 32'd1;
      end

      // trace record emission
      trace_valid <= 1'b0;
      if (trc_en) begin
        if (aw_hs) begin
          trace_valid <= 1'b1;
          trace_rec   <= aw_rec;
          if (ar_hs) begin
            pend_v   <= 1'b1;
            pend_rec <= ar_rec;
          end
        end else if (ar_hs) begin
          trace_valid <= 1'b1;
          trace_rec   <= ar_rec;
        end else if (pend_v) begin
          trace_valid <= 1'b1;
          trace_rec   <= pend_rec;
          pend_v      <= 1'b0;
        end
      end else begin
        pend_v <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (rd_addr[AW-1:2])
      14'h00:  rd_data = {30'd0, trc_en, cnt_en};
      14'h02:  rd_data = cycles[31:0];
      14'h03:  rd_data = cycles[63:32];
      14'h04:  rd_data = wr_txn;
      14'h05:  rd_data = wr_beats;
      14'h06:  rd_data = wr_bytes[31:0];
      14'h07:  rd_data = wr_bytes[63:32];
      14'h08:  rd_data = rd_txn;
      14'h09:  rd_data = rd_beats;
      14'h0A:  rd_data = rd_bytes[31:0];
      14'h0B:  rd_data = rd_bytes[63:32];
      14'h0C:  rd_data = trace_lost;
      default: rd_data = '0;
    endcase
  end

endmodule
