// Behavioural AXI4 slave memory for testbenches (stands in for the DDR4
// controller and its memory; not synthesizable). Sparse storage of
// 256-bit words indexed by address / 32, INCR bursts, one write and one read
// at a time. With RAND_READY set, ready/valid toggle at random; otherwise it
// takes one beat per cycle. Unwritten words read as zero. Counts the
// address handshakes it saw (n_aw, n_ar) so a test can prove an access never
// arrived.
module axi_mem_model
  import mango_pkg::*;
#(
  parameter bit RAND_READY = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp
);

  logic [AXI_DATA_W-1:0] mem [longint unsigned];
  int unsigned n_aw, n_ar;

  logic                 w_act, b_pend, r_act;
  longint unsigned      w_addr, r_addr;
  logic [AXI_ID_W-1:0]  w_id, r_id;
  logic [7:0]           r_left;

  function automatic bit coin();
    return RAND_READY ? ($urandom_range(3) != 0) : 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp    <= '0;
      w_act  <= 1'b0;
      b_pend <= 1'b0;
      r_act  <= 1'b0;
      n_aw   <= 0;
      n_ar   <= 0;
    end else begin
      // write address
      if (req.aw_valid && rsp.aw_ready) begin
        w_act  <= 1'b1;
        w_addr <= req.aw.addr >> 5;
        w_id   <= req.aw.id;
        n_aw   <= n_aw + 1;
      end
      rsp.aw_ready <= !w_act && !b_pend && !(req.aw_valid && rsp.aw_ready) && coin();
      // write data
      if (req.w_valid && rsp.w_ready) begin
        logic [AXI_DATA_W-1:0] old;
        old = mem.exists(w_addr) ? mem[w_addr] : '0;
        for (int b = 0; b < AXI_STRB_W; b++)
          if (req.w_strb[b]) old[b*8 +: 8] = req.w_data[b*8 +: 8];
        mem[w_addr] = old;
        w_addr <= w_addr + 1;
        if (req.w_last) begin
          w_act  <= 1'b0;
          b_pend <= 1'b1;
        end
      end
      rsp.w_ready <= w_act && !(req.w_valid && rsp.w_ready && req.w_last) && coin();
      // write response
      if (rsp.b_valid && req.b_ready) begin
        rsp.b_valid <= 1'b0;
        b_pend      <= 1'b0;
      end else if (b_pend && !rsp.b_valid && coin()) begin
        rsp.b_valid <= 1'b1;
        rsp.b_id    <= w_id;
        rsp.b_resp  <= RESP_OKAY;
      end
      // read
      if (req.ar_valid && rsp.ar_ready) begin
        r_act  <= 1'b1;
        r_addr <= req.ar.addr >> 5;
        r_id   <= req.ar.id;
        r_left <= req.ar.len;
        n_ar   <= n_ar + 1;
      end
      rsp.ar_ready <= !r_act && !(req.ar_valid && rsp.ar_ready) && coin();
      if (rsp.r_valid && req.r_ready) begin
        rsp.r_valid <= 1'b0;
        if (rsp.r_last) r_act <= 1'b0;
        else begin
          r_addr <= r_addr + 1;
          r_left <= r_left - 1;
        end
      end
      if (r_act && (!rsp.r_valid || req.r_ready) && !(rsp.r_valid && req.r_ready && rsp.r_last)) begin
        longint unsigned a;
        logic [7:0] left;
        a    = (rsp.r_valid && req.r_ready) ? r_addr + 1 : r_addr;
        left = (rsp.r_valid && req.r_ready) ? r_left - 1 : r_left;
        if (coin()) begin
          rsp.r_valid <= 1'b1;
          rsp.r_data  <= mem.exists(a) ? mem[a] : '0;
          rsp.r_id    <= r_id;
          rsp.r_resp  <= RESP_OKAY;
          rsp.r_last  <= (left == 0);
        end
      end
    end
  end

endmodule
