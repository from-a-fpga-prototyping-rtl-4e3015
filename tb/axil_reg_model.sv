// Behavioural AXI4-Lite slave for testbenches (stands in for the clock
// wizards, the DDR4 controller's registers and the OpenCL region; not
// synthesizable). Sixteen 32-bit registers at addr[5:2], OKAY responses,
// random response delays when RAND_DELAY is set. n_wr and n_rd count the
// accesses that reached it.
module axil_reg_model
  import mango_pkg::*;
#(
  parameter bit RAND_DELAY = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp
);

  logic [31:0] regs [16];
  int unsigned n_wr, n_rd;
  logic        aw_got, w_got;
  logic [3:0]  w_idx;
  logic [31:0] w_dat;
  logic        r_got;
  logic [3:0]  r_idx;

  function automatic bit coin();
    return RAND_DELAY ? ($urandom_range(2) == 0) : 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp    <= '0;
      n_wr   <= 0;
      n_rd   <= 0;
      aw_got <= 1'b0;
      w_got  <= 1'b0;
      r_got  <= 1'b0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      rsp.aw_ready <= 1'b0;
      rsp.w_ready  <= 1'b0;
      rsp.ar_ready <= 1'b0;
      if (req.aw_valid && rsp.aw_ready) begin aw_got <= 1'b1; w_idx <= req.aw_addr[5:2]; end
      if (req.w_valid && rsp.w_ready)   begin w_got  <= 1'b1; w_dat <= req.w_data; end
      if (!aw_got && req.aw_valid && !rsp.aw_ready && !rsp.b_valid) rsp.aw_ready <= coin();
      if (!w_got && req.w_valid && !rsp.w_ready && !rsp.b_valid)    rsp.w_ready  <= coin();
      if (aw_got && w_got && !rsp.b_valid && coin()) begin
        regs[w_idx] <= w_dat;
        n_wr        <= n_wr + 1;
        rsp.b_valid <= 1'b1;
        rsp.b_resp  <= RESP_OKAY;
      end
      if (rsp.b_valid && req.b_ready) begin
        rsp.b_valid <= 1'b0;
        aw_got      <= 1'b0;
        w_got       <= 1'b0;
      end
      if (req.ar_valid && !rsp.ar_ready && !r_got && coin()) rsp.ar_ready <= 1'b1;
      if (req.ar_valid && rsp.ar_ready) begin
        r_got <= 1'b1;
        r_idx <= req.ar_addr[5:2];
      end
      if (r_got && !rsp.r_valid && coin()) begin
        rsp.r_valid <= 1'b1;
        rsp.r_data  <= regs[r_idx];
        rsp.r_resp  <= RESP_OKAY;
        n_rd        <= n_rd + 1;
      end
      if (rsp.r_valid && req.r_ready) begin
        rsp.r_valid <= 1'b0;
        r_got       <= 1'b0;
      end
    end
  end

endmodule
