// AXI4 master bus-functional model for testbenches (not synthesizable).
// The caller fills wbuf[0..len] and calls write_burst, or calls read_burst
// and finds the beats in rbuf[0..len]. With gaps set, W valid and R ready
// drop at random cycles. last_cycles counts rising edges from issue until the
// response (B handshake, or the last R beat).
module axi_master_bfm
  import mango_pkg::*;
(
  input  logic     clk,
  output axi_req_t req,
  input  axi_rsp_t rsp
);

  logic [AXI_DATA_W-1:0] wbuf [256];
  logic [AXI_DATA_W-1:0] rbuf [256];
  axi_resp_e             rresp_all;   // worst read response of the last burst
  logic                  rlast_ok;    // r_last came exactly on the last beat
  bit                    gaps;
  int unsigned           last_cycles;

  initial begin
    req  = '0;
    gaps = 0;
  end

  task automatic write_burst(input logic [63:0] addr, input logic [7:0] len,
                             input logic [3:0] id, output axi_resp_e resp);
    int unsigned beat;
    bit aw_done;
    beat = 0; aw_done = 0; last_cycles = 0;
    req.aw       <= '{id: id, addr: addr, len: len, size: 3'd5, burst: 2'b01};
    req.aw_valid <= 1'b1;
    req.w_data   <= wbuf[0];
    req.w_strb   <= '1;
    req.w_last   <= (len == 0);
    req.w_valid  <= 1'b1;
    req.b_ready  <= 1'b1;
    forever begin
      @(posedge clk);
      last_cycles++;
      if (req.aw_valid && rsp.aw_ready) req.aw_valid <= 1'b0;
      if (req.w_valid && rsp.w_ready) begin
        beat++;
        if (beat > len) begin
          req.w_valid <= 1'b0;
        end else begin
          req.w_data  <= wbuf[beat];
          req.w_last  <= (beat == len);
          req.w_valid <= !(gaps && $urandom_range(3) == 0);
        end
      end else if (beat <= len && !req.w_valid) begin
        req.w_valid <= 1'b1;
      end
      if (rsp.b_valid && req.b_ready) begin
        resp = rsp.b_resp;
        break;
      end
    end
  endtask

  task automatic read_burst(input logic [63:0] addr, input logic [7:0] len,
                            input logic [3:0] id);
    int unsigned beat;
    beat = 0; last_cycles = 0;
    rresp_all = RESP_OKAY;
    rlast_ok  = 1'b1;
    req.ar       <= '{id: id, addr: addr, len: len, size: 3'd5, burst: 2'b01};
    req.ar_valid <= 1'b1;
    req.r_ready  <= 1'b1;
    forever begin
      @(posedge clk);
      last_cycles++;
      if (req.ar_valid && rsp.ar_ready) req.ar_valid <= 1'b0;
      if (rsp.r_valid && req.r_ready) begin
        rbuf[beat] = rsp.r_data;
        if (rsp.r_resp > rresp_all) rresp_all = rsp.r_resp;
        if (rsp.r_last != (beat == len)) rlast_ok = 1'b0;
        if (rsp.r_id != id) rlast_ok = 1'b0;
        beat++;
        if (rsp.r_last || beat > len) break;
      end
      req.r_ready <= !(gaps && $urandom_range(3) == 0);
    end
  endtask

endmodule
