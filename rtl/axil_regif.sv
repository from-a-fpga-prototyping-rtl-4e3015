// AXI4-Lite slave front end for small register blocks.
//
// Converts AXI4-Lite transactions into single-cycle register strobes so that
// each register block only has to describe its registers. A write is taken
// when AW and W are both valid and no B response is pending: wr_en pulses for
// one cycle with the address, data and byte strobes, and B (OKAY) is returned
// in the next cycle. A read is taken when AR is valid and no R response is
// pending: rd_en pulses with rd_addr, the parent returns rd_data
// combinationally in that same cycle, and it is registered onto R (1 cycle).
// Only the low ADDR_W address bits are passed on.
module axil_regif
  import mango_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  axil_req_t              s_req,
  output axil_rsp_t              s_rsp,
  output logic                   wr_en,
  output logic [ADDR_W-1:0]      wr_addr,
  output logic [AXIL_DATA_W-1:0] wr_data,
  output logic [AXIL_STRB_W-1:0] wr_strb,
  output logic                   rd_en,
  output logic [ADDR_W-1:0]      rd_addr,
  input  logic [AXIL_DATA_W-1:0] rd_data
);

  logic                   b_pend, r_pend;
  logic [AXIL_DATA_W-1:0] r_q;

  assign wr_en   = s_req.aw_valid && s_req.w_valid && !b_pend;
  assign wr_addr = s_req.aw_addr[ADDR_W-1:0];
  assign wr_data = s_req.w_data;
  assign wr_strb = s_req.w_strb;
  assign rd_en   = s_req.ar_valid && !r_pend;
  assign rd_addr = s_req.ar_addr[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_pend <= 1'b0;
      r_pend <= 1'b0;
      r_q    <= '0;
    end else begin
      if (wr_en)                        b_pend <= 1'b1;
      else if (b_pend && s_req.b_ready) b_pend <= 1'b0;
      if (rd_en) begin
        r_pend <= 1'b1;
        r_q    <= rd_data;
      end else if (r_pend && s_req.r_ready) begin
        r_pend <= 1'b0;
      end
    end
  end

  always_comb begin
    s_rsp          = '0;
    s_rsp.aw_ready = wr_en;
    s_rsp.w_ready  = wr_en;
    s_rsp.b_valid  = b_pend;
    s_rsp.b_resp   = RESP_OKAY;
    s_rsp.ar_ready = rd_en;
    s_rsp.r_valid  = r_pend;
    s_rsp.r_data   = r_q;
    s_rsp.r_resp   = RESP_OKAY;
  end

endmodule
