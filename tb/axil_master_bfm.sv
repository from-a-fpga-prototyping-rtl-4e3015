// AXI4-Lite master bus-functional model for testbenches (not synthesizable).
// Tasks: write(addr, data, strb, resp) and read(addr, data, resp). B and R
// ready stay high once set (only one transaction is ever outstanding). Signals are
// driven with non-blocking assignments right after a rising edge and
// handshakes are sampled at rising edges. Each task also returns the number
// of cycles from issue to response in last_cycles.
module axil_master_bfm
  import mango_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  int unsigned last_cycles;

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output axi_resp_e resp);
    bit aw_done, w_done;
    aw_done = 0; w_done = 0; last_cycles = 0;
    req.aw_addr  <= addr;
    req.aw_valid <= 1'b1;
    req.w_data   <= data;
    req.w_strb   <= strb;
    req.w_valid  <= 1'b1;
    req.b_ready  <= 1'b1;
    forever begin
      @(posedge clk);
      last_cycles++;
      if (req.aw_valid && rsp.aw_ready) begin aw_done = 1; req.aw_valid <= 1'b0; end
      if (req.w_valid && rsp.w_ready)   begin w_done = 1;  req.w_valid  <= 1'b0; end
      if (rsp.b_valid && req.b_ready) begin
        resp = rsp.b_resp;
        break;
      end
    end
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output axi_resp_e resp);
    last_cycles = 0;
    req.ar_addr  <= addr;
    req.ar_valid <= 1'b1;
    req.r_ready  <= 1'b1;
    forever begin
      @(posedge clk);
      last_cycles++;
      if (req.ar_valid && rsp.ar_ready) req.ar_valid <= 1'b0;
      if (rsp.r_valid && req.r_ready) begin
        data = rsp.r_data;
        resp = rsp.r_resp;
        break;
      end
    end
  endtask

endmodule
