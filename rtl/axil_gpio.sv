// AXI4-Lite general purpose I/O register block.
//
// The shell uses three of these: one drives the partial-reconfiguration
// isolation signal of the OpenCL region, one reports a feature/platform ID,
// and one reports the DDR4 calibration status. Register map (byte offsets,
// modelled on the usual two-channel GPIO layout, a design choice):
//   0x0  GPIO_DATA   read/write, drives gpio_out[OUT_W-1:0]
//   0x8  GPIO2_DATA  read-only, samples gpio_in[IN_W-1:0]
// Other offsets read as zero and ignore writes. gpio_in passes through a
// two-flop synchroniser because status inputs (such as DDR calibration done)
// come from other clock domains. Write-to-output latency is one cycle; read
// latency is one cycle after AR is accepted.
module axil_gpio
  import mango_pkg::*;
#(
  parameter int unsigned OUT_W     = 1,
  parameter int unsigned IN_W      = 1,
  parameter logic [31:0] OUT_RESET = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        s_req,
  output axil_rsp_t        s_rsp,
  output logic [OUT_W-1:0] gpio_out,
  input  logic [IN_W-1:0]  gpio_in
);

  localparam int unsigned AW = 12;

  logic                   wr_en, rd_en;
  logic [AW-1:0]          wr_addr, rd_addr;
  logic [AXIL_DATA_W-1:0] wr_data, rd_data;
  logic [AXIL_STRB_W-1:0] wr_strb;
  logic [IN_W-1:0]        in_s1, in_s2;

  axil_regif #(.ADDR_W(AW)) u_if (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gpio_out <= OUT_RESET[OUT_W-1:0];
      in_s1    <= '0;
      in_s2    <= '0;
    end else begin
      in_s1 <= gpio_in;
      in_s2 <= in_s1;
      if (wr_en && wr_addr[AW-1:2] == '0) begin
        for (int unsigned b = 0; b < OUT_W; b++) begin
          if (wr_strb[b/8]) gpio_out[b] <= wr_data[b];
        end
      end
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr[AW-1:2])
      10'd0:   rd_data[OUT_W-1:0] = gpio_out;
      10'd2:   rd_data[IN_W-1:0]  = in_s2;
      default: rd_data = '0;
    endcase
  end

endmodule
