// Self-checking testbench for axil_gpio: output register write/read-back with
// byte strobes, synchronised input sampling, unmapped offsets, response
// latency, and the reset value of the output.
module tb_axil_gpio;
  import mango_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t   req;
  axil_rsp_t   rsp;
  logic [11:0] gout;
  logic [15:0] gin;
  int checks = 0, failures = 0;

  axil_gpio #(.OUT_W(12), .IN_W(16), .OUT_RESET(32'h5A5)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .gpio_out(gout), .gpio_in(gin)
  );
  axil_master_bfm bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    axi_resp_e   r;
    gin = 16'h1234;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(gout == 12'h5A5, "reset value of output");
    bfm.read(32'h0, d, r);
    check(d == 32'h5A5 && r == RESP_OKAY, "read reset value");
    check(bfm.last_cycles == 2, $sformatf("read latency %0d", bfm.last_cycles));
    bfm.write(32'h0, 32'hFFFF_FABC, 4'hF, r);
    check(r == RESP_OKAY, "write resp");
    check(bfm.last_cycles == 2, $sformatf("write latency %0d", bfm.last_cycles));
    check(gout == 12'hABC, $sformatf("out after write %h", gout));
    bfm.write(32'h0, 32'h0000_0F00, 4'h2, r);  // only byte 1
    check(gout == 12'hFBC, $sformatf("byte strobe %h", gout));
    bfm.write(32'h0, 32'h0000_0000, 4'h0, r);  // no strobes
    check(gout == 12'hFBC, "no strobe keeps value");
    bfm.read(32'h8, d, r);
    check(d == 32'h1234, $sformatf("input read %h", d));
    gin = 16'hBEEF;
    repeat (3) @(posedge clk);
    bfm.read(32'h8, d, r);
    check(d == 32'hBEEF, $sformatf("input read 2 %h", d));
    bfm.write(32'h8, 32'h0, 4'hF, r);  // read-only: ignored
    bfm.read(32'h8, d, r);
    check(d == 32'hBEEF, "input register is read-only");
    check(gout == 12'hFBC, "write to 0x8 does not change output");
    bfm.read(32'h4, d, r);
    check(d == 0 && r == RESP_OKAY, "unmapped offset reads zero");
    bfm.write(32'h4, 32'h123, 4'hF, r);
    check(gout == 12'hFBC, "write to 0x4 ignored");
    // random write/read-back
    for (int i = 0; i < 50; i++) begin
      logic [11:0] v;
      v = 12'($urandom);
      bfm.write(32'h0, {20'h0, v}, 4'hF, r);
      bfm.read(32'h0, d, r);
      check(d == {20'h0, v} && gout == v, "random write/read-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
