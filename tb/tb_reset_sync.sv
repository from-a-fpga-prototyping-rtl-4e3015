// Self-checking testbench for reset_sync: reset asserts without a clock edge
// and is released exactly STAGES rising edges after the input is released.
module tb_reset_sync;
  logic clk = 0, rst_in = 1, rst_out, rst_out3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reset_sync dut (.clk, .rst_n_i(rst_in), .rst_n_o(rst_out));
  reset_sync #(.STAGES(3)) dut3 (.clk, .rst_n_i(rst_in), .rst_n_o(rst_out3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5; rep++) begin
      int n2, n3;
      #3 rst_in = 0;
      #1;
      check(rst_out == 0 && rst_out3 == 0, "asynchronous assertion");
      repeat (3) @(posedge clk);
      #2 rst_in = 1;
      n2 = 0; n3 = 0;
      for (int c = 1; c <= 6; c++) begin
        @(posedge clk); #1;
        if (rst_out && n2 == 0)  n2 = c;
        if (rst_out3 && n3 == 0) n3 = c;
      end
      check(n2 == 2, $sformatf("2-stage release after %0d edges", n2));
      check(n3 == 3, $sformatf("3-stage release after %0d edges", n3));
      // assert in the middle of a clock period
      #(3 + rep);
      rst_in = 0;
      #1;
      check(rst_out == 0, "assertion mid-cycle");
      #20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
