// Self-checking testbench for pr_decoupler: blocking starts with the
// request, reset waits for in-flight accesses to finish, and release order.
module tb_pr_decoupler;
  logic clk = 0, rst_n = 0;
  logic isolate, ctrl_busy, data_busy, block, decoupled, region_rst_n;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pr_decoupler dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isolate = 0; ctrl_busy = 0; data_busy = 0;
    repeat (2) @(posedge clk);
    #1;
    check(region_rst_n == 0, "partition in reset during shell reset");
    rst_n = 1;
    @(posedge clk); #1;
    check(!block && !decoupled && region_rst_n, "idle after reset");
    // isolation with accesses in flight
    for (int rep = 0; rep < 20; rep++) begin
      int wait_c, n, exp_n;
      wait_c = $urandom_range(0, 6);
      ctrl_busy = $urandom_range(1);
      data_busy = (wait_c > 0);
      exp_n = (ctrl_busy || data_busy) ? wait_c + 1 : 0;
      isolate = 1;
      #1;
      check(block, "block follows the request at once");
      n = 0;
      for (int c = 0; c < 10; c++) begin
        @(posedge clk); #1;
        if (c == wait_c) begin ctrl_busy = 0; data_busy = 0; end
        if (!decoupled) begin
          n++;
          check(region_rst_n, "no reset while an access is in flight");
        end
        check(block, "block held during isolation");
      end
      check(decoupled && !region_rst_n, "decoupled and in reset");
      check(n == exp_n, $sformatf("decouple after %0d cycles, expected %0d", n, exp_n));
      isolate = 0;
      #1;
      check(block, "block still set the cycle isolation drops");
      @(posedge clk); #1;
      check(!decoupled && region_rst_n && !block, "released");
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
