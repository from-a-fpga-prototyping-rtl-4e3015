// Partial-reconfiguration isolation sequencer for the reconfigurable partition.
//
// While a new kernel bitstream is loaded, the reconfigurable partition (the
// OpenCL region and, in this expanded-PR layout, the DDR4 controller) must be
// held in reset and cut off from the static shell, while the shell itself and
// the PCIe link keep running. The host requests isolation through a GPIO bit.
//
// How it works: as soon as `isolate` is set, `block` tells the interconnects
// to answer every new access aimed at the partition with SLVERR instead of
// forwarding it. Accesses already in flight (`ctrl_busy`, `data_busy`) are
// allowed to finish; once none is left, `decoupled` is set and the partition
// reset `region_rst_n` is asserted. When `isolate` is cleared, reset is
// released at once and `block` is released one cycle later, so no access
// reaches the partition while it is still in reset. `decoupled` is
// reported back to the host (GPIO input) so it can tell when it may start
// loading the bitstream. The wait-for-idle handshake is a design choice.
module pr_decoupler (
  input  logic clk,
  input  logic rst_n,
  input  logic isolate,      // host request (GPIO output)
  input  logic ctrl_busy,    // control access in flight to the partition
  input  logic data_busy,    // data access in flight to the partition
  output logic block,        // interconnects answer partition accesses locally
  output logic decoupled,    // partition isolated and in reset
  output logic region_rst_n  // active-low reset of the partition
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      decoupled <= 1'b0;
    end else if (!isolate) begin
      decoupled <= 1'b0;
    end else if (!ctrl_busy && !data_busy) begin
      decoupled <= 1'b1;
    end
  end

  assign block        = isolate || decoupled;
  assign region_rst_n = rst_n && !decoupled;

  // Nothing may be in flight to the partition once it is decoupled.
  a_idle_when_decoupled: assert property (@(posedge clk) disable iff (!rst_n)
    decoupled |-> !ctrl_busy && !data_busy);

endmodule
