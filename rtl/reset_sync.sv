// Reset synchroniser for the shell clock domain.
//
// Part of the shell's clock and reset logic. The external reset (from the PCIe
// block) may be asserted at any time; it is applied at once (asynchronous
// assertion) and released only after STAGES rising clock edges (synchronous
// de-assertion), so that every flip-flop of the shell leaves reset in the same
// cycle. rst_n_o is active low. The number of stages is a design choice.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) sync_q <= '0;
    else          sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_n_o = sync_q[STAGES-1];

endmodule
