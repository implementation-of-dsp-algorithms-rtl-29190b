// reset_sync: reset conditioning for the whole design.
//
// The board's reset input is asynchronous. This block asserts the internal
// active-low reset at once when rst_n_in goes low and releases it only
// after STAGES rising clock edges with rst_n_in high, so every flip-flop
// leaves reset on the same clock edge. It is the "clock and reset" layer of
// the FPGA floor plan; the PLL of that layer is a vendor primitive and is
// not part of this RTL (the clock enters directly). The stage count is this
// design's choice.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic [STAGES-1:0] sync;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) sync <= '0;
    else           sync <= {sync[STAGES-2:0], 1'b1};
  end

  assign rst_n_out = sync[STAGES-1];

  initial assert (STAGES >= 2) else $error("reset_sync: STAGES must be at least 2");
endmodule
