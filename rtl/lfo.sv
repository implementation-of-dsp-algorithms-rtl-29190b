// lfo: triangle-wave low-frequency oscillator that sweeps a chorus delay.
//
// The chorus figure shows an LFO above each delay but says nothing of its
// shape, so this one is the simplest sweep: an up/down counter that moves
// one step every RATE_DIV sample strobes between 0 and SPAN and back. Its
// output is added to a base delay by the chorus. START and START_UP set the
// initial phase so that two voices can sweep out of step.
//
// Interface: tick advances the oscillator (once per audio sample); value is
// the current offset, registered. dir_up shows the direction of travel.
// Everything here is this design's choice; the document only names the block.
module lfo #(
  parameter int unsigned W        = 11,
  parameter int unsigned SPAN     = 512,
  parameter int unsigned RATE_DIV = 16,
  parameter int unsigned START    = 0,
  parameter bit          START_UP = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  output logic [W-1:0] value,
  output logic         dir_up
);
  localparam int unsigned DW = (RATE_DIV > 1) ? $clog2(RATE_DIV) : 1;
  logic [DW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value  <= W'(START);
      dir_up <= START_UP;
      div    <= '0;
    end else if (tick) begin
      if (div == DW'(RATE_DIV-1)) begin
        div <= '0;
        if (dir_up) begin
          if (value >= W'(SPAN)) begin
            dir_up <= 1'b0;
            value  <= value - 1'b1;
          end else begin
            value  <= value + 1'b1;
          end
        end else begin
          if (value == '0) begin
            dir_up <= 1'b1;
            value  <= value + 1'b1;
          end else begin
            value  <= value - 1'b1;
          end
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  initial begin
    assert (SPAN > 0 && SPAN < 2**W) else $error("lfo: SPAN out of range");
    assert (START <= SPAN) else $error("lfo: START above SPAN");
  end
endmodule
