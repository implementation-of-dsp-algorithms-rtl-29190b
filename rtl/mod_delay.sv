// mod_delay: delay line with a delay that may change every sample.
//
// This is the "Delay" block of the chorus. Samples are written into a
// circular buffer of DEPTH words (2048 by default, the same 2k store as the
// echo). On each strobe the new sample goes in at the write pointer and the
// sample written 'tap' strobes earlier is read out, so out = x[n - tap].
// tap is clamped to 1 .. DEPTH-1. Until 'tap' samples have been written the
// output is zero, so the random power-up contents of the buffer never reach
// the output.
//
// Interface: in_valid/in_sample in, out_valid/out_sample one clock later.
// The document gives the block's function (a delay whose length the LFO
// moves); the circular buffer and the zero fill are this design's choices.
module mod_delay
  import audio_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  sample_t                  in_sample,
  input  logic [$clog2(DEPTH)-1:0] tap,
  output logic                     out_valid,
  output sample_t                  out_sample
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [SAMPLE_W-1:0] mem [DEPTH];
  logic [AW-1:0]       wr_ptr, rd_ptr, tap_c;
  logic [CW-1:0]       filled;     // samples written, saturating at DEPTH
  logic [SAMPLE_W-1:0] rd_data;
  logic                valid_d;

  always_comb begin
    tap_c = (tap == '0) ? AW'(1) : tap;
    if (32'(tap_c) > DEPTH - 1) tap_c = AW'(DEPTH - 1);
    // wr_ptr - tap_c modulo DEPTH
    if (tap_c > wr_ptr) rd_ptr = AW'(32'(wr_ptr) + DEPTH - 32'(tap_c));
    else                rd_ptr = wr_ptr - tap_c;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[wr_ptr] <= in_sample;
      rd_data     <= mem[rd_ptr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      filled    <= '0;
      valid_d   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wr_ptr  <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
        if (filled != CW'(DEPTH)) filled <= filled + 1'b1;
        valid_d <= (CW'(tap_c) <= filled);
      end
    end
  end

  assign out_sample = valid_d ? sample_t'(rd_data) : '0;
endmodule
