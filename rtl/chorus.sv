// chorus: dry signal plus two delayed voices whose delays drift.
//
// Structure as in the chorus figure: the input feeds a dry path and two
// Delay blocks; an LFO above each Delay moves its length; each of the three
// paths has its own Mix gain and the three are added. Each voice's delay is
// BASEk + lfo_k, where lfo_k sweeps a triangle between 0 and SPAN. The two
// LFOs start at opposite ends of the sweep so the voices never line up.
//
//   out = sat( (mix0*x[n] + mix1*x[n-d1(n)] + mix2*x[n-d2(n)]) / 128 )
//
// Interface: one sample per in_valid strobe; out_valid pulses two clocks
// later. Mix gains are unsigned with 7 fraction bits (128 = 1.0). The
// figure gives the blocks and their connections; the delay ranges, LFO shape
// and rate, number formats and saturation are this design's choices.
module chorus
  import audio_pkg::*;
#(
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned BASE1    = 256,
  parameter int unsigned BASE2    = 768,
  parameter int unsigned SPAN     = 512,
  parameter int unsigned RATE_DIV = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_sample,
  input  gain_t   mix0,
  input  gain_t   mix1,
  input  gain_t   mix2,
  output logic    out_valid,
  output sample_t out_sample,
  output logic [$clog2(DEPTH)-1:0] tap1,
  output logic [$clog2(DEPTH)-1:0] tap2,
  output logic [1:0] lfo_up   // direction of each LFO sweep (1: delay growing)
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] lfo1_v, lfo2_v;
  logic          d1_valid, d2_valid;
  sample_t       d1, d2, x_d;

  lfo #(.W(AW), .SPAN(SPAN), .RATE_DIV(RATE_DIV), .START(0),    .START_UP(1'b1)) u_lfo1 (
    .clk, .rst_n, .tick(in_valid), .value(lfo1_v), .dir_up(lfo_up[0]));
  lfo #(.W(AW), .SPAN(SPAN), .RATE_DIV(RATE_DIV), .START(SPAN), .START_UP(1'b0)) u_lfo2 (
    .clk, .rst_n, .tick(in_valid), .value(lfo2_v), .dir_up(lfo_up[1]));

  assign tap1 = AW'(BASE1) + lfo1_v;
  assign tap2 = AW'(BASE2) + lfo2_v;

  mod_delay #(.DEPTH(DEPTH)) u_dly1 (
    .clk, .rst_n, .in_valid, .in_sample, .tap(tap1),
    .out_valid(d1_valid), .out_sample(d1));
  mod_delay #(.DEPTH(DEPTH)) u_dly2 (
    .clk, .rst_n, .in_valid, .in_sample, .tap(tap2),
    .out_valid(d2_valid), .out_sample(d2));

  logic signed [31:0] acc;
  always_comb
    acc = 32'(scale(x_d, mix0)) + 32'(scale(d1, mix1)) + 32'(scale(d2, mix2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d        <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      if (in_valid) x_d <= in_sample;
      out_valid <= d1_valid && d2_valid;
      if (d1_valid) out_sample <= sat(acc >>> GAIN_FRAC);
    end
  end

  initial assert (BASE1 >= 1 && BASE2 >= 1 && BASE1 + SPAN < DEPTH && BASE2 + SPAN < DEPTH)
    else $error("chorus: delay range does not fit the buffer");
endmodule
