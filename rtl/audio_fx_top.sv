// audio_fx_top: real-time audio effect processor between an ADC and a DAC.
//
// The FPGA sits between a 12-bit ADC (AD7891) and a 12-bit DAC. adc_if
// samples the selected ADC channel at FS_HZ; each sample feeds the echo and
// the chorus, which run in parallel on every sample; fx_select picks, by the
// DIP switches, the dry sample, the echo, the chorus or silence; dac_if
// writes the result to the DAC and pulses the enable of the DAC channel
// chosen by dac_sel. reset_sync releases the reset of all blocks on one
// clock edge.
//
//   db_in -> adc_if --+-------------------------> fx_select -> dac_if -> dac_out, en
//                     +-> echo   (2k FIFO)    ---^
//                     +-> chorus (2 x 2k delay)--^
//
// Latency from the end of the ADC read to dac_out: 4 clocks through echo
// or chorus, 2 through bypass or mute; the DAC enable follows one clock
// later. After reset is released the first sample period starts 2 clocks
// later (reset synchronizer). Control inputs (fx_sel, delays, gains) are
// expected to be static or from switches; they are used as they are, with
// no synchronizer. The external pins keep the names of the board schematic;
// the bidirectional db bus is split into db_in/db_out/db_oe for the pad.
module audio_fx_top
  import audio_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned FS_HZ    = 1_000_000,
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned BASE1    = 256,
  parameter int unsigned BASE2    = 768,
  parameter int unsigned SPAN     = 512,
  parameter int unsigned RATE_DIV = 64
) (
  input  logic        clk,
  input  logic        rst_n,      // asynchronous, active low
  // ADC (AD7891)
  output logic        mode_ad,
  input  logic        eoc_ad,
  output logic        rd_ad,
  output logic        wr_ad,
  output logic        convst_ad,
  output logic        cs_ad,
  output logic        adc_clk,
  input  logic [11:0] db_in,
  output logic [11:0] db_out,
  output logic        db_oe,
  input  logic [1:0]  ch_adc,
  // DAC
  output logic [11:0] dac_out,
  output logic [3:0]  en,
  input  logic [1:0]  dac_sel,
  input  logic [7:0]  bit_trun,
  // effect controls (DIP switches)
  input  logic [1:0]  fx_sel,
  input  logic [$clog2(DEPTH+1)-1:0] echo_delay,
  input  logic [7:0]  echo_gain,
  input  logic [7:0]  chorus_mix0,
  input  logic [7:0]  chorus_mix1,
  input  logic [7:0]  chorus_mix2,
  // status
  output logic        overrun
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic rst_n_s;   // reset released synchronously to clk
  reset_sync u_rst (.clk, .rst_n_in(rst_n), .rst_n_out(rst_n_s));

  logic    adc_valid, echo_valid, chorus_valid, sel_valid;
  sample_t adc_sample, echo_sample, chorus_sample, sel_sample;
  logic    ch_write_unused, echo_armed_unused, echo_full_unused;
  logic [1:0]    lfo_up_unused;
  logic [AW-1:0] tap1_unused, tap2_unused;

  adc_if #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)) u_adc (
    .clk, .rst_n(rst_n_s), .ch_adc,
    .mode_ad, .eoc_ad, .rd_ad, .wr_ad, .convst_ad, .cs_ad, .adc_clk,
    .db_in, .db_out, .db_oe,
    .valid(adc_valid), .sample(adc_sample),
    .ch_write(ch_write_unused), .overrun);

  echo #(.DEPTH(DEPTH)) u_echo (
    .clk, .rst_n(rst_n_s),
    .in_valid(adc_valid), .in_sample(adc_sample),
    .delay(echo_delay), .gain(echo_gain),
    .out_valid(echo_valid), .out_sample(echo_sample),
    .armed(echo_armed_unused), .fifo_full(echo_full_unused));

  chorus #(.DEPTH(DEPTH), .BASE1(BASE1), .BASE2(BASE2), .SPAN(SPAN), .RATE_DIV(RATE_DIV)) u_chorus (
    .clk, .rst_n(rst_n_s),
    .in_valid(adc_valid), .in_sample(adc_sample),
    .mix0(chorus_mix0), .mix1(chorus_mix1), .mix2(chorus_mix2),
    .out_valid(chorus_valid), .out_sample(chorus_sample),
    .tap1(tap1_unused), .tap2(tap2_unused), .lfo_up(lfo_up_unused));

  fx_select u_sel (
    .clk, .rst_n(rst_n_s), .mode(fx_mode_e'(fx_sel)),
    .dry_valid(adc_valid), .dry(adc_sample),
    .echo_valid, .echo(echo_sample),
    .chorus_valid, .chorus(chorus_sample),
    .out_valid(sel_valid), .out_sample(sel_sample));

  dac_if u_dac (
    .clk, .rst_n(rst_n_s),
    .in_valid(sel_valid), .in_sample(sel_sample),
    .dac_sel, .bit_trun, .dac_out, .en);
endmodule
