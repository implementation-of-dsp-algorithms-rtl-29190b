// echo: single echo, y[n] = x[n] + gain * x[n - delay].
//
// Built the way the echo model draws it: every incoming sample is written
// into a FIFO (2048 samples by default). A sample counter, enabled by the
// inverse of the FIFO read enable, counts incoming samples; when it equals
// 'delay' the read enable turns on and the counter stops, which holds the
// read enable on. From then on each new sample pushes one word and pops the
// word written 'delay' samples earlier. The popped word is scaled by 'gain'
// (the constant multiplier) and added to the running sample (the adder).
//
// Interface: in_valid/in_sample is one sample per strobe. out_valid pulses
// two clocks after in_valid with out_sample; the sum saturates to 12 bits.
// Until the FIFO holds 'delay' samples the echo term is zero. gain is
// unsigned with 7 fraction bits (128 = 1.0). delay runs from 1 to DEPTH;
// delay 0 turns the echo term off. Changing delay empties the FIFO and
// restarts the count, so the new delay takes effect after it has refilled.
// The FIFO, counter, compare and feedback come from the document's model;
// the number formats, saturation and the restart on a change of delay are
// this design's own choices. Back-to-back samples (in_valid every clock) are
// accepted.
module echo
  import audio_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  sample_t                    in_sample,
  input  logic [$clog2(DEPTH+1)-1:0] delay,
  input  gain_t                      gain,
  output logic                       out_valid,
  output sample_t                    out_sample,
  output logic                       armed,     // FIFO read enable is on
  output logic                       fifo_full
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [CW-1:0] cnt, delay_q;
  logic          restart;
  logic          re;
  logic [SAMPLE_W-1:0] fifo_dout;
  logic [1:0]    pct_unused;
  logic [CW-1:0] count_unused;
  logic          empty_unused;

  // Relational block: counter == delay. The counter is enabled by its
  // inverse, so once equal it stays equal.
  assign re      = (delay != '0) && (cnt == delay);
  assign armed   = re;
  assign restart = (delay != delay_q);

  sync_fifo #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH), .PCT_W(2)) u_fifo (
    .clk, .rst_n,
    .clr      (restart),
    .din      (in_sample),
    .we       (in_valid && delay != '0),
    .re       (in_valid && re),
    .dout     (fifo_dout),
    .empty    (empty_unused),
    .full     (fifo_full),
    .pct_full (pct_unused),
    .count    (count_unused)
  );

  sample_t x_d;
  logic    v_d, tap_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      delay_q    <= '0;
      x_d        <= '0;
      v_d        <= 1'b0;
      tap_d      <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      delay_q <= delay;
      if (restart)               cnt <= '0;
      else if (in_valid && !re && delay != '0) cnt <= cnt + 1'b1;

      v_d   <= in_valid;
      tap_d <= in_valid && re && !restart;
      x_d   <= in_sample;

      out_valid <= v_d;
      if (v_d)
        out_sample <= sat(32'(x_d) +
                          (tap_d ? 32'(scale(sample_t'(fifo_dout), gain) >>> GAIN_FRAC) : 32'sd0));
    end
  end
endmodule
