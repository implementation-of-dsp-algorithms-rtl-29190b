// dac_if: drives the 12-bit DAC bus with the processed sample.
//
// On each in_valid the sample is truncated and converted, then placed on
// dac_out, where it stays until the next sample. One clock later the enable
// of the DAC channel chosen by dac_sel (en[dac_sel]) goes high for EN_CLKS
// clocks, so the data is settled before and during the enable.
//   - bit_trun: each set bit k clears bit k of the sample (k = 0..7), which
//     lowers the resolution sent to the DAC, for listening to truncation.
//   - dac_out is offset binary (two's complement with the MSB inverted), the
//     code of a unipolar multiplying DAC such as the AD7541.
// The names and widths (dac_out 12, en 4, dac_sel 2, bit_trun 8) are the
// document's; what bit_trun does, the offset-binary code, the active-high
// enables and their timing are this design's choices.
module dac_if
  import audio_pkg::*;
#(
  parameter int unsigned EN_CLKS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_sample,
  input  logic [1:0]  dac_sel,
  input  logic [7:0]  bit_trun,
  output logic [11:0] dac_out,
  output logic [3:0]  en
);
  localparam int unsigned EW = $clog2(EN_CLKS + 1);

  logic [EW-1:0] en_cnt;
  logic [1:0]    sel_q;
  logic          pending;
  logic [11:0]   trunc;

  assign trunc = in_sample & ~{4'b0, bit_trun};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_out <= 12'h800;   // mid-scale: 0 V
      en      <= '0;
      en_cnt  <= '0;
      sel_q   <= '0;
      pending <= 1'b0;
    end else begin
      pending <= 1'b0;
      if (in_valid) begin
        dac_out <= {~trunc[11], trunc[10:0]};
        sel_q   <= dac_sel;
        pending <= 1'b1;
        en      <= '0;
        en_cnt  <= '0;
      end else if (pending) begin
        en     <= 4'(1) << sel_q;
        en_cnt <= EW'(EN_CLKS);
      end else if (en_cnt != '0) begin
        en_cnt <= en_cnt - 1'b1;
        if (en_cnt == EW'(1)) en <= '0;
      end
    end
  end

  // At most one DAC channel enabled at a time.
  a_en_onehot0: assert property (@(posedge clk) disable iff (!rst_n) (en & (en - 4'd1)) == 4'd0);
endmodule
