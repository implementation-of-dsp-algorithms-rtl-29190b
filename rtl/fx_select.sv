// fx_select: picks the effect that reaches the DAC.
//
// All effects run side by side on every sample, each in its own part of the
// fabric; the DIP switches (mode) choose whose output goes on. FX_BYPASS
// passes the ADC sample straight through, FX_ECHO and FX_CHORUS take the
// matching effect, FX_MUTE sends silence (zero) at the same sample rate.
// The output is registered: out_valid follows the selected input's valid
// by one clock. Selection by DIP switches is the document's; the encoding
// and the mute setting are this design's choices.
module fx_select
  import audio_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  fx_mode_e mode,
  input  logic     dry_valid,
  input  sample_t  dry,
  input  logic     echo_valid,
  input  sample_t  echo,
  input  logic     chorus_valid,
  input  sample_t  chorus,
  output logic     out_valid,
  output sample_t  out_sample
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      unique case (mode)
        FX_BYPASS: begin out_valid <= dry_valid;    out_sample <= dry;    end
        FX_ECHO:   begin out_valid <= echo_valid;   out_sample <= echo;   end
        FX_CHORUS: begin out_valid <= chorus_valid; out_sample <= chorus; end
        default:   begin out_valid <= dry_valid;    out_sample <= '0;     end
      endcase
    end
  end
endmodule
