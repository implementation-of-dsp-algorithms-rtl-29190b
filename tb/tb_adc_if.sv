// tb_adc_if: the ADC controller against the ad7891_model, at the default
// 50 MHz clock and 1 MHz sample rate.
// Checks: each sample equals the value the model sampled on the selected
// channel; samples come every 50 clocks; the control register is written
// exactly once per channel change and holds the requested channel; no
// protocol errors; a conversion slower than the sample period makes
// overrun pulse and halves the sample rate; adc_clk toggles every 2 clocks.
module tb_adc_if;
  import audio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ch_adc = 2'd1;
  logic mode_ad, eoc_ad, rd_ad, wr_ad, convst_ad, cs_ad, adc_clk;
  logic [11:0] db_in, db_out, m_db;
  logic db_oe, m_drive;
  logic valid, ch_write, overrun;
  sample_t sample;
  logic [11:0] chan_val [4];
  int conv_clks = 20;
  int checks = 0, failures = 0, n_over = 0, n_samples = 0, n_chw = 0, adc_edges = 0;
  longint cyc = 0, last_valid = -1;
  int wr_now = 0, wr_prev = 0, skip_iv = 0;

  adc_if dut (.*);
  ad7891_model adc (
    .clk, .mode_ad, .convst_n(convst_ad), .cs_n(cs_ad), .rd_n(rd_ad), .wr_n(wr_ad),
    .db_in(db_out), .db_in_oe(db_oe), .eoc_n(eoc_ad), .db_out(m_db), .db_drive(m_drive),
    .chan_val, .conv_clks);
  assign db_in = m_db;

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic adc_clk_q;
  longint last_edge = -1;
  always @(posedge clk) if (rst_n) begin
    adc_clk_q <= adc_clk;
    if (adc_clk != adc_clk_q) begin
      if (last_edge >= 0) check(cyc - last_edge == 2, "adc_clk half period 2 clocks");
      last_edge = cyc;
      adc_edges++;
    end
    if (ch_write) begin n_chw++; wr_now = 1; end
    if (overrun)  n_over++;
    if (valid) begin
      n_samples++;
      check(sample == sample_t'(adc.result), "sample equals converted value");
      check(adc.conv_ch == {1'b0, ch_adc}, "converted the selected channel");
      if (skip_iv > 0) skip_iv--;
      else if (last_valid >= 0) begin
        // a control-register write delays its sample by 4 clocks
        if (conv_clks < 30) check(cyc - last_valid == 50 + 4*wr_now - 4*wr_prev, "one sample per 50 clocks");
        else                check(cyc - last_valid == 100, "overrun skips one period");
      end
      last_valid = cyc;
      wr_prev = wr_now;
      wr_now  = 0;
      for (int i = 0; i < 4; i++) chan_val[i] = 12'($urandom);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) chan_val[i] = 12'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(mode_ad == 1'b1, "parallel mode");
    repeat (50 * 40) @(posedge clk);
    @(posedge valid); @(posedge clk); #1 ch_adc = 2'd3;
    repeat (50 * 40) @(posedge clk);
    @(posedge valid); @(posedge clk); #1 ch_adc = 2'd0;
    repeat (50 * 20) @(posedge clk);
    @(posedge valid); @(posedge clk); #1 ch_adc = 2'd2;
    repeat (50 * 20) @(posedge clk);
    // slow conversion: every other period is skipped
    @(posedge valid);
    conv_clks = 60;
    skip_iv = 2;
    repeat (50 * 20) @(posedge clk);
    @(posedge valid);
    conv_clks = 20;
    skip_iv = 2;
    repeat (50 * 10) @(posedge clk);
    check(adc.errors == 0, "no ADC protocol errors");
    check(n_chw == 4 && adc.ch_writes == 4, "one control write per channel change");
    check(n_over > 5, "overrun reported");
    check(n_samples > 120, "samples delivered");
    check(adc_edges > 100, "adc_clk running");
    $display("samples=%0d chw=%0d over=%0d err=%0d", n_samples, n_chw, n_over, adc.errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
