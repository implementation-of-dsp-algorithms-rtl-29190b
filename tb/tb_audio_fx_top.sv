// tb_audio_fx_top: the whole processor at its default parameters (50 MHz
// clock, 1 MHz sampling, 2048-sample stores) between an ADC model and the
// DAC pins. The ADC model is fed random samples; the testbench keeps its own
// model of every effect and checks each DAC write:
//   bypass: y = x          mute: y = 0
//   echo:   y = sat(x[n] + floor(g * x[n-D] / 128)), x counted since the
//           last change of D, echo term zero before D samples
//   chorus: y = sat((m0 x[n] + m1 x[n-d1] + m2 x[n-d2]) >>> 7), with
//           d1 = 256 + tri(n/64), d2 = 768 + tri(512 + n/64)
// then offset binary with the bit_trun bits cleared, on en[dac_sel].
// It also checks the pin-to-pin latency (enable rises 5 clocks after the
// ADC read for echo/chorus, 3 for bypass/mute) and counts each mechanism:
// every effect mode, echo FIFO full, saturation, ADC channel switch, every
// DAC channel, truncation, both LFO turnarounds, and ADC overrun.
module tb_audio_fx_top;
  import audio_pkg::*;
  localparam int DEPTH = 2048, BASE1 = 256, BASE2 = 768, SPAN = 512, RATE = 64;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // power-on reset edge
  logic mode_ad, eoc_ad, rd_ad, wr_ad, convst_ad, cs_ad, adc_clk;
  logic [11:0] db_in, db_out, m_db;
  logic db_oe, m_drive, overrun;
  logic [1:0] ch_adc = 2'd0, dac_sel = 2'd0, fx_sel = 2'd0;
  logic [7:0] bit_trun = '0;
  logic [11:0] dac_out;
  logic [3:0] en;
  logic [11:0] echo_delay = 12'd0;
  logic [7:0] echo_gain = 8'd128, chorus_mix0 = 8'd128, chorus_mix1 = 8'd90, chorus_mix2 = 8'd90;
  logic [11:0] chan_val [4];
  int conv_clks = 20;

  audio_fx_top dut (.*);
  ad7891_model adc (
    .clk, .mode_ad, .convst_n(convst_ad), .cs_n(cs_ad), .rd_n(rd_ad), .wr_n(wr_ad),
    .db_in(db_out), .db_in_oe(db_oe), .eoc_n(eoc_ad), .db_out(m_db), .db_drive(m_drive),
    .chan_val, .conv_clks);
  assign db_in = m_db;

  always #10 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- reference model ----------------
  sample_t all_x[$];       // every sample since reset (chorus)
  sample_t echo_x[$];      // samples since the last change of echo delay
  logic [11:0] exp_q[$];
  longint exp_cyc[$];
  int exp_lat[$];
  int n_sat = 0, n_full = 0, n_trunc = 0, n_top = 0, n_bot = 0, n_over = 0, n_chsw = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_dac[4]  = '{0, 0, 0, 0};
  int n_writes = 0;

  function automatic int tri_at(int m);
    m = m % (2*SPAN);
    return (m <= SPAN) ? m : 2*SPAN - m;
  endfunction

  function automatic sample_t satv(int v);
    if (v > 2047 || v < -2048) n_sat++;
    return (v > 2047) ? 12'sd2047 : (v < -2048) ? -12'sd2048 : sample_t'(v);
  endfunction

  function automatic int past(int n, int d);
    return (d <= n) ? int'(all_x[n-d]) : 0;
  endfunction

  // capture each sample at the end of its ADC read
  logic rd_q = 1;
  always @(posedge clk) begin
    rd_q <= rd_ad;
    if (!rd_q && rd_ad) begin
      sample_t x, y, xd;
      int n, s, v, ne, idx;
      x = sample_t'(adc.result);
      n = all_x.size();
      all_x.push_back(x);
      // echo
      v = int'(x);
      ne = echo_x.size();
      if (echo_delay != 0 && ne >= int'(echo_delay)) begin
        idx = ne - int'(echo_delay);
        xd = echo_x[idx];
        v += (int'(xd) * int'(echo_gain)) >>> 7;
      end
      if (echo_delay != 0 && echo_x.size() >= DEPTH) n_full++;
      if (echo_delay != 0) echo_x.push_back(x);
      case (fx_sel)
        2'd0: y = x;
        2'd1: y = satv(v);
        2'd2: begin
          s = n / RATE;
          y = satv((int'(x) * int'(chorus_mix0)
                    + past(n, BASE1 + tri_at(s)) * int'(chorus_mix1)
                    + past(n, BASE2 + tri_at(SPAN + s)) * int'(chorus_mix2)) >>> 7);
          if (n > 0 && n % RATE == 0 && tri_at(s) == SPAN) n_top++;
          if (n > 0 && n % RATE == 0 && tri_at(SPAN + s) == 0) n_bot++;
        end
        default: y = '0;
      endcase
      n_mode[fx_sel]++;
      if (bit_trun != 0) n_trunc++;
      exp_q.push_back(12'(int'(y) + 2048) & ~{4'b0, bit_trun});
      exp_cyc.push_back(cyc);
      exp_lat.push_back((fx_sel == 2'd1 || fx_sel == 2'd2) ? 5 : 3);
      for (int i = 0; i < 4; i++) chan_val[i] = 12'($urandom);
    end
  end

  // check each DAC write
  logic [3:0] en_q = '0;
  always @(posedge clk) begin
    en_q <= en;
    if (overrun) n_over++;
    if (rst_n && en_q == 0 && en != 0) begin
      n_writes++;
      check(exp_q.size() > 0, "DAC write expected");
      if (exp_q.size() > 0) begin
        logic [11:0] e; longint c; int l;
        e = exp_q.pop_front(); c = exp_cyc.pop_front(); l = exp_lat.pop_front();
        check(dac_out == e, "dac_out value");
        if (dac_out != e && failures < 20) $display("  got %h exp %h (write %0d)", dac_out, e, n_writes);
        check(cyc - c == longint'(l), "ADC read to DAC enable latency");
        check(en == (4'b1 << dac_sel), "enable of the selected DAC channel");
        n_dac[dac_sel]++;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic after_write(int k);   // wait k DAC writes, then 1 clock
    repeat (k) @(posedge clk iff (en_q == 0 && en != 0));
    @(posedge clk);
    #1;
  endtask

  task automatic set_echo(int d, int g);
    echo_delay = 12'(d);
    echo_gain  = 8'(g);
    echo_x = {};
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) chan_val[i] = 12'($urandom);
    repeat (5) @(posedge clk);
    rst_n = 1;
    // bypass
    after_write(200);
    // echo, short delay, unity gain
    fx_sel = 2'd1; set_echo(300, 128); ch_adc = 2'd2; n_chsw++;
    after_write(800);
    // echo, full 2048-sample store, with truncation on DAC channel 1
    set_echo(DEPTH, 200); dac_sel = 2'd1; bit_trun = 8'h0F;
    after_write(4500);
    // chorus until both LFO turnarounds have passed
    fx_sel = 2'd2; dac_sel = 2'd2; bit_trun = 8'h00; set_echo(100, 64);
    while (n_bot == 0 || n_top == 0) after_write(500);
    // mute
    fx_sel = 2'd3; dac_sel = 2'd3; ch_adc = 2'd1; n_chsw++;
    after_write(100);
    // bypass with an ADC slower than the sample period
    fx_sel = 2'd0; conv_clks = 60;
    after_write(50);
    conv_clks = 20;
    after_write(50);
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "every sample reached the DAC");
    check(adc.errors == 0, "no ADC protocol errors");
    check(adc.ch_writes == 1 + n_chsw, "one ADC control write per channel switch");
    foreach (n_mode[m]) check(n_mode[m] > 0, "effect mode used");
    foreach (n_dac[c])  check(n_dac[c] > 0, "DAC channel used");
    check(n_full > 0,  "echo store full");
    check(n_sat > 0,   "saturation");
    check(n_trunc > 0, "bit truncation");
    check(n_top > 0 && n_bot > 0, "LFO turnarounds");
    check(n_over > 0,  "ADC overrun");
    $display("writes=%0d modes=%0d/%0d/%0d/%0d dac=%0d/%0d/%0d/%0d full=%0d sat=%0d trunc=%0d lfo=%0d/%0d over=%0d chsw=%0d",
             n_writes, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_dac[0], n_dac[1], n_dac[2], n_dac[3],
             n_full, n_sat, n_trunc, n_top, n_bot, n_over, n_chsw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
