// tb_chorus: random samples through the chorus, compared with
//   y[n] = sat((m0*x[n] + m1*x[n-d1] + m2*x[n-d2]) >>> 7)
// where d1 = BASE1 + tri(s), d2 = BASE2 + tri(SPAN + s), s = n / RATE_DIV,
// tri() the triangle sweep, and an unwritten sample reads as zero.
// Also checks the two-clock latency and that each LFO turns around.
module tb_chorus;
  import audio_pkg::*;
  localparam int DEPTH = 64, BASE1 = 3, BASE2 = 10, SPAN = 20, RATE = 2;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_sample = '0, out_sample;
  gain_t mix0 = 128, mix1 = 64, mix2 = 64;
  logic out_valid;
  logic [AW-1:0] tap1, tap2;
  logic [1:0] lfo_up;
  int checks = 0, failures = 0, n_sat = 0, turns = 0;
  sample_t hist[$];
  longint cyc = 0;

  chorus #(.DEPTH(DEPTH), .BASE1(BASE1), .BASE2(BASE2), .SPAN(SPAN), .RATE_DIV(RATE)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int tri_at(int m);
    m = m % (2*SPAN);
    return (m <= SPAN) ? m : 2*SPAN - m;
  endfunction

  function automatic int past(int n, int d);
    return (d <= n) ? int'(hist[n-d]) : 0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] last_up;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_up = lfo_up;
    for (int n = 0; n < 800; n++) begin
      int s, d1, d2, acc;
      sample_t e;
      longint c0;
      @(negedge clk);
      if (n % 200 == 0) begin
        mix0 = gain_t'($urandom); mix1 = gain_t'($urandom); mix2 = gain_t'($urandom);
      end
      s  = n / RATE;
      d1 = BASE1 + tri_at(s);
      d2 = BASE2 + tri_at(SPAN + s);
      check(int'(tap1) == d1 && int'(tap2) == d2, "taps follow the LFOs");
      in_sample = sample_t'($urandom);
      hist.push_back(in_sample);
      acc = (int'(in_sample) * int'(mix0) + past(n, d1) * int'(mix1) + past(n, d2) * int'(mix2)) >>> 7;
      if (acc > 2047 || acc < -2048) n_sat++;
      e = (acc > 2047) ? 12'sd2047 : (acc < -2048) ? -12'sd2048 : sample_t'(acc);
      in_valid = 1;
      c0 = cyc;
      @(negedge clk);
      in_valid = 0;
      check(!out_valid, "not valid after one clock");
      @(negedge clk);
      check(out_valid && cyc == c0 + 2, "out_valid two clocks after input");
      check(out_sample == e, "chorus output");
      if (out_sample != e && failures < 20) $display("  n=%0d got %0d exp %0d", n, out_sample, e);
      if (lfo_up != last_up) turns++;
      last_up = lfo_up;
      repeat ($urandom % 2) @(negedge clk);
    end
    check(turns >= 4, "LFO turnarounds seen");
    check(n_sat > 0, "saturation exercised");
    $display("turns=%0d sat=%0d", turns, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
