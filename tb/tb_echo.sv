// tb_echo: drives random samples into the echo and compares every output
// with y[n] = sat(x[n] + floor(gain * x[n-delay] / 128)), where n counts
// samples since the last change of delay and the echo term is zero while
// n < delay. Covers delay = 1, small and odd delays, delay = DEPTH (FIFO
// full while streaming), delay = 0 (echo off), back-to-back and spaced
// strobes, gain 0/1.0/max, saturation, and the two-clock latency.
module tb_echo;
  import audio_pkg::*;
  localparam int DEPTH = 64;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_sample = '0, out_sample;
  logic [CW-1:0] delay = '0;
  gain_t gain = '0;
  logic out_valid, armed, fifo_full;
  int checks = 0, failures = 0;
  int n_full = 0, n_sat = 0, n_armed = 0;
  longint cyc = 0;

  echo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  sample_t hist[$];                  // samples since last restart
  sample_t exp_q[$];
  longint  exp_cyc[$];

  function automatic sample_t ref_y(sample_t x, int n, int d, int g);
    int v;
    v = int'(x);
    if (d != 0 && n >= d) v += (int'(hist[n-d]) * g) >>> 7;
    if (v > 2047 || v < -2048) n_sat++;
    return (v > 2047) ? 12'sd2047 : (v < -2048) ? -12'sd2048 : sample_t'(v);
  endfunction

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (fifo_full) n_full++;
    if (armed)     n_armed++;
    if (out_valid) begin
      check(exp_q.size() > 0, "unexpected out_valid");
      if (exp_q.size() > 0) begin
        sample_t e; longint c;
        e = exp_q.pop_front(); c = exp_cyc.pop_front();
        check(out_sample == e, "out_sample");
        check(cyc == c + 2, "latency 2 clocks");
        if (out_sample != e && failures < 20) $display("  got %0d exp %0d", out_sample, e);
      end
    end
  end

  task automatic send(sample_t x, int gap);
    @(negedge clk);
    in_valid  = 1;
    in_sample = x;
    exp_q.push_back(ref_y(x, hist.size(), int'(delay), int'(gain)));
    exp_cyc.push_back(cyc);
    hist.push_back(x);
    @(negedge clk);
    in_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic set_delay(int d, int g);
    @(negedge clk);
    delay = CW'(d);
    gain  = gain_t'(g);
    repeat (3) @(negedge clk);
    hist = {};
  endtask

  task automatic burst(int count, int amp, bit b2b);
    for (int i = 0; i < count; i++)
      send(sample_t'($signed($urandom % (2*amp+1)) - amp), b2b ? 0 : ($urandom % 3));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    set_delay(5, 128);      burst(40, 800, 0);
    set_delay(1, 64);       burst(30, 2000, 1);
    set_delay(DEPTH, 200);  burst(3*DEPTH, 2047, 1);   // FIFO runs full
    set_delay(17, 255);     burst(80, 2047, 0);        // saturation
    set_delay(0, 128);      burst(20, 1000, 0);        // echo off
    set_delay(33, 0);       burst(60, 1500, 1);        // gain 0
    set_delay(DEPTH-1, 96); burst(2*DEPTH, 1200, 0);
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all outputs seen");
    check(n_full > 0, "FIFO full reached");
    check(n_sat > 0, "saturation exercised");
    check(n_armed > 0, "read enable armed");
    $display("full=%0d sat=%0d armed=%0d", n_full, n_sat, n_armed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
