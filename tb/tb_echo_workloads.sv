// tb_echo_workloads: the echo at the delays quoted for the effect, with
// the store enlarged to hold them (DEPTH = 70,000 samples).
//   1. the echo model's own settings: pulse-train input, gain 1.0, read
//      enable armed when the sample counter reaches 16000;
//   2. a 50 ms echo at 1 MHz sampling = 50,000 samples, gain 0.5;
//   3. a 70 ms echo at 1 MHz sampling = 70,000 samples, gain 0.75 (the
//      store runs full).
// The input is a pulse train (a pulse generator, as in the echo model) with
// random amplitude; every output is checked against
// y[n] = sat(x[n] + floor(g * x[n-D] / 128)). Samples are fed every other
// clock to keep the run short; the echo does not depend on the spacing.
// For each case the first echoed pulse must appear exactly D samples after
// the first input pulse.
module tb_echo_workloads;
  import audio_pkg::*;
  localparam int DEPTH = 70_000;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_sample = '0, out_sample;
  logic [CW-1:0] delay = '0;
  gain_t gain = '0;
  logic out_valid, armed, fifo_full;
  int checks = 0, failures = 0, n_full = 0;

  echo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (fifo_full) n_full++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t hist[$];

  task automatic run_case(int d, int g, int samples, int period, int width);
    int first_echo;
    @(negedge clk);
    delay = CW'(d);
    gain  = gain_t'(g);
    repeat (3) @(negedge clk);
    hist = {};
    first_echo = -1;
    for (int n = 0; n < samples; n++) begin
      sample_t x, e;
      int v, amp;
      amp = 200 + (n / period) % 800;
      x = ((n % period) < width) ? sample_t'(amp) : '0;
      v = int'(x);
      if (n >= d) v += (int'(hist[n-d]) * g) >>> 7;
      e = (v > 2047) ? 12'sd2047 : sample_t'(v);
      hist.push_back(x);
      in_sample = x;
      in_valid  = 1;
      @(negedge clk);
      in_valid  = 0;
      @(negedge clk);
      check(out_valid, "one output per sample");
      check(out_sample == e, "echo output");
      if (first_echo < 0 && n >= d && out_sample != x) first_echo = n;
    end
    check(first_echo == d, "first echo exactly D samples after the first pulse");
    $display("delay %0d: first echo at sample %0d", d, first_echo);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(16_000, 128, 20_000, 1000, 100);
    run_case(50_000, 64,  54_000, 5000, 300);
    run_case(70_000, 96,  74_000, 7000, 500);
    check(n_full > 0, "store full at the 70 ms delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
