// tb_mod_delay: random samples with a tap that changes every sample
// (random, swept, at the limits 0 and DEPTH-1, and beyond the fill level).
// Each output must equal x[n - clamp(tap)] one clock after the strobe, or
// zero when that sample has not been written yet.
module tb_mod_delay;
  import audio_pkg::*;
  localparam int DEPTH = 32;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_sample = '0, out_sample;
  logic [AW-1:0] tap = '0;
  logic out_valid;
  int checks = 0, failures = 0, n_zero = 0, n_wrap = 0;
  sample_t hist[$];

  mod_delay #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int t, tc;
      sample_t e;
      @(negedge clk);
      case ((n / 100) % 3)
        0: t = $urandom % DEPTH;
        1: t = (n % 2) ? 0 : DEPTH - 1;
        default: t = 3 + (n % 20);
      endcase
      tc = (t == 0) ? 1 : t;
      e  = (tc <= n) ? hist[n - tc] : '0;
      if (tc > n) n_zero++;
      if (n >= DEPTH && (n % DEPTH) < tc) n_wrap++;
      tap = AW'(t);
      in_sample = sample_t'($urandom);
      in_valid = 1;
      hist.push_back(in_sample);
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid one clock later");
      check(out_sample == e, "delayed sample");
      repeat ($urandom % 2) begin
        @(negedge clk);
        check(!out_valid, "no extra out_valid");
      end
    end
    check(n_zero > 0 && n_wrap > 0, "zero fill and pointer wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
