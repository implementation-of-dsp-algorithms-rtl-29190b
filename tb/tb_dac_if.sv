// tb_dac_if: random samples, DAC channel selects and truncation masks.
// Each sample must appear on dac_out one clock after in_valid, as offset
// binary with the masked low bits cleared; then exactly the selected en bit
// must be high for EN_CLKS clocks while dac_out holds still.
module tb_dac_if;
  import audio_pkg::*;
  localparam int EN_CLKS = 4;
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_sample = '0;
  logic [1:0] dac_sel = '0;
  logic [7:0] bit_trun = '0;
  logic [11:0] dac_out;
  logic [3:0] en;
  int checks = 0, failures = 0;
  int per_ch[4] = '{0, 0, 0, 0};

  dac_if #(.EN_CLKS(EN_CLKS)) dut (.*);
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
    @(negedge clk);
    check(dac_out == 12'h800 && en == 4'b0, "mid-scale after reset");
    for (int i = 0; i < 300; i++) begin
      logic [11:0] e;
      int v;
      in_sample = sample_t'($urandom);
      dac_sel   = 2'($urandom);
      bit_trun  = (i % 3 == 0) ? 8'h00 : 8'($urandom);
      v = int'(in_sample) + 2048;                 // offset binary
      e = 12'(v) & ~{4'b0, bit_trun};
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(dac_out == e, "dac_out value");
      check(en == 4'b0, "enable low while data settles");
      for (int k = 0; k < EN_CLKS; k++) begin
        @(negedge clk);
        check(en == (4'b1 << dac_sel), "selected enable high");
        check(dac_out == e, "dac_out held");
      end
      @(negedge clk);
      check(en == 4'b0, "enable drops after EN_CLKS");
      per_ch[dac_sel]++;
      repeat ($urandom % 3) @(negedge clk);
    end
    foreach (per_ch[c]) check(per_ch[c] > 0, "every DAC channel used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
