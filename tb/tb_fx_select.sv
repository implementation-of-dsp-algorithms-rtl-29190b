// tb_fx_select: for every mode, random valid strobes and samples on the
// three inputs; the output must follow the selected input (or zero for
// mute, timed by the dry strobe) one clock later.
module tb_fx_select;
  import audio_pkg::*;
  logic clk = 0, rst_n = 0;
  fx_mode_e mode = FX_BYPASS;
  logic dry_valid = 0, echo_valid = 0, chorus_valid = 0, out_valid;
  sample_t dry = '0, echo = '0, chorus = '0, out_sample;
  int checks = 0, failures = 0;

  fx_select dut (.*);
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
    for (int m = 0; m < 4; m++) begin
      mode = fx_mode_e'(m);
      for (int i = 0; i < 100; i++) begin
        logic ev; sample_t es;
        @(negedge clk);
        dry_valid = $urandom % 2; echo_valid = $urandom % 2; chorus_valid = $urandom % 2;
        dry = sample_t'($urandom); echo = sample_t'($urandom); chorus = sample_t'($urandom);
        case (m)
          0: begin ev = dry_valid;    es = dry;    end
          1: begin ev = echo_valid;   es = echo;   end
          2: begin ev = chorus_valid; es = chorus; end
          default: begin ev = dry_valid; es = '0; end
        endcase
        @(negedge clk);
        check(out_valid == ev, "out_valid follows selected input");
        if (ev) check(out_sample == es, "out_sample is selected input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
