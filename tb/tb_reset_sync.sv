// tb_reset_sync: the output must drop together with the input (no clock
// needed) and rise exactly STAGES clock edges after the input rises, for
// input edges at random points inside the clock period.
module tb_reset_sync;
  localparam int STAGES = 3;
  logic clk = 0, rst_n_in = 0, rst_n_out;
  int checks = 0, failures = 0;

  reset_sync #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 check(rst_n_out == 0, "held in reset");
    for (int i = 0; i < 50; i++) begin
      #($urandom % 9 + 1);
      rst_n_in = 1;
      for (int k = 1; k <= STAGES; k++) begin
        @(posedge clk); #1;
        check(rst_n_out == (k == STAGES), "release after STAGES edges");
      end
      repeat ($urandom % 4) begin @(posedge clk); #1 check(rst_n_out == 1, "stays released"); end
      #($urandom % 4 + 1);
      rst_n_in = 0;
      #0.1 check(rst_n_out == 0, "asynchronous assert");
      repeat (1 + $urandom % 3) @(posedge clk);
      #1 check(rst_n_out == 0, "held while input low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
