// tb_sync_fifo: random pushes and pops against a queue reference model.
// Checks dout (one clock after each pop), empty, full, count and the
// quarter-depth fill level, including simultaneous push and pop when full,
// dropped pushes when full, ignored pops when empty and the clear input.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  localparam int WIDTH = 12;

  logic clk = 0, rst_n = 0, clr = 0, we = 0, re = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic empty, full;
  logic [1:0] pct_full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int full_push_pop = 0, dropped = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .PCT_W(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [WIDTH-1:0] q[$];
  logic [WIDTH-1:0] expect_dout;
  bit               pend;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 500) % 3;   // fill-heavy, drain-heavy, balanced phases
      @(negedge clk);
      // compare the word popped in the previous cycle
      if (pend) check(dout == expect_dout, "dout");
      pend = 0;
      check(count == $bits(count)'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(pct_full == 2'((q.size() * 4 / DEPTH) > 3 ? 3 : q.size() * 4 / DEPTH), "pct_full");
      din = WIDTH'($urandom);
      clr = (i == 3333);
      case (phase)
        0: begin we = ($urandom % 10) < 8; re = ($urandom % 10) < 3; end
        1: begin we = ($urandom % 10) < 3; re = ($urandom % 10) < 8; end
        default: begin we = $urandom % 2; re = $urandom % 2; end
      endcase
      @(posedge clk);
      #1;
      if (clr) begin
        q = {};
      end else begin
        bit pop, push;
        pop  = re && q.size() > 0;
        push = we && (q.size() < DEPTH || pop);
        if (we && q.size() == DEPTH && pop) full_push_pop++;
        if (we && !push) dropped++;
        if (pop) begin expect_dout = q.pop_front(); pend = 1; end
        if (push) q.push_back(din);
      end
      clr = 0;
    end
    check(full_push_pop > 0, "push+pop while full exercised");
    check(dropped > 0, "push while full exercised");
    $display("full push+pop=%0d dropped=%0d", full_push_pop, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
