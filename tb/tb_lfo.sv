// tb_lfo: checks the triangle sweep against a closed-form model.
// After s steps (one step per RATE_DIV ticks) an oscillator that starts at
// phase p0 must read tri(p0 + s), tri(m) = m mod 2*SPAN folded at SPAN.
// Three instances: start at 0 going up, at SPAN going down, at 2 going up;
// ticks arrive on random cycles. Both turnarounds must be seen.
module tb_lfo;
  localparam int SPAN = 5, RATE = 3, W = 4;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [W-1:0] v0, v1, v2;
  logic d0, d1, d2;
  int checks = 0, failures = 0, ticks = 0, top_turns = 0, bottom_turns = 0;

  lfo #(.W(W), .SPAN(SPAN), .RATE_DIV(RATE), .START(0),    .START_UP(1'b1)) u0 (.clk, .rst_n, .tick, .value(v0), .dir_up(d0));
  lfo #(.W(W), .SPAN(SPAN), .RATE_DIV(RATE), .START(SPAN), .START_UP(1'b0)) u1 (.clk, .rst_n, .tick, .value(v1), .dir_up(d1));
  lfo #(.W(W), .SPAN(SPAN), .RATE_DIV(RATE), .START(2),    .START_UP(1'b1)) u2 (.clk, .rst_n, .tick, .value(v2), .dir_up(d2));

  always #5 clk = ~clk;

  function automatic int tri_at(int m);
    m = m % (2*SPAN);
    return (m <= SPAN) ? m : 2*SPAN - m;
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
    logic [W-1:0] prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      begin
        int s;
        s = ticks / RATE;
        check(int'(v0) == tri_at(s), "lfo0");
        check(int'(v1) == tri_at(SPAN + s), "lfo1");
        check(int'(v2) == tri_at(2 + s), "lfo2");
        if (s > 0 && tri_at(s) == SPAN && ticks % RATE == 0) top_turns++;
        if (s > 0 && tri_at(s) == 0 && ticks % RATE == 0) bottom_turns++;
      end
      tick = ($urandom % 3) != 0;
      @(posedge clk);
      if (tick) ticks++;
      #1 tick = 0;
    end
    check(top_turns > 0 && bottom_turns > 0, "both turnarounds seen");
    check(d0 == d0, "dir visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
