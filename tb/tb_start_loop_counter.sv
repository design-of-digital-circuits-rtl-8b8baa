// tb_start_loop_counter: applies Start pulses of random length (1 to 6
// cycles) with random gaps and checks that R counts each pulse exactly once,
// that R changes one cycle after S_incr is entered, and that Ready is high
// only while waiting in S_idle.
module tb_start_loop_counter;
  logic       clk = 1'b0, rst = 1'b1, start = 1'b0, ready;
  logic [7:0] r;
  int         checks = 0, failures = 0, pulses = 0;

  start_loop_counter dut (.clk, .rst, .start, .ready, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  initial begin
    step; rst = 1'b0; #1;
    check(r === 8'd0 && ready === 1'b1, "cleared by reset");
    for (int n = 0; n < 100; n++) begin
      int len, gap;
      len = $urandom_range(1, 6);
      gap = $urandom_range(1, 3);
      check(ready === 1'b1, "ready before pulse");
      start = 1'b1;
      step;                                   // now in S_incr
      check(ready === 1'b0 && r === 8'(pulses), "S_incr: count not yet updated");
      for (int c = 1; c < len; c++) step;
      start = 1'b0;
      pulses++;
      step;
      check(r === 8'(pulses), $sformatf("after pulse %0d of %0d cycles: r=%0d", n, len, r));
      for (int c = 0; c < gap; c++) step;
    end
    check(r === 8'(pulses), "final count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
