// tb_mean_ctrl: walks the mean controller through every state and branch of
// its chart by driving the status inputs, and checks the control outputs of
// each cycle against the values the chart calls for.
module tb_mean_ctrl;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic a_zero = 1'b0, div_ready = 1'b0, div_done = 1'b0;
  logic load_regs, add, divide, decr_a, ready, done;
  int   checks = 0, failures = 0;

  mean_ctrl dut (.clk, .rst, .start, .a_zero, .div_ready, .div_done,
                 .load_regs, .add, .divide, .decr_a, .ready, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {load_regs, add, divide, decr_a, ready, done}
  task automatic expect_out(input logic [5:0] e, input string where);
    checks++;
    if ({load_regs, add, divide, decr_a, ready, done} !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", where, {load_regs, add, divide, decr_a, ready, done}, e);
    end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  initial begin
    step; rst = 1'b0; #1;
    expect_out(6'b000010, "idle");
    step; expect_out(6'b000010, "idle holds without start");
    for (int run = 0; run < 2; run++) begin
      start = 1'b1; #1;
      expect_out(6'b100010, "idle with start: Load_regs");
      step; start = 1'b0; a_zero = 1'b0; #1;
      expect_out(6'b010100, "sum, A not zero: Add and Decr_A");
      step; #1; expect_out(6'b010100, "sum again");
      a_zero = 1'b1; #1;
      expect_out(6'b010000, "sum, A zero: Add only");
      step; a_zero = 1'b0; div_ready = 1'b0; #1;
      expect_out(6'b001000, "div_start: Divide");
      step; expect_out(6'b001000, "div_start waits for Div_ready");
      div_ready = 1'b1;
      step; div_ready = 1'b0; #1;
      expect_out(6'b000000, "div");
      step; expect_out(6'b000000, "div waits for Div_done");
      div_done = 1'b1;
      step; div_done = 1'b0; #1;
      expect_out(6'b000001, "done");
      step; expect_out(6'b000010, "back to idle");
    end
    // reset in the middle of a run
    start = 1'b1; step; start = 1'b0; #1;
    expect_out(6'b010100, "sum before reset");
    rst = 1'b1; step; rst = 1'b0; #1;
    expect_out(6'b000010, "idle after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
