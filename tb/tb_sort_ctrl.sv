// tb_sort_ctrl: drives the status inputs of the sorting controller through
// every branch (swap and no swap, inner and outer loop ends) and checks the
// control outputs of each cycle against the state sequence of the chart.
module tb_sort_ctrl;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic i_done = 1'b0, j_done = 1'b0, b_lt_a = 1'b0;
  logic init_i, init_j, incr_i, incr_j, load_a, load_b, store_a, store_b, ready, done;
  int   checks = 0, failures = 0;

  sort_ctrl dut (.clk, .rst, .start, .i_done, .j_done, .b_lt_a,
                 .init_i, .init_j, .incr_i, .incr_j, .load_a, .load_b,
                 .store_a, .store_b, .ready, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {init_i, init_j, incr_i, incr_j, load_a, load_b, store_a, store_b, ready, done}
  localparam logic [9:0] IDLE      = 10'b0000_0000_10;
  localparam logic [9:0] IDLE_GO   = 10'b1000_0000_10;
  localparam logic [9:0] OUTER     = 10'b0100_1000_00;
  localparam logic [9:0] INNER     = 10'b0000_0100_00;
  localparam logic [9:0] COMPARE   = 10'b0000_0000_00;
  localparam logic [9:0] SWAP_A    = 10'b0000_0010_00;
  localparam logic [9:0] SWAP_B    = 10'b0000_0001_00;
  localparam logic [9:0] CHECK_J   = 10'b0001_1000_00;
  localparam logic [9:0] CHECK_I   = 10'b0010_1000_00;
  localparam logic [9:0] CHECK_END = 10'b0000_1000_00;
  localparam logic [9:0] DONE      = 10'b0000_0000_01;

  task automatic expect_out(input logic [9:0] e, input string where);
    logic [9:0] got;
    got = {init_i, init_j, incr_i, incr_j, load_a, load_b, store_a, store_b, ready, done};
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", where, got, e);
    end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  // one inner iteration: InnerLoop, Compare, optional Swap, CheckLoops
  task automatic inner(input bit swap, input bit jd, input bit id);
    expect_out(INNER, "inner");
    step; b_lt_a = swap; #1;
    expect_out(COMPARE, "compare");
    step; b_lt_a = 1'b0; #1;
    if (swap) begin
      expect_out(SWAP_A, "swap: Store_A");
      step; expect_out(SWAP_B, "swap: Store_B");
      step;
    end
    j_done = jd; i_done = id; #1;
    if (!jd)      expect_out(CHECK_J, "check: next j");
    else if (!id) expect_out(CHECK_I, "check: next i");
    else          expect_out(CHECK_END, "check: finished");
    step; j_done = 1'b0; i_done = 1'b0; #1;
  endtask

  initial begin
    step; rst = 1'b0; #1;
    expect_out(IDLE, "idle");
    start = 1'b1; #1;
    expect_out(IDLE_GO, "idle with start");
    step; start = 1'b0; #1;
    // k = 3: i = 0 (j = 1, 2), i = 1 (j = 2)
    expect_out(OUTER, "outer i=0");
    step; inner(1'b1, 1'b0, 1'b0);
    inner(1'b0, 1'b1, 1'b0);
    expect_out(OUTER, "outer i=1");
    step; inner(1'b1, 1'b1, 1'b1);
    expect_out(DONE, "done");
    step; expect_out(IDLE, "idle again");
    step; expect_out(IDLE, "idle holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
