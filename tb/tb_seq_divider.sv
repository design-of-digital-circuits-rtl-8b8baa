// tb_seq_divider: directed and random divisions on the default 8-bit
// divider, compared with the / and % operators. Also checks the handshake:
// ready drops for exactly N = 8 cycles after start, done rises after them,
// and reset clears done and the outputs.
module tb_seq_divider;
  localparam int N = 8;
  logic         clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [N-1:0] dividend = '0, divisor = '1, q, r;
  logic         ready, done;
  int           checks = 0, failures = 0;

  seq_divider dut (.clk, .reset, .start, .dividend, .divisor, .q, .r, .ready, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic divide(input logic [N-1:0] x, input logic [N-1:0] y);
    int busy;
    logic [N-1:0] eq, er;
    eq = (y == 0) ? '1 : x / y;
    er = (y == 0) ? x  : x % y;
    check(ready === 1'b1, "ready before start");
    dividend = x; divisor = y; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0; dividend = '0; divisor = '0;   // inputs are captured at start
    busy = 0;
    while (!done) begin
      check(ready === 1'b0, "ready low while busy");
      busy++;
      @(posedge clk); #1;
    end
    check(busy == N, $sformatf("busy %0d cycles, expected %0d", busy, N));
    check(q === eq, $sformatf("%0d/%0d: q=%0d expected %0d", x, y, q, eq));
    check(r === er, $sformatf("%0d%%%0d: r=%0d expected %0d", x, y, r, er));
    check(ready === 1'b1, "ready when done");
    @(posedge clk); #1;
    check(done === 1'b1 && q === eq, "done and q held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(ready === 1'b1 && done === 1'b0, "idle after reset");
    divide(8'd100, 8'd4);
    divide(8'd255, 8'd4);
    divide(8'd7, 8'd9);
    divide(8'd255, 8'd1);
    divide(8'd200, 8'd200);
    divide(8'd13, 8'd0);
    for (int n = 0; n < 200; n++) divide(8'($urandom), 8'($urandom_range(1, 255)));
    reset = 1'b1; @(posedge clk); #1 reset = 1'b0;
    check(done === 1'b0 && q === '0 && ready === 1'b1, "reset clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
