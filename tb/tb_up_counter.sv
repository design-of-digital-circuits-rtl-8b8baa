// tb_up_counter: random load/count/reset sequence on a 4-bit
// up-counter, checked every cycle against a reference count kept in the
// testbench (load has priority over count; the count wraps).
module tb_up_counter;
  logic       clk = 1'b0, rst = 1'b1, load = 1'b0, count = 1'b0;
  logic [3:0] d = '0, q, ref_q;
  int         checks = 0, failures = 0;

  up_counter #(.W(4)) dut (.clk, .rst, .load, .count, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      rst   = ($urandom_range(0, 49) == 0);
      load  = ($urandom_range(0, 7) == 0);
      count = $urandom_range(0, 1);
      d     = 4'($urandom);
      @(posedge clk);
      if (rst)        ref_q = '0;
      else if (load)  ref_q = d;
      else if (count) ref_q = ref_q + 4'd1;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d: q=%0d expected %0d", n, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
