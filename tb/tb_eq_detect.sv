// tb_eq_detect: exhaustive check of the C = VALUE detector for the default
// (W = 2, VALUE = 3) and for W = 4 with VALUE = 2 and 9. Expected value is
// (c == VALUE).
module tb_eq_detect;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [1:0] c2;  logic e3;
  logic [3:0] c4;  logic e2, e9;

  eq_detect                     dut3 (.c(c2), .eq(e3));
  eq_detect #(.W(4), .VALUE(2)) dut2 (.c(c4), .eq(e2));
  eq_detect #(.W(4), .VALUE(9)) dut9 (.c(c4), .eq(e9));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      c2 = 2'(v); @(posedge clk);
      checks++; if (e3 !== (v == 3)) begin failures++; $display("FAIL c=%0d eq=%b", v, e3); end
    end
    for (int v = 0; v < 16; v++) begin
      c4 = 4'(v); @(posedge clk);
      checks++; if (e2 !== (v == 2)) begin failures++; $display("FAIL V=2 c=%0d", v); end
      checks++; if (e9 !== (v == 9)) begin failures++; $display("FAIL V=9 c=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
