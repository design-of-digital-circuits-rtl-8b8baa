// tb_zero_detect: exhaustive check of the C = 0 detector at W = 2 (default)
// and W = 5. The expected value is computed as (c == 0).
module tb_zero_detect;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [1:0] c2;  logic z2;
  logic [4:0] c5;  logic z5;

  zero_detect          dut2 (.c(c2), .zero(z2));
  zero_detect #(.W(5)) dut5 (.c(c5), .zero(z5));

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
      checks++; if (z2 !== (v == 0)) begin failures++; $display("FAIL W=2 c=%0d z=%b", v, z2); end
    end
    for (int v = 0; v < 32; v++) begin
      c5 = 5'(v); @(posedge clk);
      checks++; if (z5 !== (v == 0)) begin failures++; $display("FAIL W=5 c=%0d z=%b", v, z5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
