// tb_mean_unit: end-to-end test of the mean circuit at its defaults (K = 4,
// N = 8). For random words it checks M = (sum mod 2^N) / K, that Done comes
// exactly K + N + 3 cycles after Start is seen, that Ready is low in between,
// and that a Start held high across Done begins the next run (the chart has
// no Start-release wait). A second instance with K = 6 and N = 12 checks a
// size that is not a power of two.
module tb_mean_unit;
  localparam int K = 4, N = 8;
  logic         clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic         ready, done, wr_en = 1'b0;
  logic [1:0]   wr_addr = '0;
  logic [N-1:0] wr_data = '0, m;
  int           checks = 0, failures = 0;

  mean_unit dut (.clk, .rst, .start, .ready, .done, .wr_en, .wr_addr, .wr_data, .m);

  // second instance: K = 6 (not a power of two), N = 12
  localparam int K6 = 6, N12 = 12;
  logic           start6 = 1'b0, ready6, done6, wr6 = 1'b0;
  logic [2:0]     wa6 = '0;
  logic [N12-1:0] wd6 = '0, m6;
  mean_unit #(.K(K6), .N(N12)) dut6 (.clk, .rst, .start(start6), .ready(ready6), .done(done6),
                                     .wr_en(wr6), .wr_addr(wa6), .wr_data(wd6), .m(m6));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  task automatic run(input logic [N-1:0] w [K]);
    int sum = 0, cycles = 0;
    for (int a = 0; a < K; a++) begin
      wr_en = 1'b1; wr_addr = 2'(a); wr_data = w[a]; sum += w[a];
      step;
    end
    wr_en = 1'b0;
    check(ready === 1'b1, "ready before start");
    start = 1'b1; step; start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100) begin
      check(ready === 1'b0, "ready low while busy");
      step; cycles++;
    end
    check(cycles == K + N + 3, $sformatf("Done after %0d cycles, expected %0d", cycles, K + N + 3));
    check(m === N'((sum % (1 << N)) / K), $sformatf("M=%0d expected %0d", m, (sum % (1 << N)) / K));
    step;
    check(ready === 1'b1 && m === N'((sum % (1 << N)) / K), "M held in idle");
  endtask

  task automatic run6(input int w [K6]);
    int sum = 0, cycles;
    for (int a = 0; a < K6; a++) begin
      wr6 = 1'b1; wa6 = 3'(a); wd6 = N12'(w[a]); sum += w[a];
      step;
    end
    wr6 = 1'b0;
    start6 = 1'b1; step; start6 = 1'b0;
    cycles = 1;
    while (!done6 && cycles < 100) begin step; cycles++; end
    check(cycles == K6 + N12 + 3, $sformatf("K=6: Done after %0d cycles, expected %0d", cycles, K6 + N12 + 3));
    check(m6 === N12'((sum % (1 << N12)) / K6), $sformatf("K=6: M=%0d expected %0d", m6, (sum % (1 << N12)) / K6));
  endtask

  initial begin
    logic [N-1:0] w [K];
    int w6 [K6];
    step; rst = 1'b0;
    w = '{8'd1, 8'd2, 8'd3, 8'd4};     run(w);
    w = '{8'd60, 8'd61, 8'd62, 8'd63}; run(w);
    w = '{8'd255, 8'd1, 8'd0, 8'd0};   run(w);
    for (int n = 0; n < 30; n++) begin
      foreach (w[a]) w[a] = N'($urandom);
      run(w);
    end
    w6 = '{1, 2, 3, 4, 5, 6};  run6(w6);
    for (int n = 0; n < 20; n++) begin
      foreach (w6[a]) w6[a] = $urandom_range(0, 4095);
      run6(w6);
    end
    // Start held high: a second run begins straight after Done
    start = 1'b1;
    repeat (K + N + 5) step;
    check(done === 1'b0 && ready === 1'b0, "held Start restarts the circuit");
    start = 1'b0;
    while (!done) step;
    step;
    check(ready === 1'b1, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
