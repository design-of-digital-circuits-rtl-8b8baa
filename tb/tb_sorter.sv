// tb_sorter: end-to-end sorting at the defaults (K = 4, N = 8). Runs the
// worked example 3 7 1 0 -> 0 1 3 7, arrays with ties, sorted and reversed
// input and random arrays. Each result is compared with a reference sort,
// and the cycle count from Start to Done with
//   (K-1) + 3*K*(K-1)/2 + 2*swaps + 1,
// where the number of swaps comes from the testbench's own run of the
// exchange-sort algorithm. A second instance with K = 7 and N = 12 checks a
// size that is not a power of two in the same way.
module tb_sorter;
  localparam int K = 4, N = 8;
  logic         clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic         ready, done, ext_we = 1'b0;
  logic [1:0]   ext_addr = '0;
  logic [N-1:0] ext_wdata = '0, ext_rdata;
  int           checks = 0, failures = 0;

  sorter dut (.clk, .rst, .start, .ready, .done, .ext_we, .ext_addr, .ext_wdata, .ext_rdata);

  // second instance: K = 7 (not a power of two), N = 12
  localparam int K7 = 7, N7 = 12;
  logic          start7 = 1'b0, ready7, done7, we7 = 1'b0;
  logic [2:0]    addr7 = '0;
  logic [N7-1:0] wdata7 = '0, rdata7;
  sorter #(.K(K7), .N(N7)) dut7 (.clk, .rst, .start(start7), .ready(ready7), .done(done7),
                                 .ext_we(we7), .ext_addr(addr7), .ext_wdata(wdata7), .ext_rdata(rdata7));

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

  task automatic step; @(posedge clk); #1; endtask

  task automatic run(input int v [K]);
    int r [K], swaps = 0, cycles, tmp, expect_cycles;
    r = v;
    for (int i = 0; i <= K - 2; i++)
      for (int j = i + 1; j <= K - 1; j++)
        if (r[j] < r[i]) begin tmp = r[i]; r[i] = r[j]; r[j] = tmp; swaps++; end
    expect_cycles = (K - 1) + 3 * K * (K - 1) / 2 + 2 * swaps + 1;
    for (int a = 0; a < K; a++) begin
      ext_we = 1'b1; ext_addr = 2'(a); ext_wdata = N'(v[a]); step;
    end
    ext_we = 1'b0;
    start = 1'b1; step; start = 1'b0;
    cycles = 1;
    while (!done && cycles < 1000) begin
      ext_we = 1'b1; ext_addr = 2'(cycles); ext_wdata = 8'hEE;  // must be ignored
      step; cycles++;
    end
    ext_we = 1'b0;
    check(cycles == expect_cycles, $sformatf("Done after %0d cycles, expected %0d", cycles, expect_cycles));
    step;
    check(ready === 1'b1, "ready after done");
    for (int a = 0; a < K; a++) begin
      ext_addr = 2'(a); #1;
      check(ext_rdata === N'(r[a]), $sformatf("word %0d = %0d expected %0d", a, ext_rdata, r[a]));
    end
  endtask

  task automatic run7(input int v [K7]);
    int r [K7], swaps = 0, cycles, tmp, expect_cycles;
    r = v;
    for (int i = 0; i <= K7 - 2; i++)
      for (int j = i + 1; j <= K7 - 1; j++)
        if (r[j] < r[i]) begin tmp = r[i]; r[i] = r[j]; r[j] = tmp; swaps++; end
    expect_cycles = (K7 - 1) + 3 * K7 * (K7 - 1) / 2 + 2 * swaps + 1;
    for (int a = 0; a < K7; a++) begin
      we7 = 1'b1; addr7 = 3'(a); wdata7 = N7'(v[a]); step;
    end
    we7 = 1'b0;
    start7 = 1'b1; step; start7 = 1'b0;
    cycles = 1;
    while (!done7 && cycles < 1000) begin step; cycles++; end
    check(cycles == expect_cycles, $sformatf("K=7: Done after %0d cycles, expected %0d", cycles, expect_cycles));
    step;
    for (int a = 0; a < K7; a++) begin
      addr7 = 3'(a); #1;
      check(rdata7 === N7'(r[a]), $sformatf("K=7 word %0d = %0d expected %0d", a, rdata7, r[a]));
    end
  endtask

  initial begin
    int v [K];
    int v7 [K7];
    step; rst = 1'b0;
    v = '{3, 7, 1, 0};       run(v);   // worked example: 5 swaps
    v = '{0, 1, 3, 7};       run(v);
    v = '{255, 128, 2, 1};   run(v);
    v = '{5, 5, 5, 5};       run(v);
    v = '{9, 2, 9, 2};       run(v);
    for (int n = 0; n < 40; n++) begin
      foreach (v[a]) v[a] = $urandom_range(0, 255);
      run(v);
    end
    v7 = '{6, 5, 4, 3, 2, 1, 0};  run7(v7);
    for (int n = 0; n < 20; n++) begin
      foreach (v7[a]) v7[a] = $urandom_range(0, 4095);
      run7(v7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
