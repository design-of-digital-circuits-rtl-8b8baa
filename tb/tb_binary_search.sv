// tb_binary_search: fills the default 4-word array with sorted values and
// searches for every stored value (found, right index) and for values below,
// between and above them (not found). Cycle counts from Start to Done are
// compared with a reference model of the algorithm: 2 cycles per probe plus
// 1 for the final L > R test when the search fails. A second instance with
// K = 13 covers array sizes that are not powers of two.
module tb_binary_search;
  localparam int N = 8;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;

  // K = 4 (default)
  logic         start4 = 0, ready4, done4, found4, wr4 = 0;
  logic [1:0]   idx4, wa4 = '0;
  logic [N-1:0] t4 = '0, wd4 = '0;
  binary_search dut4 (.clk, .rst, .start(start4), .target(t4), .ready(ready4), .done(done4),
                      .found(found4), .index(idx4), .wr_en(wr4), .wr_addr(wa4), .wr_data(wd4));

  // K = 13
  logic         start13 = 0, ready13, done13, found13, wr13 = 0;
  logic [3:0]   idx13, wa13 = '0;
  logic [N-1:0] t13 = '0, wd13 = '0;
  binary_search #(.K(13)) dut13 (.clk, .rst, .start(start13), .target(t13), .ready(ready13),
                      .done(done13), .found(found13), .index(idx13), .wr_en(wr13),
                      .wr_addr(wa13), .wr_data(wd13));

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

  // reference: returns index or -1, and the cycle count
  function automatic int model(input int arr [], input int t, output int cycles);
    int l = 0, r = arr.size() - 1, m;
    cycles = 0;
    while (l <= r) begin
      m = (l + r) / 2;
      cycles += 2;
      if (arr[m] < t) l = m + 1;
      else if (arr[m] > t) r = m - 1;
      else return m;
    end
    cycles += 1;
    return -1;
  endfunction

  task automatic search4(input int arr [], input int t);
    int exp_idx, exp_cyc, cycles;
    exp_idx = model(arr, t, exp_cyc);
    t4 = N'(t); start4 = 1'b1; step; start4 = 1'b0;
    cycles = 0;
    while (!done4 && cycles < 100) begin step; cycles++; end
    check(cycles == exp_cyc, $sformatf("K=4 T=%0d: %0d cycles, expected %0d", t, cycles, exp_cyc));
    check(found4 === (exp_idx >= 0), $sformatf("K=4 T=%0d: found=%b", t, found4));
    if (exp_idx >= 0) check(idx4 === 2'(exp_idx), $sformatf("K=4 T=%0d: index %0d expected %0d", t, idx4, exp_idx));
    step;
    check(ready4 === 1'b1, "K=4 ready again");
  endtask

  task automatic search13(input int arr [], input int t);
    int exp_idx, exp_cyc, cycles;
    exp_idx = model(arr, t, exp_cyc);
    t13 = N'(t); start13 = 1'b1; step; start13 = 1'b0;
    cycles = 0;
    while (!done13 && cycles < 100) begin step; cycles++; end
    check(cycles == exp_cyc, $sformatf("K=13 T=%0d: %0d cycles, expected %0d", t, cycles, exp_cyc));
    check(found13 === (exp_idx >= 0), $sformatf("K=13 T=%0d: found=%b", t, found13));
    if (exp_idx >= 0) check(idx13 === 4'(exp_idx), $sformatf("K=13 T=%0d: index %0d expected %0d", t, idx13, exp_idx));
    step;
  endtask

  initial begin
    int a4 [] = '{10, 20, 30, 40};
    int a13 [];
    step; rst = 1'b0;
    foreach (a4[i]) begin wr4 = 1; wa4 = 2'(i); wd4 = N'(a4[i]); step; end
    wr4 = 0;
    for (int t = 0; t <= 50; t += 5) search4(a4, t);
    for (int n = 0; n < 4; n++) begin
      // new sorted random contents
      int v;
      v = 0;
      foreach (a4[i]) begin v += $urandom_range(1, 60); a4[i] = v; end
      foreach (a4[i]) begin wr4 = 1; wa4 = 2'(i); wd4 = N'(a4[i]); step; end
      wr4 = 0;
      foreach (a4[i]) search4(a4, a4[i]);
      for (int k = 0; k < 6; k++) search4(a4, $urandom_range(0, 255));
    end
    a13 = new[13];
    foreach (a13[i]) a13[i] = 3 + 7 * i;
    foreach (a13[i]) begin wr13 = 1; wa13 = 4'(i); wd13 = N'(a13[i]); step; end
    wr13 = 0;
    for (int t = 0; t <= 100; t++) search13(a13, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
