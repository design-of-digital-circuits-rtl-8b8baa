// tb_algo_hw_top: end-to-end test of algo_hw_top at its default parameters
// (K = 4, N = 8).
//
// Each round takes K random words and: writes them to the sorter and sorts
// them; reads the sorted words back and loads them into the binary-search
// array; writes the original words to the mean circuit and computes the mean
// while the binary search looks for every word and for random values; and
// meanwhile gives the Start-loop counter one Start pulse of random length.
// Everything is compared with values the testbench computes itself. It also
// counts how often each mechanism happened (swap, compare without swap,
// found, not found, sum wrap-around in the N-bit sum register, divider wait,
// Start held for more than one cycle) and counts a failure for any that
// never happened.
module tb_algo_hw_top;
  localparam int K = 4, N = 8;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;

  logic         mean_start = 0, mean_ready, mean_done, mean_wr_en = 0;
  logic [1:0]   mean_wr_addr = '0;
  logic [N-1:0] mean_wr_data = '0, mean_m;
  logic         sort_start = 0, sort_ready, sort_done, sort_we = 0;
  logic [1:0]   sort_addr = '0;
  logic [N-1:0] sort_wdata = '0, sort_rdata;
  logic         bs_start = 0, bs_ready, bs_done, bs_found, bs_wr_en = 0;
  logic [N-1:0] bs_target = '0, bs_wr_data = '0;
  logic [1:0]   bs_index, bs_wr_addr = '0;
  logic         slc_start = 0, slc_ready;
  logic [7:0]   slc_r;

  algo_hw_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_swap = 0, n_noswap = 0, n_found = 0, n_notfound = 0;
  int n_wrap = 0, n_divwait = 0, n_heldstart = 0;

  always @(posedge clk) begin
    if (dut.u_sort.store_b) n_swap++;
    if (dut.u_sort.u_ctrl.state == algo_pkg::SORT_COMPARE && !dut.u_sort.b_lt_a) n_noswap++;
    if (dut.u_mean.u_ctrl.state == algo_pkg::MEAN_DIV && !dut.u_mean.div_done) n_divwait++;
    if (dut.u_slc.state == algo_pkg::SLC_DONE && slc_start) n_heldstart++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  initial begin
    int w [K], s [K], sum, pulses = 0, len, t, idx;
    step; rst = 1'b0;
    for (int round = 0; round < 25; round++) begin
      foreach (w[a]) w[a] = $urandom_range(0, 255);
      if (round == 0) w = '{3, 7, 1, 0};
      s = w; s.sort();
      sum = 0; foreach (w[a]) sum += w[a];
      if (sum >= 256) n_wrap++;
      // sort
      for (int a = 0; a < K; a++) begin
        sort_we = 1; sort_addr = 2'(a); sort_wdata = N'(w[a]); step;
      end
      sort_we = 0;
      sort_start = 1; step; sort_start = 0;
      while (!sort_done) step;
      step;
      // read back into the binary-search array; fill the mean circuit
      for (int a = 0; a < K; a++) begin
        sort_addr = 2'(a); #1;
        check(sort_rdata === N'(s[a]), $sformatf("round %0d sorted word %0d", round, a));
        bs_wr_en = 1; bs_wr_addr = 2'(a); bs_wr_data = sort_rdata;
        mean_wr_en = 1; mean_wr_addr = 2'(a); mean_wr_data = N'(w[a]);
        step;
      end
      bs_wr_en = 0; mean_wr_en = 0;
      // mean and Start-loop counter run while the searches go on
      mean_start = 1; slc_start = 1;
      len = $urandom_range(1, 5);
      step; mean_start = 0;
      fork
        begin
          repeat (len - 1) step;
          slc_start = 0; pulses++;
        end
        begin
          for (int q = 0; q < K + 3; q++) begin
            t = (q < K) ? s[q] : $urandom_range(0, 255);
            idx = -1;
            for (int a = K - 1; a >= 0; a--) if (s[a] == t) idx = a;
            bs_target = N'(t); bs_start = 1; step; bs_start = 0;
            while (!bs_done) step;
            check(bs_found === (idx >= 0), $sformatf("search %0d found=%b", t, bs_found));
            if (idx >= 0) begin
              check(s[bs_index] == t, $sformatf("search %0d index %0d", t, bs_index));
              n_found++;
            end else n_notfound++;
            step;
          end
        end
        begin
          while (!mean_done) step;
          check(mean_m === N'((sum % 256) / K), $sformatf("mean %0d expected %0d", mean_m, (sum % 256) / K));
        end
      join
      step;
      check(slc_r === 8'(pulses), $sformatf("start count %0d expected %0d", slc_r, pulses));
    end
    $display("mechanisms: swap=%0d compare_no_swap=%0d found=%0d not_found=%0d sum_wrap=%0d div_wait=%0d held_start=%0d",
             n_swap, n_noswap, n_found, n_notfound, n_wrap, n_divwait, n_heldstart);
    check(n_swap > 0, "swap happened");
    check(n_noswap > 0, "compare without swap happened");
    check(n_found > 0, "search found");
    check(n_notfound > 0, "search not found");
    check(n_wrap > 0, "sum wrap-around happened");
    check(n_divwait > 0, "divider wait happened");
    check(n_heldstart > 0, "held Start happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
