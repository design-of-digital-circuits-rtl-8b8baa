// tb_sort_datapath: exercises the sorting datapath (K = 4, N = 8) by hand:
// external fill and read-back, i/j counters with i_done and j_done, loads of
// A and B through the read-address multiplexer, B_lt_A, and both swap writes
// through the write-address and write-data multiplexers.
module tb_sort_datapath;
  localparam int K = 4, N = 8;
  logic         clk = 1'b0, rst = 1'b1;
  logic         init_i = 0, init_j = 0, incr_i = 0, incr_j = 0;
  logic         load_a = 0, load_b = 0, store_a = 0, store_b = 0;
  logic         i_done, j_done, b_lt_a;
  logic         ext_sel = 1'b1, ext_we = 1'b0;
  logic [1:0]   ext_addr = '0;
  logic [N-1:0] ext_wdata = '0, ext_rdata;
  int           checks = 0, failures = 0;

  sort_datapath dut (.clk, .rst, .init_i, .init_j, .incr_i, .incr_j, .load_a, .load_b,
                     .store_a, .store_b, .i_done, .j_done, .b_lt_a,
                     .ext_sel, .ext_we, .ext_addr, .ext_wdata, .ext_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  task automatic write(input int a, input int v);
    ext_sel = 1'b1; ext_we = 1'b1; ext_addr = 2'(a); ext_wdata = N'(v); step; ext_we = 1'b0;
  endtask

  function automatic logic [N-1:0] peek(input int a);
    return dut.u_rf.mem[a];
  endfunction

  initial begin
    int vals [K] = '{30, 70, 10, 0};
    step; rst = 1'b0;
    foreach (vals[a]) write(a, vals[a]);
    foreach (vals[a]) begin
      ext_addr = 2'(a); #1;
      check(ext_rdata === N'(vals[a]), $sformatf("read back word %0d", a));
    end
    ext_sel = 1'b0;
    // i <- 0, then j <- i+1 = 1 while A <- Reg[0]
    init_i = 1; step; init_i = 0;
    check(i_done === 1'b0, "i=0 not done");
    init_j = 1; load_a = 1; step; init_j = 0; load_a = 0;
    check(j_done === 1'b0, "j=1 not done");
    load_b = 1; step; load_b = 0;                 // B <- Reg[1] = 70
    check(b_lt_a === 1'b0, "70 < 30 is false");
    incr_j = 1; step; incr_j = 0;                 // j = 2
    load_b = 1; step; load_b = 0;                 // B <- Reg[2] = 10
    check(b_lt_a === 1'b1, "10 < 30 is true");
    store_a = 1; step; store_a = 0;               // Reg[j=2] <- A = 30
    store_b = 1; step; store_b = 0;               // Reg[i=0] <- B = 10
    check(peek(0) === 8'd10 && peek(2) === 8'd30, "swap of Reg[0] and Reg[2]");
    load_a = 1; step; load_a = 0;                 // A <- Reg[0] = 10
    incr_j = 1; step; incr_j = 0;                 // j = 3
    check(j_done === 1'b1, "j=3 is j_done");
    load_b = 1; step; load_b = 0;                 // B <- Reg[3] = 0
    check(b_lt_a === 1'b1, "0 < 10 is true");
    incr_i = 1; step; incr_i = 0;                 // i = 1
    check(i_done === 1'b0, "i=1 not done");
    incr_i = 1; step; incr_i = 0;                 // i = 2 = k-2
    check(i_done === 1'b1, "i=2 is i_done");
    init_j = 1; step; init_j = 0;                 // j <- i+1 = 3
    check(j_done === 1'b1, "j <- i+1 = 3");
    // reads and writes go through the external port again when selected
    ext_sel = 1'b1; ext_addr = 2'd2; #1;
    check(ext_rdata === 8'd30, "external read after swap");
    // random comparisons
    for (int n = 0; n < 50; n++) begin
      int x, y;
      x = $urandom_range(0, 255); y = $urandom_range(0, 255);
      write(0, x); write(1, y);
      ext_sel = 1'b0;
      init_i = 1; step; init_i = 0;
      init_j = 1; load_a = 1; step; init_j = 0; load_a = 0;
      load_b = 1; step; load_b = 0;
      check(b_lt_a === (y < x), $sformatf("%0d < %0d", y, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
