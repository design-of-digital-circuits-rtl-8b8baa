// tb_mean_datapath: drives the control signals of the mean datapath by hand
// (K = 4, N = 8): fills the register file, clears S and loads A = k-1, adds
// one word per cycle while counting A down, checks A_zero on the last word,
// starts the divider and checks M = (sum mod 256) / 4 and the handshake.
module tb_mean_datapath;
  localparam int K = 4, N = 8;
  logic         clk = 1'b0, rst = 1'b1;
  logic         load_regs = 1'b0, add = 1'b0, divide = 1'b0, decr_a = 1'b0;
  logic         a_zero, div_ready, div_done;
  logic         wr_en = 1'b0;
  logic [1:0]   wr_addr = '0;
  logic [N-1:0] wr_data = '0, m;
  int           checks = 0, failures = 0;

  mean_datapath dut (.clk, .rst, .load_regs, .add, .divide, .decr_a,
                     .a_zero, .div_ready, .div_done, .wr_en, .wr_addr, .wr_data, .m);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    int sum = 0, cycles;
    for (int a = 0; a < K; a++) begin
      wr_en = 1'b1; wr_addr = 2'(a); wr_data = w[a]; sum += w[a];
      step;
    end
    wr_en = 1'b0;
    load_regs = 1'b1; step; load_regs = 1'b0;
    check(div_done === 1'b0 && m === '0, "Load_regs clears the divider");
    for (int a = K - 1; a >= 0; a--) begin
      check(a_zero === (a == 0), $sformatf("A_zero at A=%0d", a));
      add = 1'b1; decr_a = (a != 0);
      step;
    end
    add = 1'b0; decr_a = 1'b0;
    check(div_ready === 1'b1, "divider ready");
    divide = 1'b1; step; divide = 1'b0;
    cycles = 0;
    while (!div_done && cycles < 100) begin step; cycles++; end
    check(cycles == N, $sformatf("divide took %0d cycles", cycles));
    check(m === N'((sum % 256) / K), $sformatf("M=%0d expected %0d", m, (sum % 256) / K));
  endtask

  initial begin
    logic [N-1:0] w [K];
    step; rst = 1'b0;
    w = '{8'd10, 8'd20, 8'd30, 8'd40}; run(w);
    w = '{8'd3, 8'd0, 8'd0, 8'd0};     run(w);
    w = '{8'd63, 8'd63, 8'd63, 8'd63}; run(w);
    w = '{8'd200, 8'd100, 8'd1, 8'd2}; run(w);   // sum wraps modulo 2^N
    for (int n = 0; n < 20; n++) begin
      foreach (w[a]) w[a] = N'($urandom_range(0, 63));
      run(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
