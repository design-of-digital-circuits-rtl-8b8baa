// tb_reg_file: random writes and reads of the default 4 x 8 register file
// against a reference array. Checks the combinational read (same cycle as
// the address) and that a write only shows after its clock edge.
module tb_reg_file;
  logic       clk = 1'b0, w_en = 1'b0;
  logic [1:0] r_addr = '0, w_addr = '0;
  logic [7:0] r_data, w_data = '0;
  logic [7:0] ref_mem [4];
  int         checks = 0, failures = 0;

  reg_file dut (.clk, .r_addr, .r_data, .w_en, .w_addr, .w_data);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < 4; a++) begin
      w_en = 1'b1; w_addr = 2'(a); w_data = 8'(8'h30 + a * 17);
      ref_mem[a] = w_data;
      @(posedge clk); #1;
    end
    w_en = 1'b0;
    for (int n = 0; n < 300; n++) begin
      w_en   = $urandom_range(0, 1);
      w_addr = 2'($urandom);
      w_data = 8'($urandom);
      r_addr = 2'($urandom);
      #1;
      checks++;   // read before the edge: old contents
      if (r_data !== ref_mem[r_addr]) begin
        failures++; $display("FAIL read %0d = %h expected %h", r_addr, r_data, ref_mem[r_addr]);
      end
      @(posedge clk);
      if (w_en) ref_mem[w_addr] = w_data;
      #1;
      r_addr = w_addr; #1;
      checks++;   // read back the written word after the edge
      if (r_data !== ref_mem[w_addr]) begin
        failures++; $display("FAIL readback %0d = %h expected %h", w_addr, r_data, ref_mem[w_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
