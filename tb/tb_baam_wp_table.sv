// tb_baam_wp_table: self-checking testbench of the way-prediction table.
// Checks that every flag reads way 0 after reset, then random flag writes
// and combinational reads against a table kept in the testbench.
module tb_baam_wp_table;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [7:0] rd_idx = 0, wr_idx = 0;
  logic [1:0] rd_flag, wr_flag = 0;
  int checks = 0, failures = 0;
  logic [1:0] m [256];

  baam_wp_table dut (.clk, .rst_n, .rd_idx, .rd_flag, .wr_en, .wr_idx, .wr_flag);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++) m[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); rd_idx = 8'(s); #1; check(rd_flag == 0, "flag 0 after reset");
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_idx = 8'($urandom); wr_flag = 2'($urandom);
      rd_idx = ($urandom_range(0, 3) == 0) ? wr_idx : 8'($urandom);
      #1;
      check(rd_flag == m[rd_idx], $sformatf("flag of set %0d", rd_idx));
      @(posedge clk);
      if (wr_en) m[wr_idx] = wr_flag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
