// tb_baam_tag_array: self-checking testbench of one tag-array way. Checks
// that valid bits are clear after reset, that writes are read back one
// cycle after an enabled read, that a disabled read reports invalid, and
// random write/read traffic against an array kept in the testbench.
module tb_baam_tag_array;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0, wr_valid = 0, rd_valid;
  logic [7:0] rd_idx = 0, wr_idx = 0;
  logic [18:0] wr_tag = 0, rd_tag;
  int checks = 0, failures = 0;
  logic [18:0] m_tag [256];
  bit m_val [256];

  baam_tag_array dut (.clk, .rst_n, .rd_en, .rd_idx, .rd_tag, .rd_valid,
                      .wr_en, .wr_idx, .wr_tag, .wr_valid);

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
    bit en; logic [7:0] ri;
    for (int i = 0; i < 256; i++) m_val[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); rd_en = 1; rd_idx = 8'(i);
      @(negedge clk); check(!rd_valid, "invalid after reset");
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      ri = 8'($urandom_range(0, 15));
      rd_en = en; rd_idx = ri;
      wr_en = $urandom_range(0, 1); wr_idx = 8'($urandom_range(0, 15));
      wr_tag = 19'($urandom); wr_valid = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        check(rd_valid == m_val[ri], $sformatf("valid of set %0d", ri));
        if (m_val[ri]) check(rd_tag == m_tag[ri], $sformatf("tag of set %0d", ri));
      end else begin
        check(!rd_valid, "disabled way reads invalid");
      end
      if (wr_en) begin m_tag[wr_idx] = wr_tag; m_val[wr_idx] = wr_valid; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
