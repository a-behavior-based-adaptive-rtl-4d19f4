// tb_baam_block_buffer: self-checking testbench of the single block buffer.
// Checks no hit after reset, hit after a load (also in the cycle of the
// load), miss on another line, store update of the held line, invalidation
// while disabled, and random traffic against a model kept in the testbench.
module tb_baam_block_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, lu_hit, load = 0, wr_en = 0;
  logic [26:0] lu_laddr = 0, load_laddr = 0, wr_laddr = 0;
  logic [255:0] load_line = '0;
  logic [2:0] wr_word = 0, rd_word = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [3:0] wr_be = 0;
  int checks = 0, failures = 0;
  bit m_v; logic [26:0] m_la; logic [255:0] m_line;

  baam_block_buffer dut (.clk, .rst_n, .enable, .lu_laddr, .lu_hit, .load, .load_laddr,
                         .load_line, .wr_en, .wr_laddr, .wr_word, .wr_data, .wr_be,
                         .rd_word, .rd_data);

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

  localparam logic [26:0] LINES [4] = '{27'h0000123, 27'h0000124, 27'h4000123, 27'h7FFFFFF};

  initial begin
    bit exp_hit;
    m_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      enable = (i < 100) ? 1'b1 : ($urandom_range(0, 9) != 0);
      load = $urandom_range(0, 2) == 0;
      load_laddr = LINES[$urandom_range(0, 3)];
      for (int k = 0; k < 8; k++) load_line[k*32 +: 32] = $urandom;
      lu_laddr = LINES[$urandom_range(0, 3)];
      wr_en = !load && $urandom_range(0, 2) == 0;
      wr_laddr = LINES[$urandom_range(0, 3)];
      wr_word = 3'($urandom); wr_data = $urandom; wr_be = 4'($urandom);
      rd_word = 3'($urandom);
      #1;
      exp_hit = enable && (load ? (load_laddr == lu_laddr) : (m_v && m_la == lu_laddr));
      check(lu_hit == exp_hit, $sformatf("hit %0d: got %0b exp %0b", i, lu_hit, exp_hit));
      if (m_v) check(rd_data == m_line[rd_word*32 +: 32], "buffered word");
      @(posedge clk);
      if (!enable) m_v = 0;
      else if (load) begin m_v = 1; m_la = load_laddr; m_line = load_line; end
      else if (m_v && wr_en && wr_laddr == m_la)
        for (int b = 0; b < 4; b++) if (wr_be[b]) m_line[wr_word*32 + b*8 +: 8] = wr_data[b*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
