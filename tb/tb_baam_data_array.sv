// tb_baam_data_array: self-checking testbench of one data-array way with its
// sense amplifiers. Line writes, word writes with byte enables (alone and
// over a line write) and reads with and without the sense-amplifier enable
// are compared with an array kept in the testbench; an unsensed read must
// return zero.
module tb_baam_data_array;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sa_en = 0, line_we = 0, word_we = 0;
  logic [7:0] rd_idx = 0, wr_idx = 0;
  logic [255:0] rd_line, wr_line = '0;
  logic [2:0] wr_word = 0;
  logic [31:0] wr_data = 0;
  logic [3:0] wr_be = 0;
  int checks = 0, failures = 0;
  logic [255:0] m [256];

  baam_data_array dut (.clk, .sa_en, .rd_idx, .rd_line, .line_we, .word_we,
                       .wr_idx, .wr_line, .wr_word, .wr_data, .wr_be);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] rand_line();
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit en; logic [7:0] ri;
    // fill sets 0..15
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); line_we = 1; wr_idx = 8'(i); wr_line = rand_line(); m[i] = wr_line;
    end
    @(negedge clk); line_we = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 1); ri = 8'($urandom_range(0, 15));
      sa_en = en; rd_idx = ri;
      line_we = ($urandom_range(0, 7) == 0); word_we = $urandom_range(0, 1);
      wr_idx = 8'($urandom_range(0, 15)); wr_line = rand_line();
      wr_word = 3'($urandom); wr_data = $urandom; wr_be = 4'($urandom);
      @(posedge clk);
      #1;
      check(rd_line == (en ? m[ri] : '0), $sformatf("read of set %0d sa=%0b", ri, en));
      if (line_we) m[wr_idx] = wr_line;
      if (word_we)
        for (int b = 0; b < 4; b++) if (wr_be[b]) m[wr_idx][wr_word*32 + b*8 +: 8] = wr_data[b*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
