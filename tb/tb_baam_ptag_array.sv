// tb_baam_ptag_array: self-checking testbench of the partial tag array.
// Writes known 3-bit partial tags into every way of a few sets and checks
// the per-way match vector for every possible request partial tag, with the
// array enabled (only equal partial tags match) and disabled (all match).
module tb_baam_ptag_array;
  logic clk = 0;
  always #5 clk = ~clk;
  logic enable = 0, wr_en = 0;
  logic [7:0] rd_idx = 0, wr_idx = 0;
  logic [2:0] rd_ptag = 0, wr_ptag = 0;
  logic [1:0] wr_way = 0;
  logic [3:0] match;
  int checks = 0, failures = 0;
  logic [2:0] m [16][4];

  baam_ptag_array dut (.clk, .enable, .rd_idx, .rd_ptag, .match, .wr_en, .wr_idx, .wr_way, .wr_ptag);

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
    logic [3:0] exp;
    for (int s = 0; s < 16; s++)
      for (int w = 0; w < 4; w++) begin
        @(negedge clk); wr_en = 1; wr_idx = 8'(s); wr_way = 2'(w);
        wr_ptag = 3'($urandom); m[s][w] = wr_ptag;
      end
    @(negedge clk); wr_en = 0;
    for (int r = 0; r < 300; r++) begin
      for (int s = 0; s < 16; s++) begin
        for (int p = 0; p < 8; p++) begin
          @(negedge clk);
          enable = (r % 3 != 0); rd_idx = 8'(s); rd_ptag = 3'(p);
          #1;
          for (int w = 0; w < 4; w++) exp[w] = !enable || (m[s][w] == 3'(p));
          check(match == exp, $sformatf("set %0d ptag %0d en %0b: got %b exp %b", s, p, enable, match, exp));
        end
      end
      // rewrite one entry between rounds
      @(negedge clk); wr_en = 1; wr_idx = 8'($urandom_range(0, 15)); wr_way = 2'($urandom);
      wr_ptag = 3'($urandom);
      @(posedge clk); m[wr_idx[3:0]][wr_way] = wr_ptag;
      @(negedge clk); wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
