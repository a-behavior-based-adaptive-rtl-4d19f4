// tb_baam_way_select: self-checking testbench of the tag comparators and the
// way multiplexer. Random tags, valid bits and lines, with the request tag
// taken from a random way or from nowhere, are checked for the hit vector,
// hit way, selected line and selected word.
module tb_baam_way_select;
  logic [3:0][18:0]  way_tag;
  logic [3:0]        way_valid;
  logic [3:0][255:0] way_line;
  logic [18:0]       req_tag;
  logic [2:0]        req_word;
  logic [3:0]        hit_vec;
  logic              hit;
  logic [1:0]        hit_way;
  logic [255:0]      hit_line;
  logic [31:0]       hit_word;
  int checks = 0, failures = 0;

  baam_way_select dut (.way_tag, .way_valid, .way_line, .req_tag, .req_word,
                       .hit_vec, .hit, .hit_way, .hit_line, .hit_word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int target; logic [3:0] exp;
    for (int i = 0; i < 5000; i++) begin
      for (int w = 0; w < 4; w++) begin
        way_tag[w] = 19'(w * 19'h1111 + ($urandom & 19'h0FF0));  // distinct per way
        for (int k = 0; k < 8; k++) way_line[w][k*32 +: 32] = $urandom;
      end
      way_valid = 4'($urandom);
      target = $urandom_range(0, 4);
      req_tag = (target < 4) ? way_tag[target] : 19'h7FFFF;
      req_word = 3'($urandom);
      #1;
      exp = '0;
      if (target < 4 && way_valid[target]) exp[target] = 1'b1;
      check(hit_vec == exp, $sformatf("hit_vec %b exp %b", hit_vec, exp));
      check(hit == (exp != 0), "hit");
      if (exp != 0) begin
        check(int'(hit_way) == target, "hit way");
        check(hit_line == way_line[target], "line");
        check(hit_word == way_line[target][req_word*32 +: 32], "word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
