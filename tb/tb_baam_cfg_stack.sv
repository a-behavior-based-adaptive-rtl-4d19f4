// tb_baam_cfg_stack: self-checking testbench of the 16 x 6 configuration
// stack. Pushes random entries until full, checks count, full/empty and that
// a push while full is dropped, pops everything back in reverse order, then
// runs random push/pop traffic against a queue kept in the testbench.
module tb_baam_cfg_stack;
  localparam int DEPTH = 16, WIDTH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] push_data = '0, top;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  baam_cfg_stack dut (.clk, .rst_n, .push, .push_data, .pop, .top, .empty, .full, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    check(int'(count) == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(top == model[$], $sformatf("top %h exp %h", top, model[$]));
  endtask

  task automatic op(input bit do_push, input bit do_pop, input logic [WIDTH-1:0] d);
    @(negedge clk);
    push = do_push; pop = do_pop; push_data = d;
    @(posedge clk);
    if (do_push && model.size() < DEPTH) model.push_back(d);
    if (do_pop && model.size() > 0) void'(model.pop_back());
    @(negedge clk);
    push = 0; pop = 0;
    compare();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < DEPTH + 2; i++) op(1, 0, 6'($urandom));
    check(full, "full after 16 pushes");
    for (int i = 0; i < DEPTH + 2; i++) op(0, 1, '0);
    check(empty, "empty after popping all");
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 1)) op(1, 0, 6'($urandom));
      else op(0, 1, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
