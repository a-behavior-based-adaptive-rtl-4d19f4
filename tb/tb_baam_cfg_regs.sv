// tb_baam_cfg_regs: self-checking testbench of the configuration registers
// with the ConReg_we / Exit_Con instructions. Replays the nesting of the
// instrumentation example (module A calls B, B contains a loop), then nests
// 20 deep so that the 16-entry stack overflows, checking that the
// configuration stays put while full and that unwinding restores every
// level; ends with random instruction traffic against a model kept here.
module tb_baam_cfg_regs;
  import baam_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic conreg_we = 0, exit_con = 0;
  cfg_pair_t conreg_data = '0, cfg;
  logic [4:0] stack_count;
  logic stack_full, ev_push, ev_pop, ev_overflow, ev_underflow;
  logic [7:0] ovf_depth;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_under = 0;

  baam_cfg_regs dut (.clk, .rst_n, .conreg_we, .conreg_data, .exit_con, .cfg,
                     .stack_count, .stack_full, .ovf_depth, .ev_push, .ev_pop,
                     .ev_overflow, .ev_underflow);

  // model: configuration, saved stack, pending overflow count
  cfg_pair_t m_cfg;
  cfg_pair_t m_stk [$];
  int        m_ovf;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    check(cfg == m_cfg, $sformatf("cfg %b exp %b", cfg, m_cfg));
    check(int'(stack_count) == m_stk.size(), "stack depth");
    check(int'(ovf_depth) == m_ovf, "overflow depth");
  endtask

  task automatic conreg(input cfg_pair_t v);
    @(negedge clk);
    conreg_we = 1; conreg_data = v;
    @(posedge clk);
    if (m_stk.size() < 16) begin m_stk.push_back(m_cfg); m_cfg = v; end
    else begin m_ovf++; n_ovf++; end
    @(negedge clk); conreg_we = 0; compare();
  endtask

  task automatic exitcon();
    @(negedge clk);
    exit_con = 1;
    @(posedge clk);
    if (m_ovf > 0) m_ovf--;
    else if (m_stk.size() > 0) m_cfg = m_stk.pop_back();
    else n_under++;
    @(negedge clk); exit_con = 0; compare();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam cfg_pair_t MODE_A = 6'b101_001, MODE_B = 6'b010_010, MODE_C = 6'b110_101;

  initial begin
    m_cfg = '0; m_ovf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    // Sub A: ConReg_we(mode_A) ... call B: ConReg_we(mode_B), loop: ConReg_we(mode_C)
    conreg(MODE_A);
    check(cfg == MODE_A, "mode A active");
    conreg(MODE_B);
    conreg(MODE_C);
    check(cfg == MODE_C && stack_count == 3, "loop mode active, three saved");
    exitcon();
    check(cfg == MODE_B, "back to B after the loop");
    exitcon();
    check(cfg == MODE_A, "back to A after return from B");
    exitcon();
    check(cfg == '0, "back to the reset configuration");
    // deep nesting with overflow
    for (int i = 0; i < 20; i++) conreg(cfg_pair_t'(i + 1));
    check(stack_full && ovf_depth == 4, "overflowed four times");
    check(cfg == cfg_pair_t'(16), "configuration held while full");
    for (int i = 0; i < 20; i++) exitcon();
    check(cfg == '0 && stack_count == 0, "fully unwound");
    exitcon();
    check(n_under == 1, "underflow seen");
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 99) < 55) conreg(cfg_pair_t'($urandom));
      else exitcon();
    end
    check(n_ovf > 4, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
