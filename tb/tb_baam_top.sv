// tb_baam_top: end-to-end testbench of the whole design at its default size
// (two 32 KB 4-way caches, 16-entry configuration stack).
//
// It plays a small instrumented program: seven program modules, each with
// its own code region, loop count, data walk and a configuration of both
// caches, entered with ConReg_we and left with Exit_Con. Module 1 calls
// module 2, whose code maps onto the same cache sets with another tag, and
// module 4 has an inner loop with a configuration of its own, as in the
// instrumentation example. A final deep nesting of 20 levels overflows the
// stack. Instruction fetches and data accesses run at the same time.
//
// Checked: every fetched word and loaded word (against formulas and a
// reference memory kept here), the active configuration after every
// ConReg_we / Exit_Con (against a stack model), hit latency (one cycle, two
// after a way misprediction), no data sense amplifier on a block-buffer hit
// and at most one on a correctly predicted way, and stores written through.
// Each mechanism - WP correct prediction, WP misprediction with second
// probe, partial-tag filtering, block-buffer hit, refill, write-through,
// mode switch, configuration push, pop and stack overflow - must happen at
// least once, as must back-to-back accepts of fetch bursts, whose hits
// must stream at one per cycle; the counts are printed with the average number of
// data sense amplifiers enabled per read in each access mode.
module tb_baam_top;
  import baam_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic conreg_we = 0, exit_con = 0;
  cfg_pair_t conreg_data = '0, cfg;
  logic [4:0] stack_count;
  logic stack_full, ev_cfg_push, ev_cfg_pop, ev_cfg_overflow, ev_cfg_underflow;
  logic [7:0] stack_ovf_depth;
  logic ic_req_valid = 0, ic_req_ready, ic_resp_valid;
  logic [31:0] ic_req_addr = 0, ic_resp_rdata;
  logic dc_req_valid = 0, dc_req_ready, dc_req_we = 0, dc_resp_valid;
  logic [31:0] dc_req_addr = 0, dc_req_wdata = 0, dc_resp_rdata;
  logic [3:0] dc_req_be = 0;
  logic ic_mem_req_valid, ic_mem_req_ready, ic_mem_resp_valid;
  logic [31:0] ic_mem_req_addr;
  logic [255:0] ic_mem_resp_rdata, dc_mem_resp_rdata;
  logic dc_mem_req_valid, dc_mem_req_ready, dc_mem_req_we, dc_mem_resp_valid;
  logic [31:0] dc_mem_req_addr, dc_mem_req_wdata;
  logic [3:0] dc_mem_req_be;
  logic [3:0] ic_act_tag_en, ic_act_sa_en, dc_act_tag_en, dc_act_sa_en, ic_ev, dc_ev;
  int unsigned ic_mr, ic_mw, dc_mr, dc_mw;

  baam_top dut (.*);

  tb_mem_model #(.LATENCY(6)) u_imem (
    .clk, .rst_n, .req_valid(ic_mem_req_valid), .req_ready(ic_mem_req_ready), .req_we(1'b0),
    .req_addr(ic_mem_req_addr), .req_wdata(32'h0), .req_be(4'h0),
    .resp_valid(ic_mem_resp_valid), .resp_rdata(ic_mem_resp_rdata), .n_reads(ic_mr), .n_writes(ic_mw));

  tb_mem_model #(.LATENCY(6)) u_dmem (
    .clk, .rst_n, .req_valid(dc_mem_req_valid), .req_ready(dc_mem_req_ready), .req_we(dc_mem_req_we),
    .req_addr(dc_mem_req_addr), .req_wdata(dc_mem_req_wdata), .req_be(dc_mem_req_be),
    .resp_valid(dc_mem_resp_valid), .resp_rdata(dc_mem_resp_rdata), .n_reads(dc_mr), .n_writes(dc_mw));

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ references
  function automatic logic [31:0] init_word(input logic [31:0] a);
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction
  logic [31:0] dref [int unsigned];
  function automatic logic [31:0] dref_word(input logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    return dref.exists(w) ? dref[w] : init_word(w);
  endfunction

  cfg_pair_t m_cfg = '0;
  cfg_pair_t m_stk [$];
  int        m_ovf = 0;

  // ---------------------------------------------------- mechanism counters
  // index 0: instruction cache, 1: data cache
  int n_wp_hit [2], n_wp_miss [2], n_ptc_filt [2], n_sbb [2], n_refill [2];
  int n_store = 0, n_switch = 0, n_push = 0, n_pop = 0, n_ovf = 0;
  longint sa_sum [2][8];
  int     rd_cnt [2][8];

  // ------------------------------------------------------------ accesses
  task automatic ic_fetch(input logic [31:0] a);
    int lat = 0, sa = 0; bit wpm = 0, sbbh = 0, hitv = 0; cfg_t c = cfg.ic;
    @(negedge clk);
    ic_req_valid = 1; ic_req_addr = a;
    do @(posedge clk); while (!ic_req_ready);
    sa += $countones(ic_act_sa_en);
    @(negedge clk); ic_req_valid = 0;
    forever begin
      @(posedge clk);
      lat++;
      sa += $countones(ic_act_sa_en);
      wpm |= ic_ev[2]; sbbh |= ic_ev[3]; hitv |= ic_ev[0];
      if (ic_resp_valid) break;
    end
    check(ic_resp_rdata == init_word(a), $sformatf("fetch %h: got %h exp %h", a, ic_resp_rdata, init_word(a)));
    account(0, c, lat, sa, wpm, sbbh, hitv);
  endtask

  task automatic dc_access(input logic [31:0] a, input bit we, input logic [31:0] wd);
    int lat = 0, sa = 0; bit wpm = 0, sbbh = 0, hitv = 0; cfg_t c = cfg.dc;
    logic [31:0] exp = dref_word(a);
    @(negedge clk);
    dc_req_valid = 1; dc_req_addr = a; dc_req_we = we; dc_req_wdata = wd; dc_req_be = 4'hF;
    do @(posedge clk); while (!dc_req_ready);
    sa += $countones(dc_act_sa_en);
    @(negedge clk); dc_req_valid = 0;
    forever begin
      @(posedge clk);
      lat++;
      sa += $countones(dc_act_sa_en);
      wpm |= dc_ev[2]; sbbh |= dc_ev[3]; hitv |= dc_ev[0];
      if (dc_resp_valid) break;
    end
    if (we) begin
      dref[{a[31:2], 2'b00}] = wd;
      n_store++;
    end else begin
      check(dc_resp_rdata == exp, $sformatf("load %h: got %h exp %h", a, dc_resp_rdata, exp));
      account(1, c, lat, sa, wpm, sbbh, hitv);
    end
  endtask

  // Read accounting and per-read checks.
  function automatic void account(input int k, input cfg_t c, input int lat, input int sa,
                                  input bit wpm, input bit sbbh, input bit hitv);
    if (hitv) check(lat == (wpm ? 2 : 1), $sformatf("cache %0d hit latency %0d", k, lat));
    if (sbbh) check(sa == 0, "no sense amplifier on a block-buffer hit");
    if (c.reg0 && hitv && !wpm && !sbbh) check(sa == 1, "one sense amplifier on a predicted hit");
    n_wp_hit[k]   += int'(c.reg0 && hitv && !wpm && !sbbh);
    n_wp_miss[k]  += int'(wpm);
    n_ptc_filt[k] += int'(!c.reg0 && c.reg1 && !sbbh && sa < NUM_WAYS);
    n_sbb[k]      += int'(sbbh);
    n_refill[k]   += int'(!hitv);
    sa_sum[k][c] += sa;
    rd_cnt[k][c]++;
  endfunction


  // Back-to-back fetches: req_valid stays high, a new fetch is accepted in
  // the response cycle of the previous hit. Returns the cycles from the first
  // acceptance to the last response and the number of pipelined accepts.
  int n_pipelined = 0;
  task automatic ic_burst(input logic [31:0] base, input int n, output int span);
    logic [31:0] q [$];
    int issued = 0, done = 0, t = 0, t0 = -1;
    @(negedge clk);
    ic_req_valid = 1; ic_req_addr = base;
    while (done < n) begin
      @(posedge clk);
      t++;
      if (ic_resp_valid) begin
        logic [31:0] ea = q.pop_front();
        check(ic_resp_rdata == init_word(ea), $sformatf("burst fetch %h", ea));
        done++;
        if (ic_req_valid && ic_req_ready) n_pipelined++;
      end
      if (ic_req_valid && ic_req_ready) begin
        if (t0 < 0) t0 = t;
        q.push_back(ic_req_addr);
        issued++;
      end
      @(negedge clk);
      if (issued < n) ic_req_addr = base + 32'(issued * 4);
      else ic_req_valid = 0;
    end
    span = t - t0;
  endtask

  // --------------------------------------------------- configuration ops
  task automatic conreg(input cfg_pair_t v);
    @(negedge clk);
    conreg_we = 1; conreg_data = v;
    @(posedge clk);
    if (m_stk.size() < STACK_DEPTH) begin
      m_stk.push_back(m_cfg);
      n_switch += int'(m_cfg != v);
      m_cfg = v; n_push++;
    end else begin
      m_ovf++; n_ovf++;
    end
    @(negedge clk); conreg_we = 0;
    check(cfg == m_cfg, $sformatf("cfg after ConReg_we %b exp %b", cfg, m_cfg));
  endtask

  task automatic exitcon();
    @(negedge clk);
    exit_con = 1;
    @(posedge clk);
    if (m_ovf > 0) m_ovf--;
    else if (m_stk.size() > 0) begin
      cfg_pair_t p = m_stk.pop_back();
      n_switch += int'(p != m_cfg);
      m_cfg = p; n_pop++;
    end
    @(negedge clk); exit_con = 0;
    check(cfg == m_cfg, $sformatf("cfg after Exit_Con %b exp %b", cfg, m_cfg));
  endtask

  // ------------------------------------------------------------- program
  // module: code base, code length (instructions), iterations, data base,
  // data stride, configuration {DC, IC}
  localparam logic [31:0] CODE [7] = '{32'h0001_0000, 32'h0001_4000, 32'h0001_6000, 32'h0002_0400,
                                       32'h0003_0800, 32'h0004_1000, 32'h0005_1800};
  localparam int          LEN  [7] = '{96, 80, 64, 120, 72, 88, 56};
  localparam int          ITER [7] = '{3, 3, 2, 3, 2, 3, 3};
  localparam logic [31:0] DATA [7] = '{32'h1000_0000, 32'h1000_2000, 32'h1001_2000, 32'h1002_0000,
                                       32'h1003_0000, 32'h1004_0000, 32'h1005_0000};
  localparam int          STRD [7] = '{4, 8192, 8192, 32, 4, 4096, 8};
  localparam cfg_pair_t   CFG  [7] = '{6'b101_101, 6'b110_001, 6'b010_110, 6'b100_000,
                                       6'b001_101, 6'b110_010, 6'b101_110};
  localparam cfg_pair_t   LOOP_CFG = 6'b010_001;

  int data_ptr [7];

  task automatic body(input int m, input int it, input int first, input int last);
    for (int i = first; i < last; i++) begin
      logic [31:0] pa = CODE[m] + 32'(i * 4);
      if (i % 3 == 0) begin
        logic [31:0] da = DATA[m] + 32'((data_ptr[m] % 24) * STRD[m]);
        bit we = (i % 4 == 0) && (it > 0);
        data_ptr[m]++;
        fork
          ic_fetch(pa);
          dc_access(da, we, $urandom);
        join
      end else begin
        ic_fetch(pa);
      end
    end
  endtask

  task automatic run_module(input int m);
    conreg(CFG[m]);
    for (int it = 0; it < ITER[m]; it++) begin
      if (m == 1) begin
        body(1, it, 0, LEN[1] / 2);
        conreg(CFG[2]);               // call of module 2 (same sets, other tag)
        body(2, it, 0, LEN[2]);
        exitcon();
        body(1, it, LEN[1] / 2, LEN[1]);
      end else if (m == 4) begin
        body(4, it, 0, 24);
        conreg(LOOP_CFG);             // inner loop with its own configuration
        for (int k = 0; k < 4; k++) body(4, it, 24, 48);
        exitcon();
        body(4, it, 48, LEN[4]);
      end else begin
        body(m, it, 0, LEN[m]);
      end
    end
    exitcon();
  endtask

  initial begin
    for (int m = 0; m < 7; m++) data_ptr[m] = 0;
    for (int k = 0; k < 2; k++) begin
      n_wp_hit[k] = 0; n_wp_miss[k] = 0; n_ptc_filt[k] = 0; n_sbb[k] = 0; n_refill[k] = 0;
      for (int c = 0; c < 8; c++) begin sa_sum[k][c] = 0; rd_cnt[k][c] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg == '0, "reset configuration is conventional access");
    for (int rep = 0; rep < 2; rep++)
      for (int m = 0; m < 7; m++) if (m != 2) run_module(m);
    // deep nesting: 20 levels, the last 4 overflow the stack
    for (int d = 0; d < 20; d++) begin
      conreg(cfg_pair_t'(CFG[d % 7] ^ 6'(d & 1)));
      body(d % 7, 1, 0, 6);
    end
    check(stack_full && stack_ovf_depth == 8'd4, "stack overflowed by four");
    for (int d = 0; d < 20; d++) begin
      body(d % 7, 1, 6, 12);
      exitcon();
    end
    check(cfg == '0 && stack_count == 0, "unwound to the reset configuration");
    // back-to-back fetch bursts over module 0, whose code is still cached
    begin
      int span;
      conreg(6'b000_110);               // IC: PTC with block buffer, no misprediction possible
      ic_burst(CODE[0], LEN[0], span);
      check(span == LEN[0], $sformatf("burst of %0d hits took %0d cycles", LEN[0], span));
      exitcon();
      conreg(6'b000_101);               // IC: WP with block buffer
      ic_burst(CODE[0], LEN[0], span);
      check(span >= LEN[0] && span <= LEN[0] + LEN[0] / 8, "WP burst: at most one extra cycle per line");
      exitcon();
      conreg(6'b000_000);               // IC: conventional, on code never fetched (misses)
      ic_burst(32'h0007_0000, 40, span);
      exitcon();
    end
    check(n_pipelined > 0, "pipelined accepts seen");
    repeat (4) @(posedge clk);
    check(dc_mw == n_store, "every store written through");
    // every mechanism must have happened
    for (int k = 0; k < 2; k++) begin
      check(n_wp_hit[k] > 0,   $sformatf("cache %0d: correct way prediction seen", k));
      check(n_wp_miss[k] > 0,  $sformatf("cache %0d: way misprediction seen", k));
      check(n_ptc_filt[k] > 0, $sformatf("cache %0d: partial-tag filtering seen", k));
      check(n_sbb[k] > 0,      $sformatf("cache %0d: block-buffer hit seen", k));
      check(n_refill[k] > 0,   $sformatf("cache %0d: refill seen", k));
      $display("%s: WP hits %0d, WP mispredictions %0d, PTC-filtered reads %0d, buffer hits %0d, refills %0d",
               k == 0 ? "IC" : "DC", n_wp_hit[k], n_wp_miss[k], n_ptc_filt[k], n_sbb[k], n_refill[k]);
      for (int c = 0; c < 8; c++)
        if (rd_cnt[k][c] > 0)
          $display("  mode reg2..0=%03b: %0d reads, %0.2f data sense amplifiers per read",
                   3'(c), rd_cnt[k][c], real'(sa_sum[k][c]) / real'(rd_cnt[k][c]));
    end
    check(n_store > 0 && n_switch > 0 && n_push > 0 && n_pop > 0 && n_ovf > 0,
          "write-through, mode switch, push, pop and overflow seen");
    $display("stores %0d, mode switches %0d, pushes %0d, pops %0d, overflows %0d, pipelined accepts %0d",
             n_store, n_switch, n_push, n_pop, n_ovf, n_pipelined);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
