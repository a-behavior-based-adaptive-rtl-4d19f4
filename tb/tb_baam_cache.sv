// tb_baam_cache: self-checking testbench of one BAAM cache at its full
// default size (32 KB, 4 ways, 32-byte lines).
//
// A cycle-level reference model kept in the testbench (tags, round-robin
// pointers, way-prediction flags, known partial tags and the block buffer
// line address) predicts for every access: the data, the latency from
// acceptance to response, the number of tag ways activated and the number of
// data sense amplifiers enabled (exactly, or as a range where a partial tag
// of a never-filled way is unknown). Random loads and stores over a few sets
// and conflicting tags run under every access mode, the mode changing every
// few dozen accesses, with back-to-back requests and idle gaps. Event
// counters of the cache are compared with the model at the end. Read data
// is compared with a reference memory kept here, independent of the memory
// model's contents.
module tb_baam_cache;
  import baam_pkg::*;

  localparam int unsigned MEM_LAT = 3;
  localparam int unsigned N_TXN   = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t                cfg;
  logic                req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [ADDR_W-1:0]   req_addr = '0;
  logic [WORD_W-1:0]   req_wdata = '0;
  logic [3:0]          req_be = '0;
  logic                resp_valid;
  logic [WORD_W-1:0]   resp_rdata;
  logic                mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0]   mem_req_addr;
  logic [WORD_W-1:0]   mem_req_wdata;
  logic [3:0]          mem_req_be;
  logic [LINE_W-1:0]   mem_resp_rdata;
  logic [NUM_WAYS-1:0] act_tag_en, act_sa_en;
  logic                ev_hit, ev_miss, ev_wp_miss, ev_sbb_hit;
  int unsigned         mem_reads, mem_writes;

  baam_cache dut (
    .clk, .rst_n, .cfg,
    .req_valid, .req_ready, .req_addr, .req_we, .req_wdata, .req_be,
    .resp_valid, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_be, .mem_resp_valid, .mem_resp_rdata,
    .act_tag_en, .act_sa_en, .ev_hit, .ev_miss, .ev_wp_miss, .ev_sbb_hit
  );

  tb_mem_model #(.LATENCY(MEM_LAT)) u_mem (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .req_be(mem_req_be),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata),
    .n_reads(mem_reads), .n_writes(mem_writes)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------ reference memory
  logic [31:0] ref_mem [int unsigned];
  function automatic logic [31:0] ref_word(input logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    return ref_mem.exists(w) ? ref_mem[w] : ((w * 32'h9E37_79B1) ^ 32'h5A5A_0F0F);
  endfunction

  // ------------------------------------------------------ reference cache
  bit          m_valid [NUM_SETS][NUM_WAYS];
  logic [18:0] m_tag   [NUM_SETS][NUM_WAYS];
  bit          m_ptk   [NUM_SETS][NUM_WAYS];
  int          m_rr    [NUM_SETS];
  int          m_flag  [NUM_SETS];
  bit          m_sbb_v;
  logic [26:0] m_sbb_la;
  int          exp_wp_miss = 0, exp_miss = 0, exp_sbb = 0, exp_hit = 0, n_store = 0;
  int          seen_wp_miss = 0, seen_miss = 0, seen_sbb = 0, seen_hit = 0;

  typedef struct {
    logic [31:0] addr;
    bit          we;
    logic [31:0] data;
    int          lat, tagc, sa_min, sa_max;
    int          acc_cycle, tag_acc, sa_acc;
  } txn_t;

  txn_t nxt, cur;
  bit   in_flight = 0;

  function automatic void model(input logic [31:0] a, input bit we,
                                input logic [31:0] wd, input logic [3:0] be);
    int s = int'(a[12:5]);
    logic [18:0] t = a[31:13];
    logic [26:0] la = a[31:5];
    int hw = -1, pred;
    bit wp, sbbh, predhit;
    int known = 0, unknown = 0;
    if (!cfg.reg2) m_sbb_v = 0;
    for (int w = 0; w < NUM_WAYS; w++) if (m_valid[s][w] && m_tag[s][w] == t) hw = w;
    wp      = cfg.reg0;
    pred    = m_flag[s];
    sbbh    = !we && cfg.reg2 && m_sbb_v && (m_sbb_la == la);
    predhit = wp && (hw >= 0) && (hw == pred);
    nxt.addr = a; nxt.we = we;
    nxt.tagc = (!wp || sbbh || predhit) ? (wp ? 1 : NUM_WAYS) : NUM_WAYS;
    if (we || sbbh) begin
      nxt.sa_min = 0; nxt.sa_max = 0;
    end else if (wp) begin
      nxt.sa_min = predhit ? 1 : NUM_WAYS; nxt.sa_max = nxt.sa_min;
    end else if (cfg.reg1) begin
      for (int w = 0; w < NUM_WAYS; w++) begin
        if (!m_ptk[s][w]) unknown++;
        else if (m_tag[s][w][2:0] == t[2:0]) known++;
      end
      nxt.sa_min = known; nxt.sa_max = known + unknown;
    end else begin
      nxt.sa_min = NUM_WAYS; nxt.sa_max = NUM_WAYS;
    end
    if (we)        nxt.lat = 2 + MEM_LAT + ((wp && !predhit) ? 1 : 0);
    else if (sbbh) nxt.lat = 1;
    else if (hw >= 0) nxt.lat = (wp && !predhit) ? 2 : 1;
    else           nxt.lat = 3 + MEM_LAT + (wp ? 1 : 0);
    exp_wp_miss += int'(wp && !sbbh && !predhit);
    exp_miss    += int'(hw < 0 && !sbbh);
    exp_sbb     += int'(sbbh);
    exp_hit     += int'(hw >= 0 || sbbh);
    // state updates
    if (sbbh) begin
      // predicted way or nothing: the flag does not change
    end else if (hw >= 0) begin
      if (wp) m_flag[s] = hw;
      if (!we && cfg.reg2) begin m_sbb_v = 1; m_sbb_la = la; end
    end else if (!we) begin
      int v = m_rr[s];
      m_rr[s] = (v + 1) % NUM_WAYS;
      m_valid[s][v] = 1; m_tag[s][v] = t; m_ptk[s][v] = 1;
      if (wp) m_flag[s] = v;
      if (cfg.reg2) begin m_sbb_v = 1; m_sbb_la = la; end
    end
    if (we) begin
      logic [31:0] w = ref_word(a);
      for (int b = 0; b < 4; b++) if (be[b]) w[b*8 +: 8] = wd[b*8 +: 8];
      ref_mem[{a[31:2], 2'b00}] = w;
      nxt.data = '0;
      n_store++;
    end else begin
      nxt.data = ref_word(a);
    end
  endfunction

  // ------------------------------------------------------------- monitor
  always @(posedge clk) if (rst_n) begin
    if (resp_valid) begin
      check(in_flight, "response without a request");
      if (!cur.we) check(resp_rdata == cur.data,
                         $sformatf("data %h: got %h exp %h", cur.addr, resp_rdata, cur.data));
      check(cycle - cur.acc_cycle == cur.lat,
            $sformatf("latency %h we=%0b: got %0d exp %0d", cur.addr, cur.we, cycle - cur.acc_cycle, cur.lat));
      check(cur.tag_acc == cur.tagc,
            $sformatf("tag ways %h: got %0d exp %0d", cur.addr, cur.tag_acc, cur.tagc));
      check(cur.sa_acc >= cur.sa_min && cur.sa_acc <= cur.sa_max,
            $sformatf("sense amps %h: got %0d exp %0d..%0d", cur.addr, cur.sa_acc, cur.sa_min, cur.sa_max));
      in_flight = 0;
    end
    if (req_valid && req_ready) begin
      cur = nxt;
      cur.acc_cycle = cycle;
      cur.tag_acc = $countones(act_tag_en);
      cur.sa_acc  = $countones(act_sa_en);
      in_flight = 1;
    end else if (in_flight) begin
      cur.tag_acc += $countones(act_tag_en);
      cur.sa_acc  += $countones(act_sa_en);
    end
    seen_wp_miss += int'(ev_wp_miss);
    seen_miss    += int'(ev_miss);
    seen_sbb     += int'(ev_sbb_hit);
    seen_hit     += int'(ev_hit);
  end

  // -------------------------------------------------------------- driver
  task automatic access(input logic [31:0] a, input bit we, input logic [31:0] wd, input logic [3:0] be);
    @(negedge clk);
    model(a, we, wd, be);
    req_valid = 1'b1; req_addr = a; req_we = we; req_wdata = wd; req_be = be;
    do @(posedge clk); while (!req_ready);
  endtask

  task automatic go_idle();
    @(negedge clk);
    req_valid = 1'b0;
    while (in_flight) @(negedge clk);
  endtask

  localparam logic [18:0] TAGS [8] = '{19'h10, 19'h18, 19'h20, 19'h11, 19'h29, 19'h31, 19'h12, 19'h7FFFF};
  localparam logic [7:0]  SETS_USED [3] = '{8'd3, 8'd4, 8'd200};
  localparam cfg_t        MODES [8] = '{3'b000, 3'b001, 3'b010, 3'b101, 3'b110, 3'b100, 3'b011, 3'b111};

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mode_hist [8];

  initial begin
    logic [31:0] a, last_a;
    cfg = 3'b000;
    m_sbb_v = 0;
    for (int s = 0; s < NUM_SETS; s++) begin
      m_rr[s] = 0; m_flag[s] = 0;
      for (int w = 0; w < NUM_WAYS; w++) begin m_valid[s][w] = 0; m_ptk[s][w] = 0; m_tag[s][w] = '0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last_a = 32'h0002_0060;
    for (int i = 0; i < N_TXN; i++) begin
      if (i % 40 == 0) begin
        int m;
        go_idle();
        m = (i / 40) % 8;
        if (i >= 320) m = int'($urandom_range(0, 7));
        cfg = MODES[m];
        mode_hist[m]++;
      end
      if ($urandom_range(0, 99) < 35) a = {last_a[31:5], 3'($urandom), 2'b00};
      else a = {TAGS[$urandom_range(0, 7)], SETS_USED[$urandom_range(0, 2)], 3'($urandom), 2'b00};
      access(a, ($urandom_range(0, 99) < 20), $urandom, 4'($urandom_range(1, 15)));
      last_a = a;
      if ($urandom_range(0, 99) < 30) go_idle();
    end
    go_idle();
    repeat (2) @(posedge clk);
    check(seen_wp_miss == exp_wp_miss, $sformatf("wp miss events %0d exp %0d", seen_wp_miss, exp_wp_miss));
    check(seen_miss == exp_miss, $sformatf("miss events %0d exp %0d", seen_miss, exp_miss));
    check(seen_sbb == exp_sbb, $sformatf("sbb events %0d exp %0d", seen_sbb, exp_sbb));
    check(seen_hit == exp_hit, $sformatf("hit events %0d exp %0d", seen_hit, exp_hit));
    check(mem_writes == n_store, "every store written through");
    check(exp_wp_miss > 10 && exp_sbb > 10 && exp_miss > 10, "mechanisms exercised");
    $display("cache tb: %0d accesses, %0d misses, %0d way mispredictions, %0d buffer hits, %0d stores",
             N_TXN, exp_miss, exp_wp_miss, exp_sbb, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
