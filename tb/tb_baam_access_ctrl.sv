// tb_baam_access_ctrl: self-checking testbench of the access controller on
// its own. The testbench plays the arrays: for each access it picks the way
// that holds the block (or none), the predicted way, the partial-tag
// matches and a block-buffer hit, and returns tag compare results only for
// the ways the controller activated in the previous cycle. A next level with
// a fixed latency answers refills and stores. For every access the response
// source, latency, tag-way and sense-amplifier counts, and the number of
// word-write, refill, buffer-load and way-prediction-update strobes are
// compared with values worked out from the access-mode rules.
module tb_baam_access_ctrl;
  import baam_pkg::*;

  localparam int MEM_D = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t      cfg = '0;
  logic      req_valid = 0, req_we = 0, req_ready, accept;
  logic [1:0] pred_way = 0, pred_q;
  logic [3:0] pt_match = '1, hit_vec, tag_en, sa_en;
  logic      sbb_hit = 0, hit;
  logic      resp_valid;
  resp_src_e resp_src;
  cfg_t      mode_q;
  logic      word_wr, fill_we, sbb_load, wp_hit_upd, wp_fill_upd;
  logic      mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid = 0;
  logic      ev_hit, ev_miss, ev_wp_miss, ev_sbb_hit;

  baam_access_ctrl dut (
    .clk, .rst_n, .cfg, .req_valid, .req_we, .req_ready, .accept,
    .pred_way, .pt_match, .sbb_hit, .hit_vec, .hit, .tag_en, .sa_en,
    .resp_valid, .resp_src, .mode_q, .pred_q, .word_wr, .fill_we, .sbb_load,
    .wp_hit_upd, .wp_fill_upd, .mem_req_valid, .mem_req_we, .mem_req_ready,
    .mem_resp_valid, .ev_hit, .ev_miss, .ev_wp_miss, .ev_sbb_hit
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // the arrays: hit results for the ways enabled in the previous cycle
  int          cur_hw = -1;
  logic [3:0]  tag_en_q = '0;
  always_ff @(posedge clk) tag_en_q <= tag_en;
  always_comb begin
    hit_vec = '0;
    if (cur_hw >= 0) hit_vec[cur_hw] = tag_en_q[cur_hw];
    hit = |hit_vec;
  end

  // the next level
  assign mem_req_ready = 1'b1;
  int mem_cnt = -1;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) mem_cnt <= 1;
    else if (mem_cnt > 0) begin
      if (mem_cnt == MEM_D - 1) begin mem_resp_valid <= 1'b1; mem_cnt <= -1; end
      else mem_cnt <= mem_cnt + 1;
    end
  end

  typedef struct {
    int hw; bit we;
    int lat, tagc, sac;
    resp_src_e src;
    int n_wword, n_fill, n_load, n_hitupd, n_fillupd, n_mem;
    int acc, tag_acc, sa_acc, wword, fill, load, hitupd, fillupd, mem;
  } txn_t;
  txn_t nxt, cur;
  bit in_flight = 0;
  int n_wpmiss = 0, n_sbb = 0, n_missc = 0, n_ptc_filtered = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_flight) begin
      cur.wword += int'(word_wr); cur.fill += int'(fill_we); cur.load += int'(sbb_load);
      cur.hitupd += int'(wp_hit_upd); cur.fillupd += int'(wp_fill_upd);
      cur.mem += int'(mem_req_valid && mem_req_ready);
    end
    if (resp_valid) begin
      check(in_flight, "response without request");
      check(resp_src == cur.src, $sformatf("source %0d exp %0d", resp_src, cur.src));
      check(cycle - cur.acc == cur.lat, $sformatf("latency %0d exp %0d", cycle - cur.acc, cur.lat));
      check(cur.tag_acc == cur.tagc, $sformatf("tag ways %0d exp %0d", cur.tag_acc, cur.tagc));
      check(cur.sa_acc == cur.sac, $sformatf("sense amps %0d exp %0d", cur.sa_acc, cur.sac));
      check(cur.wword == cur.n_wword && cur.fill == cur.n_fill && cur.load == cur.n_load,
            $sformatf("strobes ww%0d/%0d fill%0d/%0d load%0d/%0d", cur.wword, cur.n_wword, cur.fill, cur.n_fill, cur.load, cur.n_load));
      check(cur.hitupd == cur.n_hitupd && cur.fillupd == cur.n_fillupd && cur.mem == cur.n_mem,
            "way-prediction update / next-level strobes");
      in_flight = 0;
    end
    if (accept) begin
      cur = nxt; cur.acc = cycle;
      cur.tag_acc = $countones(tag_en); cur.sa_acc = $countones(sa_en);
      cur.wword = 0; cur.fill = 0; cur.load = 0; cur.hitupd = 0; cur.fillupd = 0; cur.mem = 0;
      in_flight = 1;
      cur_hw = nxt.hw;
    end else if (in_flight) begin
      cur.tag_acc += $countones(tag_en); cur.sa_acc += $countones(sa_en);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hw; bit we, sbb, wp, sbbuse, predhit; logic [1:0] pr; logic [3:0] ptm; cfg_t c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      c  = cfg_t'($urandom);
      we = ($urandom_range(0, 3) == 0);
      hw = $urandom_range(0, 4) - 1;
      pr = 2'($urandom);
      sbb = (hw >= 0) && ($urandom_range(0, 3) == 0);
      ptm = 4'($urandom);
      if (hw >= 0) ptm[hw] = 1'b1;
      if (!c.reg1) ptm = '1;  // the partial tag array reports all matches when off
      wp = c.reg0; sbbuse = sbb && !we; predhit = wp && hw >= 0 && hw == int'(pr);
      nxt.hw = hw; nxt.we = we;
      nxt.tagc = wp ? ((sbbuse || predhit) ? 1 : 4) : 4;
      nxt.sac  = (we || sbbuse) ? 0 : (wp ? (predhit ? 1 : 4) : (c.reg1 ? $countones(ptm) : 4));
      nxt.src  = we ? SRC_WACK : (sbbuse ? SRC_SBB : (hw >= 0 ? SRC_CACHE : SRC_FILL));
      if (we)             nxt.lat = 2 + MEM_D + ((wp && !predhit) ? 1 : 0);
      else if (sbbuse)    nxt.lat = 1;
      else if (hw >= 0)   nxt.lat = (wp && !predhit) ? 2 : 1;
      else                nxt.lat = 3 + MEM_D + (wp ? 1 : 0);
      nxt.n_wword   = int'(we && hw >= 0);
      nxt.n_fill    = int'(!we && hw < 0);
      nxt.n_load    = int'(!we && !sbbuse);
      nxt.n_hitupd  = int'(sbbuse || hw >= 0);
      nxt.n_fillupd = int'(!we && hw < 0);
      nxt.n_mem     = int'(we || hw < 0);
      n_wpmiss += int'(wp && !sbbuse && !predhit);
      n_sbb    += int'(sbbuse);
      n_ptc_filtered += int'(!wp && c.reg1 && !we && !sbbuse && $countones(ptm) < 4);
      cfg = c; req_valid = 1; req_we = we; pred_way = pr; pt_match = ptm; sbb_hit = sbb;
      do @(posedge clk); while (!req_ready);
      @(negedge clk);
      req_valid = 0;
      pt_match = 4'($urandom); pred_way = 2'($urandom); sbb_hit = $urandom_range(0, 1);
      if ($urandom_range(0, 1)) while (in_flight) @(negedge clk);
    end
    while (in_flight) @(negedge clk);
    check(n_wpmiss > 100 && n_sbb > 100 && n_ptc_filtered > 100, "all modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
