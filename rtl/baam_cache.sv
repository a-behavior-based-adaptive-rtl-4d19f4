// baam_cache: one L1 set-associative cache with behaviour-based adaptive
// access modes.
//
// The cache is 32 KB, 4-way, 32-byte lines by default. Around the usual tag
// and data arrays of each way it has:
//   * a way-prediction table (one 2-bit flag per set) with an MRU way
//     predictor, used when Reg0 is set;
//   * a partial tag array holding the 3 low tag bits of every way, whose
//     comparison gates the data sense amplifiers when Reg1 is set;
//   * a single block buffer holding the last accessed block, used when Reg2
//     is set;
//   * an access controller (baam_access_ctrl) that turns the three register
//     bits into tag-way and sense-amplifier enables and sequences hits, way
//     mispredictions, refills and stores.
// The configuration `cfg` comes from baam_cfg_regs and may change between
// any two accesses; each access uses the value seen when it was accepted.
//
// Address split (32-bit byte address): tag [31:13], set index [12:5], word
// [4:2], byte [1:0]; the partial tag is address bits [15:13].
//
// Processor port: `req_valid`/`req_ready` handshake with address, store
// flag, store data and byte enables; `resp_valid` with `resp_rdata` one
// cycle after acceptance on a hit, two on a way misprediction, later on a
// miss or a store. One access is in flight at a time.
// Next-level port: one request at a time (`mem_req_valid`/`mem_req_ready`);
// a line read returns the whole 256-bit line with `mem_resp_valid`; a store
// is a 32-bit write with byte enables, acknowledged by `mem_resp_valid`.
// Activity: `act_tag_en` and `act_sa_en` give the tag ways and data sense
// amplifiers activated in each cycle, for power accounting; the `ev_*`
// outputs pulse once per hit, miss, way misprediction and block buffer hit.
// Victims are chosen round robin per set (reset to way 0), a choice of this
// design.
module baam_cache
  import baam_pkg::*;
#(
  parameter int unsigned SETS   = baam_pkg::NUM_SETS,
  parameter int unsigned WAYS   = baam_pkg::NUM_WAYS,
  parameter int unsigned PT_W   = baam_pkg::PTAG_W,
  localparam int unsigned IW    = $clog2(SETS),
  localparam int unsigned TW    = ADDR_W - IW - OFF_W,
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WOW   = $clog2(LINE_W / WORD_W),
  localparam int unsigned LAW   = ADDR_W - OFF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_t                cfg,
  // processor port
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [ADDR_W-1:0]   req_addr,
  input  logic                req_we,
  input  logic [WORD_W-1:0]   req_wdata,
  input  logic [WORD_W/8-1:0] req_be,
  output logic                resp_valid,
  output logic [WORD_W-1:0]   resp_rdata,
  // next-level port
  output logic                mem_req_valid,
  input  logic                mem_req_ready,
  output logic                mem_req_we,
  output logic [ADDR_W-1:0]   mem_req_addr,
  output logic [WORD_W-1:0]   mem_req_wdata,
  output logic [WORD_W/8-1:0] mem_req_be,
  input  logic                mem_resp_valid,
  input  logic [LINE_W-1:0]   mem_resp_rdata,
  // activity
  output logic [WAYS-1:0]     act_tag_en,
  output logic [WAYS-1:0]     act_sa_en,
  output logic                ev_hit,
  output logic                ev_miss,
  output logic                ev_wp_miss,
  output logic                ev_sbb_hit
);

  // ---------------------------------------------------------------- request
  logic [ADDR_W-1:0]   addr_q;
  logic [WORD_W-1:0]   wdata_q;
  logic [WORD_W/8-1:0] be_q;
  logic                accept;

  logic [IW-1:0]  req_idx, q_idx, rd_idx;
  logic [TW-1:0]  q_tag;
  logic [WOW-1:0] q_word;

  assign req_idx = req_addr[OFF_W +: IW];
  assign q_idx   = addr_q[OFF_W +: IW];
  assign q_tag   = addr_q[ADDR_W-1 -: TW];
  assign q_word  = addr_q[2 +: WOW];

  always_ff @(posedge clk) begin
    if (accept) begin
      addr_q  <= req_addr;
      wdata_q <= req_wdata;
      be_q    <= req_be;
    end
  end

  // --------------------------------------------------------------- control
  cfg_t            mode_q;
  logic [WW-1:0]   pred_way, pred_q, victim, victim_q;
  logic [WAYS-1:0] pt_match, hit_vec, tag_en, sa_en;
  logic            sbb_hit, hit, word_wr, fill_we, sbb_load;
  logic            wp_hit_upd, wp_fill_upd;
  resp_src_e       resp_src;

  baam_access_ctrl #(.WAYS(WAYS)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg           (cfg),
    .req_valid     (req_valid),
    .req_we        (req_we),
    .req_ready     (req_ready),
    .accept        (accept),
    .pred_way      (pred_way),
    .pt_match      (pt_match),
    .sbb_hit       (sbb_hit),
    .hit_vec       (hit_vec),
    .hit           (hit),
    .tag_en        (tag_en),
    .sa_en         (sa_en),
    .resp_valid    (resp_valid),
    .resp_src      (resp_src),
    .mode_q        (mode_q),
    .pred_q        (pred_q),
    .word_wr       (word_wr),
    .fill_we       (fill_we),
    .sbb_load      (sbb_load),
    .wp_hit_upd    (wp_hit_upd),
    .wp_fill_upd   (wp_fill_upd),
    .mem_req_valid (mem_req_valid),
    .mem_req_we    (mem_req_we),
    .mem_req_ready (mem_req_ready),
    .mem_resp_valid(mem_resp_valid),
    .ev_hit        (ev_hit),
    .ev_miss       (ev_miss),
    .ev_wp_miss    (ev_wp_miss),
    .ev_sbb_hit    (ev_sbb_hit)
  );

  assign act_tag_en = tag_en;
  assign act_sa_en  = sa_en;

  // Arrays are read at the request's set when it is accepted, and at the
  // registered set for the second probe of a way misprediction.
  assign rd_idx = accept ? req_idx : q_idx;

  // ---------------------------------------------------- way prediction (1)
  logic          wpt_we;
  logic [WW-1:0] wpt_flag, wpt_rd;

  baam_way_predictor #(.WAYS(WAYS)) u_wpred (
    .enable  (mode_q.reg0),
    .hit_upd (wp_hit_upd),
    .hit_vec (hit_vec),
    .fill_upd(wp_fill_upd),
    .fill_way(victim_q),
    .wr_en   (wpt_we),
    .wr_flag (wpt_flag)
  );

  baam_wp_table #(.SETS(SETS), .WAYS(WAYS)) u_wpt (
    .clk    (clk),
    .rst_n  (rst_n),
    .rd_idx (req_idx),
    .rd_flag(wpt_rd),
    .wr_en  (wpt_we),
    .wr_idx (q_idx),
    .wr_flag(wpt_flag)
  );

  // A flag written in this cycle is forwarded to a request of the same set.
  assign pred_way = (wpt_we && (q_idx == req_idx)) ? wpt_flag : wpt_rd;

  // --------------------------------------------------- partial tag array (2)
  baam_ptag_array #(.SETS(SETS), .WAYS(WAYS), .PTAG_W(PT_W)) u_ptag (
    .clk    (clk),
    .enable (cfg.reg1),
    .rd_idx (req_idx),
    .rd_ptag(req_addr[OFF_W+IW +: PT_W]),
    .match  (pt_match),
    .wr_en  (fill_we),
    .wr_idx (q_idx),
    .wr_way (victim),
    .wr_ptag(q_tag[PT_W-1:0])
  );

  // ------------------------------------------------------------ replacement
  logic [WW-1:0] rr_ptr [SETS];

  assign victim = rr_ptr[q_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) rr_ptr[s] <= '0;
    end else if (fill_we) begin
      rr_ptr[q_idx] <= rr_ptr[q_idx] + 1'b1;
    end
  end

  logic [LINE_W-1:0] fill_line_q;

  always_ff @(posedge clk) begin
    if (fill_we) begin
      victim_q    <= victim;
      fill_line_q <= mem_resp_rdata;
    end
  end

  // ------------------------------------------------------ tag and data ways
  logic [WAYS-1:0][TW-1:0]     way_tag;
  logic [WAYS-1:0]             way_valid;
  logic [WAYS-1:0][LINE_W-1:0] way_line;
  logic [WW-1:0]               hit_way;
  logic [LINE_W-1:0]           hit_line;
  logic [WORD_W-1:0]           hit_word;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    baam_tag_array #(.SETS(SETS), .TAG_W(TW)) u_tag (
      .clk     (clk),
      .rst_n   (rst_n),
      .rd_en   (tag_en[w]),
      .rd_idx  (rd_idx),
      .rd_tag  (way_tag[w]),
      .rd_valid(way_valid[w]),
      .wr_en   (fill_we && (victim == WW'(w))),
      .wr_idx  (q_idx),
      .wr_tag  (q_tag),
      .wr_valid(1'b1)
    );

    baam_data_array #(.SETS(SETS), .LINE_W(LINE_W), .WORD_W(WORD_W)) u_data (
      .clk    (clk),
      .sa_en  (sa_en[w]),
      .rd_idx (rd_idx),
      .rd_line(way_line[w]),
      .line_we(fill_we && (victim == WW'(w))),
      .word_we(word_wr && (hit_way == WW'(w))),
      .wr_idx (q_idx),
      .wr_line(mem_resp_rdata),
      .wr_word(q_word),
      .wr_data(wdata_q),
      .wr_be  (be_q)
    );
  end

  baam_way_select #(.WAYS(WAYS), .TAG_W(TW), .LINE_W(LINE_W), .WORD_W(WORD_W)) u_sel (
    .way_tag  (way_tag),
    .way_valid(way_valid),
    .way_line (way_line),
    .req_tag  (q_tag),
    .req_word (q_word),
    .hit_vec  (hit_vec),
    .hit      (hit),
    .hit_way  (hit_way),
    .hit_line (hit_line),
    .hit_word (hit_word)
  );

  // ------------------------------------------------------ block buffer (SBB)
  logic [WORD_W-1:0] sbb_word;

  baam_block_buffer #(.LADDR_W(LAW), .LINE_W(LINE_W), .WORD_W(WORD_W)) u_sbb (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (cfg.reg2),
    .lu_laddr  (req_addr[ADDR_W-1:OFF_W]),
    .lu_hit    (sbb_hit),
    .load      (sbb_load && mode_q.reg2),
    .load_laddr(addr_q[ADDR_W-1:OFF_W]),
    .load_line (resp_src == SRC_FILL ? fill_line_q : hit_line),
    .wr_en     (word_wr),
    .wr_laddr  (addr_q[ADDR_W-1:OFF_W]),
    .wr_word   (q_word),
    .wr_data   (wdata_q),
    .wr_be     (be_q),
    .rd_word   (q_word),
    .rd_data   (sbb_word)
  );

  // --------------------------------------------------------------- outputs
  always_comb begin
    unique case (resp_src)
      SRC_CACHE: resp_rdata = hit_word;
      SRC_SBB:   resp_rdata = sbb_word;
      SRC_FILL:  resp_rdata = fill_line_q[q_word*WORD_W +: WORD_W];
      default:   resp_rdata = '0;
    endcase
  end

  assign mem_req_addr  = mem_req_we ? addr_q : {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  assign mem_req_wdata = wdata_q;
  assign mem_req_be    = be_q;

endmodule
