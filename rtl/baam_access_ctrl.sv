// baam_access_ctrl: access controller of one BAAM cache.
//
// Sequences every access and decides, for each cycle, which tag ways are
// activated (`tag_en`) and which data ways have their sense amplifiers
// enabled (`sa_en`). The configuration registers are sampled when a request
// is accepted and hold for the whole access (`mode_q`).
//
// Access modes (Reg0 = way prediction, Reg1 = partial tag comparison, Reg2 =
// single block buffer):
//   * WP (Reg0 = 1): only the way named by the way-prediction table is probed
//     first. If its tag does not match, the other ways are probed in the next
//     cycle (state PROBE2): one extra cycle, and the only case in which the
//     design is slower than a conventional cache.
//   * PTC (Reg0 = 0, Reg1 = 1): all tag ways are probed; the sense amplifiers
//     of a data way are enabled only if its partial tag matched. Through the
//     OR gates G0..G3 (sense amplifier enable of way i = Reg0 OR a_i) Reg0
//     overrides the partial-tag result.
//   * Conventional (Reg0 = Reg1 = 0): all ways, tags and data, in parallel.
//   * Reg2 = 1 adds the single block buffer to either mode. It is looked up
//     alongside the array access; on a buffer hit no data sense amplifier is
//     enabled and the word comes from the buffer, with unchanged latency.
// Reg0 = Reg1 = 1 behaves as WP.
//
// Timing: a request is accepted when `req_valid && req_ready` (cycle 0); the
// arrays are read at that edge and a hit responds with `resp_valid` in
// cycle 1, when the next request can already be accepted. A WP misprediction
// responds in cycle 2. A read miss requests the line from the next level
// (MEM_REQ, MEM_WAIT), writes it into the victim way and responds one cycle
// after the line arrived (RESP). Stores are write-through with no allocation
// on a miss: the tag probe finds the way, a hit updates the word, the store is
// sent to the next level and `resp_valid` acknowledges it when the next level
// does; a store takes no data sense amplifier and never uses the buffer. A new
// request is accepted in the response cycle of a read hit, otherwise only in
// IDLE. The replacement order, the write policy and the one-cycle array
// latency are choices of this design.
module baam_access_ctrl
  import baam_pkg::*;
#(
  parameter int unsigned WAYS = baam_pkg::NUM_WAYS,
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  // request side
  input  logic            req_valid,
  input  logic            req_we,
  output logic            req_ready,
  output logic            accept,
  // decode-time inputs for the request being accepted
  input  logic [WW-1:0]   pred_way,
  input  logic [WAYS-1:0] pt_match,
  input  logic            sbb_hit,
  // lookup result for the access in flight
  input  logic [WAYS-1:0] hit_vec,
  input  logic            hit,
  // array enables for the read issued in this cycle
  output logic [WAYS-1:0] tag_en,
  output logic [WAYS-1:0] sa_en,
  // response
  output logic            resp_valid,
  output resp_src_e       resp_src,
  // datapath strobes
  output cfg_t            mode_q,
  output logic [WW-1:0]   pred_q,
  output logic            word_wr,
  output logic            fill_we,
  output logic            sbb_load,
  output logic            wp_hit_upd,
  output logic            wp_fill_upd,
  // next level
  output logic            mem_req_valid,
  output logic            mem_req_we,
  input  logic            mem_req_ready,
  input  logic            mem_resp_valid,
  // events, one cycle each
  output logic            ev_hit,
  output logic            ev_miss,
  output logic            ev_wp_miss,
  output logic            ev_sbb_hit
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_PROBE2, S_MEM_REQ, S_MEM_WAIT, S_RESP
  } state_e;

  state_e state, state_d;
  logic   we_q, sbb_q;

  logic [WAYS-1:0] pred_1h, pred_q_1h, gate;
  logic            sbb_use, lookup, done_read, go_probe2;

  always_comb begin
    pred_1h   = '0;
    pred_q_1h = '0;
    pred_1h[pred_way] = 1'b1;
    pred_q_1h[pred_q] = 1'b1;
  end

  // G0..G3: the partial tag match of each way, overridden by Reg0.
  always_comb begin
    for (int w = 0; w < WAYS; w++) gate[w] = cfg.reg0 | pt_match[w];
  end

  assign lookup    = (state == S_LOOKUP) || (state == S_PROBE2);
  assign done_read = lookup && !we_q && (sbb_q || hit);
  assign go_probe2 = (state == S_LOOKUP) && !(sbb_q && !we_q) && !hit && mode_q.reg0;
  assign req_ready = (state == S_IDLE) || done_read;
  assign accept    = req_valid && req_ready;
  assign sbb_use   = sbb_hit && !req_we;

  // Array enables for the read issued in this cycle.
  always_comb begin
    tag_en = '0;
    sa_en  = '0;
    if (accept) begin
      tag_en = cfg.reg0 ? pred_1h : '1;
      sa_en  = (req_we || sbb_use) ? '0 : (tag_en & gate);
    end else if (go_probe2) begin
      tag_en = ~pred_q_1h;
      sa_en  = we_q ? '0 : ~pred_q_1h;
    end
  end

  always_comb begin
    state_d       = state;
    resp_valid    = 1'b0;
    resp_src      = SRC_CACHE;
    word_wr       = 1'b0;
    fill_we       = 1'b0;
    sbb_load      = 1'b0;
    wp_hit_upd    = 1'b0;
    wp_fill_upd   = 1'b0;
    mem_req_valid = 1'b0;
    ev_hit        = 1'b0;
    ev_miss       = 1'b0;
    ev_wp_miss    = 1'b0;
    ev_sbb_hit    = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (accept) state_d = S_LOOKUP;
      end
      S_LOOKUP, S_PROBE2: begin
        if (!we_q && sbb_q) begin
          resp_valid = 1'b1;
          resp_src   = SRC_SBB;
          ev_sbb_hit = 1'b1;
          ev_hit     = 1'b1;
          wp_hit_upd = 1'b1;
          state_d    = accept ? S_LOOKUP : S_IDLE;
        end else if (hit) begin
          ev_hit     = 1'b1;
          wp_hit_upd = 1'b1;
          if (we_q) begin
            word_wr = 1'b1;
            state_d = S_MEM_REQ;
          end else begin
            resp_valid = 1'b1;
            resp_src   = SRC_CACHE;
            sbb_load   = 1'b1;
            state_d    = accept ? S_LOOKUP : S_IDLE;
          end
        end else if (go_probe2) begin
          ev_wp_miss = 1'b1;
          state_d    = S_PROBE2;
        end else begin
          ev_miss = 1'b1;
          state_d = S_MEM_REQ;
        end
      end
      S_MEM_REQ: begin
        mem_req_valid = 1'b1;
        if (mem_req_ready) state_d = S_MEM_WAIT;
      end
      S_MEM_WAIT: begin
        if (mem_resp_valid) begin
          if (we_q) begin
            resp_valid = 1'b1;
            resp_src   = SRC_WACK;
            state_d    = S_IDLE;
          end else begin
            fill_we = 1'b1;
            state_d = S_RESP;
          end
        end
      end
      S_RESP: begin
        resp_valid  = 1'b1;
        resp_src    = SRC_FILL;
        sbb_load    = 1'b1;
        wp_fill_upd = 1'b1;
        state_d     = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign mem_req_we = we_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      we_q   <= 1'b0;
      sbb_q  <= 1'b0;
      pred_q <= '0;
      mode_q <= '0;
    end else begin
      state <= state_d;
      if (accept) begin
        we_q   <= req_we;
        sbb_q  <= sbb_use;
        pred_q <= pred_way;
        mode_q <= cfg;
      end
    end
  end

  a_hit_onehot: assert property (@(posedge clk) disable iff (!rst_n) lookup |-> $onehot0(hit_vec));
  a_resp_idle_accept: assert property (@(posedge clk) disable iff (!rst_n)
                                       accept |-> (state == S_IDLE) || resp_valid);

endmodule
