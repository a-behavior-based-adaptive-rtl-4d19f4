// baam_top: instruction cache and data cache with behaviour-based adaptive
// access modes, and the configuration unit that switches their modes at the
// boundaries of program modules.
//
// The processor (not part of this design) connects to three ports:
//   * the instruction fetch port of the instruction cache (read only);
//   * the load/store port of the data cache;
//   * the configuration instruction port: `conreg_we` with `conreg_data`
//     executes ConReg_we (Reg0..Reg2 of the IC in bits [2:0] and of the DC in
//     bits [5:3]), `exit_con` executes Exit_Con. The new configuration is
//     used from the first access accepted after the clock edge.
// Each cache has its own next-level port (to an L2 cache or memory, not part
// of this design) and activity outputs for power accounting. The stack
// status shows the nesting depth and entries that could not be pushed.
module baam_top
  import baam_pkg::*;
#(
  parameter int unsigned SETS        = baam_pkg::NUM_SETS,
  parameter int unsigned WAYS        = baam_pkg::NUM_WAYS,
  parameter int unsigned STK_DEPTH   = baam_pkg::STACK_DEPTH,
  localparam int unsigned CW         = $clog2(STK_DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration instructions
  input  logic                conreg_we,
  input  cfg_pair_t           conreg_data,
  input  logic                exit_con,
  output cfg_pair_t           cfg,
  output logic [CW-1:0]       stack_count,
  output logic                stack_full,
  output logic [7:0]          stack_ovf_depth,
  output logic                ev_cfg_push,
  output logic                ev_cfg_pop,
  output logic                ev_cfg_overflow,
  output logic                ev_cfg_underflow,
  // instruction fetch
  input  logic                ic_req_valid,
  output logic                ic_req_ready,
  input  logic [ADDR_W-1:0]   ic_req_addr,
  output logic                ic_resp_valid,
  output logic [WORD_W-1:0]   ic_resp_rdata,
  // loads and stores
  input  logic                dc_req_valid,
  output logic                dc_req_ready,
  input  logic [ADDR_W-1:0]   dc_req_addr,
  input  logic                dc_req_we,
  input  logic [WORD_W-1:0]   dc_req_wdata,
  input  logic [WORD_W/8-1:0] dc_req_be,
  output logic                dc_resp_valid,
  output logic [WORD_W-1:0]   dc_resp_rdata,
  // next level, instruction cache
  output logic                ic_mem_req_valid,
  input  logic                ic_mem_req_ready,
  output logic [ADDR_W-1:0]   ic_mem_req_addr,
  input  logic                ic_mem_resp_valid,
  input  logic [LINE_W-1:0]   ic_mem_resp_rdata,
  // next level, data cache
  output logic                dc_mem_req_valid,
  input  logic                dc_mem_req_ready,
  output logic                dc_mem_req_we,
  output logic [ADDR_W-1:0]   dc_mem_req_addr,
  output logic [WORD_W-1:0]   dc_mem_req_wdata,
  output logic [WORD_W/8-1:0] dc_mem_req_be,
  input  logic                dc_mem_resp_valid,
  input  logic [LINE_W-1:0]   dc_mem_resp_rdata,
  // activity
  output logic [WAYS-1:0]     ic_act_tag_en,
  output logic [WAYS-1:0]     ic_act_sa_en,
  output logic [3:0]          ic_ev,      // {sbb_hit, wp_miss, miss, hit}
  output logic [WAYS-1:0]     dc_act_tag_en,
  output logic [WAYS-1:0]     dc_act_sa_en,
  output logic [3:0]          dc_ev       // {sbb_hit, wp_miss, miss, hit}
);

  baam_cfg_regs #(.DEPTH(STK_DEPTH), .OVF_W(8)) u_cfg (
    .clk         (clk),
    .rst_n       (rst_n),
    .conreg_we   (conreg_we),
    .conreg_data (conreg_data),
    .exit_con    (exit_con),
    .cfg         (cfg),
    .stack_count (stack_count),
    .stack_full  (stack_full),
    .ovf_depth   (stack_ovf_depth),
    .ev_push     (ev_cfg_push),
    .ev_pop      (ev_cfg_pop),
    .ev_overflow (ev_cfg_overflow),
    .ev_underflow(ev_cfg_underflow)
  );

  logic             ic_mem_req_we;
  logic [WORD_W-1:0] ic_mem_req_wdata;
  logic [WORD_W/8-1:0] ic_mem_req_be;

  baam_cache #(.SETS(SETS), .WAYS(WAYS)) u_icache (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg           (cfg.ic),
    .req_valid     (ic_req_valid),
    .req_ready     (ic_req_ready),
    .req_addr      (ic_req_addr),
    .req_we        (1'b0),
    .req_wdata     ('0),
    .req_be        ('0),
    .resp_valid    (ic_resp_valid),
    .resp_rdata    (ic_resp_rdata),
    .mem_req_valid (ic_mem_req_valid),
    .mem_req_ready (ic_mem_req_ready),
    .mem_req_we    (ic_mem_req_we),
    .mem_req_addr  (ic_mem_req_addr),
    .mem_req_wdata (ic_mem_req_wdata),
    .mem_req_be    (ic_mem_req_be),
    .mem_resp_valid(ic_mem_resp_valid),
    .mem_resp_rdata(ic_mem_resp_rdata),
    .act_tag_en    (ic_act_tag_en),
    .act_sa_en     (ic_act_sa_en),
    .ev_hit        (ic_ev[0]),
    .ev_miss       (ic_ev[1]),
    .ev_wp_miss    (ic_ev[2]),
    .ev_sbb_hit    (ic_ev[3])
  );

  baam_cache #(.SETS(SETS), .WAYS(WAYS)) u_dcache (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg           (cfg.dc),
    .req_valid     (dc_req_valid),
    .req_ready     (dc_req_ready),
    .req_addr      (dc_req_addr),
    .req_we        (dc_req_we),
    .req_wdata     (dc_req_wdata),
    .req_be        (dc_req_be),
    .resp_valid    (dc_resp_valid),
    .resp_rdata    (dc_resp_rdata),
    .mem_req_valid (dc_mem_req_valid),
    .mem_req_ready (dc_mem_req_ready),
    .mem_req_we    (dc_mem_req_we),
    .mem_req_addr  (dc_mem_req_addr),
    .mem_req_wdata (dc_mem_req_wdata),
    .mem_req_be    (dc_mem_req_be),
    .mem_resp_valid(dc_mem_resp_valid),
    .mem_resp_rdata(dc_mem_resp_rdata),
    .act_tag_en    (dc_act_tag_en),
    .act_sa_en     (dc_act_sa_en),
    .ev_hit        (dc_ev[0]),
    .ev_miss       (dc_ev[1]),
    .ev_wp_miss    (dc_ev[2]),
    .ev_sbb_hit    (dc_ev[3])
  );

  // The instruction cache never stores.
  a_ic_no_store: assert property (@(posedge clk) disable iff (!rst_n) !ic_mem_req_we);

endmodule
