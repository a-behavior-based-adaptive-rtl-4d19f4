// baam_cfg_regs: configuration registers of both caches and their nesting
// control.
//
// Holds Reg0, Reg1 and Reg2 of the instruction cache and of the data cache
// (one 6-bit cfg_pair_t). Two instructions act on them at the boundaries of
// program modules:
//   ConReg_we (`conreg_we`, value `conreg_data`): the active configuration is
//     pushed onto the configuration stack and the new one becomes active at
//     the next clock edge.
//   Exit_Con (`exit_con`): the configuration on top of the stack is popped
//     and becomes active again, so the cache returns to the mode of the
//     enclosing module.
// When the stack is full a ConReg_we is not applied: the caches stay in the
// current configuration. A counter of such unapplied entries (`ovf_depth`)
// makes the matching Exit_Con instructions leave the configuration alone as
// well, so pushes and pops stay paired and the enclosing modules get their
// own configuration back once the stack has room again. An Exit_Con with an
// empty stack and no pending overflow changes nothing and is flagged on
// `ev_underflow`. Reset selects the conventional access (all registers 0).
// The overflow counter and the reset value are choices of this design; the
// rest follows the description of the instrumentation scheme. The two
// instructions must not be issued in the same cycle (assertion).
module baam_cfg_regs
  import baam_pkg::*;
#(
  parameter int unsigned DEPTH = baam_pkg::STACK_DEPTH,
  parameter int unsigned OVF_W = 8,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             conreg_we,
  input  cfg_pair_t        conreg_data,
  input  logic             exit_con,
  output cfg_pair_t        cfg,
  output logic [CW-1:0]    stack_count,
  output logic             stack_full,
  output logic [OVF_W-1:0] ovf_depth,
  output logic             ev_push,
  output logic             ev_pop,
  output logic             ev_overflow,
  output logic             ev_underflow
);

  cfg_pair_t top;
  logic      empty;

  baam_cfg_stack #(.DEPTH(DEPTH), .WIDTH(CFG_PAIR_W)) u_stack (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (ev_push),
    .push_data(cfg),
    .pop      (ev_pop),
    .top      (top),
    .empty    (empty),
    .full     (stack_full),
    .count    (stack_count)
  );

  logic ovf_pending;
  assign ovf_pending = (ovf_depth != '0);

  always_comb begin
    ev_push      = conreg_we && !stack_full;
    ev_overflow  = conreg_we && stack_full;
    ev_pop       = exit_con && !ovf_pending && !empty;
    ev_underflow = exit_con && !ovf_pending && empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '0;
      ovf_depth <= '0;
    end else begin
      if (ev_push) cfg <= conreg_data;
      if (ev_pop)  cfg <= top;
      if (ev_overflow && (ovf_depth != '1)) ovf_depth <= ovf_depth + 1'b1;
      if (exit_con && ovf_pending)          ovf_depth <= ovf_depth - 1'b1;
    end
  end

  a_one_instr: assert property (@(posedge clk) disable iff (!rst_n) !(conreg_we && exit_con));

endmodule
