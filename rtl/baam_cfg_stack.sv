// baam_cfg_stack: configuration stack.
//
// A last-in first-out store of DEPTH entries of WIDTH bits (16 x 6 by
// default: the Reg0..Reg2 values of the instruction cache and the data
// cache). When a module entered with ConReg_we nests inside another, the
// configuration that was active is pushed here, and Exit_Con pops it back.
// `push` and `pop` act at the clock edge; `top` is the most recent entry,
// valid while `empty` is low. A push while `full` or a pop while `empty` is
// ignored (the caller, baam_cfg_regs, never issues one). Push and pop in the
// same cycle are not allowed; an assertion checks this.
module baam_cfg_stack #(
  parameter int unsigned DEPTH = baam_pkg::STACK_DEPTH,
  parameter int unsigned WIDTH = baam_pkg::CFG_PAIR_W,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign top   = empty ? '0 : mem[AW'(count - 1'b1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (push && !full) begin
      count <= count + 1'b1;
    end else if (pop && !empty) begin
      count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[AW'(count)] <= push_data;
  end

  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
