// baam_wp_table: way-prediction table.
//
// One WAY_W-bit way-prediction flag per set (2 bits for 4 ways) naming the
// way to probe first. The flag of the requested set is read combinationally
// as soon as the set index is known, so the prediction is ready for the same
// cycle's array access; a write lands at the clock edge. Reset sets every
// flag to way 0, a choice of this design.
module baam_wp_table #(
  parameter int unsigned SETS = baam_pkg::NUM_SETS,
  parameter int unsigned WAYS = baam_pkg::NUM_WAYS,
  localparam int unsigned IW  = $clog2(SETS),
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] rd_idx,
  output logic [WW-1:0] rd_flag,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  logic [WW-1:0] wr_flag
);

  logic [WW-1:0] flags [SETS];

  assign rd_flag = flags[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) flags[s] <= '0;
    end else if (wr_en) begin
      flags[wr_idx] <= wr_flag;
    end
  end

endmodule
