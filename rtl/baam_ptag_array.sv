// baam_ptag_array: partial tag array and partial tag comparators.
//
// A small array, organised like the regular tag array, that keeps for every
// set and every way a copy of the PTAG_W least significant bits of the full
// tag (3 bits by default). It is read while the set is decoded and compared
// with the same bits of the requested address; `match[w]` high means way w
// may hold the block, so its data sense amplifiers must be enabled. A way
// whose partial tag differs cannot hit and its amplifiers stay off.
//
// `enable` is Reg1. When it is low the array is not used for filtering and
// every `match` bit is high, so that with Reg0 also low the cache falls back
// to the conventional access of all ways. Writes keep the copy in step with
// the tag array and happen whatever `enable` is. The read is combinational
// (a register file), the write lands at the clock edge. There are no valid
// bits: an invalid way whose stale partial tag matches only costs power.
module baam_ptag_array #(
  parameter int unsigned SETS   = baam_pkg::NUM_SETS,
  parameter int unsigned WAYS   = baam_pkg::NUM_WAYS,
  parameter int unsigned PTAG_W = baam_pkg::PTAG_W,
  localparam int unsigned IW    = $clog2(SETS),
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              enable,
  input  logic [IW-1:0]     rd_idx,
  input  logic [PTAG_W-1:0] rd_ptag,
  output logic [WAYS-1:0]   match,
  input  logic              wr_en,
  input  logic [IW-1:0]     wr_idx,
  input  logic [WW-1:0]     wr_way,
  input  logic [PTAG_W-1:0] wr_ptag
);

  logic [WAYS-1:0][PTAG_W-1:0] ptags [SETS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      match[w] = !enable || (ptags[rd_idx][w] == rd_ptag);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) ptags[wr_idx][wr_way] <= wr_ptag;
  end

endmodule
