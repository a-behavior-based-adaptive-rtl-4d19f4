// baam_tag_array: tag array of one cache way.
//
// Holds a tag and a valid bit for every set. A read is synchronous: when
// `rd_en` is high in a cycle the entry at `idx` appears on `rd_tag` /
// `rd_valid` in the next cycle. A way that was not enabled reports
// `rd_valid = 0` in that next cycle, so it can never produce a tag match;
// this models a way whose tag sub-array is not activated. Writes (`wr_en`)
// take effect at the clock edge; a read of the same entry in the same cycle
// returns the old contents. Valid bits are cleared by reset, tags are not.
module baam_tag_array #(
  parameter int unsigned SETS  = baam_pkg::NUM_SETS,
  parameter int unsigned TAG_W = baam_pkg::TAG_W,
  localparam int unsigned IW   = $clog2(SETS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [IW-1:0]    rd_idx,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_valid,
  input  logic             wr_en,
  input  logic [IW-1:0]    wr_idx,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic             wr_valid
);

  logic [TAG_W-1:0] tags [SETS];
  logic [SETS-1:0]  valid;

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_idx] <= wr_tag;
    if (rd_en) rd_tag <= tags[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en & valid[rd_idx];
      if (wr_en) valid[wr_idx] <= wr_valid;
    end
  end

endmodule
