// baam_block_buffer: single block buffer (SBB) at the cache output.
//
// Holds the most recently accessed block: its line address (tag and index,
// 27 bits by default) and its data (one 256-bit line). A lookup compares the
// line address of a new request with the stored one while the set is being
// decoded, so `lu_hit` is combinational and can switch the data sense
// amplifiers off for the same access. If a block is being loaded in the same
// cycle, the lookup is made against the block being loaded, so back-to-back
// accesses to one block hit. `rd_data` is the word `rd_word` of the stored
// block, read combinationally in the cycle after the lookup.
//
// `enable` is Reg2. While it is low the buffer is invalid and never hits, so
// a block held from before cannot be used once the buffer is switched on
// again. `load` writes a new block at the clock edge. A store to the held
// block (`wr_en`) updates the buffered word so the buffer never goes stale.
// Reset clears the valid bit.
module baam_block_buffer #(
  parameter int unsigned LADDR_W = baam_pkg::ADDR_W - baam_pkg::OFF_W,
  parameter int unsigned LINE_W  = baam_pkg::LINE_W,
  parameter int unsigned WORD_W  = baam_pkg::WORD_W,
  localparam int unsigned WOW    = $clog2(LINE_W / WORD_W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [LADDR_W-1:0]  lu_laddr,
  output logic                lu_hit,
  input  logic                load,
  input  logic [LADDR_W-1:0]  load_laddr,
  input  logic [LINE_W-1:0]   load_line,
  input  logic                wr_en,
  input  logic [LADDR_W-1:0]  wr_laddr,
  input  logic [WOW-1:0]      wr_word,
  input  logic [WORD_W-1:0]   wr_data,
  input  logic [WORD_W/8-1:0] wr_be,
  input  logic [WOW-1:0]      rd_word,
  output logic [WORD_W-1:0]   rd_data
);

  logic               valid;
  logic [LADDR_W-1:0] laddr;
  logic [LINE_W-1:0]  line;

  always_comb begin
    if (load) lu_hit = enable && (load_laddr == lu_laddr);
    else      lu_hit = enable && valid && (laddr == lu_laddr);
  end

  assign rd_data = line[rd_word*WORD_W +: WORD_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
    end else if (!enable) begin
      valid <= 1'b0;
    end else if (load) begin
      valid <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (enable && load) begin
      laddr <= load_laddr;
      line  <= load_line;
    end else if (enable && valid && wr_en && (wr_laddr == laddr)) begin
      for (int b = 0; b < WORD_W / 8; b++) begin
        if (wr_be[b]) line[wr_word*WORD_W + b*8 +: 8] <= wr_data[b*8 +: 8];
      end
    end
  end

endmodule
