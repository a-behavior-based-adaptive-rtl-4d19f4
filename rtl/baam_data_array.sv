// baam_data_array: data array of one cache way together with its sense
// amplifiers.
//
// Stores one line of LINE_W bits per set. A read is synchronous and is gated
// by `sa_en`, the sense-amplifier enable: with `sa_en` high the line at
// `rd_idx` appears on `rd_line` in the next cycle; with it low nothing is
// sensed and `rd_line` is zero in the next cycle. Two write ports share the
// array: a whole-line write used by refills (`line_we`) and a word write
// with byte enables used by store hits (`word_we`); if both are asserted the
// word write is applied over the new line. Writes land at the clock edge.
// Zero on an unsensed read is a modelling choice: it makes any use of a way
// whose amplifiers were switched off visible.
module baam_data_array #(
  parameter int unsigned SETS   = baam_pkg::NUM_SETS,
  parameter int unsigned LINE_W = baam_pkg::LINE_W,
  parameter int unsigned WORD_W = baam_pkg::WORD_W,
  localparam int unsigned IW    = $clog2(SETS),
  localparam int unsigned WPL   = LINE_W / WORD_W,
  localparam int unsigned WOW   = $clog2(WPL)
) (
  input  logic                clk,
  input  logic                sa_en,
  input  logic [IW-1:0]       rd_idx,
  output logic [LINE_W-1:0]   rd_line,
  input  logic                line_we,
  input  logic                word_we,
  input  logic [IW-1:0]       wr_idx,
  input  logic [LINE_W-1:0]   wr_line,
  input  logic [WOW-1:0]      wr_word,
  input  logic [WORD_W-1:0]   wr_data,
  input  logic [WORD_W/8-1:0] wr_be
);

  logic [LINE_W-1:0] mem [SETS];
  logic [LINE_W-1:0] next_line;

  // Line after this cycle's writes.
  always_comb begin
    next_line = line_we ? wr_line : mem[wr_idx];
    if (word_we) begin
      for (int b = 0; b < WORD_W / 8; b++) begin
        if (wr_be[b]) next_line[wr_word*WORD_W + b*8 +: 8] = wr_data[b*8 +: 8];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (line_we || word_we) mem[wr_idx] <= next_line;
    rd_line <= sa_en ? mem[rd_idx] : '0;
  end

endmodule
