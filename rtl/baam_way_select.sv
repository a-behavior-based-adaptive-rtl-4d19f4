// baam_way_select: tag comparators and the output way multiplexer.
//
// Compares the tag read from every way with the tag of the request and
// returns one hit bit per way (`hit_vec`), the index of the hitting way,
// and the line and the addressed word of that way. A way whose tag array was
// not activated reads as invalid and so never hits. Purely combinational.
// Ways of one set never hold the same tag, so at most one bit is set; if
// that were violated the highest-numbered way would be selected.
module baam_way_select #(
  parameter int unsigned WAYS   = baam_pkg::NUM_WAYS,
  parameter int unsigned TAG_W  = baam_pkg::TAG_W,
  parameter int unsigned LINE_W = baam_pkg::LINE_W,
  parameter int unsigned WORD_W = baam_pkg::WORD_W,
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WOW   = $clog2(LINE_W / WORD_W)
) (
  input  logic [WAYS-1:0][TAG_W-1:0]  way_tag,
  input  logic [WAYS-1:0]             way_valid,
  input  logic [WAYS-1:0][LINE_W-1:0] way_line,
  input  logic [TAG_W-1:0]            req_tag,
  input  logic [WOW-1:0]              req_word,
  output logic [WAYS-1:0]             hit_vec,
  output logic                        hit,
  output logic [WW-1:0]               hit_way,
  output logic [LINE_W-1:0]           hit_line,
  output logic [WORD_W-1:0]           hit_word
);

  always_comb begin
    hit_way  = '0;
    hit_line = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = way_valid[w] && (way_tag[w] == req_tag);
      if (hit_vec[w]) begin
        hit_way  = WW'(w);
        hit_line = way_line[w];
      end
    end
    hit      = |hit_vec;
    hit_word = hit_line[req_word*WORD_W +: WORD_W];
  end

endmodule
