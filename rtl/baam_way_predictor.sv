// baam_way_predictor: most-recently-used way predictor.
//
// Decides the new way-prediction flag of a set from the tag compare results:
// after a hit the flag names the way that hit, after a refill it names the
// way that was filled, so the next access to the set probes the most recently
// used way first. `enable` is Reg0 of the access: with way prediction off the
// table is neither read for prediction nor updated. Purely combinational; the
// caller applies `wr_en`/`wr_flag` to the way-prediction table in the same
// cycle. A refill takes precedence over a hit strobe. `hit_vec` is expected
// to be one-hot or zero; a hit strobe with no hit bit set writes nothing.
module baam_way_predictor #(
  parameter int unsigned WAYS = baam_pkg::NUM_WAYS,
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic            enable,
  input  logic            hit_upd,
  input  logic [WAYS-1:0] hit_vec,
  input  logic            fill_upd,
  input  logic [WW-1:0]   fill_way,
  output logic            wr_en,
  output logic [WW-1:0]   wr_flag
);

  logic [WW-1:0] hit_way;

  always_comb begin
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (hit_vec[w]) hit_way = WW'(w);
    end
  end

  always_comb begin
    wr_en   = enable && (fill_upd || (hit_upd && (|hit_vec)));
    wr_flag = fill_upd ? fill_way : hit_way;
  end

endmodule
