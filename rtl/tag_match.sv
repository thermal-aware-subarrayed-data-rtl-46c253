// tag_match: comparators of the tag match unit.
//
// Compares the tag of every way of the set with the tag bits of the address.
// A way hits when its tag is equal and its line is valid (in this cache, a
// line is valid exactly while its supply is on; see decay_controller). Gives
// hit and the index of the hit way. Combinational.
module tag_match #(
  parameter int unsigned WAYS  = 2,
  parameter int unsigned TAG_W = 17,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][TAG_W-1:0] rtags,
  input  logic [WAYS-1:0]            valid,
  input  logic [TAG_W-1:0]           tag,
  output logic                       hit,
  output logic [WAY_W-1:0]           hit_way
);
  logic [WAYS-1:0] way_hit;
  always_comb begin
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      way_hit[w] = valid[w] && (rtags[w] == tag);
      if (way_hit[w]) hit_way = WAY_W'(w);
    end
    hit = |way_hit;
  end
endmodule
