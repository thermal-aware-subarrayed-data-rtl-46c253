// tag_subarray: one tag subarray (post-decoder and tag bit-cell array).
//
// Holds one TAG_W-bit tag per set. With en and !we the tag of `set` is read
// and shows on rtag from the next cycle until the next read; with en and we
// wtag is written at the clock edge. The comparators of the tag match unit
// that sit at the bottom of a tag subarray are in tag_match.
module tag_subarray #(
  parameter int unsigned SETS  = 256,
  parameter int unsigned TAG_W = 17
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] set,
  input  logic [TAG_W-1:0]        wtag,
  output logic [TAG_W-1:0]        rtag
);
  logic [TAG_W-1:0] cells [SETS];

  always_ff @(posedge clk)
    if (en) begin
      if (we) cells[set] <= wtag;
      else    rtag       <= cells[set];
    end
endmodule
