// tag_array: the tag array, NTBL x NTWL tag subarrays.
//
// The bitlines are cut into NTBL segments (rows, chosen by the upper set
// index bits) and the wordlines into NTWL segments, one per way. A lookup
// enables the row holding the set, so the tags of all ways are read in
// parallel and appear on rtags the cycle after en. A fill (we) writes the
// tag of one way. Packing one way per wordline segment (NTWL = WAYS) is this
// design's choice; only the subarray counts are given.
module tag_array #(
  parameter int unsigned NTBL  = dcache_pkg::NTBL,
  parameter int unsigned NTWL  = dcache_pkg::NTWL,
  parameter int unsigned SETS  = dcache_pkg::CACHE_BYTES / (dcache_pkg::WAYS * dcache_pkg::LINE_BYTES),
  parameter int unsigned WAYS  = dcache_pkg::WAYS,
  parameter int unsigned TAG_W = 17,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned SUB_SETS = SETS / NTBL,
  localparam int unsigned ROW_W = (NTBL > 1) ? $clog2(NTBL) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                        clk,
  input  logic                        en,
  input  logic                        we,
  input  logic [IDX_W-1:0]            index,
  input  logic [WAY_W-1:0]            way,
  input  logic [TAG_W-1:0]            wtag,
  output logic [WAYS-1:0][TAG_W-1:0]  rtags
);
  logic [ROW_W-1:0] row_idx, row_q;
  logic [NTBL-1:0][WAYS-1:0][TAG_W-1:0] sub_rtag;

  if (NTBL > 1) begin : g_rowbits
    assign row_idx = index[IDX_W-1 -: ROW_W];
  end else begin : g_norowbits
    assign row_idx = '0;
  end

  for (genvar r = 0; r < NTBL; r++) begin : g_row
    for (genvar w = 0; w < WAYS; w++) begin : g_way
      tag_subarray #(.SETS(SUB_SETS), .TAG_W(TAG_W)) u_tsub (
        .clk (clk),
        .en  (en && row_idx == r && (!we || way == w)),
        .we  (we),
        .set (index[$clog2(SUB_SETS)-1:0]),
        .wtag(wtag),
        .rtag(sub_rtag[r][w]));
    end
  end

  always_ff @(posedge clk)
    if (en && !we) row_q <= row_idx;

  assign rtags = sub_rtag[row_q];

  initial assert (NTWL == WAYS) else $error("tag_array: one way per wordline segment needs NTWL == WAYS");
endmodule
