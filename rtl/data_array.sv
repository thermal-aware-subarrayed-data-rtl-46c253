// data_array: the way-interleaved, subarrayed data array.
//
// ROWS = NDBL/NSPD rows by NDWL columns of data_subarray. Subarray (r, c)
// holds bytes c*SUB_BYTES .. c*SUB_BYTES+SUB_BYTES-1 of both ways of every
// line whose set index has upper bits r; the remaining index bits pick the
// wordline inside it. The row predecoder (upper index bits) and the subblock
// predecoder (upper block offset bits) together enable exactly one subarray
// for a load or store, so only that subarray dissipates access power. A fill
// enables all subarrays of the row to write a whole line.
// Interface: en starts an access; fill widens it to the whole row; we selects
// writing; index, col and way address it; be are byte enables inside the
// subblock (the same for every enabled subarray); wdata carries one subblock
// per column. col_rdata gives, one cycle after a read, each column's subblocks
// of all ways from the row that was read; sub_active shows the subarray
// enables of the current cycle (row-major, bit r*NDWL+c).
module data_array #(
  parameter int unsigned CACHE_BYTES = dcache_pkg::CACHE_BYTES,
  parameter int unsigned WAYS        = dcache_pkg::WAYS,
  parameter int unsigned LINE_BYTES  = dcache_pkg::LINE_BYTES,
  parameter int unsigned NDWL        = dcache_pkg::NDWL,
  parameter int unsigned NDBL        = dcache_pkg::NDBL,
  parameter int unsigned NSPD        = dcache_pkg::NSPD,
  localparam int unsigned SETS      = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned ROWS      = NDBL / NSPD,
  localparam int unsigned SUB_BYTES = LINE_BYTES / NDWL,
  localparam int unsigned SUB_SETS  = SETS / ROWS,
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned ROW_W     = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned COL_W     = (NDWL > 1) ? $clog2(NDWL) : 1,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                                         clk,
  input  logic                                         en,
  input  logic                                         fill,
  input  logic                                         we,
  input  logic [IDX_W-1:0]                             index,
  input  logic [COL_W-1:0]                             col,
  input  logic [WAY_W-1:0]                             way,
  input  logic [SUB_BYTES-1:0]                         be,
  input  logic [NDWL-1:0][8*SUB_BYTES-1:0]             wdata,
  output logic [NDWL-1:0][WAYS-1:0][8*SUB_BYTES-1:0]   col_rdata,
  output logic [ROWS*NDWL-1:0]                         sub_active
);
  logic [ROWS-1:0]     row_en;
  logic [NDWL-1:0]     col_en;
  logic [ROW_W-1:0]    row_idx;
  logic [$clog2(SUB_SETS)-1:0] sub_set;
  logic [ROW_W-1:0]    row_q;   // row of the last read, steers the column outputs

  logic [ROWS-1:0][NDWL-1:0][WAYS-1:0][8*SUB_BYTES-1:0] sub_rdata;

  if (ROWS > 1) begin : g_rowbits
    assign row_idx = index[IDX_W-1 -: ROW_W];
  end else begin : g_norowbits
    assign row_idx = '0;
  end
  assign sub_set = index[$clog2(SUB_SETS)-1:0];

  row_predecoder #(.ROWS(ROWS)) u_rowpd (
    .en(en), .row_idx(row_idx), .row_en(row_en));

  subblock_predecoder #(.COLS(NDWL)) u_sbpd (
    .en(en), .all_cols(fill), .col_idx(col), .col_en(col_en));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < NDWL; c++) begin : g_col
      data_subarray #(.SETS(SUB_SETS), .WAYS(WAYS), .SUB_BYTES(SUB_BYTES)) u_sub (
        .clk  (clk),
        .en   (row_en[r] & col_en[c]),
        .we   (we),
        .set  (sub_set),
        .way  (way),
        .be   (be),
        .wdata(wdata[c]),
        .rdata(sub_rdata[r][c]));
      assign sub_active[r*NDWL + c] = row_en[r] & col_en[c];
    end
  end

  always_ff @(posedge clk)
    if (en && !we) row_q <= row_idx;

  always_comb
    for (int unsigned c = 0; c < NDWL; c++)
      col_rdata[c] = sub_rdata[row_q][c];

  // A load or store touches one subarray, a fill one whole row.
  assert property (@(posedge clk) en && !fill |-> $onehot(sub_active));
  assert property (@(posedge clk) en && fill |-> $countones(sub_active) == NDWL);
endmodule
