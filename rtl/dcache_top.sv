// dcache_top: way-interleaved subarrayed L1 data cache with cache decay.
//
// A 64 KB, 2-way, 64-byte-line data cache whose data array is split into
// NDBL/NSPD = 2 rows by NDWL = 4 columns of subarrays. Each line is spread
// over the four subarrays of one row (16 bytes of both ways in each), so the
// row predecoder (upper index bit) and the subblock predecoder (upper block
// offset bits) enable one single subarray for a load or store: one eighth of
// the array is active per access and the idle neighbours around it spread
// its heat. A refill writes the four subarrays of the row at once. Lines
// that go unused for the decay interval are switched off (cache decay) to
// cut leakage; decay_en turns that on or off at run time.
//
// Timing: a load hit accepted in cycle n returns data in cycle n+2, and hits
// can be issued every cycle. Stores are written through to the next level
// (no allocation on a store miss). A load miss issues one line read and
// answers the cycle after the line arrives.
//
// Ports: CPU request/response (valid/ready request, one-cycle resp_valid
// pulse); next-level request (valid/ready, write-through words or line
// reads) and line response; sub_active shows which data subarrays are
// enabled in each cycle (bit r*NDWL+c); line_powered is the supply control of
// each line (bit set*WAYS+way), which also serves as its valid bit.
module dcache_top #(
  parameter int unsigned CACHE_BYTES    = dcache_pkg::CACHE_BYTES,
  parameter int unsigned WAYS           = dcache_pkg::WAYS,
  parameter int unsigned LINE_BYTES     = dcache_pkg::LINE_BYTES,
  parameter int unsigned NDWL           = dcache_pkg::NDWL,
  parameter int unsigned NDBL           = dcache_pkg::NDBL,
  parameter int unsigned NSPD           = dcache_pkg::NSPD,
  parameter int unsigned WORD_BYTES     = dcache_pkg::WORD_BYTES,
  parameter int unsigned ADDR_W         = dcache_pkg::ADDR_W,
  parameter int unsigned DECAY_INTERVAL = dcache_pkg::DECAY_INTERVAL,
  localparam int unsigned SETS      = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned ROWS      = NDBL / NSPD,
  localparam int unsigned SUB_BYTES = LINE_BYTES / NDWL,
  localparam int unsigned WPS       = SUB_BYTES / WORD_BYTES,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned TAG_W     = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned COL_W     = (NDWL > 1) ? $clog2(NDWL) : 1,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W     = (WPS > 1) ? $clog2(WPS) : 1,
  localparam int unsigned LINE_W    = $clog2(SETS * WAYS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     decay_en,
  // CPU side
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_write,
  input  logic [ADDR_W-1:0]        req_addr,
  input  logic [8*WORD_BYTES-1:0]  req_wdata,
  input  logic [WORD_BYTES-1:0]    req_be,
  output logic                     resp_valid,
  output logic [8*WORD_BYTES-1:0]  resp_rdata,
  output logic                     resp_hit,
  // next level
  output logic                     mem_req_valid,
  input  logic                     mem_req_ready,
  output logic                     mem_req_write,
  output logic [ADDR_W-1:0]        mem_req_addr,
  output logic [8*WORD_BYTES-1:0]  mem_req_wdata,
  output logic [WORD_BYTES-1:0]    mem_req_be,
  input  logic                     mem_resp_valid,
  input  logic [8*LINE_BYTES-1:0]  mem_resp_data,
  // activity and power control
  output logic [ROWS*NDWL-1:0]     sub_active,
  output logic [SETS*WAYS-1:0]     line_powered,
  output logic [31:0]              decay_count
);
  logic                                       da_en, da_fill, da_we;
  logic [IDX_W-1:0]                           da_index;
  logic [COL_W-1:0]                           da_col;
  logic [WAY_W-1:0]                           da_way;
  logic [SUB_BYTES-1:0]                       da_be;
  logic [NDWL-1:0][8*SUB_BYTES-1:0]           da_wdata;
  logic [NDWL-1:0][WAYS-1:0][8*SUB_BYTES-1:0] col_rdata;

  logic                        ta_en, ta_we;
  logic [IDX_W-1:0]            ta_index, cur_index;
  logic [WAY_W-1:0]            ta_way;
  logic [TAG_W-1:0]            ta_wtag, cmp_tag;
  logic [WAYS-1:0][TAG_W-1:0]  rtags;
  logic                        hit;
  logic [WAY_W-1:0]            hit_way;
  logic [WAYS-1:0]             set_valid;

  logic [COL_W-1:0]            mux_col;
  logic [WRD_W-1:0]            mux_word;
  logic [8*WORD_BYTES-1:0]     mux_rdata;

  logic                        touch, fill;
  logic [LINE_W-1:0]           touch_line, fill_line;

  cache_controller #(
    .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES), .NDWL(NDWL),
    .WORD_BYTES(WORD_BYTES), .ADDR_W(ADDR_W)
  ) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .req_be,
    .resp_valid, .resp_rdata, .resp_hit,
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_req_be, .mem_resp_valid, .mem_resp_data,
    .da_en, .da_fill, .da_we, .da_index, .da_col, .da_way, .da_be, .da_wdata,
    .ta_en, .ta_we, .ta_index, .ta_way, .ta_wtag, .cmp_tag, .cur_index,
    .hit, .hit_way, .set_valid,
    .mux_col, .mux_word, .mux_rdata,
    .touch, .touch_line, .fill, .fill_line);

  data_array #(
    .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES),
    .NDWL(NDWL), .NDBL(NDBL), .NSPD(NSPD)
  ) u_data (
    .clk, .en(da_en), .fill(da_fill), .we(da_we), .index(da_index), .col(da_col),
    .way(da_way), .be(da_be), .wdata(da_wdata), .col_rdata, .sub_active);

  tag_array #(
    .NTBL(dcache_pkg::NTBL), .NTWL(WAYS), .SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)
  ) u_tag (
    .clk, .en(ta_en), .we(ta_we), .index(ta_index), .way(ta_way), .wtag(ta_wtag), .rtags);

  always_comb
    for (int unsigned w = 0; w < WAYS; w++)
      set_valid[w] = line_powered[32'(cur_index) * WAYS + w];

  tag_match #(.WAYS(WAYS), .TAG_W(TAG_W)) u_match (
    .rtags, .valid(set_valid), .tag(cmp_tag), .hit, .hit_way);

  output_mux #(
    .COLS(NDWL), .WAYS(WAYS), .SUB_BYTES(SUB_BYTES), .WORD_BYTES(WORD_BYTES)
  ) u_omux (
    .col_rdata, .col_sel(mux_col), .way_sel(hit_way), .word_sel(mux_word), .rdata(mux_rdata));

  decay_controller #(
    .LINES(SETS * WAYS), .DECAY_INTERVAL(DECAY_INTERVAL)
  ) u_decay (
    .clk, .rst_n, .decay_en, .touch, .touch_line, .fill, .fill_line,
    .line_on(line_powered), .decay_count);
endmodule
