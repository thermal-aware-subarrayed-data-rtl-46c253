// cache_controller: access sequencing for the way-interleaved data cache.
//
// Loads: the request is accepted in cycle n and, in the same cycle, the tag
// array row and the single data subarray chosen by the row and subblock
// predecoders are read. In cycle n+1 the tags are compared and, on a hit, the
// output multiplexer word is registered, so the data is on resp_rdata in cycle
// n+2 (the 2-cycle load hit of the evaluated cache). A new load can be
// accepted in the compare cycle of a hitting load, so hits stream one per
// cycle.
// Stores: only the tags are read at first; on a hit the word is written into
// the one subarray that holds it in the compare cycle. Every store is then
// passed on to the next level (write-through, no write-allocate), and the
// store is answered once the next level has accepted it.
// Load misses: the controller requests the 64-byte line from the next level,
// and when it arrives writes it in a single cycle into all NDWL subarrays of
// the row (a replacement is the one access that enables a whole row), writes
// the tag, switches the line on in the decay controller and returns the
// requested word in the following cycle.
// Victim: an invalid (decayed or never filled) way first, otherwise the way
// after the most recently used one, which for two ways is exact LRU.
// Write policy, victim choice, the next-level handshake and the state machine
// are this design's own; the documented points are the one-subarray access,
// the whole-row refill and the 2-cycle hit.
module cache_controller #(
  parameter int unsigned CACHE_BYTES = dcache_pkg::CACHE_BYTES,
  parameter int unsigned WAYS        = dcache_pkg::WAYS,
  parameter int unsigned LINE_BYTES  = dcache_pkg::LINE_BYTES,
  parameter int unsigned NDWL        = dcache_pkg::NDWL,
  parameter int unsigned WORD_BYTES  = dcache_pkg::WORD_BYTES,
  parameter int unsigned ADDR_W      = dcache_pkg::ADDR_W,
  localparam int unsigned SETS      = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned SUB_BYTES = LINE_BYTES / NDWL,
  localparam int unsigned WPS       = SUB_BYTES / WORD_BYTES,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned TAG_W     = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned COL_W     = (NDWL > 1) ? $clog2(NDWL) : 1,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W     = (WPS > 1) ? $clog2(WPS) : 1,
  localparam int unsigned SUBOFF_W  = $clog2(SUB_BYTES),
  localparam int unsigned WOFF_W    = $clog2(WORD_BYTES),
  localparam int unsigned LINE_W    = $clog2(SETS * WAYS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // CPU side
  input  logic                              req_valid,
  output logic                              req_ready,
  input  logic                              req_write,
  input  logic [ADDR_W-1:0]                 req_addr,
  input  logic [8*WORD_BYTES-1:0]           req_wdata,
  input  logic [WORD_BYTES-1:0]             req_be,
  output logic                              resp_valid,
  output logic [8*WORD_BYTES-1:0]           resp_rdata,
  output logic                              resp_hit,
  // next level
  output logic                              mem_req_valid,
  input  logic                              mem_req_ready,
  output logic                              mem_req_write,
  output logic [ADDR_W-1:0]                 mem_req_addr,
  output logic [8*WORD_BYTES-1:0]           mem_req_wdata,
  output logic [WORD_BYTES-1:0]             mem_req_be,
  input  logic                              mem_resp_valid,
  input  logic [8*LINE_BYTES-1:0]           mem_resp_data,
  // data array
  output logic                              da_en,
  output logic                              da_fill,
  output logic                              da_we,
  output logic [IDX_W-1:0]                  da_index,
  output logic [COL_W-1:0]                  da_col,
  output logic [WAY_W-1:0]                  da_way,
  output logic [SUB_BYTES-1:0]              da_be,
  output logic [NDWL-1:0][8*SUB_BYTES-1:0]  da_wdata,
  // tag array and tag match
  output logic                              ta_en,
  output logic                              ta_we,
  output logic [IDX_W-1:0]                  ta_index,
  output logic [WAY_W-1:0]                  ta_way,
  output logic [TAG_W-1:0]                  ta_wtag,
  output logic [TAG_W-1:0]                  cmp_tag,
  output logic [IDX_W-1:0]                  cur_index,
  input  logic                              hit,
  input  logic [WAY_W-1:0]                  hit_way,
  input  logic [WAYS-1:0]                   set_valid,
  // output multiplexer
  output logic [COL_W-1:0]                  mux_col,
  output logic [WRD_W-1:0]                  mux_word,
  input  logic [8*WORD_BYTES-1:0]           mux_rdata,
  // decay controller
  output logic                              touch,
  output logic [LINE_W-1:0]                 touch_line,
  output logic                              fill,
  output logic [LINE_W-1:0]                 fill_line
);
  dcache_pkg::ctrl_state_e state;

  // The request being looked up or serviced.
  logic                       cur_write;
  logic [ADDR_W-1:0]          cur_addr;
  logic [8*WORD_BYTES-1:0]    cur_wdata;
  logic [WORD_BYTES-1:0]      cur_be;
  logic                       cur_hit;
  logic [WAY_W-1:0]           victim_q;
  logic [WAY_W-1:0]           victim;

  logic [SETS-1:0][WAY_W-1:0] mru;

  logic [TAG_W-1:0]  cur_tag;
  logic [COL_W-1:0]  cur_col;
  logic [WRD_W-1:0]  cur_word;
  logic              accept;

  assign cur_tag   = cur_addr[ADDR_W-1 -: TAG_W];
  assign cur_index = cur_addr[OFF_W +: IDX_W];
  if (NDWL > 1) begin : g_col
    assign cur_col = cur_addr[SUBOFF_W +: COL_W];
  end else begin : g_nocol
    assign cur_col = '0;
  end
  if (WPS > 1) begin : g_word
    assign cur_word = cur_addr[WOFF_W +: WRD_W];
  end else begin : g_noword
    assign cur_word = '0;
  end

  assign cmp_tag  = cur_tag;
  assign mux_col  = cur_col;
  assign mux_word = cur_word;

  assign req_ready = (state == dcache_pkg::ST_IDLE) || (state == dcache_pkg::ST_LOOKUP && !cur_write && hit);
  assign accept    = req_valid && req_ready;

  // Victim way for a refill of the current set.
  always_comb begin
    victim = WAY_W'((32'(mru[cur_index]) + 1) % WAYS);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!set_valid[w]) victim = WAY_W'(w);
  end

  // Array, next-level and decay control.
  always_comb begin
    da_en    = 1'b0;
    da_fill  = 1'b0;
    da_we    = 1'b0;
    da_index = req_addr[OFF_W +: IDX_W];
    da_col   = (NDWL > 1) ? COL_W'(req_addr[SUBOFF_W +: COL_W]) : '0;
    da_way   = hit_way;
    da_be    = '0;
    for (int unsigned c = 0; c < NDWL; c++)
      da_wdata[c] = {WPS{cur_wdata}};
    ta_en    = 1'b0;
    ta_we    = 1'b0;
    ta_index = req_addr[OFF_W +: IDX_W];
    ta_way   = victim_q;
    ta_wtag  = cur_tag;
    mem_req_valid = 1'b0;
    mem_req_write = 1'b0;
    mem_req_addr  = cur_addr;
    mem_req_wdata = cur_wdata;
    mem_req_be    = cur_be;
    touch      = 1'b0;
    touch_line = LINE_W'(32'(cur_index) * WAYS + 32'(hit_way));
    fill       = 1'b0;
    fill_line  = LINE_W'(32'(cur_index) * WAYS + 32'(victim_q));

    // Store hit: write the word into the single subarray that holds it.
    if (state == dcache_pkg::ST_LOOKUP && cur_write && hit) begin
      da_en    = 1'b1;
      da_we    = 1'b1;
      da_index = cur_index;
      da_col   = cur_col;
      da_be    = SUB_BYTES'(cur_be) << (32'(cur_word) * WORD_BYTES);
    end
    // New lookup: tags always, data only for loads.
    if (accept) begin
      ta_en = 1'b1;
      da_en = !req_write;
    end
    if (state == dcache_pkg::ST_LOOKUP && hit) touch = 1'b1;

    case (state)
      dcache_pkg::ST_WT: begin
        mem_req_valid = 1'b1;
        mem_req_write = 1'b1;
        mem_req_addr  = {cur_addr[ADDR_W-1:WOFF_W], {WOFF_W{1'b0}}};
      end
      dcache_pkg::ST_MREQ: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = {cur_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
      end
      dcache_pkg::ST_MWAIT: if (mem_resp_valid) begin
        // Refill: every subarray of the row is written at once.
        da_en    = 1'b1;
        da_fill  = 1'b1;
        da_we    = 1'b1;
        da_index = cur_index;
        da_way   = victim_q;
        da_be    = '1;
        for (int unsigned c = 0; c < NDWL; c++)
          da_wdata[c] = mem_resp_data[c*8*SUB_BYTES +: 8*SUB_BYTES];
        ta_en    = 1'b1;
        ta_we    = 1'b1;
        ta_index = cur_index;
        fill     = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= dcache_pkg::ST_IDLE;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_hit   <= 1'b0;
      mru        <= '0;
      cur_write  <= 1'b0;
      cur_addr   <= '0;
      cur_wdata  <= '0;
      cur_be     <= '0;
      cur_hit    <= 1'b0;
      victim_q   <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (state)
        dcache_pkg::ST_IDLE: ;
        dcache_pkg::ST_LOOKUP: begin
          cur_hit  <= hit;
          victim_q <= victim;
          if (hit) mru[cur_index] <= hit_way;
          if (!cur_write) begin
            if (hit) begin
              resp_valid <= 1'b1;
              resp_rdata <= mux_rdata;
              resp_hit   <= 1'b1;
              state      <= dcache_pkg::ST_IDLE;
            end else begin
              state <= dcache_pkg::ST_MREQ;
            end
          end else begin
            state <= dcache_pkg::ST_WT;
          end
        end
        dcache_pkg::ST_WT: if (mem_req_ready) begin
          resp_valid <= 1'b1;
          resp_rdata <= '0;
          resp_hit   <= cur_hit;
          state      <= dcache_pkg::ST_IDLE;
        end
        dcache_pkg::ST_MREQ: if (mem_req_ready) state <= dcache_pkg::ST_MWAIT;
        dcache_pkg::ST_MWAIT: if (mem_resp_valid) begin
          mru[cur_index] <= victim_q;
          resp_valid <= 1'b1;
          resp_rdata <= mem_resp_data[8*WORD_BYTES*(32'(cur_addr[OFF_W-1:0]) / WORD_BYTES) +: 8*WORD_BYTES];
          resp_hit   <= 1'b0;
          state      <= dcache_pkg::ST_IDLE;
        end
        default: state <= dcache_pkg::ST_IDLE;
      endcase
      // A new request overrides the return to idle.
      if (accept) begin
        state     <= dcache_pkg::ST_LOOKUP;
        cur_write <= req_write;
        cur_addr  <= req_addr;
        cur_wdata <= req_wdata;
        cur_be    <= req_be;
      end
    end
  end

  // Handshake rules.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
  assert property (@(posedge clk) disable iff (!rst_n)
                   da_en && da_fill |-> da_we);
endmodule
