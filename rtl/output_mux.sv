// output_mux: the output multiplexer of the data cache.
//
// After the tag match, the hit way and the block offset bits pick the word
// that goes to the CPU. In the way-interleaved array the upper offset bits
// name the column (subarray) that was accessed, the hit way picks one of the
// subblocks that column read out, and the lower offset bits pick the word in
// that subblock. Combinational.
module output_mux #(
  parameter int unsigned COLS       = 4,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned SUB_BYTES  = 16,
  parameter int unsigned WORD_BYTES = 8,
  localparam int unsigned WPS   = SUB_BYTES / WORD_BYTES,
  localparam int unsigned COL_W = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W = (WPS > 1) ? $clog2(WPS) : 1
) (
  input  logic [COLS-1:0][WAYS-1:0][8*SUB_BYTES-1:0] col_rdata,
  input  logic [COL_W-1:0]                           col_sel,
  input  logic [WAY_W-1:0]                           way_sel,
  input  logic [WRD_W-1:0]                           word_sel,
  output logic [8*WORD_BYTES-1:0]                    rdata
);
  logic [8*SUB_BYTES-1:0] subblock;
  always_comb begin
    subblock = col_rdata[col_sel][way_sel];
    rdata    = subblock[8*WORD_BYTES*word_sel +: 8*WORD_BYTES];
  end
endmodule
