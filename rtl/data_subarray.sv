// data_subarray: one data subarray of the way-interleaved cache.
//
// A subarray is the unit that is switched on by the predecoders. It holds, for
// each of its SETS sets, one subblock of SUB_BYTES bytes from each of the WAYS
// ways, side by side on the wordline (the way-interleaved layout). The
// subarray (post-)decoder picks the wordline from the set index; with one set
// per wordline the column multiplexer has no sets to choose between, so the
// read path delivers the subblocks of all ways and the way is chosen later by
// the output multiplexer from the tag match.
// Interface: en is the AND of the row and column predecoder outputs; nothing
// happens while it is low. With en and !we the set is read and rdata shows it
// from the next cycle until the next read (the latch behind the sense
// amplifiers). With en and we, the bytes of way `way` flagged in be are
// written from wdata at the clock edge; rdata is kept.
// The storage is written as an array; the analog read circuits are not
// modelled.
module data_subarray #(
  parameter int unsigned SETS      = 256,
  parameter int unsigned WAYS      = 2,
  parameter int unsigned SUB_BYTES = 16
) (
  input  logic                               clk,
  input  logic                               en,
  input  logic                               we,
  input  logic [$clog2(SETS)-1:0]            set,
  input  logic [(WAYS > 1 ? $clog2(WAYS) : 1)-1:0] way,
  input  logic [SUB_BYTES-1:0]               be,
  input  logic [8*SUB_BYTES-1:0]             wdata,
  output logic [WAYS-1:0][8*SUB_BYTES-1:0]   rdata
);
  // One wordline: the subblocks of all ways of one set.
  logic [WAYS-1:0][SUB_BYTES-1:0][7:0] cells [SETS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int unsigned b = 0; b < SUB_BYTES; b++)
          if (be[b]) cells[set][way][b] <= wdata[8*b +: 8];
      end else begin
        rdata <= cells[set];
      end
    end
  end
endmodule
