// row_predecoder: selects one row of data subarrays.
//
// Row predecoding takes the upper log2(NDBL/NSPD) bits of the set index and
// enables the subarray decoders of one physical row of subarrays. It is the
// same in all subarraying schemes; in the way-interleaved cache it is combined
// with the subblock predecoder so that a single subarray is enabled.
// Interface: en (an access is made this cycle), row_idx (upper index bits),
// row_en (one-hot, all zero when en is low). Purely combinational.
module row_predecoder #(
  parameter int unsigned ROWS = 2
) (
  input  logic                                 en,
  input  logic [(ROWS > 1 ? $clog2(ROWS) : 1)-1:0] row_idx,
  output logic [ROWS-1:0]                      row_en
);
  always_comb begin
    row_en = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (en && 32'(row_idx) == r) row_en[r] = 1'b1;
  end
endmodule
