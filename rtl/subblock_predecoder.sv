// subblock_predecoder: selects the column of data subarrays that holds the
// requested subblock.
//
// In the way-interleaved cache every line is spread over the NDWL subarrays of
// a row, one subblock of LINE_BYTES/NDWL bytes in each. The upper log2(NDWL)
// block offset bits therefore tell which column holds the word, and this
// predecoder enables only that column's subarray decoders. A line replacement
// writes every subblock, so all_cols enables all columns.
// Interface: en, all_cols, col_idx in; col_en out. Combinational.
module subblock_predecoder #(
  parameter int unsigned COLS = 4
) (
  input  logic                                 en,
  input  logic                                 all_cols,
  input  logic [(COLS > 1 ? $clog2(COLS) : 1)-1:0] col_idx,
  output logic [COLS-1:0]                      col_en
);
  always_comb begin
    col_en = '0;
    for (int unsigned c = 0; c < COLS; c++)
      if (en && (all_cols || 32'(col_idx) == c)) col_en[c] = 1'b1;
  end
endmodule
