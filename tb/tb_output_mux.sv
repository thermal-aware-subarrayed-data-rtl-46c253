// tb_output_mux: random check of the output multiplexer. The expected word is
// cut out of a flat byte model of the column read data.
module tb_output_mux;
  int checks = 0, failures = 0;
  logic [3:0][1:0][127:0] col_rdata;
  logic [1:0] col; logic way, word;
  logic [63:0] rdata, exp;
  logic [7:0] bytes [4][2][16];

  output_mux #(.COLS(4), .WAYS(2), .SUB_BYTES(16), .WORD_BYTES(8)) dut (
    .col_rdata(col_rdata), .col_sel(col), .way_sel(way), .word_sel(word), .rdata(rdata));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int c = 0; c < 4; c++) for (int w = 0; w < 2; w++) for (int b = 0; b < 16; b++) begin
        bytes[c][w][b] = 8'($urandom);
        col_rdata[c][w][8*b +: 8] = bytes[c][w][b];
      end
      col = 2'($urandom); way = 1'($urandom); word = 1'($urandom);
      for (int b = 0; b < 8; b++) exp[8*b +: 8] = bytes[col][way][8*word + b];
      #1;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL col=%0d way=%0d word=%0d got=%h exp=%h", col, way, word, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
