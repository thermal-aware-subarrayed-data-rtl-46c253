// tb_subblock_predecoder: exhaustive check of the subblock (column)
// predecoder: one column for an access, every column for a line fill, none
// when idle.
module tb_subblock_predecoder;
  int checks = 0, failures = 0;
  logic en, all;
  logic [1:0] idx;
  logic [3:0] col_en, exp;

  subblock_predecoder #(.COLS(4)) dut (.en(en), .all_cols(all), .col_idx(idx), .col_en(col_en));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 2; a++)
        for (int i = 0; i < 4; i++) begin
          en = e[0]; all = a[0]; idx = i[1:0];
          #1;
          exp = !e ? 4'b0000 : a ? 4'b1111 : 4'(1 << i);
          checks++;
          if (col_en !== exp) begin failures++; $display("FAIL en=%0d all=%0d idx=%0d got=%b exp=%b", e, a, i, col_en, exp); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
