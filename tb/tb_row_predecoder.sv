// tb_row_predecoder: exhaustive check of the row predecoder for 2 and 4 rows.
// Expected enables are built as a shifted one, independently of the loop in
// the design.
module tb_row_predecoder;
  int checks = 0, failures = 0;
  logic en;
  logic [0:0] idx2;  logic [1:0] out2;
  logic [1:0] idx4;  logic [3:0] out4;

  row_predecoder #(.ROWS(2)) dut2 (.en(en), .row_idx(idx2), .row_en(out2));
  row_predecoder #(.ROWS(4)) dut4 (.en(en), .row_idx(idx4), .row_en(out4));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 4; i++) begin
        en = e[0]; idx2 = i[0]; idx4 = i[1:0];
        #1;
        checks++; if (out2 !== (e ? 2'(1 << i[0]) : 2'b0)) begin failures++; $display("FAIL rows=2 en=%0d idx=%0d out=%b", e, i[0], out2); end
        checks++; if (out4 !== (e ? 4'(1 << i) : 4'b0)) begin failures++; $display("FAIL rows=4 en=%0d idx=%0d out=%b", e, i, out4); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
