// tb_tag_array: the 2x2 tag array at its full 512-set size. Tags are written
// way by way and read back for both ways of random sets, against a model.
module tb_tag_array;
  localparam int SETS = 512, TW = 17;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en, we, way;
  logic [8:0] index;
  logic [TW-1:0] wtag;
  logic [1:0][TW-1:0] rtags;
  logic [TW-1:0] model [SETS][2];

  tag_array #(.NTBL(2), .NTWL(2), .SETS(SETS), .WAYS(2), .TAG_W(TW)) dut (
    .clk(clk), .en(en), .we(we), .index(index), .way(way), .wtag(wtag), .rtags(rtags));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; index = 0; way = 0; wtag = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < 2; w++) begin
      en = 1; we = 1; index = 9'(s); way = 1'(w); wtag = TW'($urandom); model[s][w] = wtag;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 3000; t++) begin
      index = 9'($urandom); en = 1;
      if ($urandom_range(2) == 0) begin
        we = 1; way = 1'($urandom); wtag = TW'($urandom); model[index][way] = wtag;
        @(posedge clk); #1;
      end else begin
        we = 0;
        @(posedge clk); #1;
        for (int w = 0; w < 2; w++) begin
          checks++;
          if (rtags[w] !== model[index][w]) begin failures++; $display("FAIL set=%0d way=%0d got=%h exp=%h", index, w, rtags[w], model[index][w]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
