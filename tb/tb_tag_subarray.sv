// tb_tag_subarray: random writes and reads of one tag subarray against a
// model; checks one-cycle read latency and that a disabled subarray does not
// write.
module tb_tag_subarray;
  localparam int SETS = 256, TW = 17;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en, we;
  logic [7:0] set;
  logic [TW-1:0] wtag, rtag;
  logic [TW-1:0] model [SETS];

  tag_subarray #(.SETS(SETS), .TAG_W(TW)) dut (.clk(clk), .en(en), .we(we), .set(set), .wtag(wtag), .rtag(rtag));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; set = 0; wtag = 0;
    for (int s = 0; s < SETS; s++) begin
      en = 1; we = 1; set = 8'(s); wtag = TW'($urandom); model[s] = wtag;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      set = 8'($urandom);
      en = 1;
      we = 1'($urandom);
      wtag = TW'($urandom);
      if (we) model[set] = wtag;
      else begin
        @(posedge clk); #1;
        checks++;
        if (rtag !== model[set]) begin failures++; $display("FAIL set=%0d got=%h exp=%h", set, rtag, model[set]); end
        continue;
      end
      @(posedge clk); #1;
    end
    // en low: no write.
    en = 0; we = 1; set = 8'd3; wtag = ~model[3];
    @(posedge clk); #1;
    en = 1; we = 0;
    @(posedge clk); #1;
    checks++; if (rtag !== model[3]) begin failures++; $display("FAIL disabled write took effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
