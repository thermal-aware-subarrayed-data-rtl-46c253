// tb_data_subarray: random byte-masked writes and reads against a byte model
// of one subarray (256 sets x 2 ways x 16 bytes). Checks that read data comes
// the cycle after the access, is held while the subarray is idle, and that a
// disabled subarray neither writes nor reads.
module tb_data_subarray;
  localparam int SETS = 256, WAYS = 2, SB = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en, we, way;
  logic [7:0] set;
  logic [SB-1:0] be;
  logic [8*SB-1:0] wdata;
  logic [WAYS-1:0][8*SB-1:0] rdata, held;
  logic [7:0] model [SETS][WAYS][SB];

  data_subarray #(.SETS(SETS), .WAYS(WAYS), .SUB_BYTES(SB)) dut (
    .clk(clk), .en(en), .we(we), .set(set), .way(way), .be(be), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic write_all(input int s, input int w);
    en = 1; we = 1; set = 8'(s); way = 1'(w); be = '1;
    for (int b = 0; b < SB; b++) begin
      wdata[8*b +: 8] = 8'($urandom);
      model[s][w][b] = wdata[8*b +: 8];
    end
    @(posedge clk); #1;
  endtask

  task automatic check_read(input int s);
    logic [8*SB-1:0] exp;
    en = 1; we = 0; set = 8'(s);
    @(posedge clk); #1;
    en = 0;
    for (int w = 0; w < WAYS; w++) begin
      for (int b = 0; b < SB; b++) exp[8*b +: 8] = model[s][w][b];
      checks++;
      if (rdata[w] !== exp) begin failures++; $display("FAIL read set=%0d way=%0d got=%h exp=%h", s, w, rdata[w], exp); end
    end
  endtask

  initial begin
    en = 0; we = 0; set = 0; way = 0; be = 0; wdata = 0;
    @(posedge clk); #1;
    // Initialise every wordline.
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) write_all(s, w);
    for (int s = 0; s < SETS; s += 17) check_read(s);
    // Random byte-masked writes and reads.
    for (int t = 0; t < 2000; t++) begin
      int s; s = $urandom_range(SETS - 1);
      if ($urandom_range(1)) begin
        en = 1; we = 1; set = 8'(s); way = 1'($urandom); be = SB'($urandom);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        for (int b = 0; b < SB; b++) if (be[b]) model[s][way][b] = wdata[8*b +: 8];
        @(posedge clk); #1;
      end else begin
        check_read(s);
      end
    end
    // Disabled: a write with en low changes nothing, and rdata holds.
    check_read(5);
    held = rdata;
    en = 0; we = 1; set = 8'd5; way = 0; be = '1; wdata = ~wdata;
    repeat (3) @(posedge clk); #1;
    checks++; if (rdata !== held) begin failures++; $display("FAIL rdata changed while idle"); end
    en = 0; we = 0; set = 8'd9;
    @(posedge clk); #1;
    checks++; if (rdata !== held) begin failures++; $display("FAIL idle read changed rdata"); end
    check_read(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
