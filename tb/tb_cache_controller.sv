// tb_cache_controller: the access sequencer on its own. The bench plays the
// tag match, output multiplexer and next level, and checks, cycle by cycle,
// the array, next-level and decay controls the controller produces for a
// load hit (2-cycle latency), back-to-back hits, a store hit (one-subarray
// byte write, then write-through with back-pressure), a store miss, and load
// misses (victim choice, one-cycle whole-row refill, word returned).
module tb_cache_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, req_write;
  logic [31:0] req_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic [7:0] req_be;
  logic resp_valid, resp_hit;
  logic mem_req_valid, mem_req_ready, mem_req_write;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_wdata;
  logic [7:0] mem_req_be;
  logic mem_resp_valid;
  logic [511:0] mem_resp_data;
  logic da_en, da_fill, da_we;
  logic [8:0] da_index, ta_index, cur_index;
  logic [1:0] da_col, mux_col;
  logic da_way, ta_way, hit, hit_way, mux_word;
  logic [15:0] da_be;
  logic [3:0][127:0] da_wdata;
  logic ta_en, ta_we;
  logic [16:0] ta_wtag, cmp_tag;
  logic [1:0] set_valid;
  logic [63:0] mux_rdata;
  logic touch, fill;
  logic [9:0] touch_line, fill_line;

  cache_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  function automatic logic [31:0] mk(input int tag, input int set, input int off);
    return {17'(tag), 9'(set), 6'(off)};
  endfunction

  // Present a request at the falling edge; it is accepted at the next rising edge.
  task automatic present(input bit wr, input logic [31:0] a, input logic [63:0] wd, input logic [7:0] be);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = wd; req_be = be;
    #1;
    chk(req_ready, "request not accepted");
    chk(ta_en && !ta_we && ta_index == a[14:6], "tag lookup not started");
    chk(da_en == !wr && (wr || (!da_we && da_index == a[14:6] && da_col == a[5:4])), "data lookup control");
  endtask

  logic [511:0] line;
  logic [31:0] a;
  initial begin
    req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    hit = 0; hit_way = 0; set_valid = 0; mux_rdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- load hit: request cycle n, data in cycle n+2 ----
    a = mk(7, 300, 40);
    present(0, a, 0, 0);
    @(negedge clk); req_valid = 0;
    hit = 1; hit_way = 1; set_valid = 2'b11; mux_rdata = 64'h1111_2222_3333_4444;
    #1;
    chk(cmp_tag == 17'd7 && cur_index == 9'd300 && mux_col == 2'd2 && mux_word == 1'b1, "lookup fields");
    chk(touch && touch_line == 10'(300 * 2 + 1), "hit touches its line");
    chk(!resp_valid, "response too early");
    @(negedge clk);
    chk(resp_valid && resp_hit && resp_rdata == 64'h1111_2222_3333_4444, "load hit response in cycle n+2");

    // ---- back-to-back hits: second load accepted during the first compare ----
    present(0, mk(7, 300, 0), 0, 0);
    @(negedge clk);
    mux_rdata = 64'hA;
    req_addr = mk(7, 300, 8);
    #1;
    chk(req_ready, "hit does not accept the next load");
    chk(da_en && da_index == 9'd300 && da_col == 2'd0, "next load reads during compare");
    @(negedge clk); req_valid = 0;
    chk(resp_valid && resp_rdata == 64'hA, "first streamed response");
    mux_rdata = 64'hB;
    @(negedge clk);
    chk(resp_valid && resp_rdata == 64'hB, "second streamed response one cycle later");
    hit = 0;

    // ---- store hit ----
    a = mk(3, 17, 24);   // column 1, word 1
    present(1, a, 64'hCAFE_0000_BEEF_0000, 8'h0f);
    @(negedge clk); req_valid = 0;
    hit = 1; hit_way = 0; set_valid = 2'b01;
    #1;
    chk(!req_ready, "store hit must block the port");
    chk(da_en && da_we && !da_fill && da_index == 9'd17 && da_col == 2'd1 && da_way == 1'b0, "store hit write control");
    chk(da_be == 16'h0f00, "store byte enables placed in upper word");
    chk(da_wdata[1][127:64] == 64'hCAFE_0000_BEEF_0000, "store data placed");
    chk(touch && touch_line == 10'(17 * 2), "store hit touches line");
    @(negedge clk); hit = 0;
    mem_req_ready = 0;
    #1;
    chk(mem_req_valid && mem_req_write && mem_req_addr == {a[31:3], 3'b0} && mem_req_be == 8'h0f
        && mem_req_wdata == 64'hCAFE_0000_BEEF_0000, "write-through request");
    @(negedge clk); #1;
    chk(mem_req_valid && mem_req_addr == {a[31:3], 3'b0} && !resp_valid, "write-through held under back-pressure");
    mem_req_ready = 1;
    @(negedge clk); mem_req_ready = 0;
    chk(resp_valid && resp_hit, "store hit acknowledged");
    chk(!mem_req_valid, "write-through dropped after acceptance");

    // ---- store miss: no array write, written through ----
    present(1, mk(4, 18, 0), 64'h5, 8'hff);
    @(negedge clk); req_valid = 0; hit = 0; set_valid = 2'b11;
    #1;
    chk(!da_en && !touch, "store miss writes no subarray");
    @(negedge clk); mem_req_ready = 1;
    #1; chk(mem_req_valid && mem_req_write, "store miss forwarded");
    @(negedge clk); mem_req_ready = 0;
    chk(resp_valid && !resp_hit, "store miss acknowledged as miss");

    // ---- load miss with one invalid way: victim is the invalid way 1 ----
    a = mk(9, 40, 56);
    present(0, a, 0, 0);
    @(negedge clk); req_valid = 0; hit = 0; set_valid = 2'b01;
    @(negedge clk); set_valid = 2'b00;
    mem_req_ready = 1;
    #1;
    chk(mem_req_valid && !mem_req_write && mem_req_addr == {a[31:6], 6'b0}, "line read request");
    @(negedge clk); mem_req_ready = 0;
    repeat (3) begin #1; chk(!mem_req_valid && !da_en, "waiting for refill"); @(negedge clk); end
    for (int b = 0; b < 64; b++) line[8*b +: 8] = 8'(b * 7 + 1);
    mem_resp_valid = 1; mem_resp_data = line;
    #1;
    chk(da_en && da_fill && da_we && da_be == '1 && da_way == 1'b1 && da_index == 9'd40, "refill writes the row");
    for (int c = 0; c < 4; c++) chk(da_wdata[c] == line[128*c +: 128], "refill subblock data");
    chk(ta_en && ta_we && ta_way == 1'b1 && ta_index == 9'd40 && ta_wtag == 17'd9, "refill tag write");
    chk(fill && fill_line == 10'(40 * 2 + 1), "refill powers the line on");
    @(negedge clk); mem_resp_valid = 0;
    chk(resp_valid && !resp_hit && resp_rdata == line[8*56 +: 64], "miss returns the requested word");

    // ---- LRU: hit way 1 of set 40, then a miss with both ways valid evicts way 0 ----
    present(0, mk(9, 40, 0), 0, 0);
    @(negedge clk); req_valid = 0; hit = 1; hit_way = 1; set_valid = 2'b11;
    @(negedge clk); hit = 0;
    present(0, mk(11, 40, 0), 0, 0);
    @(negedge clk); req_valid = 0; set_valid = 2'b11;
    @(negedge clk); mem_req_ready = 1;
    @(negedge clk); mem_req_ready = 0;
    mem_resp_valid = 1; #1;
    chk(da_way == 1'b0 && fill_line == 10'(80), "least recently used way replaced");
    @(negedge clk); mem_resp_valid = 0;
    // Now way 0 is most recent: the next miss replaces way 1.
    present(0, mk(12, 40, 0), 0, 0);
    @(negedge clk); req_valid = 0;
    @(negedge clk); mem_req_ready = 1;
    @(negedge clk); mem_req_ready = 0;
    mem_resp_valid = 1; #1;
    chk(da_way == 1'b1, "replacement alternates under LRU");
    @(negedge clk); mem_resp_valid = 0;
    // An invalid (decayed) way is taken before the LRU way: set 50 last used
    // way 0 (reset state), way 0 is off, so way 0 is refilled.
    present(0, mk(13, 50, 0), 0, 0);
    @(negedge clk); req_valid = 0; set_valid = 2'b10;
    @(negedge clk); mem_req_ready = 1;
    @(negedge clk); mem_req_ready = 0;
    mem_resp_valid = 1; #1;
    chk(da_way == 1'b0 && fill_line == 10'(100), "invalid way refilled first");
    @(negedge clk); mem_resp_valid = 0;
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
