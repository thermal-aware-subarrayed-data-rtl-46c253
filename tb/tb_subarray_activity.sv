// tb_subarray_activity: subarray activity of the way-interleaved cache under
// two synthetic access streams, at the cache's default size.
//
// Stream "int": loads and stores scattered over a 256 KB footprint (four
// times the cache), 30 % stores, giving many misses and refills. Stream
// "fp": unit-stride sweeps over three 24 KB arrays, two loads and one store
// per element, which mostly hit.
//
// For every cycle the bench adds up the enabled subarrays (sub_active). It
// checks that the total equals one activation per load and per store hit
// plus four per refill, and compares it with the count a conventional
// subarrayed cache would need (all four subarrays of the row on every load,
// store hit and refill). The per-subarray counts are printed as a 2x4 map.
// The next level is a behavioural memory with a 12-cycle line latency.
module tb_subarray_activity;
  localparam int L2_LAT = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic decay_en = 0;
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
  logic [7:0] sub_active;
  logic [1023:0] line_powered;
  logic [31:0] decay_count;

  dcache_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Next level: memory returns a pattern derived from the address, or the
  // last value written.
  logic [7:0] mem [int unsigned];
  function automatic logic [7:0] mem_rd(input logic [31:0] a);
    if (mem.exists(a)) return mem[a];
    return 8'(a * 13 + (a >> 9));
  endfunction
  int l2_cnt = 0;
  logic [31:0] l2_addr;
  always @(negedge clk) begin
    mem_req_ready = 1'b1;
    if (mem_req_valid && mem_req_write)
      for (int b = 0; b < 8; b++) if (mem_req_be[b]) mem[mem_req_addr + b] = mem_req_wdata[8*b +: 8];
    if (mem_req_valid && !mem_req_write) begin l2_addr = mem_req_addr; l2_cnt = L2_LAT; end
    mem_resp_valid = 0;
    if (l2_cnt > 0) begin
      l2_cnt--;
      if (l2_cnt == 0) begin
        mem_resp_valid = 1;
        for (int b = 0; b < 64; b++) mem_resp_data[8*b +: 8] = mem_rd(l2_addr + b);
      end
    end
  end

  // Activity counters.
  longint act [8];
  longint act_total, loads, store_hits, stores, fills;
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int i = 0; i < 8; i++) if (sub_active[i]) begin act[i]++; act_total++; end
    if (mem_resp_valid) fills++;
  end

  task automatic access(input bit wr, input logic [31:0] a);
    logic [63:0] exp;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_be = 8'hff;
    req_wdata = {a, ~a};
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (wr) begin stores++; if (resp_hit) store_hits++; end
    else begin
      loads++;
      for (int b = 0; b < 8; b++) exp[8*b +: 8] = mem_rd(a + b);
      checks++;
      if (resp_rdata !== exp) begin failures++; $display("FAIL load %h got %h exp %h", a, resp_rdata, exp); end
    end
  endtask

  task automatic report(input string name);
    longint conv, expect_il;
    expect_il = loads + store_hits + 4 * fills;
    conv = 4 * (loads + store_hits) + 4 * fills;
    $display("%s: loads=%0d stores=%0d store_hits=%0d refills=%0d", name, loads, stores, store_hits, fills);
    $display("%s: subarray activations=%0d (one-subarray access) vs %0d (whole-row access): %0d%% fewer",
             name, act_total, conv, 100 - (100 * act_total) / conv);
    $display("%s: per-subarray map  row0: %0d %0d %0d %0d   row1: %0d %0d %0d %0d", name,
             act[0], act[1], act[2], act[3], act[4], act[5], act[6], act[7]);
    checks++;
    if (act_total != expect_il) begin failures++; $display("FAIL %s activations %0d, expected %0d", name, act_total, expect_il); end
    checks++;
    if (act_total >= conv) begin failures++; $display("FAIL %s no activity reduction", name); end
    for (int i = 0; i < 8; i++) act[i] = 0;
    act_total = 0; loads = 0; stores = 0; store_hits = 0; fills = 0;
  endtask

  initial begin
    req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    for (int i = 0; i < 8; i++) act[i] = 0;
    act_total = 0; loads = 0; stores = 0; store_hits = 0; fills = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // Integer-like: scattered accesses over 256 KB.
    for (int t = 0; t < 6000; t++)
      access($urandom_range(9) < 3, {14'h0001, 15'($urandom), 3'b000});
    report("int");

    // Floating-point-like: c[i] = a[i] + b[i] over 3 x 24 KB arrays, twice.
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 3072; i++) begin
        access(0, 32'h0010_0000 + 32'(8 * i));
        access(0, 32'h0010_8000 + 32'(8 * i));
        access(1, 32'h0011_0000 + 32'(8 * i));
      end
    report("fp");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
