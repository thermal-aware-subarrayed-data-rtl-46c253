// tb_dcache_top: end-to-end test of the way-interleaved data cache at its
// default size (64 KB, 2 ways, 64-byte lines, 2x4 subarrays, 8192-cycle
// decay interval).
//
// The next level is a behavioural memory with a 12-cycle line read latency
// and random back-pressure; its contents are the reference for every load
// (the cache writes stores through, so memory is always current). A small
// cache model (tags and most-recently-used way per set, validity taken from
// the line power state) predicts hit or miss for each access.
//
// Checked on every access: load data; hit/miss; the 2-cycle load hit
// latency; that a load enables exactly the subarray at (upper index bit,
// upper offset bits), a store lookup enables none, a store hit writes one
// subarray and a refill writes the four subarrays of one row. Counted, and
// each required at least once: load hit, load miss with refill, store hit,
// store miss, eviction of a valid line, back-to-back hit streaming, decay of
// lines, a miss caused by decay, retention with decay disabled, and next
// level back-pressure.
module tb_dcache_top;
  localparam int SETS = 512, LB = 64, L2_LAT = 12;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic decay_en;
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
  logic [SETS*2-1:0] line_powered;
  logic [31:0] decay_count;

  dcache_top dut (.*);

  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_load_hit, n_load_miss, n_store_hit, n_store_miss, n_evict, n_stream,
      n_decay_miss, n_retained, n_backpressure, n_fill_rows, n_single_sub;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- next-level memory model ----------------
  logic [7:0] mem [int unsigned];
  function automatic logic [7:0] mem_rd(input logic [31:0] a);
    if (mem.exists(a)) return mem[a];
    return 8'(a ^ (a >> 7) * 29 ^ (a >> 15) * 113);
  endfunction

  int l2_cnt = 0;
  logic [31:0] l2_addr;
  always @(negedge clk) begin
    // Ready for the coming clock edge, then the transfer it completes.
    mem_req_ready = ($urandom_range(3) != 0);
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_write) begin
        for (int b = 0; b < 8; b++) if (mem_req_be[b]) mem[mem_req_addr + b] = mem_req_wdata[8*b +: 8];
      end else begin
        checks++;
        if (mem_req_addr[5:0] != 0) begin failures++; $display("FAIL unaligned line read %h", mem_req_addr); end
        l2_addr = mem_req_addr; l2_cnt = L2_LAT;
      end
    end
    if (mem_req_valid && !mem_req_ready) n_backpressure++;
    mem_resp_valid = 0;
    if (l2_cnt > 0) begin
      l2_cnt--;
      if (l2_cnt == 0) begin
        mem_resp_valid = 1;
        for (int b = 0; b < LB; b++) mem_resp_data[8*b +: 8] = mem_rd(l2_addr + b);
      end
    end
  end

  // ---------------- subarray activity monitor ----------------
  // Sampled shortly after the falling edge, once the bench's inputs settled.
  always @(negedge clk) if (rst_n) begin
    #2;
    if (mem_resp_valid) begin
      checks++;
      if (sub_active !== 8'h0f && sub_active !== 8'hf0) begin failures++; $display("FAIL refill activity %b", sub_active); end
      else n_fill_rows++;
    end else if (req_valid && req_ready) begin
      checks++;
      if (req_write) begin
        if (sub_active !== 8'h00) begin failures++; $display("FAIL store lookup enabled subarrays %b", sub_active); end
      end else begin
        if (sub_active !== 8'(1 << (4 * req_addr[14] + req_addr[5:4]))) begin
          failures++; $display("FAIL load %h enabled %b", req_addr, sub_active);
        end else n_single_sub++;
      end
    end else begin
      checks++;
      if ($countones(sub_active) > 1) begin failures++; $display("FAIL %b subarrays active", sub_active); end
    end
  end

  // ---------------- reference cache model ----------------
  logic [16:0] mtag [SETS][2];
  bit          mmru [SETS];

  function automatic logic [63:0] gold_word(input logic [31:0] a);
    logic [63:0] w;
    for (int b = 0; b < 8; b++) w[8*b +: 8] = mem_rd({a[31:3], 3'b0} + b);
    return w;
  endfunction

  // One access. Returns the load data; checks hit/miss, data and latency.
  task automatic access(input bit wr, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd);
    longint c_req, c_resp;
    int set; logic [16:0] tag;
    bit v0, v1, exp_hit; int hway; bit decayed_match;
    set = int'(a[14:6]); tag = a[31:15];
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = wd; req_be = be;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    c_req = cycle;
    @(negedge clk);
    req_valid = 0;
    // Lookup cycle: take the line power state the tag match sees now.
    v0 = line_powered[2*set]; v1 = line_powered[2*set + 1];
    exp_hit = (v0 && mtag[set][0] == tag) || (v1 && mtag[set][1] == tag);
    hway = (v1 && mtag[set][1] == tag) ? 1 : 0;
    decayed_match = (!v0 && mtag[set][0] == tag) || (!v1 && mtag[set][1] == tag);
    while (!resp_valid) begin @(negedge clk); end
    c_resp = cycle;
    rd = resp_rdata;
    checks++;
    if (resp_hit !== exp_hit) begin failures++; $display("FAIL %s %h hit=%b exp=%b", wr ? "store" : "load", a, resp_hit, exp_hit); end
    if (!wr) begin
      checks++;
      if (rd !== gold_word(a)) begin failures++; $display("FAIL load %h got %h exp %h", a, rd, gold_word(a)); end
      if (exp_hit) begin
        checks++;
        if (c_resp - c_req != 2) begin failures++; $display("FAIL load hit latency %0d", c_resp - c_req); end
        n_load_hit++; mmru[set] = 1'(hway);
      end else begin
        int victim;
        n_load_miss++;
        if (decayed_match) n_decay_miss++;
        if (!v0) victim = 0; else if (!v1) victim = 1; else begin victim = !mmru[set]; n_evict++; end
        mtag[set][victim] = tag; mmru[set] = 1'(victim);
      end
    end else begin
      if (exp_hit) begin n_store_hit++; mmru[set] = 1'(hway); end
      else n_store_miss++;
    end
  endtask

  task automatic load(input logic [31:0] a, output logic [63:0] rd);
    access(0, a, '0, '0, rd);
  endtask

  task automatic store(input logic [31:0] a, input logic [63:0] wd, input logic [7:0] be);
    logic [63:0] dummy;
    access(1, a, wd, be, dummy);
  endtask

  // Back-to-back loads to resident lines: one accepted per cycle.
  task automatic stream(input logic [31:0] base, input int n);
    int got; longint c_first, c_last;
    logic [31:0] exp_addr [$];
    got = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          req_valid = 1; req_write = 0; req_addr = base + 32'(8 * i); req_be = '0;
          #1;
          while (!req_ready) begin @(negedge clk); #1; end
          if (i == 0) c_first = cycle;
          exp_addr.push_back(req_addr);
        end
        @(negedge clk); req_valid = 0;
      end
      begin
        while (got < n) begin
          @(negedge clk);
          if (resp_valid) begin
            logic [31:0] ea;
            ea = exp_addr.pop_front();
            checks++;
            if (resp_rdata !== gold_word(ea) || !resp_hit) begin failures++; $display("FAIL stream %h got %h", ea, resp_rdata); end
            got++; c_last = cycle;
          end
        end
      end
    join
    checks++;
    if (c_last - c_first != n + 1) begin failures++; $display("FAIL stream of %0d took %0d cycles", n, c_last - c_first); end
    else n_stream++;
  endtask

  function automatic logic [31:0] mk(input int tag, input int set, input int off);
    return {15'(tag), 2'b0, 9'(set), 6'(off)};
  endfunction

  logic [63:0] rd;
  initial begin
    for (int s = 0; s < SETS; s++) begin mtag[s][0] = '1; mtag[s][1] = '1; mmru[s] = 0; end
    decay_en = 0; req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // Directed: miss, hit, store hit, read back.
    load(mk(1, 5, 8), rd);
    load(mk(1, 5, 8), rd);
    load(mk(1, 5, 48), rd);
    store(mk(1, 5, 16), 64'h0123_4567_89ab_cdef, 8'hff);
    load(mk(1, 5, 16), rd);
    store(mk(1, 5, 40), 64'hffee_ddcc_bbaa_9988, 8'h3c);
    load(mk(1, 5, 40), rd);
    // Second way, then eviction of the least recently used line.
    load(mk(2, 5, 0), rd);
    load(mk(1, 5, 0), rd);
    load(mk(3, 5, 0), rd);   // evicts tag 2
    load(mk(2, 5, 0), rd);   // miss again, evicts tag 1
    load(mk(3, 5, 56), rd);  // hit
    // Store miss: written through, not allocated.
    store(mk(9, 300, 24), 64'hdead_beef_cafe_f00d, 8'hff);
    load(mk(9, 300, 24), rd);
    load(mk(9, 300, 24), rd);
    // Lines in both subarray rows, then stream hits across all columns.
    load(mk(4, 260, 0), rd);
    for (int o = 0; o < 64; o += 16) load(mk(4, 261, o), rd);
    stream(mk(4, 260, 0), 8);
    stream(mk(3, 5, 0), 8);

    // Decay disabled: a line survives three decay intervals.
    repeat (3 * 8192) @(posedge clk);
    load(mk(4, 260, 8), rd);
    if (resp_hit) n_retained++;

    // Decay enabled: idle lines are switched off and miss afterwards.
    decay_en = 1;
    repeat (8192 + 16) @(posedge clk);
    checks++;
    if (line_powered !== '0) begin failures++; $display("FAIL lines still powered after a decay interval"); end
    checks++;
    if (decay_count == 0) begin failures++; $display("FAIL decay_count is zero"); end
    load(mk(4, 260, 8), rd);

    // Random traffic over a small footprint, with idle gaps that let lines decay.
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] a;
      a = mk($urandom_range(2) + 10, $urandom_range(7) * 65, $urandom_range(7) * 8);
      if ($urandom_range(3) == 0) store(a, {$urandom, $urandom}, 8'($urandom));
      else load(a, rd);
      if ($urandom_range(400) == 0) repeat ($urandom_range(9000)) @(posedge clk);
    end

    $display("load_hit=%0d load_miss=%0d store_hit=%0d store_miss=%0d evict=%0d stream=%0d",
             n_load_hit, n_load_miss, n_store_hit, n_store_miss, n_evict, n_stream);
    $display("single_subarray=%0d row_fills=%0d decayed_lines=%0d decay_miss=%0d retained=%0d backpressure=%0d",
             n_single_sub, n_fill_rows, decay_count, n_decay_miss, n_retained, n_backpressure);
    checks += 11;
    if (n_load_hit == 0)    begin failures++; $display("FAIL no load hit"); end
    if (n_load_miss == 0)   begin failures++; $display("FAIL no load miss"); end
    if (n_store_hit == 0)   begin failures++; $display("FAIL no store hit"); end
    if (n_store_miss == 0)  begin failures++; $display("FAIL no store miss"); end
    if (n_evict == 0)       begin failures++; $display("FAIL no eviction"); end
    if (n_stream == 0)      begin failures++; $display("FAIL no hit streaming"); end
    if (n_decay_miss == 0)  begin failures++; $display("FAIL no miss caused by decay"); end
    if (decay_count == 0)   begin failures++; $display("FAIL no decay"); end
    if (n_retained == 0)    begin failures++; $display("FAIL no retention with decay off"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no next-level back-pressure"); end
    if (n_fill_rows == 0 || n_single_sub == 0) begin failures++; $display("FAIL no row fill / single subarray access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
