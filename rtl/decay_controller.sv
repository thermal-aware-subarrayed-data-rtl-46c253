// decay_controller: cache-decay leakage control for the cache lines.
//
// Each line has a supply switch (gated-Vdd) and a small counter. A global
// counter produces a tick every DECAY_INTERVAL / 2**CNT_W cycles; every tick
// advances the counter of each powered line, and a line whose counter is
// already at its maximum when a tick arrives is switched off. Any access to a
// line (touch) or a refill (fill, which also switches it on) clears its
// counter. With the default 2-bit counters a line that is not used is
// switched off between 3/4 and all of DECAY_INTERVAL cycles after its last
// use. Switching off loses the data, so line_on doubles as the valid bit.
// The interval is the one evaluated for this cache; the two-level counter
// arrangement is the usual hierarchical decay design and is this design's
// choice. When decay_en is low lines stay on and counters hold.
// Interface: touch/touch_line and fill/fill_line are sampled at the clock
// edge; line_on changes at the edge. Reset switches every line off.
// decay_count counts lines switched off by decay.
module decay_controller #(
  parameter int unsigned LINES          = 1024,
  parameter int unsigned DECAY_INTERVAL = dcache_pkg::DECAY_INTERVAL,
  parameter int unsigned CNT_W          = 2,
  localparam int unsigned TICK_PERIOD = DECAY_INTERVAL >> CNT_W,
  localparam int unsigned LINE_W      = $clog2(LINES),
  localparam int unsigned GCNT_W      = (TICK_PERIOD > 1) ? $clog2(TICK_PERIOD) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               decay_en,
  input  logic               touch,
  input  logic [LINE_W-1:0]  touch_line,
  input  logic               fill,
  input  logic [LINE_W-1:0]  fill_line,
  output logic [LINES-1:0]   line_on,
  output logic [31:0]        decay_count
);
  logic [GCNT_W-1:0]            gcnt;
  logic                         tick;
  logic [LINES-1:0][CNT_W-1:0]  lcnt;
  logic [LINES-1:0]             expire;

  assign tick = decay_en && (gcnt == GCNT_W'(TICK_PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)          gcnt <= '0;
    else if (!decay_en)  gcnt <= '0;
    else if (tick)       gcnt <= '0;
    else                 gcnt <= gcnt + 1'b1;
  end

  always_comb
    for (int unsigned l = 0; l < LINES; l++)
      expire[l] = tick && line_on[l] && (&lcnt[l])
                  && !(touch && touch_line == LINE_W'(l))
                  && !(fill && fill_line == LINE_W'(l));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      line_on     <= '0;
      lcnt        <= '0;
      decay_count <= '0;
    end else begin
      for (int unsigned l = 0; l < LINES; l++) begin
        if ((touch && touch_line == LINE_W'(l)) || (fill && fill_line == LINE_W'(l))) begin
          lcnt[l] <= '0;
          if (fill && fill_line == LINE_W'(l)) line_on[l] <= 1'b1;
        end else if (expire[l]) begin
          line_on[l] <= 1'b0;
          lcnt[l]    <= '0;
        end else if (tick && line_on[l]) begin
          lcnt[l] <= lcnt[l] + 1'b1;
        end
      end
      decay_count <= decay_count + 32'($countones(expire));
    end
  end
endmodule
