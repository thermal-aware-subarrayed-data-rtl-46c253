// tb_decay_controller: cache decay at the default 8192-cycle interval over
// 1024 lines. Lines are filled, some are touched periodically, and the test
// checks: a filled line is on; an untouched line goes off no earlier than
// 3/4 and no later than one full interval after its last touch (measured
// in cycles by the bench); a regularly touched line never goes off;
// decay_count counts the lines switched off; with decay_en low nothing
// decays.
module tb_decay_controller;
  localparam int LINES = 1024, INTERVAL = 8192;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic decay_en, touch, fill;
  logic [9:0] touch_line, fill_line;
  logic [LINES-1:0] line_on, prev_on;
  logic [31:0] decay_count;
  longint cycle = 0;
  longint last_use [LINES];
  int off_events = 0;

  decay_controller #(.LINES(LINES), .DECAY_INTERVAL(INTERVAL)) dut (
    .clk(clk), .rst_n(rst_n), .decay_en(decay_en), .touch(touch), .touch_line(touch_line),
    .fill(fill), .fill_line(fill_line), .line_on(line_on), .decay_count(decay_count));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Every line that turns off must have been idle for between 3/4 and all
  // of the interval.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    prev_on <= line_on;
    if (rst_n) for (int l = 0; l < LINES; l++)
      if (prev_on[l] && !line_on[l]) begin
        longint idle;
        idle = cycle - last_use[l];
        off_events++;
        checks++;
        if (idle < 3 * INTERVAL / 4 || idle > INTERVAL + 1) begin
          failures++; $display("FAIL line %0d off after %0d idle cycles", l, idle);
        end
      end
  end

  task automatic use_line(input bit is_fill, input int l);
    touch = !is_fill; fill = is_fill; touch_line = 10'(l); fill_line = 10'(l);
    @(posedge clk); last_use[l] = cycle; #1;
    touch = 0; fill = 0;
  endtask

  initial begin
    decay_en = 1; touch = 0; fill = 0; touch_line = 0; fill_line = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (line_on !== '0) begin failures++; $display("FAIL lines on after reset"); end
    rst_n = 1;
    // Fill lines 0..63.
    for (int l = 0; l < 64; l++) begin
      use_line(1, l);
      checks++; if (!line_on[l]) begin failures++; $display("FAIL line %0d not on after fill", l); end
    end
    // Keep lines 0..7 in use every 1000 cycles for 5 intervals; the rest idle.
    for (int r = 0; r < 5 * INTERVAL / 1000; r++) begin
      for (int l = 0; l < 8; l++) use_line(0, l);
      repeat (1000 - 8) @(posedge clk);
      #1;
    end
    checks++; if (line_on[7:0] !== 8'hff) begin failures++; $display("FAIL used lines decayed: %b", line_on[7:0]); end
    checks++; if (line_on[63:8] !== '0) begin failures++; $display("FAIL idle lines still on"); end
    checks++; if (decay_count !== 32'd56) begin failures++; $display("FAIL decay_count=%0d exp 56", decay_count); end
    checks++; if (off_events != 56) begin failures++; $display("FAIL off events %0d", off_events); end
    // Decay disabled: refill a line and leave it alone for three intervals.
    decay_en = 0;
    use_line(1, 100);
    repeat (3 * INTERVAL) @(posedge clk);
    #1;
    checks++; if (!line_on[100] || line_on[7:0] !== 8'hff) begin failures++; $display("FAIL decayed while disabled"); end
    // Enabled again: everything now idle goes off within one interval.
    decay_en = 1;
    // Idle time counts from here: counters held while decay was off.
    last_use[100] = cycle; for (int l = 0; l < 8; l++) last_use[l] = cycle;
    repeat (INTERVAL + 2) @(posedge clk);
    #1;
    checks++; if (line_on !== '0) begin failures++; $display("FAIL lines still on after re-enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
