// tb_data_array: the full 64 KB way-interleaved data array (2 rows x 4
// subarrays). A line model (set, way, 64 bytes) is filled with whole-line
// writes and updated with single-subarray byte writes; reads check both ways
// of the accessed column. Every access must enable exactly the subarray at
// (upper index bit, upper offset bits); a fill must enable the four
// subarrays of one row.
module tb_data_array;
  localparam int SETS = 512, LB = 64, SB = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en, fill, we, way;
  logic [8:0] index;
  logic [1:0] col;
  logic [SB-1:0] be;
  logic [3:0][8*SB-1:0] wdata;
  logic [3:0][1:0][8*SB-1:0] col_rdata;
  logic [7:0] sub_active;
  logic [7:0] model [SETS][2][LB];

  data_array dut (
    .clk(clk), .en(en), .fill(fill), .we(we), .index(index), .col(col), .way(way),
    .be(be), .wdata(wdata), .col_rdata(col_rdata), .sub_active(sub_active));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] one_sub(input int s, input int c);
    return 8'(1 << ((s / 256) * 4 + c));
  endfunction

  task automatic do_fill(input int s, input int w);
    en = 1; fill = 1; we = 1; index = 9'(s); way = 1'(w); be = '1; col = 2'($urandom);
    for (int b = 0; b < LB; b++) begin
      model[s][w][b] = 8'($urandom);
      wdata[b / SB][8*(b % SB) +: 8] = model[s][w][b];
    end
    #1;
    checks++;
    if (sub_active !== 8'(4'hf << (4 * (s / 256)))) begin failures++; $display("FAIL fill set=%0d active=%b", s, sub_active); end
    @(posedge clk); #1;
    en = 0; fill = 0; we = 0;
  endtask

  task automatic do_read(input int s, input int c);
    logic [8*SB-1:0] exp;
    en = 1; fill = 0; we = 0; index = 9'(s); col = 2'(c);
    #1;
    checks++;
    if (sub_active !== one_sub(s, c)) begin failures++; $display("FAIL read set=%0d col=%0d active=%b", s, c, sub_active); end
    @(posedge clk); #1;
    en = 0;
    for (int w = 0; w < 2; w++) begin
      for (int b = 0; b < SB; b++) exp[8*b +: 8] = model[s][w][c*SB + b];
      checks++;
      if (col_rdata[c][w] !== exp) begin failures++; $display("FAIL data set=%0d col=%0d way=%0d got=%h exp=%h", s, c, w, col_rdata[c][w], exp); end
    end
  endtask

  initial begin
    en = 0; fill = 0; we = 0; index = 0; col = 0; way = 0; be = 0; wdata = '0;
    @(posedge clk); #1;
    checks++; if (sub_active !== 8'b0) begin failures++; $display("FAIL idle subarrays active"); end
    for (int s = 0; s < SETS; s++) for (int w = 0; w < 2; w++) do_fill(s, w);
    for (int t = 0; t < 3000; t++) begin
      int s, c;
      s = $urandom_range(SETS - 1); c = $urandom_range(3);
      case ($urandom_range(3))
        0: do_fill(s, $urandom_range(1));
        1: begin
          en = 1; fill = 0; we = 1; index = 9'(s); col = 2'(c); way = 1'($urandom);
          be = SB'($urandom);
          for (int cc = 0; cc < 4; cc++) wdata[cc] = {$urandom, $urandom, $urandom, $urandom};
          for (int b = 0; b < SB; b++) if (be[b]) model[s][way][c*SB + b] = wdata[c][8*b +: 8];
          #1;
          checks++;
          if (sub_active !== one_sub(s, c)) begin failures++; $display("FAIL write set=%0d col=%0d active=%b", s, c, sub_active); end
          @(posedge clk); #1;
          en = 0; we = 0;
        end
        default: do_read(s, c);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
