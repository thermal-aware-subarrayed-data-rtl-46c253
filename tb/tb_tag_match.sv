// tb_tag_match: random and directed checks of the tag comparators: a hit
// needs an equal tag and a valid line; the hit way is reported.
module tb_tag_match;
  int checks = 0, failures = 0;
  logic [1:0][16:0] rtags;
  logic [1:0] valid;
  logic [16:0] tag;
  logic hit, hit_way, exp_hit, exp_way;

  tag_match #(.WAYS(2), .TAG_W(17)) dut (.rtags(rtags), .valid(valid), .tag(tag), .hit(hit), .hit_way(hit_way));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      tag = 17'($urandom);
      rtags[0] = 17'($urandom); rtags[1] = 17'($urandom);
      case (t % 4)
        0: rtags[0] = tag;
        1: rtags[1] = tag;
        2: begin rtags[0] = tag ^ 17'(1 << (t % 17)); end
        default: ;
      endcase
      valid = 2'($urandom);
      exp_hit = 1'b0; exp_way = 1'b0;
      if (valid[0] && rtags[0] == tag) begin exp_hit = 1'b1; exp_way = 1'b0; end
      if (valid[1] && rtags[1] == tag) begin exp_hit = 1'b1; exp_way = 1'b1; end
      #1;
      checks++;
      if (hit !== exp_hit || (exp_hit && hit_way !== exp_way)) begin
        failures++; $display("FAIL tag=%h tags=%h/%h valid=%b hit=%b way=%b", tag, rtags[0], rtags[1], valid, hit, hit_way);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
