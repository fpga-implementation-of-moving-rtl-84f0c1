// Testbench for matching_unit (TOL=10): frames of random object values,
// concentrated around the tolerance, are counted; the final count must equal
// the number of values <= 10 and match must be (count >= global threshold).
// Global thresholds equal to the count, one above and one below are used.
module tb_matching_unit;
  localparam int CNT_W = 15, L = 100;
  logic clk = 0, rst = 1, obj_valid = 0, obj_last = 0;
  logic [9:0] obj = '0;
  logic [CNT_W-1:0] gth = '0, count;
  logic match, match_valid;
  int checks = 0, failures = 0, n_match = 0, n_unmatch = 0;

  matching_unit #(.TOL(10), .CNT_W(CNT_W)) dut (
    .clk(clk), .rst(rst), .obj_valid(obj_valid), .obj(obj), .obj_last(obj_last),
    .global_threshold(gth), .match(match), .match_valid(match_valid), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int frame = 0; frame < 12; frame++) begin
      automatic int vals[L];
      automatic int exp_cnt = 0;
      foreach (vals[i]) begin
        vals[i] = ($urandom_range(0, 1) != 0) ? int'($urandom_range(0, 20)) : int'($urandom_range(0, 1023));
        if (vals[i] <= 10) exp_cnt++;
      end
      case (frame % 3)
        0: gth = CNT_W'(exp_cnt);
        1: gth = CNT_W'(exp_cnt + 1);
        default: gth = CNT_W'(exp_cnt - 1);
      endcase
      for (int i = 0; i < L; ) begin
        @(negedge clk);
        obj_valid = $urandom_range(0, 3) != 0;
        obj = 10'(vals[i]);
        obj_last = (i == L-1);
        #1;
        checks++;
        if (match_valid) begin
          failures++;
          $display("match_valid inside a frame");
        end
        if (obj_valid) i++;
      end
      @(negedge clk);
      obj_valid = 0;
      obj_last = 0;
      checks++;
      if (!match_valid || int'(count) != exp_cnt || match != (exp_cnt >= int'(gth))) begin
        failures++;
        $display("frame %0d: valid %0b count %0d exp %0d match %0b gth %0d", frame,
                 match_valid, count, exp_cnt, match, gth);
      end
      if (match) n_match++; else n_unmatch++;
    end
    checks++;
    if (n_match == 0 || n_unmatch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
