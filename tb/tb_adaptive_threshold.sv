// Testbench for adaptive_threshold (N=64, SHIFT=log2(8N)=9): random image
// pairs are streamed with gaps; S must equal floor(sum (A-B)^2 / 8N) and be
// loaded three clocks after the N-th pair; threshold must equal S + LL2 for
// random LL2 values. Three frames check that the accumulator restarts; one
// frame uses the extreme difference 255 everywhere.
module tb_adaptive_threshold;
  import tb_ref_pkg::*;
  localparam int N = 64, SHIFT = 9;
  logic clk = 0, rst = 1, px_valid = 0;
  logic [7:0] image1 = '0, image2 = '0;
  logic signed [9:0] ll2 = '0;
  logic [12:0] s_value;
  logic s_valid;
  logic signed [14:0] threshold;
  int checks = 0, failures = 0;
  img_t a, b;
  int cyc = 0, s_cyc = 0, last_cyc = 0, n_s = 0;

  adaptive_threshold #(.N(N), .SHIFT(SHIFT)) dut (
    .clk(clk), .rst(rst), .px_valid(px_valid), .image1(image1), .image2(image2),
    .ll2(ll2), .s_value(s_value), .s_valid(s_valid), .threshold(threshold));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (px_valid) last_cyc <= cyc;
  end
  always @(negedge clk) if (s_valid) begin
    s_cyc = cyc;
    n_s++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int frame = 0; frame < 3; frame++) begin
      automatic int exp_s;
      a = new[N];
      b = new[N];
      foreach (a[i]) begin
        a[i] = (frame == 1) ? 255 : int'($urandom_range(0, 255));
        b[i] = (frame == 1) ? 0   : int'($urandom_range(0, 255));
      end
      exp_s = tb_ref_pkg::s_value(a, b, SHIFT);
      for (int i = 0; i < N; ) begin
        @(negedge clk);
        px_valid = $urandom_range(0, 2) != 0;
        image1 = 8'(a[i]);
        image2 = 8'(b[i]);
        if (px_valid) i++;
      end
      @(negedge clk);
      px_valid = 0;
      repeat (4) @(negedge clk);
      check(n_s == frame + 1, "S not loaded exactly once per frame");
      check(int'(s_value) == exp_s, $sformatf("S %0d expected %0d", s_value, exp_s));
      check(s_cyc - last_cyc == 3, $sformatf("S loaded %0d clocks after the last pixel", s_cyc - last_cyc));
      for (int k = 0; k < 20; k++) begin
        automatic int l = int'($urandom_range(0, 572)) - 159;
        ll2 = 10'(l);
        #1;
        check(int'(threshold) == exp_s + l,
              $sformatf("threshold %0d expected %0d", threshold, exp_s + l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
