// Testbench for bg_subtraction: random LL pairs and thresholds (including
// negative thresholds and thresholds equal to the difference) are applied
// and the registered object is compared with |LL2-LL1| when it is strictly
// above the threshold, else 0.
module tb_bg_subtraction;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [9:0] ll1 = '0, ll2 = '0;
  logic signed [14:0] threshold = '0;
  logic out_valid;
  logic [9:0] object;
  int checks = 0, failures = 0, n_pass = 0, n_zero = 0;

  bg_subtraction dut (.clk(clk), .rst(rst), .in_valid(in_valid), .ll1(ll1), .ll2(ll2),
                      .threshold(threshold), .out_valid(out_valid), .object(object));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic int a = int'($urandom_range(0, 572)) - 159;
      automatic int b = int'($urandom_range(0, 572)) - 159;
      automatic int d = (a > b) ? a - b : b - a;
      automatic int t, e;
      case ($urandom_range(0, 3))
        0:       t = d;                                   // equal: no object
        1:       t = d - 1;                               // just below
        2:       t = -int'($urandom_range(0, 200));
        default: t = int'($urandom_range(0, 8500));
      endcase
      e = (d > t) ? d : 0;
      if (e != 0) n_pass++; else n_zero++;
      @(negedge clk);
      in_valid = 1;
      ll1 = 10'(a);
      ll2 = 10'(b);
      threshold = 15'(t);
      @(negedge clk);
      in_valid = 0;
      ll1 = 10'($urandom);
      checks++;
      if (!out_valid || int'(object) != e) begin
        failures++;
        $display("LL1=%0d LL2=%0d AT=%0d: got %0d (valid %0b) expected %0d", a, b, t, object, out_valid, e);
      end
    end
    checks++;
    if (n_pass == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
