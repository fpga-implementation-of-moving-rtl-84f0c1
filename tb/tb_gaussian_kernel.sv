// Testbench for gaussian_kernel: random and extreme 3x3 windows are applied
// and the registered result is compared with (sum of mask * pixel) / 16 for
// the mask [1 2 1; 2 4 2; 1 2 1]. Also checks that the output register holds
// its value while en is low and that the result appears one clock after en.
module tb_gaussian_kernel;
  localparam int DW = 8;
  logic clk = 0, en = 0;
  logic [8:0][DW-1:0] win = '0;
  logic [DW-1:0] gout;
  int checks = 0, failures = 0;
  int m[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};

  gaussian_kernel #(.DW(DW)) dut (.clk(clk), .en(en), .win(win), .gaussian_out(gout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic int s = 0;
      logic [DW-1:0] held;
      @(negedge clk);
      for (int t = 0; t < 9; t++) begin
        case (n)
          0:       win[t] = '1;
          1:       win[t] = '0;
          2:       win[t] = (t == 4) ? 8'd255 : 8'd0;
          default: win[t] = DW'($urandom);
        endcase
        s += m[t] * int'(win[t]);
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (int'(gout) != s / 16) begin
        failures++;
        $display("window %0d: got %0d expected %0d", n, gout, s / 16);
      end
      held = gout;
      for (int t = 0; t < 9; t++) win[t] = DW'($urandom);
      @(negedge clk);
      checks++;
      if (gout != held) begin
        failures++;
        $display("output changed with en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
