// Testbench for window3x3: shifts a known sequence through the chain (with
// idle cycles in between) and checks that every tap a11..a33 shows the pixel
// at its distance back in the stream: a33=0, a32=1, a31=2, a23=W, a22=W+1,
// a21=W+2, a13=2W, a12=2W+1, a11=2W+2 samples.
module tb_window3x3;
  localparam int W  = 7;
  localparam int DW = 8;
  logic clk = 0, shift = 0;
  logic [DW-1:0] din = '0;
  logic [8:0][DW-1:0] win;
  int checks = 0, failures = 0;
  int hist[$];
  int ofs[9] = '{2*W+2, 2*W+1, 2*W, W+2, W+1, W, 2, 1, 0};

  window3x3 #(.IMG_W(W), .DW(DW)) dut (.clk(clk), .shift(shift), .din(din), .win(win));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6*W; n++) begin
      @(negedge clk);
      shift = 1'b1;
      din   = DW'($urandom);
      hist.push_front(int'(din));
      @(negedge clk);
      shift = 1'b0;
      din   = DW'($urandom);        // must be ignored while shift is low
      if (hist.size() > 2*W+2) begin
        for (int t = 0; t < 9; t++) begin
          checks++;
          if (int'(win[t]) != hist[ofs[t]]) begin
            failures++;
            $display("tap %0d: got %0d expected %0d", t, win[t], hist[ofs[t]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
