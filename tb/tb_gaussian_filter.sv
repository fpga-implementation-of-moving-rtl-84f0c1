// Testbench for gaussian_filter: three random frames (with random gaps in
// in_valid) go through an 9x6 filter; each output is compared with the
// zero-padded 3x3 Gaussian reference. Also checks one output per pixel,
// out_last on the last one, and that the end-of-frame flush holds in_ready
// low for exactly IMG_W+1 clocks.
module tb_gaussian_filter;
  import tb_ref_pkg::*;
  localparam int W = 9, H = 6, DW = 8, N = W*H;
  logic clk = 0, rst = 1, in_valid = 0;
  logic in_ready, out_valid, out_last;
  logic [DW-1:0] in_pix = '0, out_pix;
  int checks = 0, failures = 0;
  img_t img, exp_img;
  int nout = 0, frame = 0, flush_cycles = 0;

  gaussian_filter #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .out_valid(out_valid), .out_pix(out_pix), .out_last(out_last));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(posedge clk) if (!rst) begin
    if (!in_ready) flush_cycles++;
    if (out_valid) begin
      checks++;
      if (int'(out_pix) != exp_img[nout]) begin
        failures++;
        $display("frame %0d pixel %0d: got %0d expected %0d", frame, nout, out_pix, exp_img[nout]);
      end
      checks++;
      if (out_last != (nout == N-1)) begin
        failures++;
        $display("out_last wrong at pixel %0d", nout);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (frame = 0; frame < 3; frame++) begin
      img = new[N];
      foreach (img[i]) img[i] = (frame == 1) ? 255 : int'($urandom_range(0, 255));
      exp_img = gaussian(img, W, H);
      nout = 0;
      flush_cycles = 0;
      for (int i = 0; i < N; ) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        in_pix   = DW'(img[i]);
        #1;
        if (in_valid && in_ready) i++;
      end
      @(negedge clk);
      in_valid = 0;
      wait (nout == N);
      @(negedge clk);
      checks++;
      if (flush_cycles != W + 1) begin
        failures++;
        $display("flush took %0d clocks, expected %0d", flush_cycles, W + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
