// Testbench for dwt_2d_ll (8x6 image): random frames with random input gaps
// are transformed and the LL outputs are compared, in order, with the
// reference (row pass over the raster image, column pass over the L band,
// column-major LL). Checks in_ready is low during the column pass, that the
// column pass takes IMG_W*IMG_H/2 clocks of memory reads (LL outputs end a
// fixed distance after the last pixel), and rst_out on the last output.
module tb_dwt_2d_ll;
  import tb_ref_pkg::*;
  localparam int W = 8, H = 6, N = W*H, NLL = N/4;
  logic clk = 0, rst = 1, in_valid = 0;
  logic in_ready, ll_valid, rst_out;
  logic [7:0] in_pix = '0;
  logic signed [9:0] ll_band;
  int checks = 0, failures = 0;
  img_t img, exp_ll;
  int nout = 0, cyc = 0, last_in = 0, last_out = 0;

  dwt_2d_ll #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .ll_valid(ll_valid), .ll_band(ll_band), .rst_out(rst_out));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid && in_ready) last_in <= cyc;
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

  always @(negedge clk) if (!rst && ll_valid) begin
    check(int'(ll_band) == exp_ll[nout],
          $sformatf("LL %0d: got %0d expected %0d", nout, ll_band, exp_ll[nout]));
    check(rst_out == (nout == NLL-1), "rst_out wrong");
    nout++;
    last_out = cyc;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int frame = 0; frame < 3; frame++) begin
      img = new[N];
      foreach (img[i]) img[i] = (frame == 2) ? ((i % 2 != 0) ? 255 : 0) : int'($urandom_range(0, 255));
      exp_ll = tb_ref_pkg::ll_band(img, W, H);
      nout = 0;
      for (int i = 0; i < N; ) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        in_pix = 8'(img[i]);
        #1;
        if (in_valid) check(in_ready, "in_ready low during the row pass");
        if (in_valid && in_ready) i++;
      end
      @(negedge clk);
      in_valid = 0;
      // Column pass: input must be refused until the frame is finished.
      while (nout < NLL) begin
        check(!in_ready, "in_ready high during the column pass");
        @(negedge clk);
      end
      // last pixel -> L out (1) -> write/switch (1) -> N/2 reads -> read reg (1)
      check(last_out - last_in == N/2 + 3,
            $sformatf("frame took %0d clocks after the last pixel, expected %0d",
                      last_out - last_in, N/2 + 3));
      repeat (3) @(negedge clk);
      check(in_ready, "in_ready not back after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
