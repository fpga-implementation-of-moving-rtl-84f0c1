// Testbench for dwt_1d_lpf: a random signed stream with random idle cycles is
// filtered and every L-band output is compared with
// floor((-x[2k+1] + 2x[2k] + 6x[2k-1] + 2x[2k-2] - x[2k-3]) / 8). Checks
// that exactly one output comes per two samples, one clock after the odd
// sample, and that rst restarts the delay line and the divider phase.
module tb_dwt_1d_lpf;
  import tb_ref_pkg::*;
  localparam int W = 10, L = 200;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W-1:0] x = '0, lpf_out;
  logic clk_out;
  int checks = 0, failures = 0;
  img_t xs, ys;
  int nout = 0, last_take = -10, cyc = 0;

  dwt_1d_lpf #(.W(W)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
                           .clk_out(clk_out), .lpf_out(lpf_out));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid) last_take <= cyc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && clk_out) begin
    checks++;
    if (int'(lpf_out) != ys[nout]) begin
      failures++;
      $display("output %0d: got %0d expected %0d", nout, lpf_out, ys[nout]);
    end
    checks++;
    if (cyc != last_take + 1) begin
      failures++;
      $display("output %0d came %0d clocks after its sample", nout, cyc - last_take);
    end
    nout++;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      xs = new[L];
      foreach (xs[i]) xs[i] = ($urandom_range(0, 1) != 0) ? int'($urandom_range(0, 413))
                                                    : -int'($urandom_range(0, 159));
      ys = lpf(xs);
      nout = 0;
      @(negedge clk);
      rst = 1;
      @(negedge clk);
      rst = 0;
      for (int i = 0; i < L; ) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 2) != 0);
        x = W'(xs[i]);
        if (in_valid) i++;
      end
      @(negedge clk);
      in_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (nout != L/2) begin
        failures++;
        $display("run %0d: %0d outputs, expected %0d", run, nout, L/2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
