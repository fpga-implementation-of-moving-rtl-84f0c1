// End-to-end harness for face_object_detect_top, shared by the reduced-size
// and the full-size testbenches.
//
// Three frame pairs are streamed through the detector:
//   0: a dark, slightly noisy background (as in a face database with a dark
//      homogeneous background) and the same scene with a bright square
//      object added: the object must survive the adaptive threshold, and
//      with global_threshold = number of LL coefficients the frame is
//      "unmatched";
//   1: the same image on both inputs: every object coefficient is 0, S = 0
//      and the frame is "matched";
//   2: two unrelated random images.
// Every object coefficient, S, the match count and the decision are compared
// with tb_ref_pkg::detector. The harness also counts how often each
// mechanism of the design occurred (input back-pressure between frames,
// Gaussian end-of-frame flush, DWT column pass, coefficients passed and
// zeroed by the adaptive threshold, match and unmatch) and counts a failure
// for each one that never occurred. DEFAULTS=1 instantiates the detector
// with no parameter override (W and H must then be 256).
module tb_detect_harness #(
  parameter int W        = 16,
  parameter int H        = 16,
  parameter bit DEFAULTS = 1'b0,
  parameter bit GAPS     = 1'b1,
  parameter int WATCHDOG = 200000
);
  import tb_ref_pkg::*;
  localparam int N = W*H, NLL = N/4;
  localparam int CNT_W = $clog2(NLL + 1);

  logic clk = 0, rst = 1, pix_valid = 0;
  logic pix_ready, out_valid, rst_out, match, match_valid;
  logic [7:0] image_in = '0, image_ref = '0;
  logic [CNT_W-1:0] gth = CNT_W'(NLL), match_count;
  logic [9:0] image_out;
  logic [12:0] s_value;

  // Internal events, collected from whichever instance is built.
  logic ev_flush, ev_colpass, ev_obj_v;
  logic [9:0] ev_obj;

  if (DEFAULTS) begin : g_def
    face_object_detect_top dut (
      .clk(clk), .rst(rst), .pix_valid(pix_valid), .pix_ready(pix_ready),
      .image_in(image_in), .image_ref(image_ref), .global_threshold(gth),
      .image_out(image_out), .out_valid(out_valid), .rst_out(rst_out), .match(match),
      .match_valid(match_valid), .match_count(match_count), .s_value(s_value));
    assign ev_flush   = dut.u_gf_in.flushing;
    assign ev_colpass = dut.u_dwt_in.pass2;
    assign ev_obj_v   = dut.obj_v;
    assign ev_obj     = dut.object;
  end else begin : g_par
    face_object_detect_top #(.IMG_W(W), .IMG_H(H)) dut (
      .clk(clk), .rst(rst), .pix_valid(pix_valid), .pix_ready(pix_ready),
      .image_in(image_in), .image_ref(image_ref), .global_threshold(gth),
      .image_out(image_out), .out_valid(out_valid), .rst_out(rst_out), .match(match),
      .match_valid(match_valid), .match_count(match_count), .s_value(s_value));
    assign ev_flush   = dut.u_gf_in.flushing;
    assign ev_colpass = dut.u_dwt_in.pass2;
    assign ev_obj_v   = dut.obj_v;
    assign ev_obj     = dut.object;
  end

  int checks = 0, failures = 0;
  int n_backpressure = 0, n_flush = 0, n_colpass = 0, n_obj_pass = 0, n_obj_zero = 0;
  int n_match = 0, n_unmatch = 0;
  img_t a, b, exp_out;
  int exp_s, exp_cnt, nout = 0;
  int cyc = 0, frame_start = 0;

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s", msg);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (pix_valid && !pix_ready) n_backpressure++;
    if (ev_flush) n_flush++;
    if (ev_colpass) n_colpass++;
    if (ev_obj_v && ev_obj != 0) n_obj_pass++;
    if (ev_obj_v && ev_obj == 0) n_obj_zero++;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    check(int'(image_out) == exp_out[nout],
          $sformatf("object %0d: got %0d expected %0d", nout, image_out, exp_out[nout]));
    check(rst_out == (nout == NLL-1), $sformatf("rst_out wrong at %0d", nout));
    nout++;
  end

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int frame = 0; frame < 3; frame++) begin
      a = new[N];
      b = new[N];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          automatic int bg = 20 + (r + c) * 20 / (W + H) + int'($urandom_range(0, 6));
          automatic bit in_obj = (r >= H/2 && r < H/2 + H/8 && c >= W/4 && c < W/4 + W/8);
          case (frame)
            0: begin b[r*W+c] = bg; a[r*W+c] = in_obj ? clip(bg + 200) : bg; end
            1: begin b[r*W+c] = bg; a[r*W+c] = bg; end
            default: begin
              b[r*W+c] = int'($urandom_range(0, 255));
              a[r*W+c] = int'($urandom_range(0, 255));
            end
          endcase
        end
      detector(a, b, W, H, 10, exp_out, exp_s, exp_cnt);
      nout = 0;
      frame_start = cyc;
      for (int i = 0; i < N; ) begin
        @(negedge clk);
        pix_valid = GAPS ? ($urandom_range(0, 7) != 0) : 1'b1;
        image_in  = 8'(a[i]);
        image_ref = 8'(b[i]);
        #1;
        if (pix_valid && pix_ready) i++;
      end
      // Keep offering pixels: they must be refused until the frame is done.
      @(negedge clk);
      pix_valid = 1;
      while (!match_valid) @(negedge clk);
      pix_valid = 0;
      check(nout == NLL, $sformatf("frame %0d: %0d object outputs, expected %0d", frame, nout, NLL));
      check(int'(s_value) == exp_s, $sformatf("frame %0d: S %0d expected %0d", frame, s_value, exp_s));
      check(int'(match_count) == exp_cnt,
            $sformatf("frame %0d: count %0d expected %0d", frame, match_count, exp_cnt));
      check(match == (exp_cnt >= NLL), $sformatf("frame %0d: match %0b", frame, match));
      if (frame == 0) check(!match, "object frame matched");
      if (frame == 1) check(match && s_value == 0, "identical frame not matched");
      if (match) n_match++; else n_unmatch++;
      $display("frame %0d: S=%0d count=%0d/%0d match=%0b, %0d clocks", frame, s_value,
               match_count, NLL, match, cyc - frame_start);
    end
    check(n_backpressure > 0, "no back-pressure");
    check(n_flush > 0, "no Gaussian flush");
    check(n_colpass > 0, "no DWT column pass");
    check(n_obj_pass > 0, "no coefficient passed the adaptive threshold");
    check(n_obj_zero > 0, "no coefficient zeroed by the adaptive threshold");
    check(n_match > 0, "no match");
    check(n_unmatch > 0, "no unmatch");
    $display("events: backpressure=%0d flush=%0d colpass=%0d obj_pass=%0d obj_zero=%0d match=%0d unmatch=%0d",
             n_backpressure, n_flush, n_colpass, n_obj_pass, n_obj_zero, n_match, n_unmatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
