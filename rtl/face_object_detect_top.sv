// Moving-object and face detector with an adaptive threshold.
//
// Two images of the same scene are compared in the wavelet domain. Each is
// smoothed by a 3x3 Gaussian filter and reduced by a one-level 2D CDF 5/3
// DWT to its LL band (a quarter of the pixels). The LL band of the actual or
// test image (LL1) is subtracted from that of the background or database
// image (LL2); a difference survives only where it is above an adaptive
// threshold AT = S + LL2, where S is the mean squared difference of the two
// filtered images divided by 8. The surviving object coefficients are
// smoothed again by a Gaussian filter and leave as image_out (moving-object
// detection). For face detection the same object stream goes to a matching
// unit that counts coefficients at or below a tolerance (TOL = 10) and
// declares a match when the count reaches global_threshold. The block
// structure and the wiring between the blocks follow the source design; the
// frame flow control below is this design's own.
//
// Interface: one frame pair (IMG_W x IMG_H, raster order, one pixel of each
// image per clock) is taken on image_in/image_ref while pix_valid &&
// pix_ready. pix_ready then stays low until the frame has left the pipeline,
// because the 2D-DWT needs a second pass over its memory. image_out/out_valid
// carry the (IMG_W/2) x (IMG_H/2) filtered object in column-major order
// (the DWT's column pass transposes the image; the Gaussian mask is
// symmetric, so filtering the transposed image is exact). rst_out pulses with
// the last object coefficient; match_valid pulses one clock later with match
// and match_count. s_value holds S of the latest frame.
// Timing per frame at the default 256x256: 65536 input clocks, then about
// 32768 clocks of DWT column pass and 129 clocks of filter flush.
// Reset is synchronous and active high.
module face_object_detect_top
  import detect_pkg::*;
#(
  parameter int  IMG_W = 256,
  parameter int  IMG_H = 256,
  parameter int  TOL   = 10,
  localparam int CNT_W = $clog2((IMG_W/2) * (IMG_H/2) + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic [PIX_W-1:0] image_in,
  input  logic [PIX_W-1:0] image_ref,
  input  logic [CNT_W-1:0] global_threshold,
  output logic [OBJ_W-1:0] image_out,
  output logic             out_valid,
  output logic             rst_out,
  output logic             match,
  output logic             match_valid,
  output logic [CNT_W-1:0] match_count,
  output logic [S_W-1:0]   s_value
);
  localparam int N     = IMG_W * IMG_H;
  localparam int NW    = $clog2(N + 1);
  localparam int SHIFT = $clog2(8 * N);       // 19 for 256x256

  // Frame flow control.
  logic          busy;
  logic [NW-1:0] px_cnt;
  logic          take;
  logic          s_loaded;     // S of the current frame is in the register

  logic             gf1_ready, gf2_ready, gf1_v, gf2_v, gf1_last, gf2_last;
  logic [PIX_W-1:0] image1, image2;
  logic             dwt1_ready, dwt2_ready, ll1_v, ll2_v, dwt1_done, dwt2_done;
  coef_t            ll1, ll2;
  logic             s_valid;
  th_t              threshold1;
  logic             obj_v;
  obj_t             object;
  logic             gf3_ready;

  assign pix_ready = !busy && gf1_ready && gf2_ready;
  assign take      = pix_valid && pix_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      px_cnt   <= '0;
      s_loaded <= 1'b0;
    end else begin
      if (s_valid) s_loaded <= 1'b1;
      if (take) begin
        if (px_cnt == NW'(N - 1)) begin
          px_cnt <= '0;
          busy   <= 1'b1;
        end else begin
          px_cnt <= px_cnt + 1'b1;
        end
      end
      if (rst_out) begin
        busy     <= 1'b0;
        s_loaded <= 1'b0;
      end
    end
  end

  // Gaussian filters on the two inputs.
  gaussian_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(PIX_W)) u_gf_in (
    .clk(clk), .rst(rst), .in_valid(take), .in_ready(gf1_ready), .in_pix(image_in),
    .out_valid(gf1_v), .out_pix(image1), .out_last(gf1_last)
  );
  gaussian_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(PIX_W)) u_gf_ref (
    .clk(clk), .rst(rst), .in_valid(take), .in_ready(gf2_ready), .in_pix(image_ref),
    .out_valid(gf2_v), .out_pix(image2), .out_last(gf2_last)
  );

  // LL-band 2D-DWTs.
  dwt_2d_ll #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dwt_in (
    .clk(clk), .rst(rst), .in_valid(gf1_v), .in_ready(dwt1_ready), .in_pix(image1),
    .ll_valid(ll1_v), .ll_band(ll1), .rst_out(dwt1_done)
  );
  dwt_2d_ll #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dwt_ref (
    .clk(clk), .rst(rst), .in_valid(gf2_v), .in_ready(dwt2_ready), .in_pix(image2),
    .ll_valid(ll2_v), .ll_band(ll2), .rst_out(dwt2_done)
  );

  // Adaptive threshold from the filtered images and LL2.
  adaptive_threshold #(.N(N), .SHIFT(SHIFT)) u_at (
    .clk(clk), .rst(rst), .px_valid(gf1_v), .image1(image1), .image2(image2),
    .ll2(ll2), .s_value(s_value), .s_valid(s_valid), .threshold(threshold1)
  );

  // Modified background subtraction.
  bg_subtraction u_bgs (
    .clk(clk), .rst(rst), .in_valid(ll1_v), .ll1(ll1), .ll2(ll2),
    .threshold(threshold1), .out_valid(obj_v), .object(object)
  );

  // Gaussian filter on the object (LL-band size).
  gaussian_filter #(.IMG_W(IMG_H/2), .IMG_H(IMG_W/2), .DW(OBJ_W)) u_gf_obj (
    .clk(clk), .rst(rst), .in_valid(obj_v), .in_ready(gf3_ready), .in_pix(object),
    .out_valid(out_valid), .out_pix(image_out), .out_last(rst_out)
  );

  // Matching unit for face detection.
  matching_unit #(.TOL(TOL), .CNT_W(CNT_W)) u_match (
    .clk(clk), .rst(rst), .obj_valid(out_valid), .obj(image_out), .obj_last(rst_out),
    .global_threshold(global_threshold), .match(match), .match_valid(match_valid),
    .count(match_count)
  );

  // The two branches run in lock step, and no stage is ever asked to take
  // data it cannot accept.
  a_branches_aligned : assert property (@(posedge clk) disable iff (rst)
    (gf1_v == gf2_v) && (ll1_v == ll2_v) && (gf1_last == gf2_last) && (dwt1_done == dwt2_done));
  a_dwt_ready : assert property (@(posedge clk) disable iff (rst)
    gf1_v |-> (dwt1_ready && dwt2_ready));
  a_s_before_ll2 : assert property (@(posedge clk) disable iff (rst)
    ll2_v |-> s_loaded);
  a_obj_ready : assert property (@(posedge clk) disable iff (rst)
    obj_v |-> gf3_ready);
endmodule
