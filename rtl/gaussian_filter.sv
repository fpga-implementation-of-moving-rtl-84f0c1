// 3x3 Gaussian smoothing filter for one IMG_W x IMG_H raster frame.
//
// The filter removes high-frequency edges and small light variations before
// the wavelet transform, and smooths the detected object at the end of the
// pipeline. A window3x3 shift chain presents the 3x3 neighbourhood and a
// gaussian_kernel computes (corners + 2*edges + 4*centre) >> 4, as in the
// source design. Two things are this design's own choices: neighbours that
// fall outside the image are replaced by zero (zero padding), and after the
// last pixel of a frame the filter advances its window IMG_W+1 more times on
// its own, so that every input pixel yields exactly one output pixel.
//
// Interface: a pixel is taken when in_valid && in_ready. in_ready is low
// while the filter flushes the end of a frame. out_valid/out_pix give the
// filtered frame in the same raster order; out_last marks its last pixel.
// Timing: the output for pixel p appears two clocks after pixel p+IMG_W+1
// has been taken (or flushed). Reset is synchronous and active high.
module gaussian_filter #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int DW    = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_pix,
  output logic          out_last
);
  localparam int N      = IMG_W * IMG_H;
  localparam int NSHIFT = N + IMG_W + 1;     // shifts per frame incl. flush
  localparam int CW     = $clog2(NSHIFT + 1);
  localparam int RW     = $clog2(IMG_H);
  localparam int XW     = $clog2(IMG_W);

  logic [CW-1:0] in_cnt, sh_cnt;
  logic          flushing, shift, take;
  logic [RW-1:0] pr, cr;                      // next / current centre row
  logic [XW-1:0] pc, cc;                      // next / current centre column
  logic          win_v, win_last;

  logic [8:0][DW-1:0] win, win_m;

  assign in_ready = (in_cnt < CW'(N));
  assign take     = in_valid && in_ready;
  assign flushing = !in_ready && (sh_cnt < CW'(NSHIFT));
  assign shift    = take || flushing;

  window3x3 #(.IMG_W(IMG_W), .DW(DW)) u_win (
    .clk  (clk),
    .shift(shift),
    .din  (flushing ? '0 : in_pix),
    .win  (win)
  );

  // Centre-position bookkeeping. A shift numbered sh_cnt >= IMG_W+1 puts a
  // new image pixel into the a22 position.
  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt   <= '0;
      sh_cnt   <= '0;
      pr       <= '0;
      pc       <= '0;
      win_v    <= 1'b0;
      win_last <= 1'b0;
      cr       <= '0;
      cc       <= '0;
    end else begin
      win_v    <= 1'b0;
      win_last <= 1'b0;
      if (take) in_cnt <= in_cnt + 1'b1;
      if (shift) begin
        if (sh_cnt == CW'(NSHIFT - 1)) begin
          // Last flush shift: the frame is complete, rearm for the next one.
          sh_cnt <= '0;
          in_cnt <= '0;
        end else begin
          sh_cnt <= sh_cnt + 1'b1;
        end
        if (sh_cnt >= CW'(IMG_W + 1)) begin
          win_v    <= 1'b1;
          cr       <= pr;
          cc       <= pc;
          win_last <= (pr == RW'(IMG_H - 1)) && (pc == XW'(IMG_W - 1));
          if (pc == XW'(IMG_W - 1)) begin
            pc <= '0;
            pr <= (pr == RW'(IMG_H - 1)) ? '0 : pr + 1'b1;
          end else begin
            pc <= pc + 1'b1;
          end
        end
      end
    end
  end

  // Zero padding: drop the window positions that lie outside the image.
  always_comb begin
    win_m = win;
    if (cr == '0) begin                       // top row: no a1x
      win_m[0] = '0; win_m[1] = '0; win_m[2] = '0;
    end
    if (cr == RW'(IMG_H - 1)) begin           // bottom row: no a3x
      win_m[6] = '0; win_m[7] = '0; win_m[8] = '0;
    end
    if (cc == '0) begin                       // left column: no ax1
      win_m[0] = '0; win_m[3] = '0; win_m[6] = '0;
    end
    if (cc == XW'(IMG_W - 1)) begin           // right column: no ax3
      win_m[2] = '0; win_m[5] = '0; win_m[8] = '0;
    end
  end

  gaussian_kernel #(.DW(DW)) u_kernel (
    .clk         (clk),
    .en          (win_v),
    .win         (win_m),
    .gaussian_out(out_pix)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= win_v;
      out_last  <= win_last;
    end
  end
endmodule
