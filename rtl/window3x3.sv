// 3x3 overlapping-window generator for a raster pixel stream.
//
// A single shift chain of 2*IMG_W+3 registers holds the last two image lines
// plus three pixels. Taps are placed as in the three-row D_ff / shift-register
// structure of the source design: the newest pixel is a33, then a32, a31, a
// (IMG_W-3)-deep shift register, a23, a22, a21, another shift register, and
// a13, a12, a11. Each window row is therefore exactly one image line older
// than the one before it, and a22 is the pixel IMG_W+1 samples back.
//
// Interface: `shift` advances the chain by one with `din` entering at a33.
// `win` is packed a11,a12,a13,a21,...,a33 at indices 0..8 (index =
// 3*(row-1) + (col-1) for a<row><col>). No reset: the contents of a new frame's
// first lines are masked by the user (see gaussian_filter). Timing: `win`
// changes one clock after `shift`.
module window3x3 #(
  parameter int IMG_W = 256,
  parameter int DW    = 8
) (
  input  logic               clk,
  input  logic               shift,
  input  logic [DW-1:0]      din,
  output logic [8:0][DW-1:0] win
);
  localparam int LEN = 2*IMG_W + 3;

  logic [DW-1:0] sr [LEN];

  always_ff @(posedge clk) begin
    if (shift) begin
      sr[0] <= din;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  // a<row><col> -> win[3*(row-1)+(col-1)]
  assign win[8] = sr[0];          // a33
  assign win[7] = sr[1];          // a32
  assign win[6] = sr[2];          // a31
  assign win[5] = sr[IMG_W];      // a23
  assign win[4] = sr[IMG_W+1];    // a22
  assign win[3] = sr[IMG_W+2];    // a21
  assign win[2] = sr[2*IMG_W];    // a13
  assign win[1] = sr[2*IMG_W+1];  // a12
  assign win[0] = sr[2*IMG_W+2];  // a11
endmodule
