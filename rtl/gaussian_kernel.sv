// Shift-and-add 3x3 Gaussian kernel, mask 1/16 [1 2 1; 2 4 2; 1 2 1].
//
// The nine window pixels are combined without multipliers, following the
// source design's adder structure: one adder sums the four corners
// (a11+a13+a31+a33), a second sums the four edge pixels (a12+a21+a23+a32)
// and is shifted left by 1, the centre a22 is shifted left by 2, a final
// adder joins the three terms and the result is shifted right by 4 (floor
// division by 16). The result is held in an output D flip-flop.
//
// Interface: `win` packs a11..a33 at indices 0..8 (see window3x3). `en` loads
// the output register; `gaussian_out` follows `win` by one clock. The load
// enable is this design's addition so the register only captures valid
// pixels. The result never exceeds the largest input, so it fits DW bits.
module gaussian_kernel #(
  parameter int DW = 8
) (
  input  logic               clk,
  input  logic               en,
  input  logic [8:0][DW-1:0] win,
  output logic [DW-1:0]      gaussian_out
);
  logic [DW+1:0] corners, edges;
  logic [DW+3:0] total;

  always_comb begin
    corners = (DW+2)'(win[0]) + (DW+2)'(win[2]) + (DW+2)'(win[6]) + (DW+2)'(win[8]);
    edges   = (DW+2)'(win[1]) + (DW+2)'(win[3]) + (DW+2)'(win[5]) + (DW+2)'(win[7]);
    total   = (DW+4)'(corners) + ((DW+4)'(edges) << 1) + ((DW+4)'(win[4]) << 2);
  end

  always_ff @(posedge clk) begin
    if (en) gaussian_out <= DW'(total >> 4);
  end
endmodule
