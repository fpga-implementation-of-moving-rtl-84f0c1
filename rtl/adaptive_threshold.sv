// Adaptive threshold: AT_i = S + LL2_i with S = sum((A-B)^2) / (8N).
//
// A and B are the Gaussian-filtered actual and reference images (N pixels
// each, N = 256x256 in the source design). As in the source design the
// pipeline is Subtraction -> square -> accumulator with feedback -> right
// shift by SHIFT (= log2(8N) = 19) -> D_ff loaded by a pixel counter after
// the N-th pixel -> final adder with the reference LL coefficient. The
// threshold is thus one value per LL coefficient: the frame-wide difference
// energy S lifted by the local background level.
//
// Interface: image1/image2 are taken when px_valid is high. The subtraction
// and square stages are registered, so S is loaded (s_valid pulses) three
// clocks after the N-th pixel pair. threshold = s_value + ll2 is
// combinational (no register follows the final adder), signed. The
// accumulator clears itself when S is loaded so the next frame starts from
// zero (this design's choice). Reset is synchronous and active high.
module adaptive_threshold
  import detect_pkg::*;
#(
  parameter int N     = 65536,
  parameter int SHIFT = 19
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             px_valid,
  input  logic [PIX_W-1:0] image1,
  input  logic [PIX_W-1:0] image2,
  input  coef_t            ll2,
  output logic [S_W-1:0]   s_value,
  output logic             s_valid,
  output th_t              threshold
);
  localparam int AW = 2*PIX_W + $clog2(N);   // 32 bits for N = 65536
  localparam int CW = $clog2(N + 1);

  logic signed [PIX_W:0]  diff;
  logic [2*PIX_W-1:0]     sq;
  logic                   v1, v2;
  logic [AW-1:0]          acc, acc_next;
  logic [CW-1:0]          cnt;

  assign acc_next = acc + AW'(sq);

  always_ff @(posedge clk) begin
    if (rst) begin
      diff    <= '0;
      sq      <= '0;
      v1      <= 1'b0;
      v2      <= 1'b0;
      acc     <= '0;
      cnt     <= '0;
      s_value <= '0;
      s_valid <= 1'b0;
    end else begin
      s_valid <= 1'b0;
      // Subtraction stage.
      v1 <= px_valid;
      if (px_valid) diff <= signed'({1'b0, image1}) - signed'({1'b0, image2});
      // Square stage.
      v2 <= v1;
      if (v1) sq <= (2*PIX_W)'(diff * diff);
      // Accumulate; the counter loads the S register after N pixels.
      if (v2) begin
        if (cnt == CW'(N - 1)) begin
          s_value <= S_W'(acc_next >> SHIFT);
          s_valid <= 1'b1;
          acc     <= '0;
          cnt     <= '0;
        end else begin
          acc <= acc_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign threshold = th_t'(signed'({1'b0, s_value})) + th_t'(ll2);
endmodule
