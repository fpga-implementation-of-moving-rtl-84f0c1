// Low-pass (L-band) half of the CDF 5/3 (LeGall) one-dimensional DWT.
//
// y[n] = (-x[n] + 2x[n-1] + 6x[n-2] + 2x[n-3] - x[n-4]) >> 3
//
// built, as in the source design, from a four-stage D-FF delay line, adders
// and shifters only: x[n]+x[n-4] is subtracted, (x[n-1]+x[n-3])<<1 is added
// and x[n-2] enters as (x[n-2]<<2)+(x[n-2]<<1). The sum is shifted right by
// 3 (arithmetic, i.e. floor) and captured in an output D-FF on every second
// sample, which down-samples by two. The clock divider of the source design
// is realised here as a phase flip-flop that produces the one-cycle strobe
// clk_out instead of a divided clock.
//
// Choices of this design: the output is taken when the second sample of each
// pair (odd index after rst) is x[n], so output k is
// (-x[2k+1] + 2x[2k] + 6x[2k-1] + 2x[2k-2] - x[2k-3]) >> 3 with x[<0] = 0;
// the delay line is not cleared at line ends, so an image is filtered as one
// continuous stream.
//
// Interface: a sample is taken when in_valid is high. clk_out pulses for one
// clock with lpf_out valid, one clock after the odd sample was taken. rst
// (synchronous, active high) clears the delay line and the divider phase.
module dwt_1d_lpf #(
  parameter int W = 10
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                clk_out,
  output logic signed [W-1:0] lpf_out
);
  localparam int SW = W + 4;                  // room for the 8x gain

  logic signed [W-1:0] d1, d2, d3, d4;       // x[n-1] .. x[n-4]
  logic                phase;
  logic signed [SW-1:0] outer, inner, centre, acc;

  always_comb begin
    outer  = SW'(x) + SW'(d4);
    inner  = SW'(d1) + SW'(d3);
    centre = (SW'(d2) <<< 2) + (SW'(d2) <<< 1);
    acc    = (inner <<< 1) + centre - outer;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0; d3 <= '0; d4 <= '0;
      phase   <= 1'b0;
      clk_out <= 1'b0;
      lpf_out <= '0;
    end else begin
      clk_out <= 1'b0;
      if (in_valid) begin
        d1    <= x;
        d2    <= d1;
        d3    <= d2;
        d4    <= d3;
        phase <= ~phase;
        if (phase) begin
          lpf_out <= W'(acc >>> 3);
          clk_out <= 1'b1;
        end
      end
    end
  end
endmodule
