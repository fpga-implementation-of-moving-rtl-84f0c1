// Modified background subtraction with an adaptive threshold.
//
// For each LL coefficient pair the block forms |LL2 - LL1| the way the
// source design draws it, with a max/min stage followed by a subtraction,
// and compares the difference with the adaptive threshold AT of the same
// coefficient. The difference is passed on as object when it is above the
// threshold and replaced by zero otherwise. The source design states the
// rule both as "LL >= AT" and as "AT less than LL"; this design uses the
// strict form, difference > AT.
//
// Interface: ll1, ll2 and threshold are sampled together when in_valid is
// high; object and out_valid follow one clock later (registered, this
// design's choice). Reset is synchronous and active high.
module bg_subtraction
  import detect_pkg::*;
#(
  parameter int W = COEF_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] ll1,
  input  logic signed [W-1:0] ll2,
  input  th_t                 threshold,
  output logic                out_valid,
  output logic [W-1:0]        object
);
  logic signed [W-1:0] mx, mn;
  logic        [W:0]   diff;
  logic                pass;

  always_comb begin
    if (ll1 > ll2) begin
      mx = ll1; mn = ll2;
    end else begin
      mx = ll2; mn = ll1;
    end
    diff = (W+1)'(mx) - (W+1)'(mn);
    pass = th_t'({1'b0, diff}) > threshold;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      object    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) object <= pass ? W'(diff) : '0;
    end
  end
endmodule
