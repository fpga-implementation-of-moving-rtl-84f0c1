// Face matching unit: counts near-zero object coefficients.
//
// When the test face and the database face are the same person, background
// subtraction cancels most of the image, but lighting differences leave
// small residues. Every object coefficient at or below the tolerance TOL (10
// in the source design) is therefore counted as a cancelled, i.e. similar,
// coefficient. At the end of the frame the count is compared with the
// global threshold: count >= global_threshold means the person is matched.
// The source design's text says "greater than" but its pseudo code uses
// ">="; this design follows the pseudo code.
//
// Interface: obj is taken when obj_valid is high; obj_last marks the last
// coefficient of the frame (this design's frame boundary). One clock after
// it, match_valid pulses with match and the final count, and the counter
// restarts from zero. Reset is synchronous and active high.
module matching_unit
  import detect_pkg::*;
#(
  parameter int TOL   = 10,
  parameter int CNT_W = 15
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             obj_valid,
  input  logic [OBJ_W-1:0] obj,
  input  logic             obj_last,
  input  logic [CNT_W-1:0] global_threshold,
  output logic             match,
  output logic             match_valid,
  output logic [CNT_W-1:0] count
);
  logic [CNT_W-1:0] cnt, cnt_next;

  // Threshold block of the source design: compare with the tolerance.
  assign cnt_next = cnt + CNT_W'(obj_valid && (obj <= OBJ_W'(TOL)));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      match       <= 1'b0;
      match_valid <= 1'b0;
      count       <= '0;
    end else begin
      match_valid <= 1'b0;
      if (obj_valid) begin
        if (obj_last) begin
          // Comparator: decision for this frame, then restart the count.
          match       <= (cnt_next >= global_threshold);
          match_valid <= 1'b1;
          count       <= cnt_next;
          cnt         <= '0;
        end else begin
          cnt <= cnt_next;
        end
      end
    end
  end
endmodule
