// Address controller of the flipping 2D-DWT.
//
// Write phase (rd_wr = 0): each L-band coefficient produced by the row pass
// (wr_strobe) is written at the next wr_addr, 0 .. ROWS*COLS-1, i.e. in
// row-major order. When the last one has been written, rd_wr goes to 1 and
// the read phase produces one rd_addr per clock in transposed order:
// rd_addr = r*COLS + c with the column c in the outer loop and the row r in
// the inner loop, so each L-band column is replayed as a contiguous stream
// for the column pass. After the last read rd_wr returns to 0 for the next
// frame (this return, the read order and the one-read-per-clock rate are
// this design's reading of the source design's description).
//
// Interface: rd_en is high for every valid read address; pass2_start pulses
// on the first read, pass2_done on the clock after the last read. Reset is
// synchronous, active high, and enters the write phase at address 0.
module dwt_controller #(
  parameter int ROWS = 256,
  parameter int COLS = 128,
  localparam int AW  = $clog2(ROWS * COLS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_strobe,
  output logic          rd_wr,
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] rd_addr,
  output logic          rd_en,
  output logic          pass2_start,
  output logic          pass2_done
);
  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int CW = (COLS > 1) ? $clog2(COLS) : 1;

  logic [RW-1:0] r;
  logic [CW-1:0] c;
  logic          first;

  assign rd_en       = rd_wr;
  assign rd_addr     = AW'(r) * AW'(COLS) + AW'(c);
  assign pass2_start = rd_wr && first;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_wr      <= 1'b0;
      wr_addr    <= '0;
      r          <= '0;
      c          <= '0;
      first      <= 1'b0;
      pass2_done <= 1'b0;
    end else begin
      pass2_done <= 1'b0;
      if (!rd_wr) begin
        if (wr_strobe) begin
          if (wr_addr == AW'(ROWS * COLS - 1)) begin
            wr_addr <= '0;
            rd_wr   <= 1'b1;
            first   <= 1'b1;
            r       <= '0;
            c       <= '0;
          end else begin
            wr_addr <= wr_addr + 1'b1;
          end
        end
      end else begin
        first <= 1'b0;
        if (r == RW'(ROWS - 1)) begin
          r <= '0;
          if (c == CW'(COLS - 1)) begin
            c          <= '0;
            rd_wr      <= 1'b0;
            pass2_done <= 1'b1;
          end else begin
            c <= c + 1'b1;
          end
        end else begin
          r <= r + 1'b1;
        end
      end
    end
  end
endmodule
