// LL band of a one-level 2D CDF 5/3 DWT, flipping architecture.
//
// A single dwt_1d_lpf is used twice per frame. Pass 1: the input MUX feeds it
// the IMG_W x IMG_H pixels in raster order, and the DEMUX sends the
// IMG_W/2 x IMG_H L-band coefficients it produces (one every second clock)
// into dwt_memory_unit at consecutive addresses. Pass 2: dwt_controller reads
// the memory back column by column, one word per clock, the MUX feeds those
// words to the same 1D unit, and the DEMUX sends its output, the
// (IMG_W/2) x (IMG_H/2) LL band, to ll_band. Only the L (low-pass) half is
// ever computed, as in the source design.
//
// Because pass 2 walks columns, the LL band comes out column-major: output
// number c*(IMG_H/2)+r is LL(row r, column c). The 1D unit's delay line is
// cleared at the start of each pass, so each pass filters its samples as one
// continuous stream starting from zero history. These are this design's
// choices where the source design gives no detail.
//
// Interface: a pixel is taken when in_valid && in_ready; in_ready is high
// only in pass 1 until IMG_W*IMG_H pixels are in. ll_valid (the clk_out of
// the source design) strobes each LL coefficient; rst_out pulses with the
// last one. Timing per frame: IMG_W*IMG_H clocks of input, then
// IMG_W*IMG_H/2 clocks of pass 2 plus a few clocks of latency. Reset is
// synchronous and active high.
module dwt_2d_ll
  import detect_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int W     = COEF_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [PIX_W-1:0]    in_pix,
  output logic                ll_valid,
  output logic signed [W-1:0] ll_band,
  output logic                rst_out
);
  localparam int N    = IMG_W * IMG_H;
  localparam int COLS = IMG_W / 2;
  localparam int NL   = N / 2;
  localparam int NLL  = N / 4;
  localparam int AW   = $clog2(NL);
  localparam int IW   = $clog2(N + 1);
  localparam int LW   = $clog2(NLL + 1);

  logic          pass2;               // MUX / DEMUX select
  logic [IW-1:0] in_cnt;
  logic          take;

  logic                dwt_rst, dwt_in_valid, l_valid;
  logic signed [W-1:0] dwt_x, l_out;

  logic          rd_wr, rd_en, rd_v, pass2_start, pass2_done;
  logic [1:0]    done_sr;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [W-1:0]  transpose;
  logic [LW-1:0] ll_cnt;

  assign in_ready = !pass2 && (in_cnt < IW'(N));
  assign take     = in_valid && in_ready;

  // Input MUX.
  assign dwt_x        = pass2 ? signed'(transpose) : signed'(W'(in_pix));
  assign dwt_in_valid = pass2 ? rd_v : take;
  assign dwt_rst      = rst || pass2_start || done_sr[1];

  dwt_1d_lpf #(.W(W)) u_dwt1d (
    .clk     (clk),
    .rst     (dwt_rst),
    .in_valid(dwt_in_valid),
    .x       (dwt_x),
    .clk_out (l_valid),
    .lpf_out (l_out)
  );

  dwt_controller #(.ROWS(IMG_H), .COLS(COLS)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .wr_strobe  (l_valid && !pass2),
    .rd_wr      (rd_wr),
    .wr_addr    (wr_addr),
    .rd_addr    (rd_addr),
    .rd_en      (rd_en),
    .pass2_start(pass2_start),
    .pass2_done (pass2_done)
  );

  // DEMUX, memory side.
  dwt_memory_unit #(.DEPTH(NL), .W(W)) u_mem (
    .clk      (clk),
    .rst      (rst),
    .rd_wr    (rd_wr),
    .wr_en    (l_valid && !pass2),
    .rd_en    (rd_en),
    .wr_addr  (wr_addr),
    .rd_addr  (rd_addr),
    .l_band   (l_out),
    .transpose(transpose)
  );

  // DEMUX, output side.
  assign ll_valid = l_valid && pass2;
  assign ll_band  = l_out;
  assign rst_out  = ll_valid && (ll_cnt == LW'(NLL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      pass2   <= 1'b0;
      in_cnt  <= '0;
      rd_v    <= 1'b0;
      done_sr <= '0;
      ll_cnt  <= '0;
    end else begin
      rd_v    <= rd_en;
      done_sr <= {done_sr[0], pass2_done};
      if (take) in_cnt <= in_cnt + 1'b1;
      if (pass2_start) pass2 <= 1'b1;
      // Two clocks after the last read the last LL output has left the
      // 1D unit: switch back to pass 1 for the next frame.
      if (done_sr[1]) begin
        pass2  <= 1'b0;
        in_cnt <= '0;
      end
      if (ll_valid) ll_cnt <= (ll_cnt == LW'(NLL - 1)) ? '0 : ll_cnt + 1'b1;
    end
  end

  // Pass 1 must deliver exactly one frame before the memory is read.
  a_no_input_in_pass2 : assert property (@(posedge clk) disable iff (rst)
    pass2 |-> !take);
endmodule
