// Transpose memory of the 2D-DWT: one frame of L-band coefficients.
//
// DEPTH words of W bits (32768 = 256 rows x 128 L-band columns in the source
// design). rd_wr selects the mode and the address, as in the source design's
// memory unit: rd_wr = 0 writes l_band at wr_addr, rd_wr = 1 reads rd_addr.
// The source design also multiplexes two clocks (clk1 for reads, clk2 for
// writes); with a single clock here the two clocks become the strobes rd_en
// and wr_en, and the same rd_wr selects between them.
//
// Timing: a write takes effect at the clock edge where wr_en is high and
// rd_wr is 0. A read is synchronous: transpose holds the word one clock
// after rd_en is high with rd_wr at 1. rst clears only the read register.
module dwt_memory_unit #(
  parameter int DEPTH = 32768,
  parameter int W     = 10,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rd_wr,
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [AW-1:0] rd_addr,
  input  logic [W-1:0]  l_band,
  output logic [W-1:0]  transpose
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] addr;
  logic          strobe;

  // The two multiplexers controlled by rd_wr.
  assign addr   = rd_wr ? rd_addr : wr_addr;
  assign strobe = rd_wr ? rd_en   : wr_en;

  always_ff @(posedge clk) begin
    if (strobe && !rd_wr) mem[addr] <= l_band;
  end

  always_ff @(posedge clk) begin
    if (rst)                  transpose <= '0;
    else if (strobe && rd_wr) transpose <= mem[addr];
  end
endmodule
