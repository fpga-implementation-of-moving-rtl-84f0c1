// Shared widths of the moving-object / face detector datapath.
//
// Pixels are 8-bit grey levels. The CDF 5/3 low-pass has unit DC gain but
// overshoots, so an 8-bit image gives L-band values in [-64,318] and LL-band
// values in [-159,413]: 10-bit two's complement holds both. The object
// (|LL2-LL1|) is at most 572 and also fits 10 bits. The adaptive-threshold
// offset S is at most 255^2/8 = 8128 (13 bits), so S + LL2 needs 15 signed
// bits. None of these widths is given by the source design; they are chosen
// here from the value ranges above.
package detect_pkg;
  localparam int PIX_W  = 8;
  localparam int COEF_W = 10;
  localparam int OBJ_W  = 10;
  localparam int S_W    = 13;
  localparam int TH_W   = 15;

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [OBJ_W-1:0]  obj_t;
  typedef logic signed [TH_W-1:0]   th_t;
endpackage
