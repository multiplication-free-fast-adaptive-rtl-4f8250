// cu_ro: context update (CU) and range operation (RO) for one binary symbol.
//
// This is one lane of phase 0 of the encoder, and the whole symbol step of
// the decoder's model. It is purely combinational.
//
// Regular mode follows the multiplication-free algorithm:
//   delta = (X - 2^(d-2)) >> (d-4)            in {0,1,2,3}
//   T     = max(1, (no + delta*(no>>2)) >> bl)  delta*q built from q and 2q
//   X     = X - T
//   LPS:  add_low = X, X = T,
//         no = no + ((A - no + 2^(bl-1)) >> bl), A = (9/16)*2^(d-1)*2^bl;
//         if no > A/2 the MPS flips and no = A - no
//   MPS:  no = no - ((no + 2^(bl-1)) >> bl)
// no is the ISW count of least-probable symbols scaled by alpha*2^(d-1)
// with alpha = 9/16; T approximates X*p for the four quantised range values.
// Bypass mode splits the range in halves (T = X>>1, symbol 1 takes the upper
// part) and leaves the context alone. The result is renormalised: x_out is
// shifted left until bit d-2 is set and rshift is the shift count.
//
// Interface: x_in/x_out are d-1 bits wide and always in [2^(d-2), 2^(d-1)).
// st_in/st_out are the context state {mps, no}. st_we is high for a valid
// regular symbol. A lane with valid low passes the range and state through
// with add_low = 0 and rshift = 0.
//
// The algorithm, the quantisation alpha = 9/16 and the MPS switch follow the
// published method; the initial context value, d and bl are this design's
// choices (see fabrc_encoder).
module cu_ro
  import fabrc_pkg::*;
#(
  parameter int unsigned D  = 16,
  parameter int unsigned BL = 5,
  localparam int unsigned W   = D - 1,
  localparam int unsigned NOW = D + BL - 1,
  localparam int unsigned SHW = $clog2(D)
) (
  input  logic           valid,
  input  em_t            em,
  input  logic           sym,
  input  logic [W-1:0]   x_in,
  input  logic [NOW:0]   st_in,   // {mps, no}
  output logic [W-1:0]   x_out,
  output logic [NOW:0]   st_out,
  output logic           st_we,
  output logic [W-1:0]   add_low,
  output logic [SHW-1:0] rshift
);

  // A = alpha*2^(d-1)*2^bl = 9*2^(d-5+bl); the MPS switch threshold is A/2.
  localparam logic [NOW-1:0] A_FULL = NOW'(9) << (D - 5 + BL);
  localparam logic [NOW-1:0] A_HALF = NOW'(9) << (D - 6 + BL);
  localparam logic [NOW-1:0] HALF_W = NOW'(1) << (BL - 1);
  localparam logic [W-1:0]   QUARTER = W'(1) << (D - 2);

  logic [NOW-1:0] no;
  logic           mps;
  logic [1:0]     delta;
  logic [W-1:0]   xoff;
  logic [NOW-1:0] q;
  logic [NOW+1:0] prod;   // no + delta*(no>>2)
  logic [NOW+1:0] tfull;
  logic [W-1:0]   t;
  logic [W-1:0]   xm;
  logic [W-1:0]   xn;
  logic           lps;
  logic [NOW-1:0] no_up;
  logic [NOW-1:0] no_new;
  logic           mps_new;

  assign no  = st_in[NOW-1:0];
  assign mps = st_in[NOW];

  // Range after renormalisation is in [2^(d-2), 2^(d-1)): delta is the
  // quarter-interval the range falls in.
  assign xoff  = x_in - QUARTER;
  assign delta = 2'(xoff >> (D - 4));
  assign q     = no >> 2;

  always_comb begin
    // delta*q using additions and conditions only
    prod = (NOW+2)'(no);
    if (delta[0]) prod = prod + (NOW+2)'(q);
    if (delta[1]) prod = prod + ((NOW+2)'(q) << 1);
    tfull = prod >> BL;

    if (em == EM_BYPASS) begin
      t   = x_in >> 1;
      lps = sym;
    end else begin
      t   = (tfull == '0) ? W'(1) : W'(tfull);
      lps = (sym != mps);
    end

    xm = x_in - t;
    if (lps) begin
      add_low = xm;
      xn      = t;
    end else begin
      add_low = '0;
      xn      = xm;
    end

    // ISW counter update and MPS switch
    mps_new = mps;
    if (lps) begin
      no_up = no + NOW'((A_FULL - no + HALF_W) >> BL);
      if (no_up > A_HALF) begin
        mps_new = ~mps;
        no_new  = A_FULL - no_up;
      end else begin
        no_new  = no_up;
      end
    end else begin
      no_up  = '0;
      no_new = no - NOW'((no + HALF_W) >> BL);
    end

    // renormalisation: shift until bit W-1 (= d-2) is set
    rshift = '0;
    for (int i = 0; i < W; i++) begin
      if (xn[i]) rshift = SHW'(W - 1 - i);
    end
    x_out = xn << rshift;

    st_out = {mps_new, no_new};
    st_we  = valid && (em == EM_REGULAR);
    if (em == EM_BYPASS) st_out = st_in;

    if (!valid) begin
      x_out   = x_in;
      st_out  = st_in;
      add_low = '0;
      rshift  = '0;
    end
  end

endmodule
