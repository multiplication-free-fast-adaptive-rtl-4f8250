// fabrc_ref_pkg: untimed reference models used by the testbenches.
//
// ref_enc codes one symbol at a time with plain integer arithmetic (a real
// multiply for delta*(no>>2), a loop for renormalisation) and keeps the code
// as an unbounded bit queue into which carries ripple directly. ref_dec is
// the matching decoder: it keeps the offset of the code value from the low
// end of the interval, compares it with the MPS part of the range and reads
// one code bit per renormalisation shift. Both start a stream with range
// 2^(d-1)-1, low 0 and every context at probability 1/2 (MPS 0).
package fabrc_ref_pkg;

  class ref_model #(int D = 16, int BL = 5, int NCTX = 16);
    localparam int     W      = D - 1;
    localparam longint A_FULL = 9 * (longint'(1) << (D - 5 + BL));
    localparam longint A_HALF = A_FULL / 2;

    longint no  [NCTX];
    bit     mps [NCTX];
    longint x;
    // statistics
    int n_lps, n_switch, n_bypass, n_regular;

    function new();
      reset_stream();
      n_lps = 0; n_switch = 0; n_bypass = 0; n_regular = 0;
    endfunction

    function void reset_stream();
      for (int c = 0; c < NCTX; c++) begin
        no[c]  = A_HALF;
        mps[c] = 0;
      end
      x = (longint'(1) << W) - 1;
    endfunction

    // LPS sub-range for the current range and context
    function longint lps_range(int ctx, bit bypass);
      longint delta, t;
      if (bypass) return x / 2;
      delta = (x - (longint'(1) << (D - 2))) / (longint'(1) << (D - 4));
      t = (no[ctx] + delta * (no[ctx] / 4)) / (longint'(1) << BL);
      if (t < 1) t = 1;
      return t;
    endfunction

    function void update_ctx(int ctx, bit was_lps);
      if (was_lps) begin
        no[ctx] = no[ctx] + (A_FULL - no[ctx] + (longint'(1) << (BL - 1))) / (longint'(1) << BL);
        if (no[ctx] > A_HALF) begin
          mps[ctx] = !mps[ctx];
          no[ctx]  = A_FULL - no[ctx];
          n_switch++;
        end
      end else begin
        no[ctx] = no[ctx] - (no[ctx] + (longint'(1) << (BL - 1))) / (longint'(1) << BL);
      end
    endfunction
  endclass

  class ref_enc #(int D = 16, int BL = 5, int NCTX = 16) extends ref_model #(D, BL, NCTX);
    longint y;
    bit     code[$];    // bits of the current stream, MSB first
    int     n_carry, n_pad;

    function new();
      super.new();
      y = 0; n_carry = 0; n_pad = 0;
    endfunction

    function void add_carry();
      int k;
      k = code.size() - 1;
      while (k >= 0 && code[k] == 1'b1) begin
        code[k] = 1'b0;
        k--;
      end
      if (k < 0) $fatal(1, "ref_enc: carry out of the stream");
      code[k] = 1'b1;
      n_carry++;
    endfunction

    function void put(bit bypass, int ctx, bit sym);
      longint t, xm, mask;
      bit     m, lps;
      mask = (longint'(1) << W) - 1;
      t  = lps_range(ctx, bypass);
      m  = bypass ? 1'b0 : mps[ctx];
      lps = (sym != m);
      xm = x - t;
      if (bypass) n_bypass++; else n_regular++;
      if (lps) begin
        y = y + xm;
        x = t;
        if (!bypass) n_lps++;
      end else begin
        x = xm;
      end
      if (!bypass) update_ctx(ctx, lps);
      if (y > mask) begin
        add_carry();
        y = y & mask;
      end
      while (x < (longint'(1) << (W - 1))) begin
        code.push_back(y[W-1]);
        y = (y << 1) & mask;
        x = x << 1;
      end
    endfunction

    // terminate: write all of low, pad to a byte, return the bytes
    function void finish(ref byte unsigned bytes[$]);
      byte unsigned b;
      for (int i = W - 1; i >= 0; i--) code.push_back(y[i]);
      if (code.size() % 8 != 0) n_pad++;
      while (code.size() % 8 != 0) code.push_back(1'b0);
      bytes.delete();
      for (int i = 0; i < code.size(); i += 8) begin
        b = 0;
        for (int k = 0; k < 8; k++) b = {b[6:0], code[i+k]};
        bytes.push_back(b);
      end
      code.delete();
      y = 0;
      reset_stream();
    endfunction
  endclass

  class ref_dec #(int D = 16, int BL = 5, int NCTX = 16) extends ref_model #(D, BL, NCTX);
    byte unsigned src[$];
    int     bitpos;
    longint v;

    function new();
      super.new();
    endfunction

    function bit next_bit();
      bit b;
      if (bitpos / 8 < src.size()) b = src[bitpos / 8][7 - (bitpos % 8)];
      else b = 1'b0;
      bitpos++;
      return b;
    endfunction

    function void start(byte unsigned bytes[$]);
      src = bytes;
      bitpos = 0;
      reset_stream();
      v = 0;
      for (int i = 0; i < W; i++) v = (v << 1) | longint'(next_bit());
    endfunction

    function bit get(bit bypass, int ctx);
      longint t, xm;
      bit m, lps;
      t  = lps_range(ctx, bypass);
      m  = bypass ? 1'b0 : mps[ctx];
      xm = x - t;
      lps = (v >= xm);
      if (lps) begin
        v = v - xm;
        x = t;
      end else begin
        x = xm;
      end
      if (!bypass) update_ctx(ctx, lps);
      while (x < (longint'(1) << (W - 1))) begin
        x = x << 1;
        v = (v << 1) | longint'(next_bit());
      end
      return lps ? !m : m;
    endfunction
  endclass

endpackage
