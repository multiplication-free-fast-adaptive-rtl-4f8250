// tb_cu_ro: checks one CU&RO lane against integer arithmetic.
//
// Random ranges in [2^(d-2), 2^(d-1)), random context states with the ISW
// counter in its legal range [0, alpha*2^(d-2)*2^bl], random symbols, modes
// and lane-valid. Expected values come from the reference model (LPS range
// with a real multiply, context update) and a renormalisation loop. Corner
// cases: counter 0 (T clamps to 1), counter at the MPS-switch threshold,
// smallest and largest range.
module tb_cu_ro;
  import fabrc_pkg::*;
  import fabrc_ref_pkg::*;

  localparam int D = 16, BL = 5, W = D - 1, NOW = D + BL - 1;

  logic          valid, sym;
  em_t           em;
  logic [W-1:0]  x_in, x_out, add_low;
  logic [NOW:0]  st_in, st_out;
  logic          st_we;
  logic [3:0]    rshift;

  cu_ro #(.D(D), .BL(BL)) dut (.*);

  ref_model #(D, BL, 1) m = new();
  int checks = 0, failures = 0;
  int n_lps = 0, n_switch = 0;

  task automatic run_one(longint x, longint no, bit mps, bit s, bit byp, bit v);
    longint t, xm, ex_x, ex_add, ex_no, ex_sh;
    bit     ex_mps, lps, m_mps;
    valid = v; sym = s; em = byp ? EM_BYPASS : EM_REGULAR;
    x_in = W'(x); st_in = {mps, NOW'(no)};
    #1;
    m.x = x; m.no[0] = no; m.mps[0] = mps;
    t = m.lps_range(0, byp);
    m_mps = byp ? 1'b0 : mps;
    lps = (s != m_mps);
    xm = x - t;
    ex_add = lps ? xm : 0;
    ex_x   = lps ? t : xm;
    if (!byp) m.update_ctx(0, lps);
    ex_no = m.no[0]; ex_mps = m.mps[0];
    ex_sh = 0;
    while (ex_x < (longint'(1) << (W - 1))) begin ex_x = ex_x << 1; ex_sh++; end
    if (!v) begin
      ex_x = x; ex_add = 0; ex_sh = 0; ex_no = no; ex_mps = mps;
    end
    if (v && !byp && lps) n_lps++;
    if (v && !byp && ex_mps != mps) n_switch++;
    checks++;
    if (x_out != W'(ex_x) || add_low != W'(ex_add) || rshift != 4'(ex_sh) ||
        st_out != {ex_mps, NOW'(ex_no)} || st_we != (v && !byp)) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d no=%0d mps=%0d s=%0d byp=%0d v=%0d: got x=%0d add=%0d sh=%0d st=%0h we=%0d exp x=%0d add=%0d sh=%0d no=%0d mps=%0d",
                 x, no, mps, s, byp, v, x_out, add_low, rshift, st_out, st_we, ex_x, ex_add, ex_sh, ex_no, ex_mps);
    end
  endtask

  initial begin
    longint xmin, xmax, nmax;
    xmin = longint'(1) << (D - 2);
    xmax = (longint'(1) << (D - 1)) - 1;
    nmax = m.A_HALF;
    // corners
    for (int s = 0; s < 2; s++)
      for (int mp = 0; mp < 2; mp++) begin
        run_one(xmin, 0, mp[0], s[0], 0, 1);
        run_one(xmax, 0, mp[0], s[0], 0, 1);
        run_one(xmin, nmax, mp[0], s[0], 0, 1);
        run_one(xmax, nmax, mp[0], s[0], 0, 1);
        run_one(xmax, nmax - 1000, mp[0], s[0], 0, 1);
        run_one(xmin, 1, mp[0], s[0], 1, 1);
      end
    // random
    for (int k = 0; k < 20000; k++) begin
      run_one(longint'($urandom_range(int'(xmin), int'(xmax))),
              ($urandom_range(0, 3) == 0) ? longint'($urandom_range(0, 64))
                                          : longint'($urandom_range(0, int'(nmax))),
              1'($urandom), 1'($urandom), ($urandom_range(0, 9) == 0), ($urandom_range(0, 19) != 0));
    end
    checks++;
    if (n_lps == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL: LPS (%0d) or MPS switch (%0d) never exercised", n_lps, n_switch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
