// tb_lo_unit: checks the low operation against plain arithmetic.
//
// For random low values, Add-to-low values and shifts 0..d-1 the emitted
// chunk must equal floor((Y+add)/2^(d-1-s)) and the new low must be
// ((Y+add)*2^s) mod 2^(d-1). Also checks that chunk*2^(d-1) + new low equals
// (Y+add)*2^s, i.e. no code bit is lost or duplicated.
module tb_lo_unit;
  localparam int D = 16, W = D - 1;

  logic [W-1:0] y_in, add_low, y_out;
  logic [3:0]   rshift;
  logic [W:0]   out_bits;

  lo_unit #(.D(D)) dut (.*);

  int checks = 0, failures = 0, n_carry = 0;

  initial begin
    for (int k = 0; k < 20000; k++) begin
      longint y, a, s, sum, eb, ey;
      y = longint'($urandom_range(0, (1 << W) - 1));
      a = ($urandom_range(0, 3) == 0) ? 0 : longint'($urandom_range(0, (1 << W) - 1));
      s = longint'($urandom_range(0, W));
      y_in = W'(y); add_low = W'(a); rshift = 4'(s);
      #1;
      sum = y + a;
      if (sum >= (longint'(1) << W)) n_carry++;
      eb = sum / (longint'(1) << (longint'(W) - s));
      ey = (sum * (longint'(1) << s)) % (longint'(1) << W);
      checks++;
      if (longint'(out_bits) != eb || longint'(y_out) != ey ||
          longint'(out_bits) * (longint'(1) << W) + longint'(y_out) != sum * (longint'(1) << s)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d a=%0d s=%0d: bits=%0d y_out=%0d exp %0d %0d", y, a, s, out_bits, y_out, eb, ey);
      end
    end
    checks++;
    if (n_carry == 0) begin failures++; $display("FAIL: no carry exercised"); end
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
