// tb_outcome_comb: checks the outcome combination unit.
//
// Builds random lane chunks the way the low-operation units produce them
// (s_i code bits plus a carry bit at weight 2^s_i, with at most one carry
// leaving the whole group) and compares the merged result with the sum
// over lanes of chunk_i * 2^(s_(i+1) + ... + s_(n-1)) and the total shift
// with the sum of the shifts.
module tb_outcome_comb;
  localparam int D = 16, NSYM = 3, W = D - 1, SMAX = NSYM * W;
  localparam int TSW = $clog2(SMAX + 1);

  logic [NSYM-1:0][W:0]  lane_bits;
  logic [NSYM-1:0][3:0]  lane_shift;
  logic [SMAX:0]         total_bits;
  logic [TSW-1:0]        total_shift;

  outcome_comb #(.D(D), .NSYM(NSYM)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int k = 0; k < 20000; k++) begin
      longint s[NSYM], b[NSYM], expv, exps, rest;
      exps = 0;
      for (int i = 0; i < NSYM; i++) begin
        s[i] = longint'($urandom_range(0, W));
        b[i] = longint'($urandom_range(0, (1 << s[i]) - 1));
        exps += s[i];
      end
      // one carry bit in at most one lane
      if ($urandom_range(0, 1) == 1) begin
        int l;
        l = $urandom_range(0, NSYM - 1);
        b[l] += longint'(1) << s[l];
      end
      for (int i = 0; i < NSYM; i++) begin
        lane_bits[i]  = (W+1)'(b[i]);
        lane_shift[i] = 4'(s[i]);
      end
      #1;
      expv = 0;
      for (int i = 0; i < NSYM; i++) begin
        rest = 0;
        for (int j = i + 1; j < NSYM; j++) rest += s[j];
        expv += b[i] * (longint'(1) << rest);
      end
      checks++;
      if (longint'(total_bits) != expv || longint'(total_shift) != exps) begin
        failures++;
        if (failures < 10) $display("FAIL: got %0h/%0d exp %0h/%0d", total_bits, total_shift, expv, exps);
      end
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
