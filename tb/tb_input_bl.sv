// tb_input_bl: checks the input limit buffer.
//
// Random chunks (0..NSYM*(d-1) code bits, sometimes with a carry bit on
// top) are offered with random valid gaps and held until in_ready. A
// reference bit queue takes each accepted chunk (rippling the carry into
// earlier bits); a second queue rebuilds the stream from the unit's output
// bytes and carry_out pulses. At each flush's end_out the two must agree,
// after zero padding to a whole byte. Phases with long chunks force the
// buffer full, so stalls (in_valid with in_ready low) are counted and must
// occur, as must carries and padding.
module tb_input_bl;
  localparam int D = 16, NSYM = 2, W = D - 1, SMAX = NSYM * W;
  localparam int TSW = $clog2(SMAX + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_flush = 1'b0;
  wire  in_ready;
  logic [SMAX:0]  in_bits = '0;
  logic [TSW-1:0] in_shift = '0;
  wire byte_valid, carry_out, end_out;
  wire [7:0] byte_out;

  input_bl #(.D(D), .NSYM(NSYM)) dut (.*);

  always #5 clk = ~clk;

  bit refq[$], outq[$];
  int checks = 0, failures = 0;
  int n_stall = 0, n_carry = 0, n_pad = 0, n_end = 0, n_bytes = 0;

  function automatic void ripple(ref bit q[$]);
    int k = q.size() - 1;
    while (k >= 0 && q[k]) begin q[k] = 1'b0; k--; end
    if (k < 0) $fatal(1, "carry out of the stream");
    q[k] = 1'b1;
  endfunction

  function automatic bit has_zero(ref bit q[$]);
    foreach (q[i]) if (!q[i]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic offer(int s, longint v, bit c, bit fl);
    @(negedge clk);
    in_valid = 1'b1;
    in_shift = TSW'(s);
    in_bits  = (SMAX+1)'(v) | ((SMAX+1)'(c) << s);
    in_flush = fl;
    #1;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    if (c) ripple(refq);
    for (int i = s - 1; i >= 0; i--) refq.push_back(v[i]);
    #1;
    in_valid = 1'b0;
    in_flush = 1'b0;
  endtask

  // output side: rebuild the stream
  always @(posedge clk) begin
    if (rst_n) begin
      if (carry_out) begin ripple(outq); n_carry++; end
      if (byte_valid) begin
        for (int i = 7; i >= 0; i--) outq.push_back(byte_out[i]);
        n_bytes++;
      end
      if (end_out) begin
        bit bad;
        n_end++;
        if (refq.size() % 8 != 0) n_pad++;
        while (refq.size() % 8 != 0) refq.push_back(1'b0);
        checks++;
        bad = (refq.size() != outq.size());
        for (int i = 0; i < refq.size() && i < outq.size(); i++) if (refq[i] != outq[i]) bad = 1'b1;
        if (bad) begin
          failures++;
          $display("FAIL stream %0d: %0d bits out, %0d expected", n_end, outq.size(), refq.size());
        end
        refq.delete();
        outq.delete();
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int st = 0; st < 40; st++) begin
      bit heavy;
      int n;
      heavy = (st % 3 == 1);
      n = $urandom_range(5, 300);
      for (int k = 0; k < n; k++) begin
        int s;
        longint v;
        bit c;
        s = heavy ? $urandom_range(10, SMAX) :
            ($urandom_range(0, 9) < 7 ? $urandom_range(0, 5) : $urandom_range(0, SMAX));
        v = longint'({$urandom, $urandom}) & ((longint'(1) << s) - 1);
        c = ($urandom_range(0, 9) == 0) && has_zero(refq);
        offer(s, v, c, 1'b0);
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      // flush chunk: like the encoder, it carries the whole low register
      offer(W, longint'($urandom_range(0, (1 << W) - 1)), 1'b0, 1'b1);
      wait (n_end == st + 1);
    end
    checks++;
    if (n_stall == 0 || n_carry == 0 || n_pad == 0) begin
      failures++;
      $display("FAIL: stall=%0d carry=%0d pad=%0d", n_stall, n_carry, n_pad);
    end
    $display("stall=%0d carry=%0d pad=%0d bytes=%0d", n_stall, n_carry, n_pad, n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
