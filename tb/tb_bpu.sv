// tb_bpu: checks the byte packing unit's carry resolution.
//
// Random bytes (0xFF a third of the time) arrive with random carries, and
// carries also arrive alone. A carry is offered only when it would stop in a
// byte the unit can still change (the contract the encoder upholds). A
// reference byte queue applies every carry directly. The unit's output
// events are expanded (out_byte, then n_stuff copies of stuff_byte) and at
// each done pulse must equal the reference. Stuff runs of 0xFF and of 0x00
// (a carry through a run) and lone carries must all occur.
module tb_bpu;
  logic clk = 1'b0, rst_n = 1'b0;
  logic byte_valid = 1'b0, carry_in = 1'b0, end_in = 1'b0;
  logic [7:0] byte_in = '0;
  wire out_valid, done;
  wire [7:0] out_byte, stuff_byte;
  wire [15:0] n_stuff;

  bpu #(.NW(16)) dut (.*);

  always #5 clk = ~clk;

  byte unsigned refq[$], outq[$];
  int hold = 0;   // first reference index the unit still holds
  int checks = 0, failures = 0;
  int n_ff_run = 0, n_zero_run = 0, n_lone = 0, n_done = 0;

  function automatic bit carry_ok();
    int k = refq.size() - 1;
    while (k >= 0 && refq[k] == 8'hFF) k--;
    return (k >= 0) && (k >= hold);
  endfunction

  function automatic void apply_carry();
    int k = refq.size() - 1;
    while (refq[k] == 8'hFF) begin refq[k] = 8'h00; k--; end
    refq[k] = refq[k] + 8'd1;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        outq.push_back(out_byte);
        for (int i = 0; i < int'(n_stuff); i++) outq.push_back(stuff_byte);
        if (n_stuff != 0 && stuff_byte == 8'hFF) n_ff_run++;
        if (n_stuff != 0 && stuff_byte == 8'h00) n_zero_run++;
      end
      if (done) begin
        bit bad;
        checks++;
        bad = (outq.size() != refq.size());
        for (int i = 0; i < outq.size() && i < refq.size(); i++) if (outq[i] != refq[i]) bad = 1'b1;
        if (bad) begin
          failures++;
          if (failures < 10) $display("FAIL stream %0d: %0d bytes out, %0d expected", n_done, outq.size(), refq.size());
        end
        outq.delete();
        refq.delete();
        hold = 0;
        n_done++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int st = 0; st < 60; st++) begin
      int n;
      n = $urandom_range(1, 400);
      for (int k = 0; k < n; k++) begin
        int r;
        r = $urandom_range(0, 99);
        @(negedge clk);
        byte_valid = 1'b0; carry_in = 1'b0;
        if (r < 75) begin
          byte_valid = 1'b1;
          byte_in    = ($urandom_range(0, 2) == 0) ? 8'hFF : 8'($urandom);
          carry_in   = ($urandom_range(0, 4) == 0) && carry_ok();
          if (carry_in) apply_carry();
          refq.push_back(byte_in);
          if (refq.size() == 1 || byte_in != 8'hFF || carry_in) hold = refq.size() - 1;
        end else if (r < 85 && carry_ok()) begin
          int last;
          carry_in = 1'b1;
          n_lone++;
          last = refq.size() - 1;
          if (refq[last] == 8'hFF) hold = last;
          apply_carry();
        end
      end
      @(negedge clk);
      byte_valid = 1'b0; carry_in = 1'b0; end_in = 1'b1;
      @(negedge clk);
      end_in = 1'b0;
      wait (n_done == st + 1);
    end
    checks++;
    if (n_ff_run == 0 || n_zero_run == 0 || n_lone == 0) begin
      failures++;
      $display("FAIL: ff_runs=%0d zero_runs=%0d lone_carries=%0d", n_ff_run, n_zero_run, n_lone);
    end
    $display("ff_runs=%0d zero_runs=%0d lone_carries=%0d", n_ff_run, n_zero_run, n_lone);
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
