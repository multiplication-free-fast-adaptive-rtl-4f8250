// enc_harness: self-checking driver for one fabrc_encoder configuration.
//
// Instantiates the encoder with the given parameters, codes NSTREAMS
// streams (random regular/bypass symbols over contexts with jumping
// probabilities, one burst stream that forces stalls, random idle lanes and
// input gaps) and compares every stream's bytes with the reference encoder
// and the reference decoder's symbols with the coded ones. Mechanisms that
// must occur: stall, context forwarding (only with two or more lanes), LPS,
// MPS switch, bypass, carry into packed bytes, flush padding. When finished
// it raises finished; checks and failures hold its counts.
module enc_harness #(
  parameter int D = 16,
  parameter int BL = 5,
  parameter int NSYM = 2,
  parameter int NCTX = 16,
  parameter int NSTREAMS = 6
) (
  output bit finished,
  output int checks,
  output int failures
);
  import fabrc_pkg::*;
  import fabrc_ref_pkg::*;

  localparam int CW = $clog2(NCTX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, flush = 1'b0;
  wire  in_ready;
  logic [NSYM-1:0] lane_valid = '0, lane_sym = '0;
  em_t  [NSYM-1:0] lane_em;
  logic [NSYM-1:0][CW-1:0] lane_ctx = '0;
  wire out_valid, done;
  wire [7:0] out_byte, stuff_byte;
  wire [15:0] n_stuff;

  fabrc_encoder #(.D(D), .BL(BL), .NSYM(NSYM), .NCTX(NCTX)) dut (.*);

  always #5 clk = ~clk;

  initial begin finished = 1'b0; checks = 0; failures = 0; end
  int n_stall = 0, n_fwd = 0, n_carry = 0, n_stuff_run = 0, n_stuff_zero = 0, n_streams_done = 0;

  ref_enc #(D, BL, NCTX) renc = new();
  ref_dec #(D, BL, NCTX) rdec = new();

  typedef struct { bit bypass; int ctx; bit sym; } symrec_t;
  symrec_t      sent[$];          // symbols of the stream being sent
  symrec_t      streams_sym[$][$];
  byte unsigned expect_bytes[$][$];
  byte unsigned got[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------- stimulus
  int prob [NCTX];   // probability of a 1, per mille
  int levels [6] = '{15, 80, 300, 500, 850, 985};
  int ngroups;
  bit sweep = 1'b0;   // lanes walk through all contexts, regular mode only
  int sweep_ctx = 0;

  task automatic send(input bit is_flush);
    symrec_t r;
    @(negedge clk);
    in_valid = 1'b1;
    flush    = is_flush;
    if (!is_flush) begin
      for (int i = 0; i < NSYM; i++) begin
        lane_valid[i] = sweep || ($urandom_range(0, 99) < 90);
        lane_em[i]    = (!sweep && $urandom_range(0, 99) < 12) ? EM_BYPASS : EM_REGULAR;
        lane_ctx[i]   = sweep ? CW'(sweep_ctx % NCTX) : CW'($urandom_range(0, (NCTX > 5 ? 4 : NCTX - 1)));
        sweep_ctx     = sweep_ctx + 1;
        lane_sym[i]   = ($urandom_range(0, 999) < prob[lane_ctx[i]]);
      end
    end
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    // the group is taken at this edge: run the reference model
    if (is_flush) begin
      byte unsigned eb[$];
      renc.finish(eb);
      expect_bytes.push_back(eb);
      streams_sym.push_back(sent);
      sent.delete();
    end else begin
      for (int i = 0; i < NSYM; i++) begin
        if (lane_valid[i]) begin
          r.bypass = (lane_em[i] == EM_BYPASS);
          r.ctx    = int'(lane_ctx[i]);
          r.sym    = lane_sym[i];
          renc.put(r.bypass, r.ctx, r.sym);
          sent.push_back(r);
        end
      end
    end
    #1;
    in_valid = 1'b0;
    flush    = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < NSYM; i++) lane_em[i] = EM_REGULAR;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSTREAMS; s++) begin
      ngroups = (s == 0) ? 3 : $urandom_range(200, 3000);
      if (s == 1) begin
        // burst: drive every context to a near-certain 0, then code a 1 in
        // each, so that every lane emits many bits in the same cycles
        sweep = 1'b1;
        for (int c = 0; c < NCTX; c++) prob[c] = 0;
        repeat (300 * NCTX) send(1'b0);
        for (int c = 0; c < NCTX; c++) prob[c] = 1000;
        repeat (NCTX) send(1'b0);
        sweep = 1'b0;
      end
      for (int g = 0; g < ngroups; g++) begin
        if (g % 250 == 0) begin
          for (int c = 0; c < NCTX; c++) prob[c] = levels[$urandom_range(0, 5)];
        end
        send(1'b0);
        if ($urandom_range(0, 99) < 10) repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      send(1'b1);
    end
    wait (n_streams_done == NSTREAMS);
    repeat (5) @(posedge clk);

    check(n_stall > 0,          "no pipeline stall happened");
    if (NSYM > 1) check(n_fwd > 0, "no context forwarding happened");
    check(n_carry > 0,          "no carry into packed bytes happened");
    check(renc.n_lps > 0,       "no LPS coded");
    check(renc.n_switch > 0,    "no MPS switch happened");
    check(renc.n_bypass > 0,    "no bypass symbol coded");
    check(renc.n_pad > 0,       "no flush needed padding");
    $display("D=%0d BL=%0d NSYM=%0d NCTX=%0d", D, BL, NSYM, NCTX);
    $display("mechanisms: stall=%0d forward=%0d carry=%0d stuff_runs=%0d (after carry %0d) lps=%0d mps_switch=%0d bypass=%0d regular=%0d pad=%0d",
             n_stall, n_fwd, n_carry, n_stuff_run, n_stuff_zero, renc.n_lps, renc.n_switch,
             renc.n_bypass, renc.n_regular, renc.n_pad);
    finished = 1'b1;
  end

  // ------------------------------------------------------------- monitors
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.p2_valid && !dut.bl_ready && !dut.u_bl.flushing_q) n_stall++;
      for (int i = 1; i < NSYM; i++)
        for (int j = 0; j < i; j++)
          if (dut.st_we[i] && dut.st_we[j] && dut.lane_ctx[i] == dut.lane_ctx[j]) n_fwd++;
      if (dut.bl_carry) n_carry++;
      if (out_valid) begin
        got.push_back(out_byte);
        for (int k = 0; k < int'(n_stuff); k++) got.push_back(stuff_byte);
        if (n_stuff != 0) begin
          n_stuff_run++;
          if (stuff_byte == 8'h00) n_stuff_zero++;
        end
      end
      if (done) begin
        byte unsigned eb[$];
        symrec_t      ss[$];
        int           bad;
        eb = expect_bytes.pop_front();
        ss = streams_sym.pop_front();
        check(got.size() == eb.size(),
              $sformatf("stream %0d: %0d bytes, expected %0d", n_streams_done, got.size(), eb.size()));
        bad = 0;
        for (int k = 0; k < eb.size() && k < got.size(); k++) if (got[k] != eb[k]) bad++;
        check(bad == 0, $sformatf("stream %0d: %0d bytes differ", n_streams_done, bad));
        rdec.start(got);
        bad = 0;
        foreach (ss[k]) if (rdec.get(ss[k].bypass, ss[k].ctx) != ss[k].sym) bad++;
        check(bad == 0, $sformatf("stream %0d: %0d of %0d symbols decode wrong", n_streams_done, bad, ss.size()));
        got.delete();
        n_streams_done++;
      end
    end
  end

endmodule
