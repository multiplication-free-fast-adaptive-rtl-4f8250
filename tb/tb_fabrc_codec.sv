// tb_fabrc_codec: end-to-end test of the whole codec at its default
// parameters: the encoder codes streams, the decoder decodes the bytes the
// encoder produced, and both are checked against integer reference models.
//
// Each stream mixes regular and bypass symbols over a few contexts whose
// symbol probabilities jump now and then (a non-stationary source), with
// random idle lanes, random input bubbles and lanes sharing a context in
// one cycle; one stream first drives every context to a near-certain symbol
// and then codes the other symbol in each, so the encoder must stall. At
// every done pulse the emitted bytes (out_byte followed by n_stuff stuff
// bytes) must equal the reference encoder's bytes and the reference decoder
// must recover the symbols. The same bytes then go to the decoder block
// (random byte and request gaps, zero bytes past the end), which must
// return every symbol, while the encoder already codes the next stream.
// Mechanisms counted, each required at least once: encoder stall on a full
// input buffer, context forwarding between lanes, LPS, MPS switch, bypass,
// carry into packed bytes, stuff-byte runs, flush padding, decoder waiting
// for code bits.
module tb_fabrc_codec;
  import fabrc_pkg::*;
  import fabrc_ref_pkg::*;

  localparam int D = 16, BL = 5, NSYM = 2, NCTX = 16;
  localparam int CW = $clog2(NCTX);
  localparam int NSTREAMS = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, flush = 1'b0;
  wire  in_ready;
  logic [NSYM-1:0] lane_valid = '0, lane_sym = '0;
  em_t  [NSYM-1:0] lane_em;
  logic [NSYM-1:0][CW-1:0] lane_ctx = '0;
  wire out_valid, done;
  wire [7:0] out_byte, stuff_byte;
  wire [15:0] n_stuff;
  logic dec_start = 1'b0, dec_in_valid = 1'b0, dec_req_valid = 1'b0;
  logic [7:0] dec_in_byte = '0;
  em_t  dec_req_em = EM_REGULAR;
  logic [CW-1:0] dec_req_ctx = '0;
  wire  dec_in_ready, dec_req_ready, dec_sym_valid, dec_sym_out;

  fabrc_codec top (
    .clk (clk), .rst_n (rst_n),
    .enc_in_valid (in_valid), .enc_in_ready (in_ready), .enc_flush (flush),
    .enc_lane_valid (lane_valid), .enc_lane_sym (lane_sym), .enc_lane_em (lane_em),
    .enc_lane_ctx (lane_ctx), .enc_out_valid (out_valid), .enc_out_byte (out_byte),
    .enc_stuff_byte (stuff_byte), .enc_n_stuff (n_stuff), .enc_done (done),
    .dec_start (dec_start), .dec_in_valid (dec_in_valid), .dec_in_byte (dec_in_byte),
    .dec_in_ready (dec_in_ready), .dec_req_valid (dec_req_valid), .dec_req_em (dec_req_em),
    .dec_req_ctx (dec_req_ctx), .dec_req_ready (dec_req_ready),
    .dec_sym_valid (dec_sym_valid), .dec_sym_out (dec_sym_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dec_wait = 0, n_dec_streams = 0;
  int n_stall = 0, n_fwd = 0, n_carry = 0, n_stuff_run = 0, n_stuff_zero = 0, n_streams_done = 0;

  ref_enc #(D, BL, NCTX) renc = new();
  ref_dec #(D, BL, NCTX) rdec = new();

  typedef struct { bit bypass; int ctx; bit sym; } symrec_t;
  symrec_t      sent[$];          // symbols of the stream being sent
  symrec_t      streams_sym[$][$];
  byte unsigned expect_bytes[$][$];
  byte unsigned got[$];
  byte unsigned dec_bytes_q[$][$];
  symrec_t      dec_syms_q[$][$];
  byte unsigned dbytes[$];
  bit           dfeeding = 1'b0;

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
        lane_ctx[i]   = sweep ? CW'(sweep_ctx % NCTX) : CW'($urandom_range(0, 4));
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
    wait (n_dec_streams == NSTREAMS);
    repeat (5) @(posedge clk);

    check(n_stall > 0,          "no pipeline stall happened");
    check(n_fwd > 0,            "no context forwarding happened");
    check(n_carry > 0,          "no carry into packed bytes happened");
    check(n_stuff_run > 0,      "no stuff-byte run happened");
    check(renc.n_lps > 0,       "no LPS coded");
    check(renc.n_switch > 0,    "no MPS switch happened");
    check(renc.n_bypass > 0,    "no bypass symbol coded");
    check(renc.n_pad > 0,       "no flush needed padding");
    check(n_dec_wait > 0,       "decoder never waited for code bits");
    $display("mechanisms: stall=%0d forward=%0d carry=%0d stuff_runs=%0d (after carry %0d) lps=%0d mps_switch=%0d bypass=%0d regular=%0d pad=%0d",
             n_stall, n_fwd, n_carry, n_stuff_run, n_stuff_zero, renc.n_lps, renc.n_switch,
             renc.n_bypass, renc.n_regular, renc.n_pad);
    $display("decoder waits=%0d", n_dec_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- decoder side
  initial begin
    forever begin
      @(negedge clk);
      dec_in_valid = 1'b0;
      if (dfeeding && $urandom_range(0, 9) != 0) begin
        dec_in_valid = 1'b1;
        dec_in_byte  = (dbytes.size() > 0) ? dbytes[0] : 8'h00;
        #1;
        if (dec_in_ready) begin
          @(posedge clk);
          if (dbytes.size() > 0) void'(dbytes.pop_front());
        end
      end
    end
  end

  initial begin
    symrec_t ss[$];
    int bad;
    forever begin
      wait (dec_bytes_q.size() > 0);
      dbytes = dec_bytes_q.pop_front();
      ss     = dec_syms_q.pop_front();
      @(negedge clk);
      dec_start = 1'b1;
      @(negedge clk);
      dec_start = 1'b0;
      dfeeding  = 1'b1;
      bad = 0;
      foreach (ss[k]) begin
        @(negedge clk);
        if ($urandom_range(0, 9) == 0) @(negedge clk);
        dec_req_valid = 1'b1;
        dec_req_em    = ss[k].bypass ? EM_BYPASS : EM_REGULAR;
        dec_req_ctx   = CW'(ss[k].ctx);
        #1;
        while (!dec_req_ready) begin
          if (top.u_dec.state_q == 2'd2) n_dec_wait++;
          @(negedge clk);
          #1;
        end
        @(posedge clk);
        @(negedge clk);
        dec_req_valid = 1'b0;
        if (!dec_sym_valid || dec_sym_out != ss[k].sym) bad++;
      end
      dfeeding = 1'b0;
      repeat (3) @(negedge clk);   // let the byte feeder go idle
      check(bad == 0, $sformatf("decoder block: stream %0d: %0d of %0d symbols wrong", n_dec_streams, bad, ss.size()));
      n_dec_streams++;
    end
  end

  // ------------------------------------------------------------- monitors
  always @(posedge clk) begin
    if (rst_n) begin
      if (top.u_enc.p2_valid && !top.u_enc.bl_ready && !top.u_enc.u_bl.flushing_q) n_stall++;
      for (int i = 1; i < NSYM; i++)
        for (int j = 0; j < i; j++)
          if (top.u_enc.st_we[i] && top.u_enc.st_we[j] && top.u_enc.lane_ctx[i] == top.u_enc.lane_ctx[j]) n_fwd++;
      if (top.u_enc.bl_carry) n_carry++;
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
        $display("stream %0d: %0d symbols -> %0d bytes", n_streams_done, ss.size(), got.size());
        dec_bytes_q.push_back(got);
        dec_syms_q.push_back(ss);
        got.delete();
        n_streams_done++;
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
