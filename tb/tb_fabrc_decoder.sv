// tb_fabrc_decoder: checks the decoder on streams from the reference
// encoder.
//
// Each stream is a random mix of regular and bypass symbols over several
// contexts with jumping probabilities (including long near-certain runs, so
// that large renormalisation shifts occur). The reference encoder produces
// the bytes; they are fed to the decoder with random gaps, followed by zero
// bytes, while symbols are requested with random gaps. Every decoded symbol
// must equal the coded one. Also checks that the decoder waits for bits
// (req_ready low while running) at least once.
module tb_fabrc_decoder;
  import fabrc_pkg::*;
  import fabrc_ref_pkg::*;

  localparam int D = 16, BL = 5, NCTX = 16, CW = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_byte = '0;
  wire  in_ready, req_ready, sym_valid, sym_out;
  logic req_valid = 1'b0;
  em_t  req_em = EM_REGULAR;
  logic [CW-1:0] req_ctx = '0;

  fabrc_decoder #(.D(D), .BL(BL), .NCTX(NCTX)) dut (.*);

  always #5 clk = ~clk;

  ref_enc #(D, BL, NCTX) renc = new();
  typedef struct { bit bypass; int ctx; bit sym; } symrec_t;
  symrec_t      syms[$];
  byte unsigned bytes[$];
  int checks = 0, failures = 0, n_wait = 0;
  bit feeding;

  // byte feeder
  initial begin
    forever begin
      @(negedge clk);
      in_valid = 1'b0;
      if (feeding && $urandom_range(0, 9) != 0) begin
        in_valid = 1'b1;
        in_byte  = (bytes.size() > 0) ? bytes[0] : 8'h00;
        #1;
        if (in_ready) begin
          @(posedge clk);
          if (bytes.size() > 0) void'(bytes.pop_front());
        end
      end
    end
  end

  initial begin
    int prob[NCTX];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int st = 0; st < 12; st++) begin
      int n;
      symrec_t r;
      n = $urandom_range(1, 4000);
      for (int k = 0; k < n; k++) begin
        if (k % 300 == 0)
          foreach (prob[c]) prob[c] = (st % 4 == 1) ? 0 : $urandom_range(0, 1000);
        r.bypass = ($urandom_range(0, 9) == 0);
        r.ctx    = $urandom_range(0, NCTX - 1);
        r.sym    = ($urandom_range(0, 999) < prob[r.ctx]);
        if (st % 4 == 1 && k == n - 20) foreach (prob[c]) prob[c] = 1000;
        renc.put(r.bypass, r.ctx, r.sym);
        syms.push_back(r);
      end
      renc.finish(bytes);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      feeding = 1'b1;
      foreach (syms[k]) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        req_valid = 1'b1;
        req_em    = syms[k].bypass ? EM_BYPASS : EM_REGULAR;
        req_ctx   = CW'(syms[k].ctx);
        #1;
        while (!req_ready) begin
          if (dut.state_q == 2'd2) n_wait++;
          @(negedge clk);
          #1;
        end
        @(posedge clk);
        @(negedge clk);
        req_valid = 1'b0;
        checks++;
        if (!sym_valid || sym_out != syms[k].sym) begin
          failures++;
          if (failures < 10) $display("FAIL stream %0d symbol %0d: valid=%0d got %0d exp %0d", st, k, sym_valid, sym_out, syms[k].sym);
        end
      end
      feeding = 1'b0;
      syms.delete();
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL: decoder never waited for code bits"); end
    $display("waits=%0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
