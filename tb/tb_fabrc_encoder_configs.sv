// tb_fabrc_encoder_configs: the encoder in other configurations than the
// default, each checked by enc_harness against the reference models:
// one lane, three and four lanes (the document's point that the number of
// symbols per cycle trades throughput against clock rate), and narrower and
// wider registers with other window lengths.
module tb_fabrc_encoder_configs;
  bit f[5];
  int c[5], e[5];

  enc_harness #(.D(16), .BL(5), .NSYM(1), .NCTX(16), .NSTREAMS(5)) h1 (.finished(f[0]), .checks(c[0]), .failures(e[0]));
  enc_harness #(.D(16), .BL(5), .NSYM(3), .NCTX(16), .NSTREAMS(5)) h3 (.finished(f[1]), .checks(c[1]), .failures(e[1]));
  enc_harness #(.D(16), .BL(5), .NSYM(4), .NCTX(8),  .NSTREAMS(5)) h4 (.finished(f[2]), .checks(c[2]), .failures(e[2]));
  enc_harness #(.D(12), .BL(4), .NSYM(2), .NCTX(4),  .NSTREAMS(5)) hs (.finished(f[3]), .checks(c[3]), .failures(e[3]));
  enc_harness #(.D(24), .BL(7), .NSYM(2), .NCTX(32), .NSTREAMS(5)) hw (.finished(f[4]), .checks(c[4]), .failures(e[4]));

  initial begin
    int checks, failures;
    wait (f[0] && f[1] && f[2] && f[3] && f[4]);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += e[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3] + c[4], e[0] + e[1] + e[2] + e[3] + e[4] + 1);
    $finish;
  end
endmodule
