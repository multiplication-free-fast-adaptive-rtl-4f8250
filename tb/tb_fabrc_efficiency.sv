// tb_fabrc_efficiency: compression efficiency of the encoder at its default
// parameters on stationary binary sources.
//
// For each probability p of a 1 (0.01 .. 0.5, and 0.9 to exercise the MPS
// switch), 40000 symbols from one context are coded two per cycle and
// flushed. The coded size, in bits per symbol, is compared with the source's
// empirical entropy H. An adaptive coder pays a redundancy for learning p;
// with a window of 2^bl = 32 symbols, theory puts it near 1/(2*32*ln 2)
// = 0.023 bit/symbol. The check allows H + 0.04 bit/symbol. Also checks that
// the bytes decode back with the reference decoder.
module tb_fabrc_efficiency;
  import fabrc_pkg::*;
  import fabrc_ref_pkg::*;

  localparam int NSYM = 2, CW = 4, N = 40000, NP = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, flush = 1'b0;
  wire  in_ready;
  logic [NSYM-1:0] lane_valid = '1, lane_sym = '0;
  em_t  [NSYM-1:0] lane_em = {NSYM{EM_REGULAR}};
  logic [NSYM-1:0][CW-1:0] lane_ctx = '0;
  wire out_valid, done;
  wire [7:0] out_byte, stuff_byte;
  wire [15:0] n_stuff;

  fabrc_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned got[$];
  bit syms[$];
  int ppm[NP] = '{10000, 30000, 100000, 200000, 300000, 500000, 900000};

  always @(posedge clk) begin
    if (out_valid) begin
      got.push_back(out_byte);
      for (int k = 0; k < int'(n_stuff); k++) got.push_back(stuff_byte);
    end
  end

  initial begin
    ref_dec #(16, 5, 16) rdec;
    rdec = new();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pi = 0; pi < NP; pi++) begin
      int ones, bad;
      real p, h, bps;
      ones = 0;
      got.delete();
      syms.delete();
      for (int k = 0; k < N / NSYM; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int i = 0; i < NSYM; i++) begin
          lane_sym[i] = ($urandom_range(0, 999999) < ppm[pi]);
        end
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        for (int i = 0; i < NSYM; i++) begin
          syms.push_back(lane_sym[i]);
          ones += int'(lane_sym[i]);
        end
        #1;
        in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      flush = 1'b1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      flush = 1'b0;
      @(posedge done);
      repeat (2) @(posedge clk);   // the monitor has taken the last event
      p = real'(ones) / real'(N);
      h = (ones == 0 || ones == N) ? 0.0 : -(p * $ln(p) + (1.0 - p) * $ln(1.0 - p)) / $ln(2.0);
      bps = real'(got.size() * 8) / real'(N);
      $display("p=%0.3f: H=%0.4f bit/sym, coded %0.4f bit/sym (%0d bytes), redundancy %0.4f",
               p, h, bps, got.size(), bps - h);
      checks++;
      if (bps > h + 0.04) begin
        failures++;
        $display("FAIL: redundancy above 0.04 bit/symbol");
      end
      rdec.start(got);
      bad = 0;
      foreach (syms[k]) if (rdec.get(1'b0, 0) != syms[k]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: %0d symbols decode wrong", bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
