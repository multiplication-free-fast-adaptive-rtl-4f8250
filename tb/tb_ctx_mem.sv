// tb_ctx_mem: checks the context store against an array model.
//
// Random reads on every port and random writes from every lane, including
// two lanes writing the same context in one cycle (the higher lane must
// win), reset values and the init pulse that restores probability 1/2.
module tb_ctx_mem;
  localparam int D = 16, BL = 5, NSYM = 2, NCTX = 16, NOW = D + BL - 1, CW = 4;
  localparam logic [NOW:0] ST_INIT = {1'b0, NOW'(9) << (D - 6 + BL)};

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  logic [NSYM-1:0][CW-1:0] rd_idx, wr_idx;
  logic [NSYM-1:0][NOW:0]  rd_state, wr_state;
  logic [NSYM-1:0]         we;

  ctx_mem #(.D(D), .BL(BL), .NSYM(NSYM), .NCTX(NCTX)) dut (.*);

  always #5 clk = ~clk;

  logic [NOW:0] model [NCTX];
  int checks = 0, failures = 0, n_conflict = 0;

  task automatic check_reads();
    for (int i = 0; i < NSYM; i++) begin
      checks++;
      if (rd_state[i] != model[rd_idx[i]]) begin
        failures++;
        if (failures < 10) $display("FAIL port %0d ctx %0d: %0h exp %0h", i, rd_idx[i], rd_state[i], model[rd_idx[i]]);
      end
    end
  endtask

  initial begin
    we = '0; rd_idx = '0; wr_idx = '0; wr_state = '0;
    for (int c = 0; c < NCTX; c++) model[c] = ST_INIT;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      init = ($urandom_range(0, 499) == 0);
      for (int i = 0; i < NSYM; i++) begin
        rd_idx[i]   = CW'($urandom_range(0, NCTX - 1));
        wr_idx[i]   = CW'($urandom_range(0, 3));
        wr_state[i] = (NOW+1)'($urandom);
        we[i]       = 1'($urandom);
      end
      #1;
      check_reads();
      @(posedge clk);
      if (init) begin
        for (int c = 0; c < NCTX; c++) model[c] = ST_INIT;
      end else begin
        if (we[0] && we[1] && wr_idx[0] == wr_idx[1]) n_conflict++;
        for (int i = 0; i < NSYM; i++) if (we[i]) model[wr_idx[i]] = wr_state[i];
      end
    end
    checks++;
    if (n_conflict == 0) begin failures++; $display("FAIL: no write conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
