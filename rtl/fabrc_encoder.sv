// fabrc_encoder: multiplication-free, table-free fast adaptive binary range
// coder (F-ABRC) encoder that codes up to NSYM binary symbols per cycle.
//
// Each symbol is coded with the probability of its context, estimated with
// an imaginary sliding window (ISW) of 2^bl symbols: a counter per context
// that decays by 1/2^bl per symbol and grows on the less probable symbol.
// The interval split needs no multiplier: the range is quantised to four
// points and the product range*p becomes a shift and two conditional adds.
//
// Pipeline (three phases, as in the published block diagram):
//   phase 0  NSYM chained CU&RO lanes (cu_ro). Lane i starts from the range
//            lane i-1 produced. Its context state comes from ctx_mem, or,
//            when a lower lane of the same cycle used the same context, from
//            that lane's updated state (forwarding multiplexer). The range
//            register and the contexts are updated; Add-to-low and R-Shift
//            per lane are registered.
//   phase 1  NSYM chained LO lanes (lo_unit) update the low register and
//            produce bit chunks, merged by outcome_comb; the merged chunk
//            and its length are registered.
//   phase 2  input_bl packs the chunks into bytes (one per cycle) and bpu
//            resolves carries and emits bytes plus runs of stuff bytes.
//
// Interface: a group of symbols is offered with in_valid and taken when
// in_ready is high. lane_valid selects which lanes carry a symbol (lanes are
// coded in order 0..NSYM-1); lane_em selects regular or bypass coding;
// lane_ctx the context. A group with flush set carries no symbols and
// terminates the stream: the whole low register is written out, the last
// byte is padded with zeros, the held bytes are released and done pulses.
// After a flush the range, low and all contexts start afresh. in_ready drops
// only while the input buffer is full or a flush drains. Output: every
// out_valid event stands for out_byte followed by n_stuff copies of
// stuff_byte. Latency from a symbol to the byte that completes it is at
// least four cycles.
//
// Register sizes d and bl, the number of lanes and contexts, the initial
// probability 1/2, the bypass split and the flush procedure are this
// design's choices; the algorithm and the block structure follow the
// published method.
module fabrc_encoder
  import fabrc_pkg::*;
#(
  parameter int unsigned D    = 16,
  parameter int unsigned BL   = 5,
  parameter int unsigned NSYM = 2,
  parameter int unsigned NCTX = 16,
  localparam int unsigned W    = D - 1,
  localparam int unsigned NOW  = D + BL - 1,
  localparam int unsigned SHW  = $clog2(D),
  localparam int unsigned CW   = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned SMAX = NSYM * W,
  localparam int unsigned TSW  = $clog2(SMAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    flush,
  input  logic [NSYM-1:0]         lane_valid,
  input  logic [NSYM-1:0]         lane_sym,
  input  em_t  [NSYM-1:0]         lane_em,
  input  logic [NSYM-1:0][CW-1:0] lane_ctx,
  output logic                    out_valid,
  output logic [7:0]              out_byte,
  output logic [7:0]              stuff_byte,
  output logic [15:0]             n_stuff,
  output logic                    done
);

  localparam logic [W-1:0] X_INIT = '1;

  // ---------------------------------------------------------------- phase 0
  logic                    accept;
  logic [W-1:0]            x_q;
  logic [NSYM:0][W-1:0]    x_chain;
  logic [NSYM-1:0][NOW:0]  rd_state, st_sel, st_out;
  logic [NSYM-1:0]         st_we, lane_v;
  logic [NSYM-1:0][W-1:0]  add_low;
  logic [NSYM-1:0][SHW-1:0] rshift;

  logic                    p1_valid, p1_flush;
  logic [NSYM-1:0][W-1:0]  p1_add;
  logic [NSYM-1:0][SHW-1:0] p1_shift;
  logic                    p2_valid, p2_flush;
  logic [SMAX:0]           p2_bits;
  logic [TSW-1:0]          p2_shift;
  logic                    p1_ready, p2_ready, bl_ready;

  assign p2_ready = !p2_valid || bl_ready;
  assign p1_ready = !p1_valid || p2_ready;
  assign in_ready = p1_ready;
  assign accept   = in_valid && in_ready;

  assign x_chain[0] = x_q;

  for (genvar i = 0; i < NSYM; i++) begin : g_lane
    assign lane_v[i] = accept && !flush && lane_valid[i];

    // context forwarding multiplexer: latest lower lane with the same context
    always_comb begin
      st_sel[i] = rd_state[i];
      for (int j = 0; j < i; j++) begin
        if (st_we[j] && lane_ctx[j] == lane_ctx[i]) st_sel[i] = st_out[j];
      end
    end

    cu_ro #(.D(D), .BL(BL)) u_cu_ro (
      .valid   (lane_v[i]),
      .em      (lane_em[i]),
      .sym     (lane_sym[i]),
      .x_in    (x_chain[i]),
      .st_in   (st_sel[i]),
      .x_out   (x_chain[i+1]),
      .st_out  (st_out[i]),
      .st_we   (st_we[i]),
      .add_low (add_low[i]),
      .rshift  (rshift[i])
    );
  end

  ctx_mem #(.D(D), .BL(BL), .NSYM(NSYM), .NCTX(NCTX)) u_ctx (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (accept && flush),
    .rd_idx   (lane_ctx),
    .rd_state (rd_state),
    .we       (st_we),
    .wr_idx   (lane_ctx),
    .wr_state (st_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= X_INIT;
      p1_valid <= 1'b0;
      p1_flush <= 1'b0;
      p1_add   <= '0;
      p1_shift <= '0;
    end else if (p1_ready) begin
      p1_valid <= accept;
      p1_flush <= accept && flush;
      if (accept && flush) begin
        x_q         <= X_INIT;
        p1_add      <= '0;
        p1_shift    <= '0;
        p1_shift[0] <= SHW'(W);   // move the whole low register out
      end else if (accept) begin
        x_q      <= x_chain[NSYM];
        p1_add   <= add_low;
        p1_shift <= rshift;
      end
    end
  end

  // ---------------------------------------------------------------- phase 1
  logic [W-1:0]            y_q;
  logic [NSYM:0][W-1:0]    y_chain;
  logic [NSYM-1:0][W:0]    lane_bits;
  logic [SMAX:0]           total_bits;
  logic [TSW-1:0]          total_shift;

  assign y_chain[0] = y_q;

  for (genvar i = 0; i < NSYM; i++) begin : g_lo
    lo_unit #(.D(D)) u_lo (
      .y_in     (y_chain[i]),
      .add_low  (p1_add[i]),
      .rshift   (p1_shift[i]),
      .y_out    (y_chain[i+1]),
      .out_bits (lane_bits[i])
    );
  end

  outcome_comb #(.D(D), .NSYM(NSYM)) u_comb (
    .lane_bits   (lane_bits),
    .lane_shift  (p1_shift),
    .total_bits  (total_bits),
    .total_shift (total_shift)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q      <= '0;
      p2_valid <= 1'b0;
      p2_flush <= 1'b0;
      p2_bits  <= '0;
      p2_shift <= '0;
    end else if (p2_ready) begin
      p2_valid <= p1_valid;
      p2_flush <= p1_flush;
      if (p1_valid) begin
        y_q      <= y_chain[NSYM];
        p2_bits  <= total_bits;
        p2_shift <= total_shift;
      end
    end
  end

  // ---------------------------------------------------------------- phase 2
  logic       bl_byte_valid, bl_carry, bl_end;
  logic [7:0] bl_byte;

  input_bl #(.D(D), .NSYM(NSYM)) u_bl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (p2_valid),
    .in_ready   (bl_ready),
    .in_bits    (p2_bits),
    .in_shift   (p2_shift),
    .in_flush   (p2_flush),
    .byte_valid (bl_byte_valid),
    .byte_out   (bl_byte),
    .carry_out  (bl_carry),
    .end_out    (bl_end)
  );

  bpu #(.NW(16)) u_bpu (
    .clk        (clk),
    .rst_n      (rst_n),
    .byte_valid (bl_byte_valid),
    .byte_in    (bl_byte),
    .carry_in   (bl_carry),
    .end_in     (bl_end),
    .out_valid  (out_valid),
    .out_byte   (out_byte),
    .stuff_byte (stuff_byte),
    .n_stuff    (n_stuff),
    .done       (done)
  );

endmodule
