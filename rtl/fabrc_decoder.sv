// fabrc_decoder: F-ABRC decoder, one binary symbol per cycle.
//
// It mirrors the encoder's phase 0. For each requested symbol it evaluates
// the context-update/range-operation step twice, once assuming the MPS and
// once assuming the LPS (two cu_ro instances; the LPS instance's Add-to-low
// output is the MPS part X - T of the range). The decision compares the code
// offset V (code value minus the low end of the interval) with X - T:
// V >= X - T means LPS, and V drops by X - T. The chosen instance supplies
// the new range, the context update and the renormalisation shift s; V is
// shifted left by s and refilled with the next s code bits.
//
// Code bits come in bytes (in_valid/in_ready) into a bit buffer of
// d-1+16 bits; a symbol is decoded only when at least d-1 bits are
// buffered. Past the end of a stream the source must keep supplying bytes
// (zeros), since the encoder pads with zeros.
// start (one cycle) begins a new stream: range 2^(d-1)-1, all contexts at
// probability 1/2, empty bit buffer; the first d-1 bits are then loaded
// into V before requests are taken.
// Requests: req_valid with req_em and req_ctx, taken when req_ready is
// high; the symbol appears on sym_out with sym_valid one cycle later.
//
// The document states only that the decoder is built the same way as the
// encoder; this structure, the byte interface and the single-lane rate are
// this design's choices.
module fabrc_decoder
  import fabrc_pkg::*;
#(
  parameter int unsigned D    = 16,
  parameter int unsigned BL   = 5,
  parameter int unsigned NCTX = 16,
  localparam int unsigned W   = D - 1,
  localparam int unsigned NOW = D + BL - 1,
  localparam int unsigned SHW = $clog2(D),
  localparam int unsigned CW  = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned BB  = W + 16,
  localparam int unsigned NBW = $clog2(BB + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  logic [7:0]    in_byte,
  output logic          in_ready,
  input  logic          req_valid,
  input  em_t           req_em,
  input  logic [CW-1:0] req_ctx,
  output logic          req_ready,
  output logic          sym_valid,
  output logic          sym_out
);

  localparam logic [W-1:0] X_INIT = '1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;
  state_t state_q;

  logic [W-1:0]   x_q, v_q;
  logic [BB-1:0]  bb_q;      // buffered code bits, the oldest at bit nb_q-1
  logic [NBW-1:0] nb_q;

  // ---------------------------------------------------------- symbol step
  logic           take;
  logic [NOW:0]   st;
  logic           mps_sym;
  logic [W-1:0]   xm_x, xl_x, xl_add;
  logic [NOW:0]   stm, stl;
  logic           wem, wel;
  logic [SHW-1:0] shm, shl;
  logic           lps;
  logic [W-1:0]   x_n, v_sub;
  logic [NOW:0]   st_n;
  logic           we_n;
  logic [SHW-1:0] sh_n;

  assign req_ready = (state_q == S_RUN) && (nb_q >= NBW'(W));
  assign take      = req_valid && req_ready;
  assign mps_sym   = (req_em == EM_BYPASS) ? 1'b0 : st[NOW];

  ctx_mem #(.D(D), .BL(BL), .NSYM(1), .NCTX(NCTX)) u_ctx (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (start),
    .rd_idx   (req_ctx),
    .rd_state (st),
    .we       (we_n),
    .wr_idx   (req_ctx),
    .wr_state (st_n)
  );

  cu_ro #(.D(D), .BL(BL)) u_mps (
    .valid (take), .em (req_em), .sym (mps_sym), .x_in (x_q), .st_in (st),
    .x_out (xm_x), .st_out (stm), .st_we (wem), .add_low (), .rshift (shm)
  );

  cu_ro #(.D(D), .BL(BL)) u_lps (
    .valid (take), .em (req_em), .sym (~mps_sym), .x_in (x_q), .st_in (st),
    .x_out (xl_x), .st_out (stl), .st_we (wel), .add_low (xl_add), .rshift (shl)
  );

  always_comb begin
    // xl_add = X - T, the MPS part of the range
    lps   = (v_q >= xl_add);
    x_n   = lps ? xl_x : xm_x;
    st_n  = lps ? stl : stm;
    we_n  = lps ? wel : wem;
    sh_n  = lps ? shl : shm;
    v_sub = lps ? (v_q - xl_add) : v_q;
  end

  // ---------------------------------------------------------- bit buffer
  logic [NBW-1:0] used;
  logic [NBW-1:0] nb_mid;
  logic [W-1:0]   bits_out;   // the next `used` bits, right-aligned
  logic [BB-1:0]  bb_mid;

  assign in_ready = (state_q != S_IDLE) && (nb_q <= NBW'(BB - 8));

  always_comb begin
    used = '0;
    if (state_q == S_LOAD && nb_q >= NBW'(W)) used = NBW'(W);
    else if (take)                           used = NBW'(sh_n);
    bits_out = W'(bb_q >> (nb_q - used));
    nb_mid   = nb_q - used;
    bb_mid   = bb_q & ((BB'(1) << nb_mid) - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      x_q       <= X_INIT;
      v_q       <= '0;
      bb_q      <= '0;
      nb_q      <= '0;
      sym_valid <= 1'b0;
      sym_out   <= 1'b0;
    end else if (start) begin
      state_q   <= S_LOAD;
      x_q       <= X_INIT;
      v_q       <= '0;
      bb_q      <= '0;
      nb_q      <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= take;
      if (take) begin
        sym_out <= lps ? ~mps_sym : mps_sym;
        x_q     <= x_n;
        v_q     <= W'((v_sub << sh_n) | bits_out);
      end
      if (state_q == S_LOAD && nb_q >= NBW'(W)) begin
        v_q     <= bits_out;
        state_q <= S_RUN;
      end
      if (in_valid && in_ready) begin
        bb_q <= BB'({bb_mid, in_byte});
        nb_q <= nb_mid + NBW'(8);
      end else begin
        bb_q <= bb_mid;
        nb_q <= nb_mid;
      end
    end
  end

endmodule
