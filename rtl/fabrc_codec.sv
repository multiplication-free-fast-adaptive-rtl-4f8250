// fabrc_codec: the F-ABRC encoder and decoder side by side.
//
// The encoder (fabrc_encoder) codes up to NSYM binary symbols per cycle into
// a byte stream; the decoder (fabrc_decoder) turns such a stream back into
// symbols, one per cycle, given the same sequence of modes and contexts.
// They share only the clock and reset: all encoder ports carry the prefix
// enc_, all decoder ports dec_. Each side's interface and timing are those
// of its module. Both use the same d, bl and number of contexts, which is
// what makes the decoder's probability estimates track the encoder's.
module fabrc_codec
  import fabrc_pkg::*;
#(
  parameter int unsigned D    = 16,
  parameter int unsigned BL   = 5,
  parameter int unsigned NSYM = 2,
  parameter int unsigned NCTX = 16,
  localparam int unsigned CW  = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // encoder
  input  logic                    enc_in_valid,
  output logic                    enc_in_ready,
  input  logic                    enc_flush,
  input  logic [NSYM-1:0]         enc_lane_valid,
  input  logic [NSYM-1:0]         enc_lane_sym,
  input  em_t  [NSYM-1:0]         enc_lane_em,
  input  logic [NSYM-1:0][CW-1:0] enc_lane_ctx,
  output logic                    enc_out_valid,
  output logic [7:0]              enc_out_byte,
  output logic [7:0]              enc_stuff_byte,
  output logic [15:0]             enc_n_stuff,
  output logic                    enc_done,
  // decoder
  input  logic                    dec_start,
  input  logic                    dec_in_valid,
  input  logic [7:0]              dec_in_byte,
  output logic                    dec_in_ready,
  input  logic                    dec_req_valid,
  input  em_t                     dec_req_em,
  input  logic [CW-1:0]           dec_req_ctx,
  output logic                    dec_req_ready,
  output logic                    dec_sym_valid,
  output logic                    dec_sym_out
);

  fabrc_encoder #(.D(D), .BL(BL), .NSYM(NSYM), .NCTX(NCTX)) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (enc_in_valid),
    .in_ready   (enc_in_ready),
    .flush      (enc_flush),
    .lane_valid (enc_lane_valid),
    .lane_sym   (enc_lane_sym),
    .lane_em    (enc_lane_em),
    .lane_ctx   (enc_lane_ctx),
    .out_valid  (enc_out_valid),
    .out_byte   (enc_out_byte),
    .stuff_byte (enc_stuff_byte),
    .n_stuff    (enc_n_stuff),
    .done       (enc_done)
  );

  fabrc_decoder #(.D(D), .BL(BL), .NCTX(NCTX)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (dec_start),
    .in_valid  (dec_in_valid),
    .in_byte   (dec_in_byte),
    .in_ready  (dec_in_ready),
    .req_valid (dec_req_valid),
    .req_em    (dec_req_em),
    .req_ctx   (dec_req_ctx),
    .req_ready (dec_req_ready),
    .sym_valid (dec_sym_valid),
    .sym_out   (dec_sym_out)
  );

endmodule
