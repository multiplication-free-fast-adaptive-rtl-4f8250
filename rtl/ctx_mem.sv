// ctx_mem: context state store of the encoder.
//
// Holds NCTX context states {mps, no}, where no is the scaled ISW counter of
// the least-probable symbol. It has NSYM combinational read ports (one per
// lane, addressed by the lane's context index) and NSYM write ports used to
// write back the states updated in phase 0. When several lanes write the
// same context in one cycle the highest lane wins: its state already includes
// the updates of the lower lanes through the forwarding multiplexers of the
// encoder.
//
// Reset (or a one-cycle init pulse) sets every context to probability 1/2
// (no = alpha*2^(d-2)*2^bl) with MPS = 0.
//
// The document shows context read and update paths but not the storage
// itself; a register array with these ports is this design's choice.
module ctx_mem #(
  parameter int unsigned D    = 16,
  parameter int unsigned BL   = 5,
  parameter int unsigned NSYM = 2,
  parameter int unsigned NCTX = 16,
  localparam int unsigned NOW = D + BL - 1,
  localparam int unsigned CW  = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic [NSYM-1:0][CW-1:0]  rd_idx,
  output logic [NSYM-1:0][NOW:0]   rd_state,
  input  logic [NSYM-1:0]          we,
  input  logic [NSYM-1:0][CW-1:0]  wr_idx,
  input  logic [NSYM-1:0][NOW:0]   wr_state
);

  localparam logic [NOW:0] ST_INIT = {1'b0, NOW'(9) << (D - 6 + BL)};

  logic [NOW:0] mem [NCTX];

  always_comb begin
    for (int i = 0; i < NSYM; i++) rd_state[i] = mem[rd_idx[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCTX; c++) mem[c] <= ST_INIT;
    end else if (init) begin
      for (int c = 0; c < NCTX; c++) mem[c] <= ST_INIT;
    end else begin
      for (int i = 0; i < NSYM; i++) begin
        if (we[i]) mem[wr_idx[i]] <= wr_state[i];
      end
    end
  end

endmodule
