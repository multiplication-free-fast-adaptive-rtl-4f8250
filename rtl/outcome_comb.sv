// outcome_comb: outcome combination unit at the end of phase 1.
//
// Merges the chunks produced by the NSYM low-operation units of one cycle
// into one chunk. Lane 0's bits are the start value; for each further lane i
// the running value is shifted left by that lane's shift and the lane's bits
// are added (the add absorbs the lane's carry bit). The shifts are summed.
// The result total_bits holds total_shift bits of code plus one carry bit at
// weight 2^total_shift. Because the coding interval only shrinks, at most
// one carry leaves a cycle, so total_shift+1 bits always suffice.
//
// Purely combinational; follows the adder/shifter chain of the published
// block diagram. Each lane's shift may be up to d-1 (the flush shift).
module outcome_comb #(
  parameter int unsigned D    = 16,
  parameter int unsigned NSYM = 2,
  localparam int unsigned W    = D - 1,
  localparam int unsigned SHW  = $clog2(D),
  localparam int unsigned SMAX = NSYM * W,
  localparam int unsigned TSW  = $clog2(SMAX + 1)
) (
  input  logic [NSYM-1:0][W:0]     lane_bits,
  input  logic [NSYM-1:0][SHW-1:0] lane_shift,
  output logic [SMAX:0]            total_bits,
  output logic [TSW-1:0]           total_shift
);

  always_comb begin
    total_bits  = (SMAX+1)'(lane_bits[0]);
    total_shift = TSW'(lane_shift[0]);
    for (int i = 1; i < NSYM; i++) begin
      total_bits  = (total_bits << lane_shift[i]) + (SMAX+1)'(lane_bits[i]);
      total_shift = total_shift + TSW'(lane_shift[i]);
    end
  end

endmodule
