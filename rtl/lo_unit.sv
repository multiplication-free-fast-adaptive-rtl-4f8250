// lo_unit: low operation (LO) for one coded symbol, phase 1 of the encoder.
//
// The low register Y (d-1 bits) is the lower end of the coding interval,
// counted in the frame that follows the bits already produced. The unit adds
// Add-to-low, which can produce a carry into the produced bits, and then
// shifts Y left by the symbol's renormalisation shift s. The bits leaving Y
// form the chunk out_bits = (Y + add) >> (d-1-s): s bits of code plus, at
// weight 2^s, the carry. Appending the chunk to the produced stream E means
// E' = E*2^s + out_bits, which is what the outcome combination unit does.
//
// Purely combinational. A shift of d-1 moves the whole of Y out (used to
// flush the stream).
//
// The split of work between range and low operations follows the encoder
// block diagram; the chunk-with-carry format is this design's choice.
module lo_unit #(
  parameter int unsigned D = 16,
  localparam int unsigned W   = D - 1,
  localparam int unsigned SHW = $clog2(D)
) (
  input  logic [W-1:0]   y_in,
  input  logic [W-1:0]   add_low,
  input  logic [SHW-1:0] rshift,
  output logic [W-1:0]   y_out,
  output logic [W:0]     out_bits
);

  logic [W:0] ysum;

  always_comb begin
    ysum     = {1'b0, y_in} + {1'b0, add_low};
    out_bits = ysum >> (W - int'(rshift));
    y_out    = W'(ysum << rshift);
  end

endmodule
