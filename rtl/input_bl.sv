// input_bl: input limit buffer in front of the byte packing unit (phase 2).
//
// Two registers: Buffer holds code bits not yet packed and No_Buffer counts
// them. Each accepted input chunk (total_shift code bits plus one carry bit
// from the outcome combination unit) is appended below the buffered bits:
// combined = Buffer*2^S + chunk. The bit above the combined length is a
// carry into bytes already handed on; it goes out on carry_out. When the
// combined length is larger than 8, its 8 MSBs go to the byte packer and the
// residual bits stay in Buffer, so at most one byte leaves per cycle.
//
// Handshake: in_ready is high when the chunk fits (No_Buffer + S <= CAP,
// CAP = NSYM*(d-1) + 8) and no flush is in progress. It stalls the encoder
// pipeline in the rare cycles when more bits arrive than one byte per cycle
// can drain. A chunk with in_flush set starts a flush: inputs are refused,
// bytes keep draining, the last partial byte is padded with zeros, and then
// end_out pulses for one cycle.
//
// byte_valid stands for the diagram's "No to Packet bit" count (8 or 0).
// Outputs are combinational from the registers and the input. The
// "larger than 8" rule and the register names follow the published block
// diagram; the capacity, the stall handshake and the flush are this
// design's choices.
module input_bl #(
  parameter int unsigned D    = 16,
  parameter int unsigned NSYM = 2,
  localparam int unsigned W    = D - 1,
  localparam int unsigned SMAX = NSYM * W,
  localparam int unsigned TSW  = $clog2(SMAX + 1),
  localparam int unsigned CAP  = SMAX + 8,
  localparam int unsigned NBW  = $clog2(CAP + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [SMAX:0]   in_bits,
  input  logic [TSW-1:0]  in_shift,
  input  logic            in_flush,
  output logic            byte_valid,
  output logic [7:0]      byte_out,
  output logic            carry_out,
  output logic            end_out
);

  logic [CAP-1:0] buf_q, buf_d;
  logic [NBW-1:0] nb_q, nb_d;
  logic           flushing_q, flushing_d;

  logic           accept;
  logic [NBW-1:0] s;
  logic [NBW-1:0] len;
  logic [CAP:0]   comb;
  logic [CAP:0]   data;
  logic [CAP:0]   mask;

  assign in_ready = !flushing_q && ((NBW+1)'(nb_q) + (NBW+1)'(in_shift) <= (NBW+1)'(CAP));
  assign accept   = in_valid && in_ready;

  always_comb begin
    s    = accept ? NBW'(in_shift) : '0;
    comb = ({1'b0, buf_q} << s) + (accept ? (CAP+1)'(in_bits) : '0);
    len  = nb_q + s;
    mask = ((CAP+1)'(1) << len) - 1'b1;
    data = comb & mask;
    carry_out = comb[len];

    byte_valid = 1'b0;
    byte_out   = '0;
    end_out    = 1'b0;
    buf_d      = CAP'(data);
    nb_d       = len;
    flushing_d = flushing_q || (accept && in_flush);

    if (len > NBW'(8)) begin
      byte_valid = 1'b1;
      byte_out   = 8'(data >> (len - NBW'(8)));
      nb_d       = len - NBW'(8);
      buf_d      = CAP'(data & (((CAP+1)'(1) << nb_d) - 1'b1));
    end else if (flushing_q && len != '0) begin
      byte_valid = 1'b1;
      byte_out   = 8'(data << (NBW'(8) - len));
      nb_d       = '0;
      buf_d      = '0;
    end else if (flushing_q) begin
      end_out    = 1'b1;
      flushing_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q      <= '0;
      nb_q       <= '0;
      flushing_q <= 1'b0;
    end else begin
      buf_q      <= buf_d;
      nb_q       <= nb_d;
      flushing_q <= flushing_d;
    end
  end

endmodule
