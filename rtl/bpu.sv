// bpu: byte packing unit, the last stage of the encoder.
//
// Takes one byte per cycle from the input limit buffer, together with a
// carry bit that must be added to the bytes already passed on (a carry can
// also arrive without a byte). Carries are resolved without rewriting
// output: the unit holds back the most recent byte that a carry could still
// change (the cache) and counts the 0xFF bytes that follow it. A new byte
// that is not 0xFF, or any carry, releases the cache: it is emitted as
// out_byte = cache + carry, followed by n_stuff copies of stuff_byte, which
// is 0xFF, or 0x00 when the carry rippled through them. So each output
// event describes 1 + n_stuff bytes of the code stream, in order.
//
// end_in (from the input buffer's flush) releases the cache and the pending
// 0xFF bytes and pulses done; the unit then starts a new stream.
// Outputs are registered: an event appears the cycle after its input.
//
// The three outputs (byte, stuff value, stuff count) follow the published
// block diagram; the cache-and-count carry resolution is this design's
// choice, as the document names the unit without describing it.
module bpu #(
  parameter int unsigned NW = 16   // width of the stuff-byte counter
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          byte_valid,
  input  logic [7:0]    byte_in,
  input  logic          carry_in,
  input  logic          end_in,
  output logic          out_valid,
  output logic [7:0]    out_byte,
  output logic [7:0]    stuff_byte,
  output logic [NW-1:0] n_stuff,
  output logic          done
);

  logic          cache_vld_q;
  logic [7:0]    cache_q;
  logic [NW-1:0] ff_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cache_vld_q <= 1'b0;
      cache_q     <= '0;
      ff_q        <= '0;
      out_valid   <= 1'b0;
      out_byte    <= '0;
      stuff_byte  <= '0;
      n_stuff     <= '0;
      done        <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (end_in) begin
        out_valid   <= cache_vld_q;
        out_byte    <= cache_q;
        stuff_byte  <= 8'hFF;
        n_stuff     <= ff_q;
        done        <= 1'b1;
        cache_vld_q <= 1'b0;
        ff_q        <= '0;
      end else if (byte_valid) begin
        if (!cache_vld_q) begin
          cache_q     <= byte_in;
          cache_vld_q <= 1'b1;
        end else if (byte_in != 8'hFF || carry_in) begin
          out_valid  <= 1'b1;
          out_byte   <= cache_q + {7'd0, carry_in};
          stuff_byte <= carry_in ? 8'h00 : 8'hFF;
          n_stuff    <= ff_q;
          cache_q    <= byte_in;
          ff_q       <= '0;
        end else begin
          ff_q <= ff_q + 1'b1;
        end
      end else if (carry_in) begin
        if (ff_q != '0) begin
          out_valid  <= 1'b1;
          out_byte   <= cache_q + 8'd1;
          stuff_byte <= 8'h00;
          n_stuff    <= ff_q - 1'b1;
          cache_q    <= 8'h00;
          ff_q       <= '0;
        end else begin
          cache_q <= cache_q + 8'd1;
        end
      end
    end
  end

  // A carry must land in a held byte that can absorb it.
  a_carry_absorbed: assert property (@(posedge clk) disable iff (!rst_n)
    carry_in && !end_in |-> cache_vld_q && cache_q != 8'hFF)
    else $error("bpu: carry into a byte already emitted");
  a_ff_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    byte_valid && !carry_in && byte_in == 8'hFF && cache_vld_q |-> ff_q != '1)
    else $error("bpu: 0xFF run counter overflow");

endmodule
