// bitstream_gen: bitstream generator of the encoder.
//
// Appends in_n (0..16) bits from in_bits (right-aligned, bit in_n-1 first)
// to a 32-bit accumulator each cycle and hands out one byte per cycle,
// first bit in the MSB, as Byte_out with Valid_byte. A flush request pads
// the last partial byte with zeros once the accumulator has drained and then
// pulses `done`. The producers never add more than 10 bits in a cycle and
// add at most 4 bits in most cycles, so one byte per cycle keeps the
// accumulator well below its size (checked by an assertion).
// Packing order and padding are this design's own choices.
module bitstream_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  in_n,
  input  logic [15:0] in_bits,
  input  logic        flush,
  output logic [7:0]  byte_out,
  output logic        valid_byte,
  output logic        done
);
  logic [31:0] acc;
  logic [5:0]  cnt;
  logic        pending;
  logic [47:0] acc2;
  logic [6:0]  cnt2;

  always_comb begin
    acc2 = ({16'b0, acc} << in_n) | 48'(in_bits & 16'((32'd1 << in_n) - 1));
    cnt2 = 7'(cnt) + 7'(in_n);
  end

  always_ff @(posedge clk) begin
    valid_byte <= 1'b0;
    done       <= 1'b0;
    if (rst) begin
      acc      <= '0;
      cnt      <= '0;
      pending  <= 1'b0;
      byte_out <= '0;
    end else begin
      if (flush) pending <= 1'b1;
      if (cnt2 >= 7'd8) begin
        byte_out   <= 8'(acc2 >> (cnt2 - 7'd8));
        valid_byte <= 1'b1;
        cnt        <= 6'(cnt2 - 7'd8);
        acc        <= 32'(acc2);
      end else if (pending && in_n == 0 && cnt != 0) begin
        byte_out   <= 8'(acc << (6'd8 - cnt));
        valid_byte <= 1'b1;
        cnt        <= '0;
        acc        <= '0;
      end else begin
        cnt <= 6'(cnt2);
        acc <= 32'(acc2);
        if (pending && in_n == 0 && cnt == 0) begin
          pending <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst) assert (cnt2 < 7'd32) else $error("bitstream_gen: accumulator overflow");
endmodule
