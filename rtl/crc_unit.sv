// crc_unit: one Block Check Sequence division register with its input XOR.
//
// The received block is shifted in one bit per enabled clock, first bit
// first, into a classical CRC division shift register: the new bit enters at
// the low end and the bit shifted out of the top feeds back the generator
// polynomial. After the whole block has been shifted the register holds the
// remainder of the block divided by g(D); the block passes when that
// remainder is all ones. In front of the register sits an XOR: when
// `invert` is high together with `shift_en`, the bit being shifted in is
// inverted, so that this unit checks the block with exactly that one bit
// flipped.
//
// `wide` selects the 40-bit CS-1 polynomial, otherwise the 16-bit
// CS-2..CS-4 polynomial works in the low 16 bits. `clear` (synchronous,
// above `shift_en`) empties the register. `pass` is combinational from the
// register, so it is valid the cycle after the last bit was shifted in.
//
// The polynomials, the all-ones test and the XOR in front of each register
// follow the document; sharing one 40-bit register between both BCS lengths
// and the zero start value are this design's choices.
module crc_unit
  import gprs_edc_pkg::*;
(
  input  logic                  clk,
  input  logic                  clear,
  input  logic                  shift_en,
  input  logic                  wide,
  input  logic                  data_bit,
  input  logic                  invert,
  output logic [CRC_W_WIDE-1:0] remainder,
  output logic                  pass
);

  logic [CRC_W_WIDE-1:0] rem_q, rem_d;
  logic                  bit_in;

  always_comb begin
    bit_in = data_bit ^ invert;
    if (wide) begin
      rem_d = {rem_q[CRC_W_WIDE-2:0], bit_in} ^ (rem_q[CRC_W_WIDE-1] ? POLY40 : '0);
    end else begin
      rem_d = {{(CRC_W_WIDE-CRC_W_NARROW){1'b0}},
               {rem_q[CRC_W_NARROW-2:0], bit_in} ^ (rem_q[CRC_W_NARROW-1] ? POLY16 : '0)};
    end
  end

  always_ff @(posedge clk) begin
    if (clear)         rem_q <= '0;
    else if (shift_en) rem_q <= rem_d;
  end

  assign remainder = rem_q;
  assign pass = wide ? (&rem_q) : (&rem_q[CRC_W_NARROW-1:0]);

endmodule
