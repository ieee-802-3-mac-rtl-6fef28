// mac_crc32: frame check sequence generator, one byte per enabled clock.
//
// The 802.3 CRC divides the frame, taken in line order, by
// G(x) = x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1,
// with the first 32 bits complemented and the remainder complemented. Bytes
// go on the line least significant bit first, so the register here holds
// the remainder bit-reversed (bit 0 is the x^31 coefficient) and is shifted
// right against the reversed polynomial; presetting it to all ones has the
// same effect as complementing the first 32 bits.
//
// Interface: while strt is low the register is held at all ones. While strt
// is high, each clock with en_crc high folds din into it (eight bit steps in
// one clock). crc_out is the register; fcs = ~crc_out is the frame check
// sequence in line order: fcs[3:0] is the first nibble sent, fcs[31:28] the
// last. A byte enabled in one clock is included in fcs from the next clock.
//
// From the document: the polynomial, the definition, the byte-wide input
// and the strt / en_crc / din / crc_out signals. The bit-reversed register
// and the all-ones preset are this design's way of meeting that definition.
module mac_crc32
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        strt,
  input  logic        en_crc,
  input  logic [7:0]  din,
  output logic [31:0] crc_out,
  output logic [31:0] fcs
);

  logic [31:0] crc_next;

  always_comb begin
    crc_next = crc_out;
    for (int i = 0; i < 8; i++)
      crc_next = (crc_next >> 1) ^ ((crc_next[0] ^ din[i]) ? CRC_POLY_REV : 32'h0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc_out <= '1;
    else if (!strt)  crc_out <= '1;
    else if (en_crc) crc_out <= crc_next;
  end

  assign fcs = ~crc_out;

endmodule
