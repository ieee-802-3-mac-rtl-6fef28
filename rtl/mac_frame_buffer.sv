// mac_frame_buffer: 32-bit wide frame buffer between the LLC and the frame
// assembler.
//
// The LLC writes one 32-bit word per clock through the write port. The frame
// assembler reads through an asynchronous read port (the word at raddr is on
// rdata in the same clock), which lets it fetch the length word and then the
// first address word in the two clocks of the start frame delimiter.
//
// Layout, bytes big-endian within a word (byte 0 in bits 31:24):
//   word 0      destination address bytes 0..3
//   word 1      destination address bytes 4..5 (upper half), length (lower half)
//   word 2..    data bytes, four per word
// DEPTH words of 512 hold the largest frame: 8 + 1500 bytes need 377 words.
//
// From the document: the 32-bit word, the destination address in the first 6
// bytes, the length in the lower half of the second word and data in the
// following words. The depth, the byte order inside a word and the read
// timing are this design's choices.
module mac_frame_buffer #(
  parameter int unsigned DEPTH  = 512,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [31:0]       wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [31:0]       rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
