// mac_tx_top: IEEE 802.3 CSMA/CD MAC transmitter, buffer to nibble stream.
//
// The LLC writes a frame into the 32-bit frame buffer (destination address,
// length, data) and pulses strt_xmit. The defer block waits out the 96-bit
// inter-frame gap, restarting while carrier sense is seen, and starts the
// transmitter. The transmitter sends preamble and SFD, then the bytes the
// frame assembler builds from the buffer (with the hard-wired source address
// and zero padding), while the CRC block folds the same bytes into the frame
// check sequence, which the transmitter appends. A collision makes the
// transmitter jam and hands over to the backoff block, which waits a random
// number of slot times and sends the defer block round again; after 16
// attempts the frame is dropped and col_err pulses. A length above 1500
// aborts the frame and raises len_err.
//
// Interface: plain MII-style transmit side (txd, tx_en, crs, col) at one
// nibble per clock, so a 25 MHz clock gives 100 Mb/s; a synchronous buffer
// write port; status x_busy, xmit_over, col_err, len_err and the collision count. All blocks share
// one clock and an asynchronous active-low reset.
//
// From the document: the five blocks (defer, backoff, transmitter, frame
// assembler, CRC), their connections and signal names, and the buffer. The
// buffer depth, source address value and status outputs are this design's.
module mac_tx_top
  import mac_pkg::*;
#(
  parameter int unsigned BUF_DEPTH     = 512,
  parameter int unsigned BUF_AW        = $clog2(BUF_DEPTH),
  parameter logic [47:0] SRC_ADDR      = 48'h02_00_00_00_00_01,
  parameter int unsigned IFG1_BITS     = 60,
  parameter int unsigned IFG2_BITS     = 36,
  parameter int unsigned SLOT_BITS     = 512,
  parameter int unsigned MAX_ATTEMPTS  = 16,
  parameter int unsigned BACKOFF_LIMIT = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // LLC side
  input  logic              strt_xmit,
  input  logic              buf_we,
  input  logic [BUF_AW-1:0] buf_waddr,
  input  logic [31:0]       buf_wdata,
  // PHY side
  input  logic              crs,
  input  logic              col,
  output logic [3:0]        txd,
  output logic              tx_en,
  // status
  output logic              x_busy,
  output logic              xmit_over,
  output logic              col_err,
  output logic              len_err,
  output logic [4:0]        attempts    // collisions so far for this frame
);

  logic              xmit_frame, strt_def, strt_bo, strt, fa_next;
  logic              bo_busy;
  logic [BUF_AW-1:0] buf_raddr;
  logic [31:0]       buf_rdata;
  logic [7:0]        fa_data;
  logic              fa_valid, fa_last, fa_err;
  logic [31:0]       crc_reg, fcs;

  mac_defer #(.IFG1_BITS(IFG1_BITS), .IFG2_BITS(IFG2_BITS)) u_defer (
    .clk, .rst_n, .strt_xmit, .crs, .xmit_over, .strt_def,
    .bo_err(col_err), .x_busy, .xmit_frame
  );

  mac_backoff #(
    .SLOT_BITS(SLOT_BITS), .MAX_ATTEMPTS(MAX_ATTEMPTS), .BACKOFF_LIMIT(BACKOFF_LIMIT)
  ) u_backoff (
    .clk, .rst_n, .strt_bo, .xmit_over, .strt_def,
    .err(col_err), .busy(bo_busy), .attempts(attempts)
  );

  mac_transmitter u_tx (
    .clk, .rst_n, .xmit_frame, .col,
    .fa_data, .fa_last, .fa_err, .fcs,
    .txd, .tx_en, .strt, .fa_next, .xmit_over, .strt_bo
  );

  mac_frame_buffer #(.DEPTH(BUF_DEPTH), .ADDR_W(BUF_AW)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata),
    .raddr(buf_raddr), .rdata(buf_rdata)
  );

  mac_frame_assembler #(.SRC_ADDR(SRC_ADDR), .ADDR_W(BUF_AW)) u_fa (
    .clk, .rst_n, .strt, .next(fa_next),
    .buf_raddr, .buf_rdata,
    .dout(fa_data), .dvalid(fa_valid), .dlast(fa_last), .err(fa_err)
  );

  mac_crc32 u_crc (
    .clk, .rst_n, .strt, .en_crc(fa_next), .din(fa_data),
    .crc_out(crc_reg), .fcs
  );

  assign len_err = fa_err;

  // The transmitter only takes a byte that the assembler has ready.
  a_byte_ready: assert property (@(posedge clk) disable iff (!rst_n)
    fa_next |-> fa_valid);

endmodule
