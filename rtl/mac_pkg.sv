// mac_pkg: constants shared by the blocks of the 802.3 MAC transmitter.
//
// The transmitter moves one nibble per clock (4 bit times per clock, i.e. a
// 25 MHz clock for 100 Mb/s). Field sizes and byte values below are those of
// an 802.3 frame: 7 preamble bytes of 0x55, the start frame delimiter 0xD5,
// 6-byte addresses, a 2-byte length, 46 to 1500 data bytes, a 4-byte frame
// check sequence, and a 4-byte jam of all ones after a collision.
package mac_pkg;

  localparam int unsigned BITS_PER_CLK  = 4;     // nibble-wide PHY interface
  localparam int unsigned PREAMBLE_LEN  = 7;     // preamble bytes
  localparam logic [7:0]  PREAMBLE_BYTE = 8'h55; // 1010... on the line
  localparam logic [7:0]  SFD_BYTE      = 8'hD5;
  localparam int unsigned JAM_LEN       = 4;     // jam bytes
  localparam logic [7:0]  JAM_BYTE      = 8'hFF;
  localparam int unsigned ADDR_BYTES    = 6;
  localparam int unsigned HDR_BYTES     = 14;    // DA + SA + length
  localparam int unsigned MIN_DATA      = 46;    // data + pad minimum
  localparam int unsigned MAX_DATA      = 1500;  // largest legal length
  localparam int unsigned FCS_BYTES     = 4;

  // CRC-32 generator polynomial G(x) of 802.3, normal (x^31..x^0) form, and
  // the bit-reversed form used when bytes enter least significant bit first.
  localparam logic [31:0] CRC_POLY      = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_POLY_REV  = 32'hEDB8_8320;

  // One-hot state encoding of the transmitter FSM.
  typedef enum logic [5:0] {
    TX_IDLE = 6'b000001,
    TX_PRE  = 6'b000010,
    TX_SFD  = 6'b000100,
    TX_DATA = 6'b001000,
    TX_FCS  = 6'b010000,
    TX_JAM  = 6'b100000
  } tx_state_t;

  // One-hot state encoding of the defer FSM.
  typedef enum logic [3:0] {
    DF_IDLE = 4'b0001,  // no frame pending
    DF_GAP1 = 4'b0010,  // first part of the gap, carrier sense watched
    DF_GAP2 = 4'b0100,  // second part of the gap, carrier sense ignored
    DF_XMIT = 4'b1000   // transmitter or backoff owns the frame
  } defer_state_t;

endpackage
