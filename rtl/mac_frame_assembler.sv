// mac_frame_assembler: builds the 802.3 frame, byte by byte, for the
// transmitter and the CRC generator.
//
// Byte order of the output: destination address (6 bytes, buffer words 0
// and 1), source address (6 bytes, the SRC_ADDR parameter, most significant
// byte first), length (2 bytes, lower half of buffer word 1, high byte
// first), the data bytes from buffer word 2 on, and zero pad bytes when the
// length is below MIN_DATA, so that data plus pad is never shorter than 46
// bytes. These are exactly the bytes the frame check sequence covers.
//
// Interface and timing: the block runs while strt is high. In the first
// clock of strt it reads the length word, in the second the first address
// word; from the third clock dout holds byte 0 with dvalid high. A next pulse
// (one clock, at most every second clock) consumes the byte on dout, and the
// following byte is on dout from the next clock. dlast marks the final byte.
// The buffer is read asynchronously: while idle buf_raddr points at the
// length word, afterwards at the word holding the byte that the next pulse
// will load. If the length is above
// MAX_DATA the block raises err from the third clock instead of dvalid and
// stays so until strt falls.
//
// From the document: the field order, the hard-wired source address, the
// buffer layout, the padding rule and the error on lengths above 1500. The
// handshake with the transmitter and the read timing are this design's.
module mac_frame_assembler
  import mac_pkg::*;
#(
  parameter logic [47:0] SRC_ADDR = 48'h02_00_00_00_00_01,
  parameter int unsigned ADDR_W   = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strt,       // transmitter: frame in progress
  input  logic              next,       // transmitter: byte on dout taken
  output logic [ADDR_W-1:0] buf_raddr,
  input  logic [31:0]       buf_rdata,
  output logic [7:0]        dout,
  output logic              dvalid,
  output logic              dlast,
  output logic              err         // length field above MAX_DATA
);

  typedef enum logic [3:0] {
    FA_IDLE = 4'b0001,   // reading the length word, waiting for strt
    FA_LOAD = 4'b0010,
    FA_RUN  = 4'b0100,
    FA_STOP = 4'b1000    // frame done or error, waiting for strt to fall
  } fa_state_t;

  fa_state_t   state;
  logic [10:0] idx;        // index of the byte on dout
  logic [10:0] ld_idx;     // index of the byte to load next
  logic [15:0] len;
  logic [10:0] body;       // data + pad bytes
  logic [10:0] total;      // bytes covered by the FCS
  logic [10:0] data_off;   // ld_idx - HDR_BYTES
  logic [7:0]  ld_byte;

  assign body     = (len < 16'(MIN_DATA)) ? 11'(MIN_DATA) : len[10:0];
  assign total    = 11'(HDR_BYTES) + body;
  assign ld_idx   = (state == FA_RUN) ? idx + 11'd1 : 11'd0;
  assign data_off = ld_idx - 11'(HDR_BYTES);

  // Buffer word holding the byte to load and that byte's value.
  always_comb begin
    buf_raddr = '0;
    ld_byte   = 8'h00;
    if (state == FA_IDLE) begin
      buf_raddr = ADDR_W'(1);
    end else if (ld_idx < 11'(ADDR_BYTES)) begin
      buf_raddr = ADDR_W'(ld_idx[10:2]);
      ld_byte   = buf_rdata[8*(3 - 32'(ld_idx[1:0])) +: 8];
    end else if (ld_idx < 11'(2*ADDR_BYTES)) begin
      ld_byte   = SRC_ADDR[8*(11 - 32'(ld_idx)) +: 8];
    end else if (ld_idx == 11'(2*ADDR_BYTES)) begin
      ld_byte   = len[15:8];
    end else if (ld_idx == 11'(2*ADDR_BYTES + 1)) begin
      ld_byte   = len[7:0];
    end else if (data_off < len[10:0]) begin
      buf_raddr = ADDR_W'(32'(data_off[10:2]) + 2);
      ld_byte   = buf_rdata[8*(3 - 32'(data_off[1:0])) +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FA_IDLE;
      idx   <= '0;
      len   <= '0;
      dout  <= '0;
      err   <= 1'b0;
    end else if (!strt) begin
      state <= FA_IDLE;
      idx   <= '0;
      err   <= 1'b0;
    end else begin
      unique case (state)
        FA_IDLE: begin
          len   <= buf_rdata[15:0];
          state <= FA_LOAD;
        end
        FA_LOAD: begin
          if (len > 16'(MAX_DATA)) begin
            err   <= 1'b1;
            state <= FA_STOP;
          end else begin
            dout  <= ld_byte;
            idx   <= '0;
            state <= FA_RUN;
          end
        end
        FA_RUN: begin
          if (next) begin
            if (dlast) begin
              state <= FA_STOP;
            end else begin
              dout <= ld_byte;
              idx  <= ld_idx;
            end
          end
        end
        FA_STOP: ;
        default: state <= FA_IDLE;
      endcase
    end
  end

  assign dvalid = (state == FA_RUN);
  assign dlast  = dvalid && (idx == total - 11'd1);

  // The transmitter must leave a clock between two bytes.
  a_next_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    next |=> !next);

endmodule
