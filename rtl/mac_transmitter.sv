// mac_transmitter: the nibble-serial transmit state machine of the MAC.
//
// On xmit_frame from the defer block it raises tx_en (TXDV) and sends, one
// nibble per clock and low nibble of each byte first: PREAMBLE_LEN bytes of
// preamble 0x55, the start frame delimiter 0xD5, the frame bytes supplied by
// the frame assembler, and the 4-byte frame check sequence from the CRC
// block. strt goes high with the first SFD nibble and tells the frame
// assembler and the CRC block to run. A frame byte is on the line for two
// clocks; in the second the block pulses fa_next, which both consumes the
// byte at the assembler and folds it into the CRC. After the last FCS nibble
// tx_en and strt fall and xmit_over pulses.
//
// A collision (col high) while preamble, SFD, frame or FCS is being sent
// switches at once to the jam: JAM_LEN bytes of all ones, after which tx_en
// and strt fall and strt_bo pulses to start the backoff. If the assembler
// reports a bad length when the first frame byte is due, the frame is cut
// short: tx_en and strt fall and xmit_over pulses.
//
// The states are one-hot encoded. txd and tx_en are decoded from the state
// register, so they change one clock after the event that causes them; the
// first preamble nibble is on the line the clock after xmit_frame.
//
// From the document: the field sequence, nibble width, strt, TXDV,
// xmit_over, the 4-byte jam and strt_bo, one byte read every two clocks and
// one-hot state coding. This design's choices: collisions are acted on in
// every field, not only in the preamble; the jam starts at once rather than
// after the preamble; the length-error abort; and the low-nibble-first order.
module mac_transmitter
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        xmit_frame,  // defer: gap over, send now
  input  logic        col,         // PHY collision detect
  input  logic [7:0]  fa_data,     // frame assembler byte
  input  logic        fa_last,     // that byte is the last one
  input  logic        fa_err,      // bad length: abort
  input  logic [31:0] fcs,         // CRC block, line order
  output logic [3:0]  txd,
  output logic        tx_en,
  output logic        strt,        // to frame assembler and CRC block
  output logic        fa_next,     // byte taken (also the CRC enable)
  output logic        xmit_over,   // one-clock pulse: frame finished
  output logic        strt_bo      // one-clock pulse: start backoff
);

  localparam int unsigned PRE_NIBBLES = 2 * PREAMBLE_LEN;
  localparam int unsigned JAM_NIBBLES = 2 * JAM_LEN;
  localparam int unsigned FCS_NIBBLES = 2 * FCS_BYTES;

  tx_state_t  state;
  logic [3:0] cnt;      // nibble count within preamble, SFD, FCS or jam
  logic       hi;       // second nibble of a frame byte
  logic       on_line;  // a field that a collision interrupts

  assign on_line = (state == TX_PRE) || (state == TX_SFD) ||
                   (state == TX_DATA) || (state == TX_FCS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TX_IDLE;
      cnt       <= '0;
      hi        <= 1'b0;
      strt      <= 1'b0;
      xmit_over <= 1'b0;
      strt_bo   <= 1'b0;
    end else begin
      xmit_over <= 1'b0;
      strt_bo   <= 1'b0;
      if (on_line && col) begin
        state <= TX_JAM;
        cnt   <= '0;
        strt  <= 1'b0;
      end else begin
        unique case (state)
          TX_IDLE: begin
            cnt <= '0;
            hi  <= 1'b0;
            if (xmit_frame) state <= TX_PRE;
          end
          TX_PRE: begin
            if (cnt == 4'(PRE_NIBBLES - 1)) begin
              cnt   <= '0;
              state <= TX_SFD;
              strt  <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          TX_SFD: begin
            if (cnt == 4'd1) begin
              cnt   <= '0;
              hi    <= 1'b0;
              state <= TX_DATA;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          TX_DATA: begin
            if (fa_err) begin
              state     <= TX_IDLE;
              strt      <= 1'b0;
              xmit_over <= 1'b1;
            end else begin
              hi <= !hi;
              if (hi && fa_last) begin
                cnt   <= '0;
                state <= TX_FCS;
              end
            end
          end
          TX_FCS: begin
            if (cnt == 4'(FCS_NIBBLES - 1)) begin
              cnt       <= '0;
              state     <= TX_IDLE;
              strt      <= 1'b0;
              xmit_over <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          TX_JAM: begin
            if (cnt == 4'(JAM_NIBBLES - 1)) begin
              cnt     <= '0;
              state   <= TX_IDLE;
              strt_bo <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: state <= TX_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    txd     = 4'h0;
    tx_en   = 1'b1;
    fa_next = 1'b0;
    unique case (state)
      TX_IDLE: tx_en = 1'b0;
      TX_PRE:  txd = PREAMBLE_BYTE[3:0];
      TX_SFD:  txd = cnt[0] ? SFD_BYTE[7:4] : SFD_BYTE[3:0];
      TX_DATA: begin
        if (fa_err) begin
          tx_en = 1'b0;
        end else begin
          txd     = hi ? fa_data[7:4] : fa_data[3:0];
          fa_next = hi && !col;
        end
      end
      TX_FCS:  txd = fcs[4*cnt[2:0] +: 4];
      TX_JAM:  txd = JAM_BYTE[3:0];
      default: tx_en = 1'b0;
    endcase
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

endmodule
