// mac_defer: inter-frame gap and carrier deferral for the MAC transmitter.
//
// A send request (strt_xmit) raises x_busy and starts the inter-frame gap of
// IFG1_BITS + IFG2_BITS bit times (60 + 36 = 96). During the first part the
// carrier sense input is watched and any carrier restarts the gap from zero,
// so the MAC keeps deferring while the line is busy. During the second part
// carrier sense is ignored. At the end of the gap xmit_frame is pulsed for one
// clock and the block waits: xmit_over (frame finished) returns it to idle
// and drops x_busy; strt_def (backoff finished after a collision) starts a new
// gap for the retry; bo_err (too many collisions) returns it to idle.
//
// Timing: one clock is BITS_PER_CYCLE bit times. With carrier sense low,
// xmit_frame is high IFG1_CLKS + IFG2_CLKS + 1 clocks after the clock in
// which strt_xmit or strt_def is high (25 clocks at the defaults: one clock
// to register the request, then 15 + 9 clocks of gap).
//
// From the document: the 96-bit gap split 60/36, the restart on carrier in
// the first part, the signal names and the return on xmit_over or strt_def.
// This design's choices: the bo_err exit to idle, strt_xmit being ignored
// while busy, and rounding the bit periods up to whole clocks.
module mac_defer
  import mac_pkg::*;
#(
  parameter int unsigned IFG1_BITS    = 60,
  parameter int unsigned IFG2_BITS    = 36,
  parameter int unsigned BITS_PER_CYCLE = mac_pkg::BITS_PER_CLK
) (
  input  logic clk,
  input  logic rst_n,
  input  logic strt_xmit,   // LLC: frame ready in the buffer
  input  logic crs,         // PHY carrier sense
  input  logic xmit_over,   // transmitter: frame done
  input  logic strt_def,    // backoff: retry after a collision
  input  logic bo_err,      // backoff: attempt limit reached
  output logic x_busy,      // frame in progress
  output logic xmit_frame   // one-clock pulse: start transmitting
);

  localparam int unsigned IFG1_CLKS = (IFG1_BITS + BITS_PER_CYCLE - 1) / BITS_PER_CYCLE;
  localparam int unsigned IFG2_CLKS = (IFG2_BITS + BITS_PER_CYCLE - 1) / BITS_PER_CYCLE;
  localparam int unsigned CW = $clog2(((IFG1_CLKS > IFG2_CLKS) ? IFG1_CLKS : IFG2_CLKS) + 1);

  defer_state_t   state;
  logic [CW-1:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= DF_IDLE;
      cnt        <= '0;
      xmit_frame <= 1'b0;
    end else begin
      xmit_frame <= 1'b0;
      unique case (state)
        DF_IDLE: begin
          cnt <= '0;
          if (strt_xmit) state <= DF_GAP1;
        end
        DF_GAP1: begin
          if (crs) begin
            cnt <= '0;                       // line busy: restart the gap
          end else if (cnt == CW'(IFG1_CLKS - 1)) begin
            cnt   <= '0;
            state <= DF_GAP2;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DF_GAP2: begin
          if (cnt == CW'(IFG2_CLKS - 1)) begin
            cnt        <= '0;
            state      <= DF_XMIT;
            xmit_frame <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DF_XMIT: begin
          cnt <= '0;
          if (xmit_over || bo_err) state <= DF_IDLE;
          else if (strt_def)       state <= DF_GAP1;
        end
        default: state <= DF_IDLE;
      endcase
    end
  end

  assign x_busy = (state != DF_IDLE);

endmodule
