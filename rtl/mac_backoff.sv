// mac_backoff: truncated binary exponential backoff after a collision.
//
// Each strt_bo pulse from the transmitter (a collision has been jammed) adds
// one to the attempt count n. If n reaches MAX_ATTEMPTS (16: the first try
// plus 15 retries) the frame is given up: err pulses and the count clears.
// Otherwise a random r is taken from a free-running LFSR and masked to its
// k = min(n, BACKOFF_LIMIT) low bits, so 0 <= r < 2^k, and the block waits r
// slot times (SLOT_BITS bit times each) before pulsing strt_def, which sends
// the defer block back to timing the gap for the retry. xmit_over (frame
// sent) clears the attempt count.
//
// Timing: strt_def is high (r * SLOT_CLKS) + 1 clocks after the clock in
// which strt_bo is high. busy is high while a wait is in progress.
//
// From the document: the attempt limit, the truncated exponent k = min(n,10),
// the slot-time unit, the LFSR as random source and the signal names. The
// document writes the range as 0 <= r <= 2^k; this design follows the 802.3
// rule 0 <= r < 2^k, which masking k random bits gives. The slot time of 512
// bit times is the 802.3 value and is not stated in the document.
module mac_backoff
  import mac_pkg::*;
#(
  parameter int unsigned SLOT_BITS     = 512,
  parameter int unsigned MAX_ATTEMPTS  = 16,
  parameter int unsigned BACKOFF_LIMIT = 10,
  parameter int unsigned BITS_PER_CYCLE = mac_pkg::BITS_PER_CLK,
  parameter int unsigned LFSR_W        = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strt_bo,    // transmitter: collision jammed
  input  logic       xmit_over,  // transmitter: frame finished
  output logic       strt_def,   // one-clock pulse: retry now
  output logic       err,        // one-clock pulse: attempt limit reached
  output logic       busy,       // waiting out a backoff
  output logic [4:0] attempts    // collisions of the current frame
);

  localparam int unsigned SLOT_CLKS = (SLOT_BITS + BITS_PER_CYCLE - 1) / BITS_PER_CYCLE;
  localparam int unsigned SW = $clog2(SLOT_CLKS + 1);

  logic [LFSR_W-1:0]        rnd;
  logic [BACKOFF_LIMIT-1:0] slot_cnt;   // slots still to wait
  logic [SW-1:0]            slot_time;  // clocks within the current slot
  logic [4:0]               n_next;
  logic [BACKOFF_LIMIT-1:0] mask;

  // The LFSR shifts every clock, so the value taken at a collision depends on
  // the collision time as well as on the sequence.
  mac_lfsr #(.WIDTH(LFSR_W)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(1'b1),
    .q    (rnd)
  );

  assign n_next = attempts + 5'd1;

  // k low bits set, k = min(n, BACKOFF_LIMIT)
  always_comb begin
    mask = '0;
    for (int i = 0; i < BACKOFF_LIMIT; i++)
      if (5'(i) < n_next) mask[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      attempts  <= '0;
      busy      <= 1'b0;
      slot_cnt  <= '0;
      slot_time <= '0;
      strt_def  <= 1'b0;
      err       <= 1'b0;
    end else begin
      strt_def <= 1'b0;
      err      <= 1'b0;
      if (xmit_over) begin
        attempts <= '0;
        busy     <= 1'b0;
      end else if (strt_bo) begin
        if (n_next >= 5'(MAX_ATTEMPTS)) begin
          attempts <= '0;
          err      <= 1'b1;
        end else begin
          attempts  <= n_next;
          slot_time <= '0;
          if ((rnd[BACKOFF_LIMIT-1:0] & mask) == '0) begin
            strt_def <= 1'b1;                  // r = 0: retry at once
          end else begin
            busy     <= 1'b1;
            slot_cnt <= rnd[BACKOFF_LIMIT-1:0] & mask;
          end
        end
      end else if (busy) begin
        if (slot_time == SW'(SLOT_CLKS - 1)) begin
          slot_time <= '0;
          if (slot_cnt == BACKOFF_LIMIT'(1)) begin
            busy     <= 1'b0;
            strt_def <= 1'b1;
          end
          slot_cnt <= slot_cnt - 1'b1;
        end else begin
          slot_time <= slot_time + 1'b1;
        end
      end
    end
  end

endmodule
