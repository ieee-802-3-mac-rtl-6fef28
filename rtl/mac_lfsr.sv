// mac_lfsr: free-running Fibonacci linear feedback shift register, the
// random number source of the backoff block.
//
// The register shifts left by one each clock in which shift is high; the new
// least significant bit is the XOR of the bits selected by TAPS. The default
// is the maximal-length 16-bit polynomial x^16 + x^14 + x^13 + x^11 + 1, so
// the sequence repeats after 2^16 - 1 states. Reset loads SEED, which must
// not be zero. The document names a linear feedback shift register as the
// random source; width, taps and seed are this design's choice.
module mac_lfsr #(
  parameter int unsigned     WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = 16'hB400,  // bits 15, 13, 12, 10
  parameter logic [WIDTH-1:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (shift) q <= {q[WIDTH-2:0], ^(q & TAPS)};
  end

endmodule
