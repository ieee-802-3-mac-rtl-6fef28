// tb_mac_crc32: checks the CRC block against a bit-serial model written
// straight from the 802.3 definition: complement the first 32 bits of the
// frame (bits in line order, least significant bit of each byte first),
// multiply by x^32, divide by G(x) and complement the remainder, whose x^31
// coefficient goes on the line first. Also checks the well-known CRC-32 value
// of the ASCII string "123456789", the all-ones preset while strt is low and
// that a byte is folded in one clock after its enable.
module tb_mac_crc32;
  import mac_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        strt = 1'b0;
  logic        en_crc = 1'b0;
  logic [7:0]  din = '0;
  logic [31:0] crc_out, fcs;
  int          checks = 0, failures = 0;

  mac_crc32 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: polynomial long division on the line-order bit sequence.
  function automatic logic [31:0] ref_fcs(input logic [7:0] msg[], input int n);
    logic [31:0] r = '0;
    logic        b, fb;
    logic [31:0] rem;
    logic [31:0] line;
    int          k = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < 8; j++) begin
        b  = msg[i][j];
        if (k < 32) b = ~b;          // first 32 bits complemented
        k++;
        fb = r[31] ^ b;
        r  = {r[30:0], 1'b0};
        if (fb) r = r ^ CRC_POLY;
      end
    rem = ~r;
    for (int i = 0; i < 32; i++) line[i] = rem[31-i];  // x^31 term first
    return line;
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic run(input logic [7:0] msg[], input int n, input int gap);
    @(negedge clk) strt = 1'b1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      en_crc = 1'b1;
      din    = msg[i];
      @(negedge clk);
      en_crc = 1'b0;
      din    = $urandom;               // ignored without enable
      repeat (gap) @(negedge clk);
    end
  endtask

  logic [7:0] m[];
  int         n;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check("preset", crc_out, 32'hFFFF_FFFF);

    // "123456789"
    m = new[9];
    foreach (m[i]) m[i] = 8'h31 + 8'(i);
    run(m, 9, 0);
    check("check value", fcs, 32'hCBF4_3926);
    check("model on check string", ref_fcs(m, 9), 32'hCBF4_3926);
    @(negedge clk) strt = 1'b0;
    @(negedge clk);
    check("preset after strt", crc_out, 32'hFFFF_FFFF);

    // four back-to-back bytes: the last is included in the very next clock
    m = new[4];
    m = '{8'hA5, 8'h5A, 8'h00, 8'hFF};
    @(negedge clk) strt = 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) begin en_crc = 1'b1; din = m[i]; end
    end
    @(negedge clk) begin
      en_crc = 1'b0;
      check("one-clock latency", fcs, ref_fcs(m, 4));
    end
    @(negedge clk) strt = 1'b0;

    // random frames of 4..100 bytes (the definition presets over the first
    // 32 bits, so a frame is never shorter), with and without idle clocks
    for (int t = 0; t < 40; t++) begin
      n = 4 + ($urandom % 97);
      m = new[n];
      foreach (m[i]) m[i] = 8'($urandom);
      run(m, n, t % 3);
      check($sformatf("random frame %0d (%0d bytes)", t, n), fcs, ref_fcs(m, n));
      @(negedge clk) strt = 1'b0;
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
