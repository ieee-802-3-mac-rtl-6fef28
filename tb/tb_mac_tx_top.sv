// tb_mac_tx_top: end-to-end test of the MAC transmitter at its default
// parameters. The testbench plays the LLC (fills the frame buffer, pulses
// strt_xmit) and the PHY (records every burst of tx_en, drives carrier
// sense and collisions). Each line burst is checked nibble by nibble against
// a frame built here from the 802.3 format, with the FCS from a bit-serial
// model of the CRC definition; a collided burst must be the frame's own
// prefix up to the collision followed by 32 bits of ones.
//
// Timing checks: with the line quiet the first preamble nibble comes 26
// clocks after strt_xmit (register, 96-bit gap, start); carrier restarts the
// gap; a frame goes out at one nibble per clock; after a jam the retry
// starts r slot times (128 clocks) plus 28 clocks after the last jam
// nibble, with 0 <= r < 2^min(n,10).
//
// Mechanisms counted, each of which must happen: deferral restarted by
// carrier, padding, a maximum-length frame, collision and jam, backoff
// retry, the 16-attempt error, and the length error.
module tb_mac_tx_top;
  import mac_pkg::*;
  localparam logic [47:0] SA = 48'h02_00_00_00_00_01;  // the top's default
  localparam int SLOT_CLKS = 128;
  localparam int MAX_ATTEMPTS = 16;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        strt_xmit = 1'b0, buf_we = 1'b0;
  logic [8:0]  buf_waddr = '0;
  logic [31:0] buf_wdata = '0;
  logic        crs = 1'b0, col = 1'b0;
  logic [3:0]  txd;
  logic        tx_en, x_busy, xmit_over, col_err, len_err;
  logic [4:0]  attempts;
  int          checks = 0, failures = 0;

  mac_tx_top dut (.*);

  always #20 clk = ~clk;   // 25 MHz

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- PHY side
  typedef struct {
    int         start;   // clock of the first nibble
    int         last;    // clock of the final nibble
    logic [3:0] nib[$];
  } burst_t;

  int     cyc = 0;
  burst_t cur;
  burst_t bursts[$];
  bit     prev_en = 0;
  int     n_over = 0, n_col_err = 0, n_len_err = 0;
  bit     prev_len_err = 0;

  always @(posedge clk) begin
    if (tx_en) begin
      if (!prev_en) begin
        cur.start = cyc;
        cur.nib.delete();
      end
      cur.nib.push_back(txd);
      cur.last = cyc;
    end else if (prev_en) begin
      bursts.push_back(cur);
    end
    prev_en <= tx_en;
    if (xmit_over) n_over++;
    if (col_err) n_col_err++;
    if (len_err && !prev_len_err) n_len_err++;
    prev_len_err <= len_err;
    cyc <= cyc + 1;
  end

  // carrier sense and collision drivers
  int crs_from = -1, crs_to = -1;
  int col_left = 0;      // collisions still to cause for this frame
  int col_pos  = 0;      // nibble of the burst in which to collide
  always @(negedge clk) begin
    crs = (cyc >= crs_from) && (cyc < crs_to);
    col = 1'b0;
    if (tx_en && col_left > 0 && prev_en && cur.nib.size() == col_pos) col = 1'b1;
    else if (tx_en && col_left > 0 && !prev_en && col_pos == 0) col = 1'b1;
  end
  always @(posedge clk) if (col) col_left <= col_left - 1;

  // ---------------------------------------------------------------- reference
  function automatic logic [31:0] ref_fcs(input byte unsigned msg[$]);
    logic [31:0] r = '0, rem, line;
    logic        b, fb;
    int          k = 0;
    foreach (msg[i])
      for (int j = 0; j < 8; j++) begin
        b = msg[i][j];
        if (k < 32) b = ~b;
        k++;
        fb = r[31] ^ b;
        r  = {r[30:0], 1'b0};
        if (fb) r ^= CRC_POLY;
      end
    rem = ~r;
    for (int i = 0; i < 32; i++) line[i] = rem[31-i];
    return line;
  endfunction

  // mechanism counters
  int m_defer_restart = 0, m_pad = 0, m_max = 0, m_collision = 0;
  int m_retry = 0, m_excess = 0, m_len_err = 0, m_sent = 0;

  logic [3:0] exp_nib[$];

  // Load the buffer, request, and check everything that comes out.
  task automatic send(input int len, input int ncol, input int cpos, input int busy_clks);
    logic [47:0]  da;
    byte unsigned body[$];
    byte unsigned data[];
    logic [31:0]  fcs;
    logic [31:0]  words[$];
    int           s, n0, over0, ce0, le0, exp_bursts, t0;
    bit           ok;

    da   = {8'h00 | 8'($urandom) & 8'hFE, 8'($urandom), 32'($urandom)};
    data = new[len > MAX_DATA ? 0 : len];
    foreach (data[i]) data[i] = 8'($urandom);
    // buffer image
    words.push_back(da[47:16]);
    words.push_back({da[15:0], 16'(len)});
    for (int i = 0; i < data.size(); i += 4) begin
      logic [31:0] w = $urandom;
      for (int j = 0; j < 4; j++) if (i + j < data.size()) w[8*(3-j) +: 8] = data[i+j];
      words.push_back(w);
    end
    foreach (words[i]) begin
      @(negedge clk);
      buf_we = 1'b1; buf_waddr = 9'(i); buf_wdata = words[i];
    end
    @(negedge clk) buf_we = 1'b0;

    // expected line nibbles of the whole frame
    for (int i = 5; i >= 0; i--) body.push_back(da[8*i +: 8]);
    for (int i = 5; i >= 0; i--) body.push_back(SA[8*i +: 8]);
    body.push_back(8'(len >> 8));
    body.push_back(8'(len));
    foreach (data[i]) body.push_back(data[i]);
    while (body.size() < HDR_BYTES + MIN_DATA) body.push_back(8'h00);
    fcs = ref_fcs(body);
    exp_nib.delete();
    for (int i = 0; i < 15; i++) exp_nib.push_back(4'h5);
    exp_nib.push_back(4'hD);
    if (len <= MAX_DATA) begin
      foreach (body[i]) begin
        exp_nib.push_back(body[i][3:0]);
        exp_nib.push_back(body[i][7:4]);
      end
      for (int i = 0; i < 8; i++) exp_nib.push_back(fcs[4*i +: 4]);
    end

    // request
    n0 = bursts.size(); over0 = n_over; ce0 = n_col_err; le0 = n_len_err;
    col_left = ncol; col_pos = cpos;
    @(negedge clk);
    s = cyc;
    strt_xmit = 1'b1;
    crs_from = s; crs_to = s + busy_clks;
    @(negedge clk) strt_xmit = 1'b0;
    #1 chk("x_busy after strt_xmit", x_busy);
    t0 = cyc;
    while (x_busy && cyc < t0 + 5_000_000) @(negedge clk);
    repeat (3) @(negedge clk);
    chk("x_busy falls", !x_busy);

    exp_bursts = (ncol >= MAX_ATTEMPTS) ? MAX_ATTEMPTS : ncol + 1;
    chk($sformatf("len %0d, %0d collisions: %0d bursts seen, %0d expected", len, ncol,
                  bursts.size() - n0, exp_bursts), bursts.size() - n0 == exp_bursts);
    if (bursts.size() - n0 != exp_bursts) return;

    // first burst waits for the gap, later than any carrier
    chk($sformatf("first preamble at +%0d", bursts[n0].start - s),
        bursts[n0].start == s + 26 + ((busy_clks > 1) ? busy_clks - 1 : 0));
    if (busy_clks > 1) m_defer_restart++;

    for (int b = 0; b < exp_bursts; b++) begin
      burst_t bu = bursts[n0 + b];
      bit collided = (b < ncol);
      ok = 1;
      if (collided) begin
        ok = (bu.nib.size() == cpos + 1 + 8);
        for (int i = 0; ok && i <= cpos; i++) ok = (bu.nib[i] == exp_nib[i]);
        for (int i = cpos + 1; ok && i < bu.nib.size(); i++) ok = (bu.nib[i] == 4'hF);
        chk($sformatf("burst %0d: prefix then 32-bit jam", b), ok);
        m_collision++;
        if (b + 1 < exp_bursts) begin
          int gap = bursts[n0 + b + 1].start - bu.last - 28;
          int k   = (b + 1 < 10) ? b + 1 : 10;
          chk($sformatf("backoff after collision %0d: gap %0d", b + 1, gap),
              gap >= 0 && gap % SLOT_CLKS == 0 && gap / SLOT_CLKS < (1 << k));
          m_retry++;
        end
      end else begin
        ok = (bu.nib.size() == exp_nib.size());
        for (int i = 0; ok && i < exp_nib.size(); i++) ok = (bu.nib[i] == exp_nib[i]);
        chk($sformatf("len %0d: line frame of %0d nibbles matches", len, exp_nib.size()), ok);
        chk("one nibble per clock", bu.last - bu.start + 1 == bu.nib.size());
      end
    end

    if (ncol >= MAX_ATTEMPTS) begin
      chk("col_err after 16 attempts", n_col_err == ce0 + 1 && n_over == over0);
      m_excess++;
    end else if (len > MAX_DATA) begin
      chk("len_err and xmit_over", n_len_err == le0 + 1 && n_over == over0 + 1);
      m_len_err++;
    end else begin
      chk("xmit_over once, no error", n_over == over0 + 1 && n_col_err == ce0 && n_len_err == le0);
      m_sent++;
      if (len < MIN_DATA) m_pad++;
      if (len == MAX_DATA) m_max++;
    end
    chk("attempt count cleared", attempts == 0);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(46,   0,  0,   0);
    send(0,    0,  0,  40);     // carrier busy for 40 clocks: deferral
    send(45,   1,  5,   0);     // collision in the preamble
    send(100,  3, 60,   0);     // collisions in the data
    send(1500, 2, 20,  10);     // maximum frame
    send(1600, 0,  0,   0);     // length error
    send(60,  16, 30,   0);     // 16 attempts: frame dropped
    send(47,   0,  0,   3);     // recovery after the error
    send(1,    1, 140,  0);     // collision in the FCS of a padded frame
    for (int t = 0; t < 6; t++)
      send($urandom % 1501, $urandom % 4, $urandom % 100, $urandom % 50);

    chk("mechanism: deferral restarted by carrier", m_defer_restart > 0);
    chk("mechanism: padding", m_pad > 0);
    chk("mechanism: maximum frame", m_max > 0);
    chk("mechanism: collision and jam", m_collision > 0);
    chk("mechanism: backoff retry", m_retry > 0);
    chk("mechanism: 16-attempt error", m_excess > 0);
    chk("mechanism: length error", m_len_err > 0);
    $display("frames sent %0d, deferral restarts %0d, padded %0d, max-length %0d, collisions %0d, retries %0d, attempt-limit errors %0d, length errors %0d",
             m_sent, m_defer_restart, m_pad, m_max, m_collision, m_retry, m_excess, m_len_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
