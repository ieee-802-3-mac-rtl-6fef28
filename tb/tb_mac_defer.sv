// tb_mac_defer: drives the defer block with random carrier-sense patterns
// and checks the clock at which xmit_frame comes against a reference rule:
// after a request seen in clock r, the first 15-clock run of quiet carrier
// (60 bit times at 4 bits per clock) that lies wholly after r ends in clock
// e, and xmit_frame must be high in clock e + 10 (one clock to leave the
// first part, then the 36-bit, 9-clock second part), and in no other clock.
// Carrier in the second part must not delay it. After each start the test
// ends the attempt with strt_def (a new gap must follow), xmit_over or
// bo_err (back to idle, x_busy low), and checks that a request while busy
// is ignored.
module tb_mac_defer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strt_xmit = 1'b0, crs = 1'b0, xmit_over = 1'b0, strt_def = 1'b0, bo_err = 1'b0;
  logic x_busy, xmit_frame;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  bit   quiet [int];          // carrier history by clock
  int   gaps_restarted = 0;

  mac_defer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at clock %0d", what, cyc);
    end
  endtask

  // Expected xmit_frame clock for a request seen in clock r.
  function automatic int expect_start(input int r);
    int run = 0;
    for (int c = r + 1; ; c++) begin
      if (!quiet.exists(c)) return -1;
      run = quiet[c] ? run + 1 : 0;
      if (run == 15) return c + 10;
    end
  endfunction

  // Run one gap: crs busy with probability p_busy per clock for the first
  // busy_len clocks, then quiet; returns at the falling edge after the clock
  // in which xmit_frame is seen.
  task automatic gap(input int r, input int busy_len, input int p_busy);
    int exp_t, t;
    bit restarted = 0;
    // carrier pattern for the next 400 clocks, decided up front
    for (int c = r + 1; c < r + 400; c++) begin
      quiet[c] = !((c - r) <= busy_len && ($urandom % 100) < p_busy);
      if (!quiet[c] && (c - r) <= 15 + busy_len) restarted = 1;
    end
    exp_t = expect_start(r);
    t = -1;
    // called at the falling edge of clock r + 1
    while (cyc < r + 400 && t < 0) begin
      crs = !quiet[cyc];
      @(posedge clk);
      #1;
      if (xmit_frame) t = cyc;
      else chk("x_busy high while deferring", x_busy);
      @(negedge clk);
    end
    chk($sformatf("xmit_frame at %0d expected %0d", t, exp_t), t == exp_t);
    if (restarted) gaps_restarted++;
  endtask

  int r, choice;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 chk("idle after reset", !x_busy && !xmit_frame);

    for (int t = 0; t < 150; t++) begin
      // request
      @(negedge clk) begin strt_xmit = 1'b1; crs = ($urandom % 2) == 1; end
      r = cyc;
      @(negedge clk) strt_xmit = 1'b0;
      gap(r, $urandom % 60, (t % 4) * 15);
      // one to three retries
      for (int k = 0; k < 3; k++) begin
        choice = $urandom % 3;
        begin
          crs = 1'b0;
          strt_xmit = 1'b1;           // ignored: busy
        end
        @(negedge clk) strt_xmit = 1'b0;
        #1 chk("still waiting for the transmitter", x_busy && !xmit_frame);
        if (choice == 0) begin
          @(negedge clk) strt_def = 1'b1;
          r = cyc;
          @(negedge clk) strt_def = 1'b0;
          gap(r, $urandom % 40, 30);
        end else begin
          @(negedge clk) if (choice == 1) xmit_over = 1'b1; else bo_err = 1'b1;
          @(negedge clk) begin xmit_over = 1'b0; bo_err = 1'b0; end
          #1 chk("idle after end of frame", !x_busy);
          repeat (30) begin
            @(negedge clk);
            #1 chk("no start while idle", !xmit_frame && !x_busy);
          end
          break;
        end
      end
      @(negedge clk) xmit_over = 1'b1;
      @(negedge clk) xmit_over = 1'b0;
    end
    chk("carrier restarted the gap", gaps_restarted > 20);
    $display("gaps restarted by carrier: %0d", gaps_restarted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
