// tb_mac_backoff: plays the transmitter side of the backoff block. For each
// of many frames it signals collisions one after another and measures the
// delay to strt_def. The delay must be r slot times plus one clock with a
// whole r in 0 <= r < 2^min(n,10), n being the collision count; for small n
// every value of r must turn up across the frames. The 16th collision must
// give err and no strt_def, and xmit_over must clear the count. The slot
// time is shortened to 32 bit times (8 clocks) to keep the run short.
module tb_mac_backoff;
  localparam int SLOT_BITS = 32;
  localparam int SLOT_CLKS = SLOT_BITS / 4;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       strt_bo = 1'b0, xmit_over = 1'b0;
  logic       strt_def, err, busy;
  logic [4:0] attempts;
  int         checks = 0, failures = 0;
  int         max_r [17];
  int         min_r [17];
  int         errs = 0;

  mac_backoff #(.SLOT_BITS(SLOT_BITS)) dut (.*);

  always #5 clk = ~clk;

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

  // One collision; returns the measured number of clocks to strt_def, or -1
  // if err came instead.
  task automatic collide(output int d, output bit got_err);
    int c = 0;
    @(negedge clk) strt_bo = 1'b1;
    @(negedge clk) strt_bo = 1'b0;
    c = 1;
    got_err = 0;
    d = -1;
    forever begin
      if (strt_def) begin d = c; break; end
      if (err)      begin got_err = 1; break; end
      if (c > 2000 * SLOT_CLKS) break;
      @(negedge clk);
      c++;
    end
  endtask

  int d, r, k;
  bit e;

  initial begin
    foreach (max_r[i]) begin max_r[i] = -1; min_r[i] = 1 << 20; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int f = 0; f < 150; f++) begin
      // a few frames end early with xmit_over after some collisions
      int stop_at = (f % 5 == 4) ? 1 + ($urandom % 5) : 16;
      for (int n = 1; n <= stop_at; n++) begin
        repeat ($urandom % 5) @(negedge clk);
        collide(d, e);
        if (n == 16) begin
          chk($sformatf("frame %0d: err on collision 16", f), e && d < 0);
          @(negedge clk);
          chk("count cleared after err", attempts == 0);
          errs++;
        end else begin
          k = (n < 10) ? n : 10;
          r = (d - 1) / SLOT_CLKS;
          chk($sformatf("frame %0d collision %0d: strt_def, no err", f, n), !e && d > 0);
          chk($sformatf("frame %0d collision %0d: delay %0d is r slots + 1", f, n, d),
              (d - 1) % SLOT_CLKS == 0);
          chk($sformatf("frame %0d collision %0d: r=%0d below 2^%0d", f, n, r, k), r < (1 << k));
          chk("attempt count", attempts == 5'(n));
          chk("not busy after strt_def", !busy);
          if (r > max_r[n]) max_r[n] = r;
          if (r < min_r[n]) min_r[n] = r;
        end
      end
      if (stop_at < 16) begin
        @(negedge clk) xmit_over = 1'b1;
        @(negedge clk) xmit_over = 1'b0;
        chk("count cleared by xmit_over", attempts == 0);
      end
    end
    for (int n = 1; n <= 4; n++) begin
      chk($sformatf("collision %0d: all of 0..%0d seen (min %0d max %0d)", n, (1 << n) - 1,
                    min_r[n], max_r[n]), min_r[n] == 0 && max_r[n] == (1 << n) - 1);
    end
    chk("large r reached at n=15", max_r[15] > 512);
    $display("max r per collision: %p", max_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
