// tb_mac_transmitter: drives the transmitter with a testbench byte source in
// place of the frame assembler and a fixed FCS word in place of the CRC
// block, records tx_en, txd, strt, xmit_over and strt_bo clock by clock, and
// compares the record with a trace built independently from the frame
// format: the clock after xmit_frame, 14 preamble nibbles 5, SFD nibbles 5
// and D (strt rising with the first of them), each byte low nibble first,
// the 8 FCS nibbles, then tx_en and strt low with xmit_over for one clock.
// With a collision in clock c the nibble of clock c is still sent, clocks
// c+1 to c+8 carry the jam (F) with strt low, and strt_bo pulses in c+9.
// A bad length from the byte source must end the frame right after the SFD.
module tb_mac_transmitter;
  import mac_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        xmit_frame = 1'b0, col = 1'b0;
  logic [7:0]  fa_data;
  logic        fa_last, fa_err = 1'b0;
  logic [31:0] fcs = '0;
  logic [3:0]  txd;
  logic        tx_en, strt, fa_next, xmit_over, strt_bo;
  int          checks = 0, failures = 0;
  int          n_col = 0, n_ok = 0, n_abort = 0;

  mac_transmitter dut (.*);

  always #5 clk = ~clk;

  // byte source
  byte unsigned frame[$];
  int           idx = 0;
  assign fa_data = (idx < frame.size()) ? frame[idx] : 8'h00;
  assign fa_last = (idx == frame.size() - 1);
  always @(posedge clk) begin
    if (fa_next) idx <= idx + 1;
    if (fa_next && idx >= frame.size()) begin
      failures++;
      $display("FAIL byte taken beyond the frame");
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  typedef struct packed {
    logic       en;
    logic [3:0] d;
    logic       strt;
    logic       over;
    logic       bo;
  } obs_t;

  obs_t exp_tr[$];
  obs_t got_tr[$];

  // col_at: clock (counted from the first preamble nibble, 0-based) in which
  // col is high, or -1. abort: assembler reports a bad length.
  task automatic run(input int nbytes, input int col_at, input bit abort);
    obs_t o;
    int   total, c;
    frame.delete();
    for (int i = 0; i < nbytes; i++) frame.push_back(8'($urandom));
    fcs = $urandom;
    // expected trace, starting with the first preamble nibble
    exp_tr.delete();
    for (int i = 0; i < 14; i++) exp_tr.push_back('{1'b1, 4'h5, 1'b0, 1'b0, 1'b0});
    exp_tr.push_back('{1'b1, 4'h5, 1'b1, 1'b0, 1'b0});
    exp_tr.push_back('{1'b1, 4'hD, 1'b1, 1'b0, 1'b0});
    if (abort) begin
      exp_tr.push_back('{1'b0, 4'h0, 1'b1, 1'b0, 1'b0});
      exp_tr.push_back('{1'b0, 4'h0, 1'b0, 1'b1, 1'b0});
    end else begin
      foreach (frame[i]) begin
        exp_tr.push_back('{1'b1, frame[i][3:0], 1'b1, 1'b0, 1'b0});
        exp_tr.push_back('{1'b1, frame[i][7:4], 1'b1, 1'b0, 1'b0});
      end
      for (int i = 0; i < 8; i++) exp_tr.push_back('{1'b1, fcs[4*i +: 4], 1'b1, 1'b0, 1'b0});
      exp_tr.push_back('{1'b0, 4'h0, 1'b0, 1'b1, 1'b0});
      total = exp_tr.size();
      if (col_at >= 0 && col_at < total - 1) begin
        while (exp_tr.size() > col_at + 1) void'(exp_tr.pop_back());
        for (int i = 0; i < 8; i++) exp_tr.push_back('{1'b1, 4'hF, 1'b0, 1'b0, 1'b0});
        exp_tr.push_back('{1'b0, 4'h0, 1'b0, 1'b0, 1'b1});
      end
    end
    // drive
    idx = 0;
    @(negedge clk) xmit_frame = 1'b1;
    @(negedge clk) xmit_frame = 1'b0;
    got_tr.delete();
    c = 0;
    while (c < exp_tr.size() + 4) begin
      col    = (c == col_at);
      fa_err = abort && strt;
      #1;
      o = '{tx_en, tx_en ? txd : 4'h0, strt, xmit_over, strt_bo};
      got_tr.push_back(o);
      @(negedge clk);
      c++;
    end
    col = 1'b0;
    fa_err = 1'b0;
    // compare, then expect idle clocks
    for (int i = 0; i < exp_tr.size(); i++)
      if (got_tr[i] !== exp_tr[i]) begin
        $display("clock %0d: got en=%0b d=%h strt=%0b over=%0b bo=%0b, expected en=%0b d=%h strt=%0b over=%0b bo=%0b",
                 i, got_tr[i].en, got_tr[i].d, got_tr[i].strt, got_tr[i].over, got_tr[i].bo,
                 exp_tr[i].en, exp_tr[i].d, exp_tr[i].strt, exp_tr[i].over, exp_tr[i].bo);
        chk($sformatf("%0d bytes, col at %0d, abort %0b: trace", nbytes, col_at, abort), 0);
        return;
      end
    for (int i = exp_tr.size(); i < got_tr.size(); i++)
      chk("idle after the frame", got_tr[i] == '0);
    chk($sformatf("%0d bytes, col at %0d, abort %0b: trace", nbytes, col_at, abort), 1);
    if (abort) n_abort++;
    else if (col_at >= 0 && col_at < total - 1) n_col++;
    else n_ok++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 chk("idle after reset", !tx_en && !strt);
    run(60, -1, 0);
    run(64, -1, 0);
    run(1518 - 4, -1, 0);
    run(60, 0, 0);              // collision in the first preamble nibble
    run(60, 15, 0);             // in the SFD
    run(60, 40, 0);             // in the frame
    run(60, 16 + 120 + 7, 0);   // in the last FCS nibble
    run(60, -1, 1);             // bad length
    for (int t = 0; t < 100; t++) begin
      int nb = 60 + $urandom % 200;
      run(nb, ($urandom % 2) ? int'($urandom % (16 + 2 * nb + 8)) : -1, ($urandom % 10) == 0);
    end
    chk("frames sent, collided and aborted", n_ok > 0 && n_col > 0 && n_abort > 0);
    $display("frames: %0d sent, %0d collided, %0d aborted", n_ok, n_col, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
