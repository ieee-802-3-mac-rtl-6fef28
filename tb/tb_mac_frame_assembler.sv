// tb_mac_frame_assembler: loads a testbench buffer model with a destination
// address, a length and random data, starts the frame assembler and reads
// the whole byte stream back the way the transmitter does (one byte every
// two clocks, sometimes slower). The stream must be DA, the hard-wired SA,
// the length, the data and zero pad up to 46 bytes, with dlast on the final
// byte; the first byte must be ready in the third clock of strt. Lengths
// 0, below 46, 46, between 46 and 1500, and 1500 are run, as in the
// document's test plan; lengths above 1500 must raise err and give no byte.
module tb_mac_frame_assembler;
  import mac_pkg::*;
  localparam logic [47:0] SA = 48'h02_00_00_00_00_01;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        strt = 1'b0, next = 1'b0;
  logic [8:0]  buf_raddr;
  logic [31:0] buf_rdata;
  logic [7:0]  dout;
  logic        dvalid, dlast, err;
  logic [31:0] mem [512];
  int          checks = 0, failures = 0;

  mac_frame_assembler dut (.*);   // SRC_ADDR left at its default, SA

  assign buf_rdata = mem[buf_raddr];

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  byte unsigned exp_q[$];

  task automatic run(input int len);
    logic [47:0] da;
    byte unsigned data[];
    int n;
    bit bad;
    da   = {16'($urandom), 32'($urandom)};
    data = new[len > 1500 ? 0 : len];
    foreach (data[i]) data[i] = 8'($urandom);
    foreach (mem[i]) mem[i] = $urandom;          // stale contents
    mem[0] = da[47:16];
    mem[1] = {da[15:0], 16'(len)};
    foreach (data[i]) mem[2 + i / 4][8 * (3 - i % 4) +: 8] = data[i];
    // expected byte stream
    exp_q.delete();
    for (int i = 5; i >= 0; i--) exp_q.push_back(da[8 * i +: 8]);
    for (int i = 5; i >= 0; i--) exp_q.push_back(SA[8 * i +: 8]);
    exp_q.push_back(8'(len >> 8));
    exp_q.push_back(8'(len));
    foreach (data[i]) exp_q.push_back(data[i]);
    while (exp_q.size() < HDR_BYTES + MIN_DATA) exp_q.push_back(8'h00);

    @(negedge clk) strt = 1'b1;
    @(negedge clk);
    chk("nothing valid in the second clock", !dvalid && !err);
    @(negedge clk);
    if (len > 1500) begin
      chk($sformatf("len %0d: err in the third clock", len), err && !dvalid);
      repeat (20) begin
        @(negedge clk);
        chk("err held, no data", err && !dvalid);
      end
    end else begin
      chk($sformatf("len %0d: first byte valid in the third clock", len), dvalid && !err);
      n = 0;
      bad = 0;
      forever begin
        if (!dvalid) begin bad = 1; break; end
        if (n >= exp_q.size() || dout !== exp_q[n]) begin
          bad = 1;
          $display("len %0d: byte %0d is %02h expected %02h", len, n, dout,
                   n < exp_q.size() ? exp_q[n] : 8'hxx);
          break;
        end
        if (dlast != (n == exp_q.size() - 1)) begin
          bad = 1;
          $display("len %0d: dlast %0b on byte %0d", len, dlast, n);
          break;
        end
        n++;
        @(negedge clk) next = 1'b1;         // second nibble of the byte
        @(negedge clk) next = 1'b0;
        if (n == exp_q.size()) break;
        repeat ($urandom % 3 == 0 ? 2 : 0) @(negedge clk);
      end
      chk($sformatf("len %0d: %0d bytes match", len, n), !bad && n == exp_q.size());
      chk("idle after the last byte", !dvalid);
    end
    @(negedge clk) strt = 1'b0;
    @(negedge clk);
    chk("idle after strt falls", !dvalid && !err);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(0);    run(1);    run(17);   run(45);   run(46);   run(47);
    run(64);   run(100);  run(777);  run(1499); run(1500);
    run(1501); run(1536); run(65535);
    for (int t = 0; t < 20; t++) run($urandom % 1501);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
