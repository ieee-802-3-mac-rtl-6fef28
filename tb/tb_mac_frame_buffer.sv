// tb_mac_frame_buffer: writes random words to random addresses, keeps a
// copy in a testbench array and checks every read, including that the read
// port shows a written word from the clock after the write and that a clock
// without write enable leaves the word alone.
module tb_mac_frame_buffer;
  localparam int DEPTH = 512;
  localparam int AW    = 9;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0]   wdata = '0, rdata;
  logic [31:0]   model [DEPTH];
  int            checks = 0, failures = 0;

  mac_frame_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL word %0d: %08h expected %08h", a, rdata, model[a]);
      end
    end
    // random writes, some with enable low
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = AW'($urandom); wdata = $urandom;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0; raddr = waddr;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL after write to %0d: %08h expected %08h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
