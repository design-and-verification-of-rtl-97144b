// axi_wr_addr_fsm_tb: checks the write address handshake and request capture.
//
// A master raises awvalid with random request fields after a random delay
// and holds it until awready. The testbench checks that awready comes exactly
// one cycle after awvalid is first seen in AWSTART (two cycles after awvalid
// rises when the FSM is waiting), that the recorded request equals what was
// driven, that pending stays high and no new address is taken until
// release_i, and that awready is never high while pending is set.
module axi_wr_addr_fsm_tb;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic awvalid, awready, release_i, pending;
  logic [3:0] awid, awlen;
  logic [31:0] awaddr;
  logic [2:0] awsize;
  logic [1:0] awburst;
  ax_req_t req;
  int checks = 0, failures = 0;

  axi_wr_addr_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    awvalid = 0; release_i = 0; awid = 0; awlen = 0; awaddr = 0; awsize = 0; awburst = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int wait_cycles;
      ax_req_t exp;
      exp = '{id: 4'($urandom), addr: $urandom, len: 4'($urandom), size: 3'($urandom), burst: 2'($urandom_range(0, 2))};
      repeat ($urandom_range(0, 3)) @(posedge clk);
      awvalid <= 1; awid <= exp.id; awaddr <= exp.addr; awlen <= exp.len;
      awsize <= exp.size; awburst <= exp.burst;
      wait_cycles = 0;
      do begin
        @(posedge clk);
        wait_cycles++;
      end while (!awready);
      // the FSM idles in AWSTART, so awready follows awvalid after 2 edges
      checks++;
      if (wait_cycles != 2) fail($sformatf("awready after %0d cycles", wait_cycles));
      awvalid <= 0;
      @(posedge clk);
      checks++;
      if (req !== exp || !pending) fail($sformatf("captured %p exp %p pending %b", req, exp, pending));
      // a second address must not be accepted before release_i
      awvalid <= 1; awaddr <= ~exp.addr;
      repeat ($urandom_range(3, 8)) begin
        @(posedge clk);
        checks++;
        if (awready) fail("awready while a write is pending");
      end
      checks++;
      if (req !== exp) fail("request changed while pending");
      awvalid <= 0;
      release_i <= 1;
      @(posedge clk);
      release_i <= 0;
      // wait until the FSM is back in AWSTART
      repeat (2) @(posedge clk);
      checks++;
      if (pending) fail("pending not cleared by release_i");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
