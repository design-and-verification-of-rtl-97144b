// axi_rd_addr_fsm_tb: checks the read address handshake and request capture.
//
// A master raises arvalid with random request fields after a random delay
// and holds it until arready. The testbench checks that arready comes exactly
// one cycle after arvalid is first seen in ARSTART (two cycles after arvalid
// rises when the FSM is waiting), that the recorded request equals what was
// driven, that pending stays high and no new address is taken until
// release_i, and that arready is never high while pending is set.
module axi_rd_addr_fsm_tb;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic arvalid, arready, release_i, pending;
  logic [3:0] arid, arlen;
  logic [31:0] araddr;
  logic [2:0] arsize;
  logic [1:0] arburst;
  ax_req_t req;
  int checks = 0, failures = 0;

  axi_rd_addr_fsm dut (.*);

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
    arvalid = 0; release_i = 0; arid = 0; arlen = 0; araddr = 0; arsize = 0; arburst = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int wait_cycles;
      ax_req_t exp;
      exp = '{id: 4'($urandom), addr: $urandom, len: 4'($urandom), size: 3'($urandom), burst: 2'($urandom_range(0, 2))};
      repeat ($urandom_range(0, 3)) @(posedge clk);
      arvalid <= 1; arid <= exp.id; araddr <= exp.addr; arlen <= exp.len;
      arsize <= exp.size; arburst <= exp.burst;
      wait_cycles = 0;
      do begin
        @(posedge clk);
        wait_cycles++;
      end while (!arready);
      // the FSM idles in ARSTART, so arready follows arvalid after 2 edges
      checks++;
      if (wait_cycles != 2) fail($sformatf("arready after %0d cycles", wait_cycles));
      arvalid <= 0;
      @(posedge clk);
      checks++;
      if (req !== exp || !pending) fail($sformatf("captured %p exp %p pending %b", req, exp, pending));
      // a second address must not be accepted before release_i
      arvalid <= 1; araddr <= ~exp.addr;
      repeat ($urandom_range(3, 8)) begin
        @(posedge clk);
        checks++;
        if (arready) fail("arready while a read is pending");
      end
      checks++;
      if (req !== exp) fail("request changed while pending");
      arvalid <= 0;
      release_i <= 1;
      @(posedge clk);
      release_i <= 0;
      // wait until the FSM is back in ARSTART
      repeat (2) @(posedge clk);
      checks++;
      if (pending) fail("pending not cleared by release_i");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
