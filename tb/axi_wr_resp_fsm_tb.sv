// axi_wr_resp_fsm_tb: checks the write response rule and the B handshake.
//
// For random requests the testbench pulses wr_done (with a random wr_err)
// and expects bvalid exactly 2 cycles later with bid = the request's ID and
// bresp = DECERR if wr_err, else SLVERR if awsize > 3, else OKAY. The master
// holds bready low for a random time; bvalid and bresp must hold, and
// release_o must pulse only on the cycle of the handshake.
module axi_wr_resp_fsm_tb;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bvalid, bready, wr_done, wr_err, release_o;
  logic [3:0] bid;
  logic [1:0] bresp;
  ax_req_t req;
  int checks = 0, failures = 0;
  int n_ok = 0, n_slv = 0, n_dec = 0;

  axi_wr_resp_fsm dut (.*);

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
    bready = 0; wr_done = 0; wr_err = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      logic [1:0] exp;
      int cyc, stall;
      req <= '{id: 4'($urandom), addr: $urandom, len: 4'($urandom), size: 3'($urandom), burst: 2'($urandom)};
      @(posedge clk);
      wr_err  <= ($urandom_range(0, 3) == 0);
      wr_done <= 1;
      @(posedge clk);
      wr_done <= 0;
      exp = wr_err ? RESP_DECERR : (req.size > 3'b011) ? RESP_SLVERR : RESP_OKAY;
      wr_err <= 0;
      cyc = 0;
      while (!bvalid) begin
        @(posedge clk);
        cyc++;
        checks++;
        if (release_o) fail("release before the handshake");
      end
      checks++;
      if (cyc != 2) fail($sformatf("bvalid %0d cycles after wr_done, expected 2", cyc));
      checks++;
      if (bresp !== exp || bid !== req.id) fail($sformatf("bresp %0d bid %0d, expected %0d %0d", bresp, bid, exp, req.id));
      if (exp == RESP_OKAY) n_ok++; else if (exp == RESP_SLVERR) n_slv++; else n_dec++;
      stall = $urandom_range(0, 3);
      repeat (stall) begin
        @(posedge clk);
        checks++;
        if (!bvalid || bresp !== exp || release_o) fail("bvalid/bresp changed while waiting for bready");
      end
      bready <= 1;
      #1;
      checks++;
      if (!release_o) fail("no release on handshake");
      @(posedge clk);
      bready <= 0;
      #1;
      checks++;
      if (bvalid || release_o) fail("bvalid stays after handshake");
    end
    checks++;
    if (n_ok == 0 || n_slv == 0 || n_dec == 0) fail("not every response code was produced");
    $display("responses: okay=%0d slverr=%0d decerr=%0d", n_ok, n_slv, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
