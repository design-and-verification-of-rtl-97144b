// axi_slave_waveform_tb: replays the reference transaction of the slave cycle
// by cycle and checks the state sequences it must produce.
//
// The transaction is an INCR write of 8 beats of 4 bytes (awid 9, awaddr 0x5,
// awlen 7, awsize 2, wstrb 1111, data 6, 3, a, 7, 1, 4, 6, 3) with wvalid and
// bready held high, followed by the matching INCR read with rready held high.
// Checked here:
//   - the write address FSM passes through states 0, 1, 2 (AWIDLE, AWSTART,
//     AWREADY) and awready is high only in state 2;
//   - the write data FSM repeats states 1, 4, 2, 3 (WSTART, WADDR_DEC,
//     WREADY, WVALID) once per beat, with wready only in state 2, wlen_count
//     counting 0 to 7, and ends 1, 4, 2, 0 on the last beat;
//   - the write response FSM goes 1, 2, 3, 0 (BDETECT_LAST, BSTART, BWAIT,
//     BIDLE) with bvalid only in state 3 and bresp OKAY, bid 9;
//   - the read beats come from byte addresses 0x5, 0x9, 0xd, ... 0x21, carry
//     the written words, rresp OKAY, rid 9 and rlast only on the eighth.
module axi_slave_waveform_tb;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_if bus (.clk, .rst_n);

  axi_slave dut (
    .clk, .rst_n,
    .awvalid(bus.awvalid), .awready(bus.awready), .awid(bus.awid), .awaddr(bus.awaddr),
    .awlen(bus.awlen), .awsize(bus.awsize), .awburst(bus.awburst),
    .wvalid(bus.wvalid), .wready(bus.wready), .wid(bus.wid), .wdata(bus.wdata),
    .wstrb(bus.wstrb), .wlast(bus.wlast),
    .bvalid(bus.bvalid), .bready(bus.bready), .bid(bus.bid), .bresp(bus.bresp),
    .arvalid(bus.arvalid), .arready(bus.arready), .arid(bus.arid), .araddr(bus.araddr),
    .arlen(bus.arlen), .arsize(bus.arsize), .arburst(bus.arburst),
    .rvalid(bus.rvalid), .rready(bus.rready), .rid(bus.rid), .rdata(bus.rdata),
    .rresp(bus.rresp), .rlast(bus.rlast)
  );

  int checks = 0, failures = 0;
  logic [31:0] wdata_seq [8] = '{32'h6, 32'h3, 32'ha, 32'h7, 32'h1, 32'h4, 32'h6, 32'h3};

  // state traces, sampled at each falling edge
  int aw_trace [$], w_trace [$], b_trace [$], wcount_trace [$];
  bit tracing;
  always @(negedge clk) if (tracing) begin
    aw_trace.push_back(int'(dut.u_aw.state));
    w_trace.push_back(int'(dut.u_w.state));
    b_trace.push_back(int'(dut.u_b.state));
    wcount_trace.push_back(int'(dut.u_w.wlen_count));
    checks++;
    if (bus.awready !== (dut.u_aw.state == 2'd2) || bus.wready !== (dut.u_w.state == 3'd2) ||
        bus.bvalid !== (dut.u_b.state == 2'd3)) begin
      failures++;
      $display("FAIL ready/valid not tied to its state");
    end
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // drop consecutive repeats of a trace
  function automatic void squeeze(ref int q [$], output int r [$]);
    r.delete();
    foreach (q[i]) if (r.size() == 0 || r[r.size() - 1] != q[i]) r.push_back(q[i]);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int aw_s [$], w_s [$], b_s [$], exp_w [$];
    bus.awvalid = 0; bus.wvalid = 0; bus.bready = 1; bus.arvalid = 0; bus.rready = 1;
    bus.awid = 0; bus.awaddr = 0; bus.awlen = 0; bus.awsize = 0; bus.awburst = 0;
    bus.wid = 0; bus.wdata = 0; bus.wstrb = 0; bus.wlast = 0;
    bus.arid = 0; bus.araddr = 0; bus.arlen = 0; bus.arsize = 0; bus.arburst = 0;
    repeat (3) @(posedge clk);
    tracing = 1;
    rst_n <= 1;
    // write: address and all data beats offered at once, wvalid held high
    @(posedge clk);
    bus.awvalid <= 1; bus.awid <= 4'd9; bus.awaddr <= 32'h5; bus.awlen <= 4'd7;
    bus.awsize <= 3'd2; bus.awburst <= BURST_INCR;
    fork
      begin
        do @(negedge clk); while (!bus.awready);
        @(posedge clk);
        bus.awvalid <= 0;
      end
      for (int b = 0; b < 8; b++) begin
        bus.wvalid <= 1; bus.wid <= 4'd9; bus.wdata <= wdata_seq[b]; bus.wstrb <= 4'hF;
        bus.wlast <= (b == 7);
        do @(negedge clk); while (!bus.wready);
        checks++;
        if (dut.u_w.wlen_count != 4'(b)) fail($sformatf("wlen_count %0d at beat %0d", dut.u_w.wlen_count, b));
        @(posedge clk);
      end
    join
    bus.wvalid <= 0; bus.wlast <= 0;
    do @(negedge clk); while (!bus.bvalid);
    checks++;
    if (bus.bresp !== RESP_OKAY || bus.bid !== 4'd9) fail($sformatf("bresp %0d bid %0d", bus.bresp, bus.bid));
    repeat (3) @(negedge clk);
    tracing = 0;

    squeeze(aw_trace, aw_s);
    squeeze(w_trace, w_s);
    squeeze(b_trace, b_s);
    // address FSM: 0 1 2 then idle (0) until the response frees it, then 1
    checks++;
    if (aw_s.size() < 4 || aw_s[0] != 0 || aw_s[1] != 1 || aw_s[2] != 2 || aw_s[3] != 0)
      fail($sformatf("write address states %p", aw_s));
    // data FSM: 0, then 1 4 2 3 per beat, last beat 1 4 2 0, then 1
    exp_w.push_back(0);
    for (int b = 0; b < 8; b++) begin
      exp_w.push_back(1); exp_w.push_back(4); exp_w.push_back(2);
      if (b < 7) exp_w.push_back(3);
    end
    exp_w.push_back(0);
    exp_w.push_back(1);
    checks++;
    if (w_s != exp_w) fail($sformatf("write data states %p, expected %p", w_s, exp_w));
    // response FSM: 0 1 ... 2 3 0 1
    checks++;
    if (b_s.size() != 6 || b_s[0] != 0 || b_s[1] != 1 || b_s[2] != 2 || b_s[3] != 3 || b_s[4] != 0 || b_s[5] != 1)
      fail($sformatf("write response states %p", b_s));

    // read back with rready held high
    @(posedge clk);
    bus.arvalid <= 1; bus.arid <= 4'd9; bus.araddr <= 32'h5; bus.arlen <= 4'd7;
    bus.arsize <= 3'd2; bus.arburst <= BURST_INCR;
    do @(negedge clk); while (!bus.arready);
    @(posedge clk);
    bus.arvalid <= 0;
    for (int b = 0; b < 8; b++) begin
      do @(negedge clk); while (!bus.rvalid);
      checks++;
      if (dut.u_r.addr_q !== 32'h5 + 32'(4 * b) || bus.rdata !== wdata_seq[b] || bus.rresp !== RESP_OKAY ||
          bus.rid !== 4'd9 || bus.rlast !== (b == 7) || dut.u_r.len_count != 5'(b))
        fail($sformatf("read beat %0d: addr %h data %h resp %0d rid %0d last %b len_count %0d",
                       b, dut.u_r.addr_q, bus.rdata, bus.rresp, bus.rid, bus.rlast, dut.u_r.len_count));
      @(posedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (bus.rvalid) fail("extra read beat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
