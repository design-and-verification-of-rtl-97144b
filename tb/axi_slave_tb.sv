// axi_slave_tb: end-to-end test of the AXI memory slave at its default size.
//
// A master built from tasks drives the slave through an axi_if bundle and a
// byte-array scoreboard predicts every response and every read beat. The
// test runs, in order:
//   1. the reference transaction: an 8-beat INCR write of size 2 with all
//      strobes to address 0x5 (ID 9, data 6, 3, a, 7, 1, 4, 6, 3), then an
//      8-beat INCR read of the same range, checking the data, OKAY responses
//      and the beat rates (a write beat every 4 cycles, a read beat every 3);
//   2. random FIXED, INCR and WRAP writes with random strobes, each read
//      back with a random burst;
//   3. error cases: bursts that run past the 512-byte range (DECERR), awsize
//      above 3 and arsize above 2 (SLVERR);
//   4. writes to the lower half overlapping in time with reads of the upper
//      half, with random valid gaps and ready stalls.
// Each mechanism is counted (burst types, a WRAP turning round, partial
// strobes, each error code, bready and rready stalls, wvalid gaps, an
// address held off while the previous write is open, read/write overlap);
// one that never happens counts as a failure.
module axi_slave_tb;
  import axi_pkg::*;
  localparam int unsigned BYTES = 128 * 4;

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
  logic [7:0] model [BYTES];
  logic       known [BYTES];   // byte has been written

  // mechanism counters
  int n_fixed_w, n_incr_w, n_wrap_w, n_fixed_r, n_incr_r, n_wrap_r, n_wrap_turn;
  int n_partial_strb, n_okay, n_slverr_b, n_decerr_b, n_slverr_r, n_decerr_r;
  int n_bstall, n_rstall, n_wgap, n_aw_held, n_overlap;
  bit wr_busy, rd_busy;
  int wr_beat_cycles [$];
  int rd_beat_cycles [$];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (wr_busy && rd_busy) n_overlap++;

  function automatic logic [31:0] model_next(input logic [1:0] burst, input logic [3:0] len,
                                             input logic [2:0] size, input logic [31:0] a, input int n);
    logic [31:0] region, base;
    region = (32'(len) + 1) << size;
    base   = a - (a % region);
    case (burst)
      2'b00:   return a;
      2'b10:   return base + ((a - base + 32'(n)) % region);
      default: return a + 32'(n);
    endcase
  endfunction

  function automatic void model_write_beat(input logic [31:0] a, input logic [3:0] strb, input logic [31:0] d);
    int k;
    k = 0;
    for (int i = 0; i < 4; i++) if (strb[i]) begin
      model[a + 32'(k)] = d[8*i +: 8];
      known[a + 32'(k)] = 1;
      k++;
    end
  endfunction

  // ---------------------------------------------------------------- write
  task automatic axi_write(input logic [3:0] id, input logic [31:0] addr, input logic [3:0] len,
                           input logic [2:0] size, input logic [1:0] burst,
                           input logic [3:0] strb [16], input logic [31:0] data [16],
                           input bit random_timing);
    logic [31:0] a;
    bit          bad;
    logic [1:0]  exp;
    wr_busy = 1;
    // scoreboard: apply the beats to the model
    a = addr;
    bad = 0;
    for (int b = 0; b <= int'(len); b++) begin
      int n;
      logic [31:0] nxt;
      n = 0;
      for (int i = 0; i < 4; i++) if (strb[b][i]) n++;
      if (strb[b] != 4'hF && strb[b] != 4'h0) n_partial_strb++;
      if (a + 32'(n) > BYTES) bad = 1;
      else begin
        int k;
        k = 0;
        for (int i = 0; i < 4; i++) if (strb[b][i]) begin
          model[a + 32'(k)] = data[b][8*i +: 8];
          known[a + 32'(k)] = 1;
          k++;
        end
      end
      nxt = model_next(burst, len, size, a, n);
      if (burst == 2'b10 && nxt < a) n_wrap_turn++;
      a = nxt;
    end
    exp = bad ? RESP_DECERR : (size > 3'b011) ? RESP_SLVERR : RESP_OKAY;
    case (burst) 2'b00: n_fixed_w++; 2'b01: n_incr_w++; default: n_wrap_w++; endcase
    fork
      begin : aw_phase
        if (random_timing) repeat ($urandom_range(0, 2)) @(posedge clk);
        bus.awvalid <= 1; bus.awid <= id; bus.awaddr <= addr; bus.awlen <= len;
        bus.awsize <= size; bus.awburst <= burst;
        do @(negedge clk); while (!bus.awready);
        @(posedge clk);
        bus.awvalid <= 0;
      end
      begin : w_phase
        int last;
        last = -1;
        for (int b = 0; b <= int'(len); b++) begin
          int cyc;
          if (random_timing && $urandom_range(0, 3) == 0) begin
            n_wgap++;
            bus.wvalid <= 0;
            repeat ($urandom_range(1, 3)) @(posedge clk);
          end
          bus.wvalid <= 1; bus.wid <= id; bus.wdata <= data[b]; bus.wstrb <= strb[b];
          bus.wlast <= (b == int'(len));
          cyc = 0;
          do begin @(negedge clk); cyc++; end while (!bus.wready);
          @(posedge clk);
          if (!random_timing && b > 0) wr_beat_cycles.push_back(cyc);
        end
        bus.wvalid <= 0; bus.wlast <= 0;
      end
    join
    // response
    if (random_timing && $urandom_range(0, 1) == 0) begin
      do @(negedge clk); while (!bus.bvalid);
      n_bstall++;
      repeat ($urandom_range(1, 3)) @(negedge clk);
      bus.bready = 1;
    end else begin
      bus.bready <= 1;
      do @(negedge clk); while (!bus.bvalid);
    end
    checks++;
    if (bus.bresp !== exp || bus.bid !== id)
      fail($sformatf("write @%h len %0d size %0d burst %0d: bresp %0d bid %0d, exp %0d %0d",
                     addr, len, size, burst, bus.bresp, bus.bid, exp, id));
    @(posedge clk);
    bus.bready <= 0;
    case (exp) RESP_OKAY: n_okay++; RESP_SLVERR: n_slverr_b++; default: n_decerr_b++; endcase
    wr_busy = 0;
  endtask

  // ----------------------------------------------------------------- read
  task automatic axi_read(input logic [3:0] id, input logic [31:0] addr, input logic [3:0] len,
                          input logic [2:0] size, input logic [1:0] burst, input bit random_timing);
    logic [31:0] a;
    rd_busy = 1;
    case (burst) 2'b00: n_fixed_r++; 2'b01: n_incr_r++; default: n_wrap_r++; endcase
    if (random_timing) repeat ($urandom_range(0, 2)) @(posedge clk);
    bus.arvalid <= 1; bus.arid <= id; bus.araddr <= addr; bus.arlen <= len;
    bus.arsize <= size; bus.arburst <= burst;
    do @(negedge clk); while (!bus.arready);
    @(posedge clk);
    bus.arvalid <= 0;
    a = addr;
    for (int b = 0; b <= int'(len); b++) begin
      int n, cyc;
      logic [31:0] exp_d, mask;
      logic [1:0]  exp_r;
      n = (size > 2) ? 4 : (1 << size);
      exp_d = 0; mask = 0;
      if (a + 32'(n) > BYTES) exp_r = RESP_DECERR;
      else if (size > 2)      exp_r = RESP_SLVERR;
      else begin
        exp_r = RESP_OKAY;
        for (int i = 0; i < n; i++) begin
          exp_d[8*i +: 8] = model[a + 32'(i)];
          if (known[a + 32'(i)]) mask[8*i +: 8] = 8'hFF;
        end
      end
      if (exp_r != RESP_OKAY) mask = '1;
      bus.rready <= !random_timing;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!bus.rvalid);
      if (random_timing) begin
        if ($urandom_range(0, 2) == 0) begin
          n_rstall++;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        bus.rready = 1;
      end else if (b > 0) begin
        rd_beat_cycles.push_back(cyc);
      end
      checks++;
      if ((bus.rdata & mask) !== (exp_d & mask) || bus.rresp !== exp_r || bus.rid !== id ||
          bus.rlast !== (b == int'(len)))
        fail($sformatf("read @%h beat %0d: data %h resp %0d id %0d last %b, exp %h %0d %0d %b",
                       a, b, bus.rdata, bus.rresp, bus.rid, bus.rlast, exp_d, exp_r, id, b == int'(len)));
      @(posedge clk);
      if (random_timing) bus.rready <= 0;
      if (exp_r == RESP_SLVERR) n_slverr_r++;
      if (exp_r == RESP_DECERR) n_decerr_r++;
      a = model_next(burst, len, size, a, n);
    end
    bus.rready <= 0;
    rd_busy = 0;
  endtask

  // random transaction helpers
  task automatic rand_write(input logic [31:0] lo, input logic [31:0] hi, input bit err_ok, input bit timing);
    logic [3:0]  strb [16];
    logic [31:0] data [16];
    logic [1:0]  burst;
    logic [3:0]  len;
    logic [2:0]  size;
    logic [31:0] addr;
    logic [3:0] wl [4];
    wl = '{4'd1, 4'd3, 4'd7, 4'd15};
    burst = 2'($urandom_range(0, 2));
    size  = 3'($urandom_range(0, 2));
    len   = (burst == 2'b10) ? wl[$urandom_range(0, 3)] : 4'($urandom);
    addr  = lo + ($urandom % (hi - lo));
    // keep error-free INCR bursts inside [lo, hi)
    if (!err_ok && burst == 2'b01 && addr + 4 * (32'(len) + 1) > hi) addr = hi - 4 * (32'(len) + 1);
    // keep error-free WRAP regions inside [lo, hi)
    if (!err_ok && burst == 2'b10) begin
      logic [31:0] region;
      region = (32'(len) + 1) << size;
      if ((addr & ~(region - 1)) < lo) addr = lo + (addr % region);
    end
    for (int b = 0; b < 16; b++) begin
      strb[b] = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'hF;
      data[b] = $urandom;
    end
    axi_write(4'($urandom), addr, len, size, burst, strb, data, timing);
  endtask

  task automatic rand_read(input logic [31:0] lo, input logic [31:0] hi, input bit timing);
    logic [1:0]  burst;
    logic [3:0]  len;
    logic [2:0]  size;
    logic [31:0] addr;
    logic [3:0] wl [4];
    wl = '{4'd1, 4'd3, 4'd7, 4'd15};
    burst = 2'($urandom_range(0, 2));
    size  = 3'($urandom_range(0, 2));
    len   = (burst == 2'b10) ? wl[$urandom_range(0, 3)] : 4'($urandom);
    addr  = lo + ($urandom % (hi - lo));
    if (burst == 2'b01 && addr + (32'(len) + 1) * (32'd1 << size) > hi) addr = hi - (32'(len) + 1) * (32'd1 << size);
    axi_read(4'($urandom), addr, len, size, burst, timing);
  endtask

  initial begin
    logic [3:0]  strb [16];
    logic [31:0] data [16];
    bus.awvalid = 0; bus.wvalid = 0; bus.bready = 0; bus.arvalid = 0; bus.rready = 0;
    bus.awid = 0; bus.awaddr = 0; bus.awlen = 0; bus.awsize = 0; bus.awburst = 0;
    bus.wid = 0; bus.wdata = 0; bus.wstrb = 0; bus.wlast = 0;
    bus.arid = 0; bus.araddr = 0; bus.arlen = 0; bus.arsize = 0; bus.arburst = 0;
    for (int i = 0; i < int'(BYTES); i++) begin model[i] = 0; known[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    // 1. reference transaction: INCR, 8 beats, size 2, from address 0x5
    begin
      logic [31:0] ref_data [8];
      ref_data = '{32'h6, 32'h3, 32'ha, 32'h7, 32'h1, 32'h4, 32'h6, 32'h3};
      for (int b = 0; b < 16; b++) begin strb[b] = 4'hF; data[b] = (b < 8) ? ref_data[b] : 0; end
      wr_beat_cycles.delete();
      rd_beat_cycles.delete();
      axi_write(4'd9, 32'h5, 4'd7, 3'd2, 2'b01, strb, data, 0);
      axi_read(4'd9, 32'h5, 4'd7, 3'd2, 2'b01, 0);
      foreach (wr_beat_cycles[i]) begin
        checks++;
        if (wr_beat_cycles[i] != 4) fail($sformatf("write beat spacing %0d, expected 4", wr_beat_cycles[i]));
      end
      foreach (rd_beat_cycles[i]) begin
        checks++;
        if (rd_beat_cycles[i] != 3) fail($sformatf("read beat spacing %0d, expected 3", rd_beat_cycles[i]));
      end
      checks++;
      if (wr_beat_cycles.size() != 7 || rd_beat_cycles.size() != 7) fail("reference transaction beat count");
    end

    // the slave holds off a second address while a write is still open:
    // a second awvalid is raised while the first write waits for bready,
    // and must not be accepted until the first response has been taken
    begin
      int held;
      for (int b = 0; b < 16; b++) begin strb[b] = 4'hF; data[b] = $urandom; end
      fork
        axi_write(4'd1, 32'h40, 4'd1, 3'd2, 2'b01, strb, data, 1);
        begin
          do @(negedge clk); while (!(bus.wvalid && bus.wready && bus.wlast));
          @(posedge clk);
          bus.awvalid <= 1; bus.awid <= 4'd2; bus.awaddr <= 32'h48; bus.awlen <= 4'd0;
          bus.awsize <= 3'd2; bus.awburst <= 2'b01;
          held = 0;
          do begin
            @(negedge clk);
            if (!bus.awready) held++;
            checks++;
            if (bus.awready && wr_busy) fail("second address accepted while a write is open");
          end while (!bus.awready);
          @(posedge clk);
          bus.awvalid <= 0;
          if (held > 0) n_aw_held++;
        end
      join
      // complete the second write: one beat, all strobes
      model_write_beat(32'h48, 4'hF, 32'hCAFE_F00D);
      bus.wvalid <= 1; bus.wid <= 4'd2; bus.wdata <= 32'hCAFE_F00D; bus.wstrb <= 4'hF; bus.wlast <= 1;
      do @(negedge clk); while (!bus.wready);
      @(posedge clk);
      bus.wvalid <= 0; bus.wlast <= 0; bus.bready <= 1;
      do @(negedge clk); while (!bus.bvalid);
      checks++;
      if (bus.bresp !== RESP_OKAY || bus.bid !== 4'd2) fail("second write response");
      @(posedge clk);
      bus.bready <= 0;
      axi_read(4'd3, 32'h40, 4'd2, 3'd2, 2'b01, 0);
    end

    // 2. random writes, each followed by a random read
    for (int t = 0; t < 150; t++) begin
      rand_write(0, BYTES, 0, t % 2 == 1);
      rand_read(0, BYTES, t % 3 == 0);
    end

    // 3. error cases
    for (int t = 0; t < 10; t++) begin
      for (int b = 0; b < 16; b++) begin strb[b] = 4'hF; data[b] = $urandom; end
      axi_write(4'(t), BYTES - 8 + 32'(t), 4'd3, 3'd2, 2'b01, strb, data, 0);   // runs off the end
      axi_write(4'(t), 32'h100 + 32'(t), 4'd0, 3'(4 + t % 4), 2'b01, strb, data, 0); // awsize too large
      axi_read(4'(t), BYTES - 8 + 32'(t), 4'd3, 3'd2, 2'b01, 0);
      axi_read(4'(t), 32'h10 + 32'(t), 4'd1, 3'd3, 2'b00, t % 2 == 1);
    end

    // 4. overlapping writes (lower half) and reads (upper half)
    fork
      for (int t = 0; t < 60; t++) rand_write(0, BYTES / 2, 0, 1);
      for (int t = 0; t < 60; t++) rand_read(BYTES / 2, BYTES, 1);
    join
    // final read-back of the whole memory
    for (int a = 0; a < int'(BYTES); a += 64) axi_read(4'd0, 32'(a), 4'd15, 3'd2, 2'b01, 0);

    // every mechanism must have happened
    begin
      int counts [string];
      counts["fixed write"] = n_fixed_w; counts["incr write"] = n_incr_w; counts["wrap write"] = n_wrap_w;
      counts["fixed read"] = n_fixed_r; counts["incr read"] = n_incr_r; counts["wrap read"] = n_wrap_r;
      counts["wrap turn-round"] = n_wrap_turn; counts["partial strobe"] = n_partial_strb;
      counts["bresp okay"] = n_okay; counts["bresp slverr"] = n_slverr_b; counts["bresp decerr"] = n_decerr_b;
      counts["rresp slverr"] = n_slverr_r; counts["rresp decerr"] = n_decerr_r;
      counts["bready stall"] = n_bstall; counts["rready stall"] = n_rstall; counts["wvalid gap"] = n_wgap;
      counts["address held off"] = n_aw_held; counts["read/write overlap cycles"] = n_overlap;
      foreach (counts[k]) begin
        $display("  %-26s %0d", k, counts[k]);
        checks++;
        if (counts[k] == 0) fail($sformatf("mechanism never exercised: %s", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
