// axi_wr_data_fsm_tb: checks beat handling, byte packing and address walk of
// the write data FSM.
//
// The testbench plays both the write address FSM (req, req_pending) and the
// master. For random FIXED, INCR and WRAP bursts with random strobes it
// predicts, for every beat, the memory write the FSM must issue: the start
// or next address (its own modulo-based burst model), the number of strobed
// bytes and those bytes packed low-lane first. Beats that pass the end of the
// 512-byte memory must issue no write and set err with done. It also checks
// that with wvalid held high wready comes every 4 cycles, that done pulses
// once after wlast, and that no beat is taken before a new request arrives.
module axi_wr_data_fsm_tb;
  import axi_pkg::*;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned BYTES = DEPTH * 4;

  logic clk = 0, rst_n = 0;
  logic wvalid, wready, wlast, req_pending, mem_we, done, err;
  logic [31:0] wdata, mem_waddr, mem_wdata;
  logic [3:0] wstrb;
  logic [2:0] mem_wcount;
  ax_req_t req;
  int checks = 0, failures = 0;
  int writes_seen;

  axi_wr_data_fsm #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model_next(input ax_req_t r, input logic [31:0] a, input int n);
    logic [31:0] region, base;
    region = (32'(r.len) + 1) << r.size;
    base   = a - (a % region);
    case (r.burst)
      2'b00:   return a;
      2'b10:   return base + ((a - base + 32'(n)) % region);
      default: return a + 32'(n);
    endcase
  endfunction

  // monitor of the memory write port
  logic [31:0] exp_addr, exp_data;
  int          exp_n;
  logic        exp_write;
  always @(posedge clk) if (rst_n && mem_we) writes_seen++;

  initial begin
    logic [3:0] wl [4];
    wl = '{4'd1, 4'd3, 4'd7, 4'd15};
    wvalid = 0; wlast = 0; wdata = 0; wstrb = 0; req_pending = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // no request yet: a valid beat must not be taken
    wvalid <= 1; wstrb <= 4'hF;
    repeat (10) begin
      @(posedge clk);
      checks++;
      if (wready || mem_we) fail("beat taken without a request");
    end
    wvalid <= 0;
    for (int t = 0; t < 400; t++) begin
      ax_req_t r;
      logic [31:0] a;
      logic any_bad;
      int last_ready;
      r.id    = 4'($urandom);
      r.burst = 2'($urandom_range(0, 2));
      r.size  = 3'($urandom_range(0, 3));
      r.len   = (r.burst == 2'b10) ? wl[$urandom_range(0, 3)] : 4'($urandom);
      r.addr  = (t % 10 == 9) ? 32'($urandom_range(BYTES - 8, BYTES + 8)) : 32'($urandom_range(0, BYTES - 1));
      req <= r;
      req_pending <= 1;
      a = r.addr;
      any_bad = 0;
      last_ready = -1;
      for (int b = 0; b <= int'(r.len); b++) begin
        logic [3:0] s;
        logic [31:0] d, p;
        int n, k, cyc;
        bit hold;
        s = 4'($urandom);
        d = $urandom;
        n = 0; p = 0;
        for (int i = 0; i < 4; i++) if (s[i]) begin p[8*n +: 8] = d[8*i +: 8]; n++; end
        hold = (t % 2 == 0);   // even bursts keep wvalid high throughout
        if (!hold) repeat ($urandom_range(0, 2)) @(posedge clk);
        wvalid <= 1; wdata <= d; wstrb <= s; wlast <= (b == int'(r.len));
        writes_seen = 0;
        cyc = 0;
        k = 0;
        do begin
          @(posedge clk);
          cyc++;
          if (mem_we && k == 0) begin
            k = 1;
            checks++;
            if (mem_waddr !== a || mem_wcount !== 3'(n) || (mem_wdata & ((64'd1 << (8*n)) - 1)) !== (p & ((64'd1 << (8*n)) - 1)))
              fail($sformatf("beat %0d: write %h n=%0d data %h, exp %h n=%0d data %h", b, mem_waddr, mem_wcount, mem_wdata, a, n, p));
          end
        end while (!wready);
        if (a + 32'(n) > BYTES) begin
          any_bad = 1;
          checks++;
          if (writes_seen != 0) fail("out-of-range beat was written");
        end else begin
          checks++;
          if (writes_seen != 1) fail($sformatf("beat %0d issued %0d writes", b, writes_seen));
        end
        if (hold && b > 0) begin
          checks++;
          if (cyc != 4) fail($sformatf("beat spacing %0d cycles, expected 4", cyc));
        end
        a = model_next(r, a, n);
      end
      wvalid <= 0; wlast <= 0;
      @(posedge clk);
      checks++;
      if (!done || err !== any_bad) fail($sformatf("done=%b err=%b exp err %b", done, err, any_bad));
      @(posedge clk);
      checks++;
      if (done) fail("done longer than one cycle");
      req_pending <= 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
