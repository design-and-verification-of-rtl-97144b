// axi_rd_data_fsm_tb: checks beat data, responses, rlast and timing of the
// read data FSM.
//
// The testbench plays the read address FSM (req, req_pending) and the memory:
// mem_rdata is formed from a byte array at mem_raddr. For random FIXED, INCR
// and WRAP bursts of sizes 0 to 3, some near or past the end of the 512-byte
// range, it predicts every beat with its own modulo-based burst model: the
// bytes at the beat address (lanes above 1 << arsize zero), OKAY, DECERR for
// a beat past the end, else SLVERR for arsize 3, rlast on beat arlen+1 only, rid.
// It also checks that exactly arlen+1 beats come, that with rready held high
// good beats come every 3 cycles, that rvalid waits for no rready, and that
// release_o pulses once at the end.
module axi_rd_data_fsm_tb;
  import axi_pkg::*;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned BYTES = DEPTH * 4;

  logic clk = 0, rst_n = 0;
  logic rvalid, rready, rlast, req_pending, release_o;
  logic [3:0] rid;
  logic [31:0] rdata, mem_raddr, mem_rdata;
  logic [1:0] rresp;
  ax_req_t req;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;
  int releases;

  axi_rd_data_fsm #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < 4; i++)
      mem_rdata[8*i +: 8] = (mem_raddr + 32'(i) < BYTES) ? model[mem_raddr + 32'(i)] : 8'h00;

  always @(posedge clk) if (rst_n && release_o) releases++;

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

  initial begin
    logic [3:0] wl [4];
    wl = '{4'd1, 4'd3, 4'd7, 4'd15};
    for (int i = 0; i < int'(BYTES); i++) model[i] = 8'($urandom);
    rready = 0; req_pending = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    checks++;
    if (rvalid) fail("rvalid without a request");
    for (int t = 0; t < 400; t++) begin
      ax_req_t r;
      logic [31:0] a;
      bit hold;
      r.id    = 4'($urandom);
      r.burst = 2'($urandom_range(0, 2));
      r.size  = (t % 13 == 12) ? 3'd3 : 3'($urandom_range(0, 2));
      r.len   = (r.burst == 2'b10) ? wl[$urandom_range(0, 3)] : 4'($urandom);
      r.addr  = (t % 10 == 9) ? 32'($urandom_range(BYTES - 8, BYTES + 8)) : 32'($urandom_range(0, BYTES - 1));
      hold = (t % 2 == 0);
      req <= r;
      req_pending <= 1;
      releases = 0;
      rready <= hold;
      a = r.addr;
      for (int b = 0; b <= int'(r.len); b++) begin
        int n, cyc;
        logic [31:0] exp_d;
        logic [1:0]  exp_r;
        n = (r.size > 2) ? 4 : (1 << r.size);
        exp_d = 0;
        if (a + 32'(n) > BYTES) begin
          exp_r = RESP_DECERR;
        end else if (r.size > 2) begin
          exp_r = RESP_SLVERR;
        end else begin
          exp_r = RESP_OKAY;
          for (int i = 0; i < n; i++) exp_d[8*i +: 8] = model[a + 32'(i)];
        end
        cyc = 0;
        if (!hold) rready <= 0;
        do begin
          @(posedge clk);
          cyc++;
        end while (!rvalid);
        if (!hold) begin
          repeat ($urandom_range(0, 2)) begin
            @(posedge clk);
            checks++;
            if (!rvalid) fail("rvalid dropped before rready");
          end
          rready <= 1;
          @(posedge clk);
        end
        checks++;
        if (rdata !== exp_d || rresp !== exp_r || rid !== r.id || rlast !== (b == int'(r.len)))
          fail($sformatf("t%0d beat %0d @%h: data %h resp %0d last %b, exp %h %0d %b", t, b, a, rdata, rresp, rlast, exp_d, exp_r, b == int'(r.len)));
        if (hold && b > 0 && exp_r == RESP_OKAY) begin
          checks++;
          if (cyc != 3) fail($sformatf("beat spacing %0d cycles, expected 3", cyc));
        end
        if (!hold) begin
          rready <= 0;
        end
        a = model_next(r, a, n);
      end
      rready <= 0;
      repeat (3) @(posedge clk);
      checks++;
      if (rvalid || releases != 1) fail($sformatf("extra beat or %0d releases", releases));
      req_pending <= 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
