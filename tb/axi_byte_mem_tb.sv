// axi_byte_mem_tb: checks the byte-run write port and the 4-byte read port.
//
// The whole memory is first filled word by word through aligned 4-byte runs,
// then random runs of 0 to 4 bytes at any byte address (including runs that
// run off the end) are written. A byte-array model predicts every read of
// 4 bytes at random addresses, bytes past the end reading as zero.
module axi_byte_mem_tb;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned BYTES = DEPTH * 4;

  logic        clk = 0;
  logic        we;
  logic [31:0] waddr, wdata, raddr, rdata;
  logic [2:0]  wcount;
  logic [7:0]  model [BYTES];
  int checks = 0, failures = 0;

  axi_byte_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [2:0] n);
    @(negedge clk);
    we = 1; waddr = a; wdata = d; wcount = n;
    for (int i = 0; i < int'(n); i++)
      if (a + 32'(i) < BYTES) model[a + 32'(i)] = d[8*i +: 8];
    @(negedge clk);
    we = 0;
  endtask

  task automatic rd_check(input logic [31:0] a);
    logic [31:0] exp;
    raddr = a;
    #1;
    for (int i = 0; i < 4; i++)
      exp[8*i +: 8] = (a + 32'(i) < BYTES) ? model[a + 32'(i)] : 8'h00;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL read %h got %h exp %h", a, rdata, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; wcount = 0; raddr = 0;
    for (int w = 0; w < int'(DEPTH); w++) wr(32'(4 * w), $urandom, 3'd4);
    for (int w = 0; w < int'(BYTES); w += 7) rd_check(32'(w));
    // unaligned run straddling two words
    wr(32'h0000_0023, 32'hDDCC_BBAA, 3'd4);
    rd_check(32'h23); rd_check(32'h20); rd_check(32'h24);
    // run off the end
    wr(32'(BYTES - 2), 32'h4433_2211, 3'd4);
    rd_check(32'(BYTES - 2)); rd_check(32'(BYTES - 4));
    for (int i = 0; i < 3000; i++) begin
      wr($urandom_range(0, BYTES + 3), $urandom, 3'($urandom_range(0, 4)));
      rd_check($urandom_range(0, BYTES + 3));
      rd_check($urandom_range(0, BYTES - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
