// axi_burst_addr_tb: checks the FIXED, INCR and WRAP next-address rules.
//
// Random addresses, lengths, sizes and steps are applied; the expected next
// address is computed here with a modulo over the wrap region, a different
// formulation from the block's compare-and-subtract. Directed cases cover
// the wrap-around from the top of a region back to its bottom.
module axi_burst_addr_tb;
  import axi_pkg::*;

  logic [31:0] addr, next_addr, wrap_lo;
  logic [1:0]  burst;
  logic [3:0]  len;
  logic [2:0]  size, step;
  logic        wrapped;
  int checks = 0, failures = 0;

  axi_burst_addr dut (.*);

  task automatic check_one(input logic [31:0] a, input logic [1:0] b,
                           input logic [3:0] l, input logic [2:0] s, input logic [2:0] st);
    logic [31:0] exp, region, base;
    addr = a; burst = b; len = l; size = s; step = st;
    #1;
    region = (32'(l) + 1) << s;
    base   = a - (a % region);
    case (b)
      2'b00:   exp = a;
      2'b10:   exp = base + ((a - base + 32'(st)) % region);
      default: exp = a + 32'(st);
    endcase
    checks++;
    if (next_addr !== exp) begin
      failures++;
      $display("FAIL addr=%h burst=%0d len=%0d size=%0d step=%0d got %h exp %h",
               a, b, l, s, st, next_addr, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [3:0] wl [4] = '{4'd1, 4'd3, 4'd7, 4'd15};
    // directed: 4-beat word WRAP starting at 0x38 wraps 0x3C -> 0x30
    check_one(32'h38, 2'b10, 4'd3, 3'd2, 3'd4);
    check_one(32'h3C, 2'b10, 4'd3, 3'd2, 3'd4);
    checks++; if (!wrapped || wrap_lo !== 32'h30) failures++;
    check_one(32'h05, 2'b01, 4'd7, 3'd2, 3'd4);
    checks++; if (next_addr !== 32'h09) failures++;
    check_one(32'h05, 2'b00, 4'd7, 3'd2, 3'd4);
    check_one(32'h07, 2'b10, 4'd7, 3'd0, 3'd1);
    checks++; if (next_addr !== 32'h00) failures++;
    for (int i = 0; i < 2000; i++) begin
      logic [2:0] s, st;
      s  = 3'($urandom_range(0, 3));
      st = 3'($urandom_range(0, 4));
      if (st > (3'd1 << s) && s < 3) st = 3'd1 << s;
      check_one($urandom_range(0, 1023), 2'($urandom_range(0, 2)), wl[$urandom_range(0, 3)], s, st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
