// axi_byte_mem: the slave's storage, DEPTH words of 32 bits addressed by byte.
//
// Byte address a lives in word a[..:2], lane a[1:0], so the memory covers
// DEPTH*4 byte addresses (512 for the default 128 words). The write port
// stores the low wcount bytes of wdata (byte 0 in wdata[7:0]) at the
// consecutive byte addresses waddr, waddr+1, ... on the rising clock edge
// when we is high; a run may start at any byte and straddle two words. The
// read port is combinational and returns the four bytes raddr..raddr+3, byte
// 0 in rdata[7:0]. Bytes that fall beyond the last address are dropped on a
// write and read as zero; the channel FSMs flag such accesses as errors
// before they reach the memory. The 32-bit width and 128-word depth follow
// the design description; the byte-run ports are this design's own choice.
// The array is not reset.
module axi_byte_mem #(
  parameter int unsigned DEPTH = 128
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  input  logic [2:0]  wcount,
  input  logic [31:0] raddr,
  output logic [31:0] rdata
);

  localparam int unsigned BYTES = DEPTH * 4;
  localparam int unsigned WA_W  = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++) begin
        logic [32:0] a;
        a = {1'b0, waddr} + 33'(i);
        if (3'(i) < wcount && a < 33'(BYTES))
          mem[a[WA_W+1:2]][8*a[1:0] +: 8] <= wdata[8*i +: 8];
      end
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < 4; i++) begin
      logic [32:0] a;
      a = {1'b0, raddr} + 33'(i);
      if (a < 33'(BYTES))
        rdata[8*i +: 8] = mem[a[WA_W+1:2]][8*a[1:0] +: 8];
    end
  end

endmodule
