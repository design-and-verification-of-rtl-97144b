// axi_burst_addr: next beat address of an AXI burst.
//
// FIXED keeps the address, so every beat of the burst uses the same
// location. INCR adds step, the number of bytes the beat consumed. WRAP also
// adds step but stays inside a region of (len+1) << size bytes aligned to its
// own size: the upper bits of the address are held at the region's lower
// bound and only the bits inside the region count on, so an address that
// reaches the region's upper bound continues at its bottom (modulo the region
// size, also when one step is larger than the region). AXI allows WRAP only with 2, 4, 8 or 16 beats, so
// the region size is a power of two; other lengths are not checked. wrap_lo
// is the region's lower bound and wrapped says that this step wrapped. The
// three burst rules follow the design description; the step input is shared
// by the write path (step = set strobe bits) and the read path
// (step = 1 << size). Purely combinational.
module axi_burst_addr
  import axi_pkg::*;
(
  input  logic [31:0] addr,
  input  logic [1:0]  burst,
  input  logic [3:0]  len,
  input  logic [2:0]  size,
  input  logic [2:0]  step,
  output logic [31:0] next_addr,
  output logic [31:0] wrap_lo,
  output logic        wrapped
);

  logic [31:0] region;   // bytes covered by a WRAP burst
  logic [31:0] sum;

  always_comb begin
    region    = (32'(len) + 32'd1) << size;
    wrap_lo   = addr & ~(region - 32'd1);
    sum       = addr + 32'(step);
    wrapped   = 1'b0;
    next_addr = addr;
    case (burst_e'(burst))
      BURST_FIXED: next_addr = addr;
      BURST_INCR:  next_addr = sum;
      BURST_WRAP: begin
        next_addr = wrap_lo | (sum & (region - 32'd1));
        wrapped   = (sum & ~(region - 32'd1)) != wrap_lo;
      end
      default:     next_addr = sum;
    endcase
  end

endmodule
