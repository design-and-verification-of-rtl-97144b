// axi_slave: AXI memory slave with all five channels and a 128 x 32-bit
// byte-addressable memory.
//
// Each AXI channel has its own FSM. The write address FSM records one write
// request; the write data FSM stores the strobed bytes of each beat at
// consecutive byte addresses and walks the burst (FIXED, INCR or WRAP); the
// write response FSM answers with bresp once wlast has been taken. The read
// address FSM records one read request and the read data FSM returns arlen+1
// beats of 1 << arsize bytes, checking every beat's address and size. Writes
// and reads run independently and may overlap; each direction carries one
// transaction at a time, and a new address is accepted only after the
// previous burst in that direction has finished (after the B handshake for
// writes, after the last R beat for reads).
//
// Interface: AXI3-style signals with 4-bit IDs and lengths, 32-bit address
// and data, wstrb[3:0]. Responses: OKAY, DECERR for bytes outside the
// DEPTH*4-byte address range, SLVERR for awsize above 3 or arsize above 2.
// A write answered SLVERR still stores its bytes; the size check only sets
// the response. Beats outside the address range are never stored.
// Timing with a master that never stalls: an address is accepted 2 cycles
// after its valid rises, a write beat every 4 cycles, bvalid 2 cycles after
// the last write beat, a read beat every 3 cycles. Reset is synchronous and
// active low; the memory contents are not reset.
//
// The channel FSMs, the memory size and the burst rules follow the design
// description; the one-transaction-per-direction limit and the error codes
// are this design's choices.
module axi_slave
  import axi_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  // write address
  input  logic              awvalid,
  output logic              awready,
  input  logic [ID_W-1:0]   awid,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [LEN_W-1:0]  awlen,
  input  logic [2:0]        awsize,
  input  logic [1:0]        awburst,
  // write data
  input  logic              wvalid,
  output logic              wready,
  input  logic [ID_W-1:0]   wid,
  input  logic [DATA_W-1:0] wdata,
  input  logic [STRB_W-1:0] wstrb,
  input  logic              wlast,
  // write response
  output logic              bvalid,
  input  logic              bready,
  output logic [ID_W-1:0]   bid,
  output logic [1:0]        bresp,
  // read address
  input  logic              arvalid,
  output logic              arready,
  input  logic [ID_W-1:0]   arid,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [LEN_W-1:0]  arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  // read data
  output logic              rvalid,
  input  logic              rready,
  output logic [ID_W-1:0]   rid,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  output logic              rlast
);

  ax_req_t           aw_req, ar_req;
  logic              aw_pending, ar_pending;
  logic              wr_release, rd_release;
  logic              wr_done, wr_err;
  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  logic [2:0]        mem_wcount;

  // wid is part of the AXI3 write data channel; a single outstanding write
  // makes it redundant, so it is not compared with awid.
  logic unused_wid;
  assign unused_wid = ^wid;

  axi_wr_addr_fsm u_aw (
    .clk, .rst_n, .awvalid, .awready, .awid, .awaddr, .awlen, .awsize, .awburst,
    .req(aw_req), .pending(aw_pending), .release_i(wr_release)
  );

  axi_wr_data_fsm #(.DEPTH(MEM_DEPTH)) u_w (
    .clk, .rst_n, .wvalid, .wready, .wdata, .wstrb, .wlast,
    .req(aw_req), .req_pending(aw_pending),
    .mem_we, .mem_waddr, .mem_wdata, .mem_wcount,
    .done(wr_done), .err(wr_err)
  );

  axi_wr_resp_fsm u_b (
    .clk, .rst_n, .bvalid, .bready, .bid, .bresp,
    .req(aw_req), .wr_done, .wr_err, .release_o(wr_release)
  );

  axi_rd_addr_fsm u_ar (
    .clk, .rst_n, .arvalid, .arready, .arid, .araddr, .arlen, .arsize, .arburst,
    .req(ar_req), .pending(ar_pending), .release_i(rd_release)
  );

  axi_rd_data_fsm #(.DEPTH(MEM_DEPTH)) u_r (
    .clk, .rst_n, .rvalid, .rready, .rid, .rdata, .rresp, .rlast,
    .req(ar_req), .req_pending(ar_pending),
    .mem_raddr, .mem_rdata, .release_o(rd_release)
  );

  axi_byte_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .wcount(mem_wcount),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

endmodule
