// axi_if: the five AXI channels of the memory slave as one bundle, used by
// the end-to-end testbenches to drive and observe the slave. Widths match
// axi_pkg: 4-bit IDs and lengths, 32-bit address and data, 4 byte strobes.
interface axi_if (input logic clk, input logic rst_n);
  import axi_pkg::*;
  logic              awvalid, awready;
  logic [ID_W-1:0]   awid;
  logic [ADDR_W-1:0] awaddr;
  logic [LEN_W-1:0]  awlen;
  logic [2:0]        awsize;
  logic [1:0]        awburst;
  logic              wvalid, wready, wlast;
  logic [ID_W-1:0]   wid;
  logic [DATA_W-1:0] wdata;
  logic [STRB_W-1:0] wstrb;
  logic              bvalid, bready;
  logic [ID_W-1:0]   bid;
  logic [1:0]        bresp;
  logic              arvalid, arready;
  logic [ID_W-1:0]   arid;
  logic [ADDR_W-1:0] araddr;
  logic [LEN_W-1:0]  arlen;
  logic [2:0]        arsize;
  logic [1:0]        arburst;
  logic              rvalid, rready, rlast;
  logic [ID_W-1:0]   rid;
  logic [DATA_W-1:0] rdata;
  logic [1:0]        rresp;

  modport master (input clk, awready, wready, bvalid, bid, bresp, arready, rvalid, rid, rdata, rresp, rlast,
                  output awvalid, awid, awaddr, awlen, awsize, awburst, wvalid, wid, wdata, wstrb, wlast,
                         bready, arvalid, arid, araddr, arlen, arsize, arburst, rready);

  // Valid must hold, with its payload, until ready (AXI handshake rule).
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n) awvalid && !awready |=> awvalid && $stable(awaddr));
  a_w_hold:  assert property (@(posedge clk) disable iff (!rst_n) wvalid && !wready |=> wvalid && $stable(wdata));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n) arvalid && !arready |=> arvalid && $stable(araddr));
  a_b_hold:  assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid && $stable(bresp));
  a_r_hold:  assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata));
endinterface
