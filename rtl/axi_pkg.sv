// axi_pkg: types and constants shared by the AXI memory slave.
//
// The slave speaks an AXI3-style protocol: 4-bit IDs, 4-bit burst lengths
// (1 to 16 beats), 3-bit transfer sizes, a 32-bit address and a 32-bit data
// bus with four byte strobes. Burst and response codes use the standard AXI
// encodings. ax_req_t is the request that an address channel records and the
// matching data FSM works from. popcount4 counts set strobe bits; the write
// path advances its address by that count.
package axi_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 4;
  localparam int unsigned LEN_W  = 4;

  // Largest awsize for which a write is answered OKAY (8-byte beats).
  localparam logic [2:0] WR_MAX_SIZE = 3'b011;
  // Largest arsize a read can return on the 32-bit data bus (4 bytes).
  localparam logic [2:0] RD_MAX_SIZE = 3'b010;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
    logic [2:0]        size;
    logic [1:0]        burst;
  } ax_req_t;

  function automatic logic [2:0] popcount4(input logic [3:0] v);
    return 3'(v[0]) + 3'(v[1]) + 3'(v[2]) + 3'(v[3]);
  endfunction

endpackage
