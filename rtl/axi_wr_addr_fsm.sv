// axi_wr_addr_fsm: write address channel of the AXI memory slave.
//
// A three-state FSM. AWIDLE holds awready low; it leaves for AWSTART once
// reset is released and the previous write has been answered (pending low).
// AWSTART watches awvalid; when it is high the request (awid, awaddr, awlen,
// awsize, awburst) is recorded and the FSM moves to AWREADY, where awready is
// high for one cycle. AXI holds awvalid and the request stable until ready,
// so that cycle completes the handshake, and the FSM returns to AWIDLE. An
// address therefore takes three cycles from awvalid to acceptance.
// The recorded request drives the data and response FSMs and stays valid
// (pending high) until release_i, the write response handshake. The state
// names and their order follow the design description; holding off a new
// address until the previous write is answered is this design's choice.
module axi_wr_addr_fsm
  import axi_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                awvalid,
  output logic                awready,
  input  logic [ID_W-1:0]     awid,
  input  logic [ADDR_W-1:0]   awaddr,
  input  logic [LEN_W-1:0]    awlen,
  input  logic [2:0]          awsize,
  input  logic [1:0]          awburst,
  output ax_req_t             req,
  output logic                pending,
  input  logic                release_i
);

  typedef enum logic [1:0] {AWIDLE = 2'd0, AWSTART = 2'd1, AWREADY = 2'd2} aw_state_e;
  aw_state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= AWIDLE;
      pending <= 1'b0;
      req     <= '0;
    end else begin
      unique case (state)
        AWIDLE:  if (!pending) state <= AWSTART;
        AWSTART: if (awvalid) begin
                   req   <= '{id: awid, addr: awaddr, len: awlen, size: awsize, burst: awburst};
                   state <= AWREADY;
                 end
        AWREADY: begin
                   pending <= 1'b1;
                   state   <= AWIDLE;
                 end
        default: state <= AWIDLE;
      endcase
      if (release_i) pending <= 1'b0;
    end
  end

  assign awready = (state == AWREADY);

  // The master must keep awvalid high until the slave's awready.
  a_aw_held: assert property (@(posedge clk) disable iff (!rst_n)
    state == AWSTART && awvalid |=> awvalid);

endmodule
