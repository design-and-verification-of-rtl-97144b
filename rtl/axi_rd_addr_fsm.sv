// axi_rd_addr_fsm: read address channel of the AXI memory slave.
//
// A three-state FSM. ARIDLE holds arready low; it leaves for ARSTART once
// reset is released and the previous read burst has sent its last beat (pending low).
// ARSTART watches arvalid; when it is high the request (arid, araddr, arlen,
// arsize, arburst) is recorded and the FSM moves to ARREADY, where arready is
// high for one cycle. AXI holds arvalid and the request stable until ready,
// so that cycle completes the handshake, and the FSM returns to ARIDLE. An
// address therefore takes three cycles from arvalid to acceptance.
// The recorded request drives the read data FSM and stays valid
// (pending high) until release_i, the last read beat. The state
// names and their order follow the design description; holding off a new
// address until the previous read is finished is this design's choice.
module axi_rd_addr_fsm
  import axi_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                arvalid,
  output logic                arready,
  input  logic [ID_W-1:0]     arid,
  input  logic [ADDR_W-1:0]   araddr,
  input  logic [LEN_W-1:0]    arlen,
  input  logic [2:0]          arsize,
  input  logic [1:0]          arburst,
  output ax_req_t             req,
  output logic                pending,
  input  logic                release_i
);

  typedef enum logic [1:0] {ARIDLE = 2'd0, ARSTART = 2'd1, ARREADY = 2'd2} ar_state_e;
  ar_state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ARIDLE;
      pending <= 1'b0;
      req     <= '0;
    end else begin
      unique case (state)
        ARIDLE:  if (!pending) state <= ARSTART;
        ARSTART: if (arvalid) begin
                   req   <= '{id: arid, addr: araddr, len: arlen, size: arsize, burst: arburst};
                   state <= ARREADY;
                 end
        ARREADY: begin
                   pending <= 1'b1;
                   state   <= ARIDLE;
                 end
        default: state <= ARIDLE;
      endcase
      if (release_i) pending <= 1'b0;
    end
  end

  assign arready = (state == ARREADY);

  // The master must keep arvalid high until the slave's arready.
  a_ar_held: assert property (@(posedge clk) disable iff (!rst_n)
    state == ARSTART && arvalid |=> arvalid);

endmodule
