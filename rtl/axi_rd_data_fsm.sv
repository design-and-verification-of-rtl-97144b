// axi_rd_data_fsm: read data channel of the AXI memory slave.
//
// RIDLE initialises the outputs and waits for an accepted read request. Each
// beat then starts in RSTART, which checks the beat: its size must fit the
// 32-bit bus (arsize at most 2) and all its bytes must lie inside the
// DEPTH*4-byte memory. A good beat fetches 1 << arsize bytes from the beat
// address into rdata (lowest byte in lane 0, unused lanes zero) with rresp
// OKAY; a bad beat goes through RERROR, which sets rresp to DECERR (address)
// or SLVERR (size) and rdata to zero. In RWAIT rvalid is high, with rlast on
// the final beat, until rready; the handshake counts the beat in len_count
// and moves the address on (FIXED: same, INCR and WRAP: by 1 << arsize, see
// axi_burst_addr). RVALID then checks whether len_count has reached arlen+1:
// if so the burst is over, release_o frees the read address channel and the
// FSM returns to RIDLE, otherwise the next beat starts in RSTART. With rready
// held high a beat leaves every 3 cycles (4 for an error beat).
//
// The states, the per-beat address and size check and the len_count
// tracking follow the design description. This design raises rvalid before
// rready rather than after it, as AXI requires, and sends error beats through
// the same handshake so that the master always receives arlen+1 beats.
module axi_rd_data_fsm
  import axi_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              rvalid,
  input  logic              rready,
  output logic [ID_W-1:0]   rid,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  input  ax_req_t           req,
  input  logic              req_pending,
  output logic [ADDR_W-1:0] mem_raddr,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              release_o
);

  localparam logic [32:0] BYTES = 33'(DEPTH * 4);

  typedef enum logic [2:0] {
    RIDLE = 3'd0, RSTART = 3'd1, RWAIT = 3'd2, RVALID = 3'd3, RERROR = 3'd4
  } r_state_e;

  r_state_e          state;
  logic [LEN_W:0]    len_count;    // beats sent, up to 16
  logic [ADDR_W-1:0] addr_q;       // address of the current beat
  logic [ADDR_W-1:0] next_addr;
  logic [2:0]        nbytes;
  logic              size_bad;
  logic              addr_bad;
  logic [DATA_W-1:0] beat_data;
  logic              served;       // the pending request's burst has been sent

  assign size_bad  = req.size > RD_MAX_SIZE;
  assign nbytes    = size_bad ? 3'd4 : 3'(1 << req.size);
  assign addr_bad  = ({1'b0, addr_q} + 33'(nbytes)) > BYTES;
  assign mem_raddr = addr_q;

  always_comb begin
    beat_data = '0;
    for (int i = 0; i < STRB_W; i++)
      if (3'(i) < nbytes) beat_data[8*i +: 8] = mem_rdata[8*i +: 8];
  end

  axi_burst_addr u_next (
    .addr     (addr_q),
    .burst    (req.burst),
    .len      (req.len),
    .size     (req.size),
    .step     (nbytes),
    .next_addr(next_addr),
    .wrap_lo  (),
    .wrapped  ()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RIDLE;
      len_count <= '0;
      addr_q    <= '0;
      rdata     <= '0;
      rresp     <= RESP_OKAY;
      served    <= 1'b0;
    end else begin
      if (!req_pending) served <= 1'b0;
      unique case (state)
        RIDLE: begin
          len_count <= '0;
          rdata     <= '0;
          rresp     <= RESP_OKAY;
          addr_q    <= req.addr;
          if (req_pending && !served) state <= RSTART;
        end
        RSTART: begin
          if (size_bad || addr_bad) begin
            state <= RERROR;
          end else begin
            rdata <= beat_data;
            rresp <= RESP_OKAY;
            state <= RWAIT;
          end
        end
        RERROR: begin
          rdata <= '0;
          rresp <= addr_bad ? RESP_DECERR : RESP_SLVERR;
          state <= RWAIT;
        end
        RWAIT: if (rready) begin
          len_count <= len_count + 1'b1;
          addr_q    <= next_addr;
          state     <= RVALID;
        end
        RVALID: begin
          if (len_count == {1'b0, req.len} + 1'b1) begin
            served <= 1'b1;
            state  <= RIDLE;
          end else begin
            state  <= RSTART;
          end
        end
        default: state <= RIDLE;
      endcase
    end
  end

  assign rvalid    = (state == RWAIT);
  assign rlast     = rvalid && (len_count == {1'b0, req.len});
  assign rid       = req.id;
  assign release_o = (state == RVALID) && (len_count == {1'b0, req.len} + 1'b1);

  // Once raised, rvalid and its payload stay until rready.
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !rready |=> rvalid && $stable(rdata) && $stable(rresp) && $stable(rlast));

endmodule
