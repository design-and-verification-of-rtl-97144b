// axi_wr_data_fsm: write data channel of the AXI memory slave.
//
// Each beat walks five states. WIDLE clears wready, the first-beat flag and
// the beat counter wlen_count, and moves on at the next clock. WSTART waits
// until wvalid is high and a write address is waiting whose burst has not
// been received yet. WADDR_DEC
// picks the beat's address (the request's start address on the first beat,
// the computed next address after that), stores the beat in memory and works
// out the next address. WREADY raises wready for one cycle, which completes
// the handshake, and checks wlast: with wlast the burst is over (done pulses,
// back to WIDLE); without it WVALID drops wready, counts the beat and returns
// to WSTART. With wvalid held high a beat is accepted every 4 cycles.
//
// Byte placement follows the strobes: the lanes whose wstrb bit is set are
// packed, lowest lane first, into consecutive byte addresses starting at the
// beat's address. FIXED bursts rewrite from the same address every beat; INCR
// and WRAP advance by the number of bytes stored (WRAP inside its region, see
// axi_burst_addr). awsize does not move data; it only sizes the WRAP region.
// A beat whose bytes would pass the end of the DEPTH*4-byte memory is not
// stored and sets err, reported with done. The states, their actions and the
// strobe-driven placement follow the design description; the memory write in
// WADDR_DEC relies on AXI keeping wdata stable while wvalid waits for wready.
// wid is accepted for AXI3 compatibility and not compared with awid.
module axi_wr_data_fsm
  import axi_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wvalid,
  output logic              wready,
  input  logic [DATA_W-1:0] wdata,
  input  logic [STRB_W-1:0] wstrb,
  input  logic              wlast,
  input  ax_req_t           req,
  input  logic              req_pending,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic [2:0]        mem_wcount,
  output logic              done,
  output logic              err
);

  localparam logic [32:0] BYTES = 33'(DEPTH * 4);

  typedef enum logic [2:0] {
    WIDLE = 3'd0, WSTART = 3'd1, WREADY = 3'd2, WVALID = 3'd3, WADDR_DEC = 3'd4
  } w_state_e;

  w_state_e          state;
  logic              first_done;   // the first beat of the burst has been stored
  logic [LEN_W-1:0]  wlen_count;
  logic [ADDR_W-1:0] next_addr_q;
  logic [ADDR_W-1:0] beat_addr;
  logic [ADDR_W-1:0] next_addr;
  logic [2:0]        nbytes;
  logic [DATA_W-1:0] packed_data;
  logic              beat_bad;
  logic              served;       // the pending request's burst has ended

  assign beat_addr = first_done ? next_addr_q : req.addr;
  assign nbytes    = popcount4(wstrb);
  assign beat_bad  = ({1'b0, beat_addr} + 33'(nbytes)) > BYTES;

  // Pack the strobed lanes into the low bytes.
  always_comb begin
    int k;
    packed_data = '0;
    k = 0;
    for (int i = 0; i < STRB_W; i++) begin
      if (wstrb[i]) begin
        packed_data[8*k +: 8] = wdata[8*i +: 8];
        k++;
      end
    end
  end

  axi_burst_addr u_next (
    .addr     (beat_addr),
    .burst    (req.burst),
    .len      (req.len),
    .size     (req.size),
    .step     (nbytes),
    .next_addr(next_addr),
    .wrap_lo  (),
    .wrapped  ()
  );

  assign mem_we     = (state == WADDR_DEC) && !beat_bad;
  assign mem_waddr  = beat_addr;
  assign mem_wdata  = packed_data;
  assign mem_wcount = nbytes;
  assign wready     = (state == WREADY);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= WIDLE;
      first_done  <= 1'b0;
      wlen_count  <= '0;
      next_addr_q <= '0;
      done        <= 1'b0;
      err         <= 1'b0;
      served      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!req_pending) served <= 1'b0;
      unique case (state)
        WIDLE: begin
          first_done <= 1'b0;
          wlen_count <= '0;
          err        <= 1'b0;
          state      <= WSTART;
        end
        WSTART:    if (wvalid && req_pending && !served) state <= WADDR_DEC;
        WADDR_DEC: begin
          next_addr_q <= next_addr;
          first_done  <= 1'b1;
          if (beat_bad) err <= 1'b1;
          state       <= WREADY;
        end
        WREADY: begin
          if (wlast) begin
            done   <= 1'b1;
            served <= 1'b1;
            state <= WIDLE;
          end else begin
            state <= WVALID;
          end
        end
        WVALID: begin
          wlen_count <= wlen_count + 1'b1;
          state      <= WSTART;
        end
        default: state <= WIDLE;
      endcase
    end
  end

  // wlast must mark beat awlen+1 of the burst.
  a_wlast_pos: assert property (@(posedge clk) disable iff (!rst_n)
    state == WREADY |-> wlast == (wlen_count == req.len));

endmodule
