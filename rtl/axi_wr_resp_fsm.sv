// axi_wr_resp_fsm: write response channel of the AXI memory slave.
//
// Four states. BIDLE ends the previous write and moves on at the next clock.
// BDETECT_LAST waits for the write data FSM to report the burst's last beat
// (wr_done, with wr_err telling whether any beat fell outside the memory).
// BSTART assembles the response: OKAY when every beat was inside the memory
// and awsize is at most 3'b011, DECERR when a beat was outside the memory,
// SLVERR when only the size was too large. BWAIT raises bvalid with bid and
// bresp and holds them until bready; the handshake returns the FSM to BIDLE
// and pulses release_o, which frees the write address channel for the next
// write. bvalid therefore rises two cycles after the last data beat. The
// states and the OKAY condition follow the design description; the choice
// between DECERR and SLVERR is this design's.
module axi_wr_resp_fsm
  import axi_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  output logic            bvalid,
  input  logic            bready,
  output logic [ID_W-1:0] bid,
  output logic [1:0]      bresp,
  input  ax_req_t         req,
  input  logic            wr_done,
  input  logic            wr_err,
  output logic            release_o
);

  typedef enum logic [1:0] {
    BIDLE = 2'd0, BDETECT_LAST = 2'd1, BSTART = 2'd2, BWAIT = 2'd3
  } b_state_e;

  b_state_e state;
  logic     err_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= BIDLE;
      err_q <= 1'b0;
      bresp <= RESP_OKAY;
    end else begin
      unique case (state)
        BIDLE:        state <= BDETECT_LAST;
        BDETECT_LAST: if (wr_done) begin
                        err_q <= wr_err;
                        state <= BSTART;
                      end
        BSTART: begin
          if (err_q)                     bresp <= RESP_DECERR;
          else if (req.size > WR_MAX_SIZE) bresp <= RESP_SLVERR;
          else                           bresp <= RESP_OKAY;
          state <= BWAIT;
        end
        BWAIT:        if (bready) state <= BIDLE;
        default:      state <= BIDLE;
      endcase
    end
  end

  assign bvalid    = (state == BWAIT);
  assign bid       = req.id;
  assign release_o = bvalid && bready;

  // Once raised, bvalid and its payload stay until bready.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !bready |=> bvalid && $stable(bresp) && $stable(bid));

endmodule
