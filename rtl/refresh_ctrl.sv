// Periodic refresh.
//
// A free-running counter raises a refresh request every tREFI cycles. The
// refresh then runs as a short sequence:
//   DRAIN  enq_allow goes low, so no private buffer offers a new command; the
//          commands already in the global FIFO still issue and their data
//          transfers end. Once the FIFO is empty, the data path idle and every
//          bank may be precharged (all_pre_ok: tRAS, tRTP, tWR met),
//   PREA   one precharge-all closes every open row,
//   WAIT   tRP cycles, then
//   REF    the refresh command, followed by tRFC cycles in which no command
//          may be sent.
// tRFC cycles after REF, ref_done pulses: each private buffer marks
// its bank closed, and enq_allow rises again. A request that was open before
// the refresh therefore needs an ACT again (open requests become close ones).
// Refresh requests that fall due while one is being served are counted and
// served back to back.
//
// The periodic REF, its period and its duration follow the design; the drain
// and the explicit precharge-all that JEDEC devices require before REF are
// this implementation's choice of how to empty the row buffers.
// cmd_valid/cmd are the refresh controller's use of the command bus; it uses
// it only while the FIFO is empty, so it never collides with the arbiter.
module refresh_ctrl
  import mc_pkg::*;
#(
  parameter timing_t T = DDR3_1333H
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fifo_empty,
  input  logic data_busy,
  input  logic all_pre_ok,
  output logic enq_allow,
  output logic cmd_valid,
  output cmd_e cmd,
  output logic ref_done,
  output logic refreshing
);

  localparam int unsigned PER_BITS = $clog2(T.REFI + 1);
  localparam int unsigned W_BITS   = $clog2(T.RFC + T.RP + 1);

  typedef enum logic [2:0] {R_IDLE, R_DRAIN, R_WAIT_RP, R_WAIT_RFC} rstate_e;
  rstate_e state;

  logic [PER_BITS-1:0] period;
  logic [3:0]          owed;      // refreshes due and not yet served
  logic [W_BITS-1:0]   wcnt;

  logic tick, start_prea, start_ref;
  assign tick       = (32'(period) == T.REFI - 1);
  assign start_prea = (state == R_DRAIN) && fifo_empty && !data_busy && all_pre_ok;
  assign start_ref  = (state == R_WAIT_RP) && (wcnt == '0);

  assign enq_allow  = (state == R_IDLE) && (owed == '0);
  assign refreshing = (state != R_IDLE);
  assign cmd_valid  = start_prea || start_ref;
  assign cmd        = start_prea ? CMD_PREA : (start_ref ? CMD_REF : CMD_NOP);
  assign ref_done   = (state == R_WAIT_RFC) && (wcnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= R_IDLE;
      period <= '0;
      owed   <= '0;
      wcnt   <= '0;
    end else begin
      period <= tick ? '0 : period + 1'b1;
      if (wcnt != '0) wcnt <= wcnt - 1'b1;

      unique case (state)
        R_IDLE:  if (owed != '0) state <= R_DRAIN;
        R_DRAIN: if (start_prea) begin
          state <= R_WAIT_RP;
          wcnt  <= W_BITS'(T.RP - 1);   // REF issues T.RP cycles after PREA
        end
        R_WAIT_RP: if (start_ref) begin
          state <= R_WAIT_RFC;
          wcnt  <= W_BITS'(T.RFC - 1);  // ref_done T.RFC cycles after REF
        end
        R_WAIT_RFC: if (ref_done) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase

      // owed: +1 on each tick, -1 when a REF issues
      owed <= owed + 4'(tick) - 4'(start_ref);
    end
  end

  a_owed_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    owed != 4'hF);

endmodule
