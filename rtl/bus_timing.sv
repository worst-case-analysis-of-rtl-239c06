// Cross-bank timing tracker.
//
// Watches every command issued on the command bus and says whether an ACT, a
// read or a write could legally be issued in the current cycle, counting only
// the constraints that one bank's commands place on another bank's:
//  * tRRD between any two ACTs, and tFAW: at most four ACTs in any window of
//    tFAW cycles (the ages of the last four ACTs are kept);
//  * tRTW from a read to any write, and tWTR from the end of write data to any
//    read (counted from the write itself as tWL + tBUS + tWTR);
//  * the data bus: a CAS reserves the bus for tBUS cycles starting tRL (read)
//    or tWL (write) after it issues, so a new CAS may issue only if its burst
//    would start after the last reserved burst ends.
// PRE needs nothing here: it has no constraint towards other banks.
// Same-bank constraints are kept by each requestor's private buffer.
//
// The outputs depend only on registers, so the global FIFO can use them in
// the same cycle it chooses a command. A constraint of X cycles after a
// command issued in cycle t is met from cycle t + X onwards.
//
// Which constraints act across banks, and that a data-bus conflict is one
// more CAS constraint, follow the design; the down-counter implementation and
// keeping the ages of the last four ACTs for tFAW are this implementation's.
module bus_timing
  import mc_pkg::*;
#(
  parameter timing_t T = DDR3_1333H
) (
  input  logic clk,
  input  logic rst_n,
  input  logic issue_valid,
  input  cmd_e issue_cmd,
  output logic act_ok,
  output logic rd_ok,
  output logic wr_ok
);

  function automatic cnt_t ld(int unsigned x);
    return (x == 0) ? cnt_t'(0) : cnt_t'(x - 1);
  endfunction

  function automatic cnt_t dec(cnt_t c);
    return (c == '0) ? c : c - 1'b1;
  endfunction

  cnt_t c_rrd, c_rtw, c_wtr;
  cnt_t c_faw [4];   // [0] youngest ACT ... [3] fourth most recent ACT
  cnt_t c_dbus;      // cycles, from the next one, until the data bus is free

  // A CAS whose burst starts L cycles from now needs the bus free by then.
  assign act_ok = (c_rrd == '0) && (c_faw[3] == '0);
  assign rd_ok  = (c_wtr == '0) && (32'(c_dbus) <= T.RL);
  assign wr_ok  = (c_rtw == '0) && (32'(c_dbus) <= T.WL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_rrd  <= '0;
      c_rtw  <= '0;
      c_wtr  <= '0;
      c_dbus <= '0;
      for (int i = 0; i < 4; i++) c_faw[i] <= '0;
    end else begin
      c_rrd  <= dec(c_rrd);
      c_rtw  <= dec(c_rtw);
      c_wtr  <= dec(c_wtr);
      c_dbus <= dec(c_dbus);
      for (int i = 0; i < 4; i++) c_faw[i] <= dec(c_faw[i]);

      if (issue_valid) begin
        unique case (issue_cmd)
          CMD_ACT: begin
            c_rrd    <= ld(T.RRD);
            c_faw[0] <= ld(T.FAW);
            for (int i = 1; i < 4; i++) c_faw[i] <= dec(c_faw[i-1]);
          end
          CMD_RD: begin
            c_rtw  <= ld(T.RTW);
            c_dbus <= ld(T.RL + T.BUS);
          end
          CMD_WR: begin
            c_wtr  <= ld(T.WL + T.BUS + T.WTR);
            c_dbus <= ld(T.WL + T.BUS);
          end
          default: ;
        endcase
      end
    end
  end

  // A CAS must never be issued into a busy data bus.
  a_rd_legal: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid && issue_cmd == CMD_RD |-> rd_ok);
  a_wr_legal: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid && issue_cmd == CMD_WR |-> wr_ok);
  a_act_legal: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid && issue_cmd == CMD_ACT |-> act_ok);

endmodule
