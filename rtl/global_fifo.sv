// Global arbitration FIFO.
//
// Every requestor may have exactly one command in this queue (Rule 1), so the
// queue holds NUM_REQ entries. New commands join at the back; when several
// requestors offer a command in the same cycle they join in requestor-index
// order. Each cycle the queue is scanned from the front and the first command
// that may issue now is put on the command bus (Rule 3):
//  * PRE is always ready (its own-bank constraints were met before it was
//    offered, and it has none towards other banks);
//  * ACT needs bus_timing's act_ok (tRRD, tFAW);
//  * a read or write needs rd_ok / wr_ok (tWTR, tRTW, data bus), and
//    additionally no earlier CAS in the queue may be blocked (Rule 4): once a
//    waiting CAS cannot issue, every CAS behind it waits too, so CASes never
//    overtake one another.
// PRE and ACT leave the queue when they issue. A CAS stays, marked issued,
// until the data path reports the end of its data transfer (data_done), and
// only then leaves. `serviced` tells the owner of a command that it has left.
//
// Timing: a command offered in cycle t sits in the queue from t+1 and can
// issue in t+1. One command per cycle leaves on the command bus.
// rule4_hold and reorder pulse when Rule 4 holds a ready CAS back and when a
// command other than the oldest waiting one issues (Rule 3); they are for
// observation only.
//
// The queue size, Rules 1, 3 and 4 and the removal of a CAS at the end of its
// data follow the design; the join order of simultaneous offers, the
// registered queue and the compaction into slot order are this
// implementation's choices.
module global_fifo
  import mc_pkg::*;
#(
  parameter int unsigned NUM_REQ = 8,
  localparam int unsigned RID_BITS = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_REQ-1:0]  enq_valid,
  input  dram_cmd_t           enq_cmd [NUM_REQ],
  input  logic                act_ok,
  input  logic                rd_ok,
  input  logic                wr_ok,
  input  logic                data_done,
  input  logic [RID_BITS-1:0] data_done_rid,
  output logic                issue_valid,
  output logic [RID_BITS-1:0] issue_rid,
  output dram_cmd_t           issue_cmd,
  output logic [NUM_REQ-1:0]  serviced,
  output logic                empty,
  output logic                rule4_hold,
  output logic                reorder
);

  typedef struct packed {
    logic                valid;
    logic                issued;
    logic [RID_BITS-1:0] rid;
    dram_cmd_t           cmd;
  } slot_t;

  slot_t q [NUM_REQ];        // q[0] is the front
  slot_t q_nxt [NUM_REQ];

  logic [NUM_REQ-1:0] ready, rm;
  logic [RID_BITS-1:0] sel;
  logic cas_blocked;
  logic first_waiting_seen;

  // ------------------------------------------------------- scan (Rules 3, 4)
  always_comb begin
    logic t_ok;
    t_ok        = 1'b0;
    ready       = '0;
    cas_blocked = 1'b0;
    rule4_hold  = 1'b0;
    for (int k = 0; k < NUM_REQ; k++) begin
      if (q[k].valid && !q[k].issued) begin
        unique case (q[k].cmd.cmd)
          CMD_PRE: ready[k] = 1'b1;
          CMD_ACT: ready[k] = act_ok;
          CMD_RD, CMD_WR: begin
            t_ok = (q[k].cmd.cmd == CMD_RD) ? rd_ok : wr_ok;
            ready[k] = t_ok && !cas_blocked;
            if (t_ok && cas_blocked) rule4_hold = 1'b1;
            if (!t_ok) cas_blocked = 1'b1;
          end
          default: ready[k] = 1'b0;
        endcase
      end
    end
  end

  always_comb begin
    issue_valid        = 1'b0;
    sel                = '0;
    reorder            = 1'b0;
    first_waiting_seen = 1'b0;
    for (int k = 0; k < NUM_REQ; k++) begin
      if (!issue_valid && ready[k]) begin
        issue_valid = 1'b1;
        sel         = RID_BITS'(k);
        reorder     = first_waiting_seen;
      end
      if (q[k].valid && !q[k].issued) first_waiting_seen = 1'b1;
    end
    issue_rid = q[sel].rid;
    issue_cmd = issue_valid ? q[sel].cmd : '0;
  end

  // ------------------------------------------------------ dequeue (Rule 1)
  always_comb begin
    serviced = '0;
    for (int k = 0; k < NUM_REQ; k++) begin
      rm[k] = 1'b0;
      if (q[k].valid) begin
        if (issue_valid && sel == RID_BITS'(k) && !is_cas(q[k].cmd.cmd)) rm[k] = 1'b1;
        if (q[k].issued && data_done && q[k].rid == data_done_rid) rm[k] = 1'b1;
      end
      if (rm[k]) serviced[q[k].rid] = 1'b1;
    end
  end

  // ------------------------------------------- compact, then append at back
  always_comb begin
    int unsigned n;
    n = 0;
    for (int k = 0; k < NUM_REQ; k++) q_nxt[k] = '0;
    for (int k = 0; k < NUM_REQ; k++) begin
      if (q[k].valid && !rm[k]) begin
        q_nxt[n] = q[k];
        if (issue_valid && sel == RID_BITS'(k)) q_nxt[n].issued = 1'b1;
        n++;
      end
    end
    for (int r = 0; r < NUM_REQ; r++) begin
      if (enq_valid[r] && n < NUM_REQ) begin
        q_nxt[n] = '{valid: 1'b1, issued: 1'b0, rid: RID_BITS'(r), cmd: enq_cmd[r]};
        n++;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_REQ; k++) q[k] <= '0;
    end else begin
      for (int k = 0; k < NUM_REQ; k++) q[k] <= q_nxt[k];
    end
  end

  always_comb begin
    empty = 1'b1;
    for (int k = 0; k < NUM_REQ; k++) if (q[k].valid) empty = 1'b0;
  end

  // ------------------------------------------------------------- checks
  // Rule 1: a requestor offering a command has none in the queue.
  for (genvar r = 0; r < NUM_REQ; r++) begin : g_rule1
    logic present;
    always_comb begin
      present = 1'b0;
      for (int k = 0; k < NUM_REQ; k++)
        if (q[k].valid && q[k].rid == RID_BITS'(r)) present = 1'b1;
    end
    a_one_per_requestor: assert property (@(posedge clk) disable iff (!rst_n)
      enq_valid[r] |-> !present);
  end

endmodule
