// Data-bus engine.
//
// When a CAS issues, the data bus is reserved for tBUS cycles starting tRL
// (read) or tWL (write) cycles later. This block records each issued CAS in a
// small in-order list (requestor, read/write, store data, cycles to go) and,
// when a burst's turn comes, drives the store data on dq_out with dq_oe high,
// or collects the load data from dq_in. In the last cycle of a burst it pulses
// done with the requestor's index; the global FIFO then dequeues that CAS and
// the private buffer retires the request. For a load, rdata holds the whole
// 512-bit line in that same cycle (the last two beats come straight from
// dq_in).
//
// The DDR bus moves BL = 8 beats of W_BUS bits in tBUS = BL/2 clocks; here
// both beats of one clock travel together on a 2*W_BUS-bit dq word, beat 2k
// in the low half. Beat 0 of a line is its least significant W_BUS bits.
// Bursts start in issue order because the bus_timing rules keep them apart,
// so one list suffices; MAX_INFLIGHT bounds how many CASes can be waiting for
// or using the bus (ceil((tRL + tBUS) / tBUS) + 1 with margin).
// The top 2*W_BUS bits of rdata are wired straight from dq_in without a
// register, so the line is complete in the burst's last cycle without an
// extra cycle of latency.
//
// The reservation of the data bus for tBUS cycles tRL/tWL after a CAS and the
// removal of the CAS at the end of its data follow the design; the in-flight
// list, the 128-bit two-beat word and the completion pulse are this
// implementation's choices.
module data_path
  import mc_pkg::*;
#(
  parameter int unsigned NUM_REQ      = 8,
  parameter timing_t     T            = DDR3_1333H,
  parameter int unsigned MAX_INFLIGHT = 4,
  localparam int unsigned RID_BITS = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // issued command
  input  logic                issue_valid,
  input  logic [RID_BITS-1:0] issue_rid,
  input  cmd_e                issue_cmd,
  input  line_t               issue_wdata,
  // DRAM data bus
  output dq_t                 dq_out,
  output logic                dq_oe,
  input  dq_t                 dq_in,
  // completion
  output logic                done,
  output logic [RID_BITS-1:0] done_rid,
  output logic                done_we,
  output line_t               rdata,
  output logic                busy
);

  localparam int unsigned BEATS    = LINE_BITS / DQ_BITS;   // clocks per line
  localparam int unsigned IDX_BITS = (MAX_INFLIGHT > 1) ? $clog2(MAX_INFLIGHT) : 1;
  localparam int unsigned BEAT_BITS = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef struct packed {
    logic                valid;
    logic                we;
    logic [RID_BITS-1:0] rid;
    cnt_t                wait_cnt;   // cycles until the burst starts
  } fl_t;

  fl_t   fl   [MAX_INFLIGHT];
  line_t fl_d [MAX_INFLIGHT];
  logic [IDX_BITS-1:0] head, tail;
  logic [BEAT_BITS-1:0] beat;
  line_t rbuf;

  logic new_cas, active, last_beat;
  assign new_cas   = issue_valid && is_cas(issue_cmd);
  assign active    = fl[head].valid && (fl[head].wait_cnt == '0);
  assign last_beat = active && (32'(beat) == BEATS - 1);

  function automatic logic [IDX_BITS-1:0] inc(logic [IDX_BITS-1:0] p);
    return (32'(p) == MAX_INFLIGHT - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    dq_oe  = active && fl[head].we;
    dq_out = dq_oe ? fl_d[head][32'(beat)*DQ_BITS +: DQ_BITS] : '0;
    done     = last_beat;
    done_rid = fl[head].rid;
    done_we  = fl[head].we;
    rdata    = rbuf;
    rdata[(BEATS-1)*DQ_BITS +: DQ_BITS] = dq_in;
    busy = 1'b0;
    for (int i = 0; i < MAX_INFLIGHT; i++) if (fl[i].valid) busy = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      beat <= '0;
      rbuf <= '0;
      for (int i = 0; i < MAX_INFLIGHT; i++) fl[i] <= '0;
    end else begin
      for (int i = 0; i < MAX_INFLIGHT; i++)
        if (fl[i].valid && fl[i].wait_cnt != '0) fl[i].wait_cnt <= fl[i].wait_cnt - 1'b1;

      if (active) begin
        if (!fl[head].we) rbuf[32'(beat)*DQ_BITS +: DQ_BITS] <= dq_in;
        beat <= last_beat ? '0 : beat + 1'b1;
      end
      if (last_beat) begin
        fl[head].valid <= 1'b0;
        head <= inc(head);
      end
      if (new_cas) begin
        fl[tail] <= '{valid: 1'b1, we: (issue_cmd == CMD_WR), rid: issue_rid,
                      wait_cnt: cnt_t'(((issue_cmd == CMD_WR) ? T.WL : T.RL) - 1)};
        tail <= inc(tail);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (new_cas) fl_d[tail] <= issue_wdata;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    new_cas |-> !fl[tail].valid || last_beat && tail == head);

endmodule
