// Per-requestor private buffer and command generator.
//
// Holds up to BUF_DEPTH requests of one requestor in arrival order and turns
// the oldest one into DRAM commands under the open-row policy: a request to
// the row already open in the requestor's bank needs only a CAS (read or
// write); one to a closed bank needs ACT then CAS; one to another row needs
// PRE, ACT, CAS. The bank's state (open or not, which row) lives here, because
// under private-bank mapping only this requestor touches the bank.
//
// Arbitration rules kept here:
//  * Rule 1: one command at a time is offered to the global FIFO (enq_valid,
//    a one-cycle pulse); the next is offered only after `serviced` says the
//    FIFO dequeued it. A CAS is serviced when its data transfer has ended, and
//    that also retires the request (rsp_valid, with rsp_we for a store).
//  * Rule 2: a command is offered only when every constraint caused by this
//    requestor's own earlier commands is met (tRCD, tRP, tRAS, tRC, tRTP, tWR,
//    and tWTR/tRTW between its own CASes), so once in the FIFO it is held back
//    only by other requestors.
// enq_allow low (refresh pending) stops new offers; ref_done marks the bank
// closed, and the next command is then worked out again (an ACT).
// A request whose address lies outside the requestor's bank is retired at
// once with rsp_err and never reaches the DRAM (an implementation choice).
//
// Timing: a command is offered in the first cycle its constraints allow, and
// the FIFO can issue it one cycle later. Constraint counters are loaded with
// (constraint - 1) on the issue edge, so a command separated by X cycles from
// its predecessor sees the counter at zero.
// head_wdata is the store data of the oldest request, read by the data path
// when this requestor's write CAS issues. pre_ok says the bank may be
// precharged now (used before a refresh).
// enq_cmd.bank is the constant bank of this requestor and the low three
// column bits are always zero (one burst per request), so those output bits
// are constants.
// The decoded bank field itself is not stored (only whether it is this
// requestor's bank), and of the pending command only its type and row are
// used again.
module private_buffer
  import mc_pkg::*;
#(
  parameter int unsigned NUM_REQ   = 8,
  parameter int unsigned RID       = 0,
  parameter int unsigned BUF_DEPTH = 4,
  parameter timing_t     T         = DDR3_1333H
) (
  input  logic      clk,
  input  logic      rst_n,
  // requestor side
  input  logic      req_valid,
  output logic      req_ready,
  input  logic      req_we,
  input  addr_t     req_addr,
  input  line_t     req_wdata,
  output logic      rsp_valid,
  output logic      rsp_we,
  output logic      rsp_err,
  // global FIFO side
  output logic      enq_valid,
  output dram_cmd_t enq_cmd,
  input  logic      enq_allow,
  input  logic      own_issue,
  input  logic      serviced,
  // refresh and data path
  input  logic      ref_done,
  output line_t     head_wdata,
  output logic      pre_ok
);

  localparam int unsigned PTR_BITS = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;
  localparam bank_t MY_BANK = bank_t'(RID % NUM_BANKS);

  typedef struct packed {
    logic  we;
    logic  ok;
    row_t  row;
    col_t  col;
  } req_t;

  function automatic cnt_t ld(int unsigned x);
    return (x == 0) ? cnt_t'(0) : cnt_t'(x - 1);
  endfunction

  // ---------------------------------------------------------------- buffer
  req_t  q_req  [BUF_DEPTH];
  line_t q_data [BUF_DEPTH];
  logic [PTR_BITS-1:0] rd_ptr, wr_ptr;
  logic [PTR_BITS:0]   count;

  bank_t in_bank;
  row_t  in_row;
  col_t  in_col;
  logic  in_ok;

  addr_map #(.NUM_REQ(NUM_REQ)) u_map (
    .addr(req_addr), .rid($clog2(NUM_REQ)'(RID)),
    .bank(in_bank), .row(in_row), .col(in_col), .private_ok(in_ok)
  );

  logic push, pop;
  req_t head;
  logic head_valid;

  assign req_ready  = (count < (PTR_BITS+1)'(BUF_DEPTH));
  assign push       = req_valid && req_ready;
  assign head_valid = (count != '0);
  assign head       = q_req[rd_ptr];
  assign head_wdata = q_data[rd_ptr];

  function automatic logic [PTR_BITS-1:0] inc(logic [PTR_BITS-1:0] p);
    return (32'(p) == BUF_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (PTR_BITS+1)'(push) - (PTR_BITS+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      q_req[wr_ptr]  <= '{we: req_we, ok: in_ok, row: in_row, col: in_col};
      q_data[wr_ptr] <= req_wdata;
    end
  end

  // ---------------------------------------------------------- bank state
  logic bank_open;
  row_t open_row;

  // own-bank constraint counters (Rule 2)
  cnt_t c_rcd, c_rp, c_ras, c_rc, c_rtp, c_wr, c_wtr, c_rtw;

  typedef enum logic {S_IDLE, S_WAIT} state_e;
  state_e    state;
  dram_cmd_t pend;      // command waiting in the global FIFO

  cmd_e next_cmd;
  logic next_ok;

  always_comb begin
    if (!bank_open)               next_cmd = CMD_ACT;
    else if (open_row != head.row) next_cmd = CMD_PRE;
    else                          next_cmd = head.we ? CMD_WR : CMD_RD;

    unique case (next_cmd)
      CMD_ACT: next_ok = (c_rp == '0) && (c_rc == '0);
      CMD_PRE: next_ok = (c_ras == '0) && (c_rtp == '0) && (c_wr == '0);
      CMD_RD:  next_ok = (c_rcd == '0) && (c_wtr == '0);
      CMD_WR:  next_ok = (c_rcd == '0) && (c_rtw == '0);
      default: next_ok = 1'b0;
    endcase
  end

  logic err_retire;
  assign err_retire = (state == S_IDLE) && head_valid && !head.ok;

  assign enq_valid = (state == S_IDLE) && head_valid && head.ok && enq_allow && next_ok;
  always_comb begin
    enq_cmd.cmd  = next_cmd;
    enq_cmd.bank = MY_BANK;
    enq_cmd.row  = head.row;
    enq_cmd.col  = head.col;
  end

  logic cas_done;
  assign cas_done  = (state == S_WAIT) && serviced && is_cas(pend.cmd);
  assign pop       = cas_done || err_retire;
  assign rsp_valid = pop;
  assign rsp_we    = head.we;
  assign rsp_err   = err_retire;
  assign pre_ok    = (c_ras == '0) && (c_rtp == '0) && (c_wr == '0);

  function automatic cnt_t dec(cnt_t c);
    return (c == '0) ? c : c - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pend      <= '0;
      bank_open <= 1'b0;
      open_row  <= '0;
      c_rcd <= '0; c_rp <= '0; c_ras <= '0; c_rc <= '0;
      c_rtp <= '0; c_wr <= '0; c_wtr <= '0; c_rtw <= '0;
    end else begin
      c_rcd <= dec(c_rcd); c_rp  <= dec(c_rp);  c_ras <= dec(c_ras); c_rc  <= dec(c_rc);
      c_rtp <= dec(c_rtp); c_wr  <= dec(c_wr);  c_wtr <= dec(c_wtr); c_rtw <= dec(c_rtw);

      unique case (state)
        S_IDLE: if (enq_valid) begin
          pend  <= enq_cmd;
          state <= S_WAIT;
        end
        S_WAIT: if (serviced) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      if (own_issue) begin
        unique case (pend.cmd)
          CMD_PRE: begin
            bank_open <= 1'b0;
            c_rp      <= ld(T.RP);
          end
          CMD_ACT: begin
            bank_open <= 1'b1;
            open_row  <= pend.row;
            c_rcd     <= ld(T.RCD);
            c_ras     <= ld(T.RAS);
            c_rc      <= ld(T.RC);
          end
          CMD_RD: begin
            c_rtp <= ld(T.RTP);
            c_rtw <= ld(T.RTW);
          end
          CMD_WR: begin
            c_wr  <= ld(T.WL + T.BUS + T.WR);
            c_wtr <= ld(T.WL + T.BUS + T.WTR);
          end
          default: ;
        endcase
      end

      if (ref_done) bank_open <= 1'b0;
    end
  end

  // ------------------------------------------------------------ checks
  a_issue_pending: assert property (@(posedge clk) disable iff (!rst_n)
    own_issue |-> state == S_WAIT);
  a_serviced_pending: assert property (@(posedge clk) disable iff (!rst_n)
    serviced |-> state == S_WAIT);
  a_no_enq_while_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    enq_valid |-> state == S_IDLE);

endmodule
