// Predictable DDR3 memory controller for NUM_REQ requestors.
//
// Goal: a memory latency bound for each requestor that depends only on how
// many other requestors there are, not on what they do, while still profiting
// from row hits. Two choices make that possible:
//  * private banks: requestor i owns bank i, so nobody else can close its rows,
//    and the open-row policy lets its row hits cost a single CAS;
//  * a global arbitration FIFO in which each requestor holds at most one
//    command, scanned from the front for the first command that can issue,
//    where a CAS may never overtake a blocked CAS. Each requestor is then
//    delayed by at most one command of every other requestor.
//
// Structure:
//   private_buffer x NUM_REQ -> global_fifo -> command bus
//                                   ^  bus_timing (tRRD, tFAW, tRTW, tWTR, data bus)
//   data_path  (data bus bursts, CAS completion)
//   refresh_ctrl (every tREFI: drain, PREA, REF, tRFC)
//
// Requestor ports (index i): a request is {we, addr, 512-bit wdata} accepted
// with req_valid && req_ready. Its completion is rsp_valid[i] (rsp_we[i] for a
// store, rsp_err[i] when the address lies outside the requestor's bank); for a
// load rsp_rdata holds the line in that cycle (rsp_rdata is shared by all
// requestors, only one completes per cycle).
// DRAM side: cmd_out is the command issued in this cycle (CMD_NOP when none);
// dq_out/dq_oe/dq_in carry two data beats per clock. Encoding these onto
// DDR3 pins and double-data-rate I/O is left to a PHY outside this design.
//
// The structure (private buffers, one global FIFO, command and data bus) and
// the arbitration rules follow the design; the requestor handshake, the
// completion pulse, the shared read-data port and the refresh drain are this
// implementation's choices.
module mem_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned NUM_REQ   = 8,
  parameter int unsigned BUF_DEPTH = 4,
  parameter timing_t     T         = DDR3_1333H,
  localparam int unsigned RID_BITS = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // requestors
  input  logic [NUM_REQ-1:0] req_valid,
  output logic [NUM_REQ-1:0] req_ready,
  input  logic [NUM_REQ-1:0] req_we,
  input  addr_t              req_addr  [NUM_REQ],
  input  line_t              req_wdata [NUM_REQ],
  output logic [NUM_REQ-1:0] rsp_valid,
  output logic [NUM_REQ-1:0] rsp_we,
  output logic [NUM_REQ-1:0] rsp_err,
  output line_t              rsp_rdata,
  // DRAM command and data bus
  output dram_cmd_t          cmd_out,
  output dq_t                dq_out,
  output logic               dq_oe,
  input  dq_t                dq_in,
  // status: refresh in progress; Rule 4 holding a ready CAS back; Rule 3
  // issuing a command past an older waiting one (for monitoring only)
  output logic               refreshing,
  output logic               stat_rule4_hold,
  output logic               stat_reorder
);

  // ----------------------------------------------------------- interconnect
  logic [NUM_REQ-1:0] enq_valid, serviced, own_issue, pre_ok;
  dram_cmd_t          enq_cmd [NUM_REQ];
  line_t              head_wdata [NUM_REQ];

  logic                arb_valid;
  logic [RID_BITS-1:0] arb_rid;
  dram_cmd_t           arb_cmd;
  logic                fifo_empty;

  logic act_ok, rd_ok, wr_ok;

  logic                dp_done, dp_done_we, dp_busy;
  logic [RID_BITS-1:0] dp_done_rid;

  logic enq_allow, ref_valid, ref_done;
  cmd_e ref_cmd;

  // ------------------------------------------------------- private buffers
  for (genvar i = 0; i < NUM_REQ; i++) begin : g_req
    assign own_issue[i] = arb_valid && (arb_rid == RID_BITS'(i));

    private_buffer #(
      .NUM_REQ(NUM_REQ), .RID(i), .BUF_DEPTH(BUF_DEPTH), .T(T)
    ) u_buf (
      .clk, .rst_n,
      .req_valid (req_valid[i]),
      .req_ready (req_ready[i]),
      .req_we    (req_we[i]),
      .req_addr  (req_addr[i]),
      .req_wdata (req_wdata[i]),
      .rsp_valid (rsp_valid[i]),
      .rsp_we    (rsp_we[i]),
      .rsp_err   (rsp_err[i]),
      .enq_valid (enq_valid[i]),
      .enq_cmd   (enq_cmd[i]),
      .enq_allow (enq_allow),
      .own_issue (own_issue[i]),
      .serviced  (serviced[i]),
      .ref_done  (ref_done),
      .head_wdata(head_wdata[i]),
      .pre_ok    (pre_ok[i])
    );
  end

  // ------------------------------------------------------------ arbitration
  global_fifo #(.NUM_REQ(NUM_REQ)) u_fifo (
    .clk, .rst_n,
    .enq_valid, .enq_cmd,
    .act_ok, .rd_ok, .wr_ok,
    .data_done     (dp_done),
    .data_done_rid (dp_done_rid),
    .issue_valid   (arb_valid),
    .issue_rid     (arb_rid),
    .issue_cmd     (arb_cmd),
    .serviced,
    .empty         (fifo_empty),
    .rule4_hold    (stat_rule4_hold),
    .reorder       (stat_reorder)
  );

  bus_timing #(.T(T)) u_timing (
    .clk, .rst_n,
    .issue_valid (arb_valid),
    .issue_cmd   (arb_cmd.cmd),
    .act_ok, .rd_ok, .wr_ok
  );

  // -------------------------------------------------------------- data bus
  data_path #(.NUM_REQ(NUM_REQ), .T(T)) u_data (
    .clk, .rst_n,
    .issue_valid (arb_valid),
    .issue_rid   (arb_rid),
    .issue_cmd   (arb_cmd.cmd),
    .issue_wdata (head_wdata[arb_rid]),
    .dq_out, .dq_oe, .dq_in,
    .done        (dp_done),
    .done_rid    (dp_done_rid),
    .done_we     (dp_done_we),
    .rdata       (rsp_rdata),
    .busy        (dp_busy)
  );

  // --------------------------------------------------------------- refresh
  refresh_ctrl #(.T(T)) u_ref (
    .clk, .rst_n,
    .fifo_empty,
    .data_busy  (dp_busy),
    .all_pre_ok (&pre_ok),
    .enq_allow,
    .cmd_valid  (ref_valid),
    .cmd        (ref_cmd),
    .ref_done,
    .refreshing
  );

  // ----------------------------------------------------------- command bus
  always_comb begin
    if (ref_valid) cmd_out = '{cmd: ref_cmd, bank: '0, row: '0, col: '0};
    else           cmd_out = arb_cmd;   // CMD_NOP when nothing issues
  end
  // dp_done_we is used only by the completion check below.

  a_one_cmd_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !(ref_valid && arb_valid));
  a_done_matches_issue: assert property (@(posedge clk) disable iff (!rst_n)
    dp_done |-> serviced[dp_done_rid] && rsp_we[dp_done_rid] == dp_done_we);

endmodule
