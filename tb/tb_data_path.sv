// Testbench of the data-bus engine.
// Random reads and writes from random requestors are issued as densely as the
// data bus allows (a burst may start when the previous one has ended), with
// PRE/ACT commands in between that must be ignored. A reference schedule,
// built from tRL, tWL and tBUS alone, gives for every cycle whether the
// controller must drive the bus and with which half-line, and in which cycle
// each transfer completes. The DRAM side returns a cycle-dependent pattern on
// dq_in, so the expected load line is known. Checked every cycle: dq_oe,
// dq_out, done, done_rid, done_we, rdata on loads, busy.
//
// The bus timing follows the design; the two-beat word layout checked here
// is this implementation's choice.
module tb_data_path;
  import mc_pkg::*;

  localparam int M = 8;
  localparam timing_t TT = DDR3_1333H;
  localparam longint RL = TT.RL, WL = TT.WL, BUS = TT.BUS;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic issue_valid, dq_oe, done, done_we, busy;
  logic [2:0] issue_rid, done_rid;
  cmd_e issue_cmd;
  line_t issue_wdata, rdata;
  dq_t dq_out, dq_in;

  data_path #(.NUM_REQ(M), .T(TT)) dut (
    .clk, .rst_n, .issue_valid, .issue_rid, .issue_cmd, .issue_wdata,
    .dq_out, .dq_oe, .dq_in, .done, .done_rid, .done_we, .rdata, .busy
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", now, what);
    end
  endtask

  longint now = 0;
  function automatic dq_t pattern(longint c);
    return {32'(c * 7 + 1), 32'(c ^ 32'h5a5a_0000), ~32'(c), 32'(c * 13)};
  endfunction

  typedef struct { bit we; int rid; line_t d; longint start; } xfer_t;
  xfer_t  sched [$];
  longint bus_free = 0, last_issue_end = 0;
  int n_rd = 0, n_wr = 0, b2b = 0;


  initial begin
    issue_valid = 0; issue_cmd = CMD_NOP; issue_rid = 0; issue_wdata = '0; dq_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int pick;
      @(negedge clk);
      dq_in = pattern(now);
      #0;
      // ---- compare with the reference schedule
      begin
        bit exp_oe, exp_done, inflight;
        dq_t exp_out;
        exp_oe = 0; exp_done = 0; exp_out = '0;
        inflight = (sched.size() > 0);
        if (sched.size() > 0 && now >= sched[0].start) begin
          int beat;
          beat = int'(now - sched[0].start);
          if (sched[0].we) begin
            exp_oe = 1;
            exp_out = sched[0].d[beat*DQ_BITS +: DQ_BITS];
          end
          if (beat == int'(BUS) - 1) exp_done = 1;
        end
        check(dq_oe == exp_oe, "dq_oe");
        if (exp_oe) check(dq_out == exp_out, "dq_out data");
        check(done == exp_done, "done timing");
        check(busy == inflight, "busy");
        if (exp_done) begin
          check(int'(done_rid) == sched[0].rid, "done_rid");
          check(done_we == sched[0].we, "done_we");
          if (!sched[0].we) begin
            line_t e;
            for (int b = 0; b < int'(BUS); b++) e[b*DQ_BITS +: DQ_BITS] = pattern(sched[0].start + b);
            check(rdata == e, "load line");
          end
          void'(sched.pop_front());
        end
      end
      // ---- next command
      issue_valid = 0; issue_cmd = CMD_NOP;
      pick = $urandom_range(0, 9);
      if (pick < 3 && now + RL >= bus_free) begin
        issue_valid = 1; issue_cmd = CMD_RD;
      end else if (pick < 6 && now + WL >= bus_free) begin
        issue_valid = 1; issue_cmd = CMD_WR;
      end else if (pick < 8) begin
        issue_valid = 1; issue_cmd = ($urandom_range(0, 1) == 1) ? CMD_PRE : CMD_ACT;
      end
      issue_rid = 3'($urandom_range(0, M - 1));
      for (int i = 0; i < LINE_BITS / 32; i++) issue_wdata[i*32 +: 32] = $urandom;
      if (issue_valid && is_cas(issue_cmd)) begin
        xfer_t x;
        x.we = (issue_cmd == CMD_WR);
        x.rid = int'(issue_rid);
        x.d = issue_wdata;
        x.start = now + (x.we ? WL : RL);
        if (x.start == bus_free) b2b++;
        bus_free = x.start + BUS;
        sched.push_back(x);
        if (x.we) n_wr++; else n_rd++;
      end
      @(posedge clk);
      now++;
    end
    check(n_rd > 100 && n_wr > 100 && b2b > 100, "coverage: reads, writes, back-to-back bursts");
    $display("coverage: rd=%0d wr=%0d back_to_back=%0d", n_rd, n_wr, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
