// Testbench of the global arbitration FIFO.
//
// Part 1 replays the situation that shows why CASes must not overtake each
// other: requestor 1 write, requestor 2 read, requestor 3 write, queued in that
// order. Once requestor 1's write has issued, the read is held by tWTR; the
// write of requestor 3 is ready but must wait behind the read (Rule 4), and
// issues only after it.
// Part 2 runs random traffic against a reference queue written from the
// rules alone: one command per requestor (Rule 1), first ready command from
// the front issues (Rule 3), no CAS passes a blocked CAS (Rule 4), PRE/ACT
// leave on issue, a CAS leaves at the end of its data (data_done). Every cycle
// the issued command, its requestor, the serviced vector and the Rule-4 flag
// are compared with the reference.
//
// The rules follow the design; the requestor-index join order of
// simultaneous offers is this implementation's choice and is checked too.
module tb_global_fifo;
  import mc_pkg::*;

  localparam int M = 8;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [M-1:0] enq_valid, serviced;
  dram_cmd_t    enq_cmd [M];
  logic act_ok, rd_ok, wr_ok, data_done, issue_valid, empty, rule4_hold, reorder;
  logic [2:0] data_done_rid, issue_rid;
  dram_cmd_t issue_cmd;

  global_fifo #(.NUM_REQ(M)) dut (
    .clk, .rst_n, .enq_valid, .enq_cmd, .act_ok, .rd_ok, .wr_ok,
    .data_done, .data_done_rid, .issue_valid, .issue_rid, .issue_cmd,
    .serviced, .empty, .rule4_hold, .reorder
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef struct { int rid; dram_cmd_t cmd; bit issued; } ent_t;
  ent_t rq [$];
  int   cas_order [$];     // requestors of issued CASes, oldest first

  // reference decision for the current cycle
  function automatic int ref_pick(output bit r4);
    bit blocked = 0;
    int pick = -1;
    r4 = 0;
    foreach (rq[k]) begin
      bit rdy;
      if (rq[k].issued) continue;
      case (rq[k].cmd.cmd)
        CMD_PRE: rdy = 1;
        CMD_ACT: rdy = act_ok;
        default: begin
          bit t;
          t = (rq[k].cmd.cmd == CMD_RD) ? rd_ok : wr_ok;
          rdy = t && !blocked;
          if (t && blocked) r4 = 1;
          if (!t) blocked = 1;
        end
      endcase
      if (rdy && pick < 0) pick = k;
    end
    return pick;
  endfunction

  function automatic bit present(int r);
    foreach (rq[k]) if (rq[k].rid == r) return 1;
    return 0;
  endfunction

  function automatic dram_cmd_t rnd_cmd(int r);
    dram_cmd_t c;
    cmd_e t [4] = '{CMD_PRE, CMD_ACT, CMD_RD, CMD_WR};
    c.cmd  = t[$urandom_range(0, 3)];
    c.bank = bank_t'(r);
    c.row  = row_t'($urandom);
    c.col  = col_t'($urandom);
    return c;
  endfunction

  // compare this cycle, then advance the reference at the clock edge
  task automatic step();
    int pick, pr;
    bit r4;
    logic [M-1:0] exp_srv;
    #0;
    pick = ref_pick(r4);
    exp_srv = '0;
    check(issue_valid == (pick >= 0), "issue_valid");
    if (pick >= 0 && issue_valid && int'(issue_rid) != rq[pick].rid) begin
      foreach (rq[k]) $display("  ref[%0d] rid %0d cmd %s issued %0d", k, rq[k].rid, rq[k].cmd.cmd.name(), rq[k].issued);
      for (int k = 0; k < M; k++) $display("  dut[%0d] v %0d rid %0d cmd %s issued %0d", k, dut.q[k].valid, dut.q[k].rid, dut.q[k].cmd.cmd.name(), dut.q[k].issued);
      $display("  ok act %0d rd %0d wr %0d", act_ok, rd_ok, wr_ok);
    end
    if (pick >= 0 && issue_valid) begin
      check(int'(issue_rid) == rq[pick].rid, $sformatf("issue rid %0d expected %0d", issue_rid, rq[pick].rid));
      check(issue_cmd == rq[pick].cmd, "issue cmd");
    end
    check(rule4_hold == r4, "rule4_hold flag");
    if (data_done) exp_srv[cas_order[0]] = 1;
    if (pick >= 0 && !is_cas(rq[pick].cmd.cmd)) exp_srv[rq[pick].rid] = 1;
    check(serviced == exp_srv, $sformatf("serviced %b expected %b", serviced, exp_srv));
    check(empty == (rq.size() == 0), "empty flag");
    pr = (pick >= 0) ? rq[pick].rid : -1;
    @(posedge clk);
    // advance reference
    if (data_done) begin
      int d = cas_order.pop_front();
      foreach (rq[k]) if (rq[k].rid == d) begin rq.delete(k); break; end
    end
    if (pr >= 0) begin
      foreach (rq[k]) if (rq[k].rid == pr) begin
        if (is_cas(rq[k].cmd.cmd)) begin rq[k].issued = 1; cas_order.push_back(pr); end
        else rq.delete(k);
        break;
      end
    end
    for (int r = 0; r < M; r++) if (enq_valid[r]) rq.push_back('{rid: r, cmd: enq_cmd[r], issued: 0});
    @(negedge clk);
  endtask

  task automatic idle_inputs();
    enq_valid = '0; data_done = 0; data_done_rid = '0;
    for (int r = 0; r < M; r++) enq_cmd[r] = '0;
  endtask

  int n_r4 = 0, n_reorder = 0, n_issue = 0;

  initial begin
    idle_inputs();
    act_ok = 0; rd_ok = 0; wr_ok = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- Part 1: R1 write, R2 read, R3 write
    enq_valid = 8'b0000_1110;
    enq_cmd[1] = '{cmd: CMD_WR, bank: 1, row: 5, col: 0};
    enq_cmd[2] = '{cmd: CMD_RD, bank: 2, row: 5, col: 0};
    enq_cmd[3] = '{cmd: CMD_WR, bank: 3, row: 5, col: 0};
    step();
    idle_inputs();
    wr_ok = 1; rd_ok = 0;
    #0;
    check(issue_valid && issue_rid == 1 && issue_cmd.cmd == CMD_WR, "R1 write issues first");
    step();
    for (int i = 0; i < 10; i++) begin
      #0;
      check(!issue_valid, "R3 write must wait behind the blocked read");
      check(rule4_hold, "Rule 4 holds the ready write");
      step();
    end
    rd_ok = 1; wr_ok = 0;
    #0;
    check(issue_valid && issue_rid == 2 && issue_cmd.cmd == CMD_RD, "R2 read issues second");
    step();
    wr_ok = 1; rd_ok = 0;
    #0;
    check(issue_valid && issue_rid == 3 && issue_cmd.cmd == CMD_WR, "R3 write issues last");
    step();
    // data of the three CASes ends, in order
    for (int i = 0; i < 3; i++) begin
      data_done = 1; data_done_rid = 3'(cas_order[0]);
      step();
      data_done = 0;
    end
    check(empty, "queue empty after part 1");

    // ---------------- Part 2: random traffic against the reference
    for (int c = 0; c < 30000; c++) begin
      idle_inputs();
      act_ok = ($urandom_range(0, 3) != 0);
      rd_ok  = ($urandom_range(0, 2) != 0);
      wr_ok  = ($urandom_range(0, 2) != 0);
      for (int r = 0; r < M; r++)
        if (!present(r) && $urandom_range(0, 3) == 0) begin
          enq_valid[r] = 1;
          enq_cmd[r] = rnd_cmd(r);
        end
      if (cas_order.size() > 0 && $urandom_range(0, 2) == 0) begin
        data_done = 1; data_done_rid = 3'(cas_order[0]);
      end
      #0;
      if (rule4_hold) n_r4++;
      if (reorder) n_reorder++;
      if (issue_valid) n_issue++;
      step();
    end
    check(n_r4 > 0 && n_reorder > 0 && n_issue > 1000, "coverage of Rule 3 and Rule 4");
    $display("coverage: issued=%0d rule4=%0d reorder=%0d", n_issue, n_r4, n_reorder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
