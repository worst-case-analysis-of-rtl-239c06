// Testbench of the private buffer of requestor 3 (bank 3).
//
// The environment stands in for the global FIFO and the data path: it issues
// each offered command after a random 0..4-cycle wait in the FIFO, services
// PRE/ACT on issue and a CAS at the end of its data burst (tRL/tWL + tBUS). It
// sends random loads and stores over four rows, some to a foreign bank, and
// now and then blocks new commands and closes all rows as a refresh would.
// A cycle-accurate reference, written from the open-row policy and the JEDEC
// constraints with issue timestamps, predicts in every cycle:
//  * whether a command is offered (enq_valid) — it must be offered in the
//    first cycle that the buffer is free, a request is waiting, commands are
//    allowed and every own-bank constraint is met (Rule 2), never earlier;
//  * which command (PRE / ACT / RD / WR), bank, row and column;
//  * req_ready (four-entry buffer), rsp_valid / rsp_we / rsp_err, pre_ok,
//    and head_wdata when a write issues.
//
// Rule 2 and the open-row policy follow the design; refusing a foreign-bank
// request is this implementation's choice and is checked too.
module tb_private_buffer;
  import mc_pkg::*;

  localparam int M = 8, RID = 3, DEPTH = 4;
  localparam timing_t TT = DDR3_1333H;
  localparam longint RCD = TT.RCD, RP = TT.RP, RAS = TT.RAS, RC = TT.RC, RTP = TT.RTP,
                     WRT = TT.WL + TT.BUS + TT.WR, WTR = TT.WL + TT.BUS + TT.WTR,
                     RTW = TT.RTW, RL = TT.RL, WL = TT.WL, BUS = TT.BUS;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic req_valid, req_ready, req_we, rsp_valid, rsp_we, rsp_err;
  addr_t req_addr;
  line_t req_wdata, head_wdata;
  logic enq_valid, enq_allow, own_issue, serviced, ref_done, pre_ok;
  dram_cmd_t enq_cmd;

  private_buffer #(.NUM_REQ(M), .RID(RID), .BUF_DEPTH(DEPTH), .T(TT)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_we, .rsp_err, .enq_valid, .enq_cmd, .enq_allow,
    .own_issue, .serviced, .ref_done, .head_wdata, .pre_ok
  );

  int checks = 0, failures = 0;
  longint n = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", n, what);
    end
  endtask

  typedef struct { bit we; bit ok; int row; int cb; line_t d; longint arr; } rq_t;
  rq_t reqq [$];

  bit     open_b = 0;
  int     open_row = 0;
  longint t_pre = -1000, t_act = -1000, t_rd = -1000, t_wr = -1000;
  bit     waiting = 0;
  cmd_e   wcmd;
  longint issue_at, srv_at;
  int     blocked_left = 0;
  bit     ref_pending = 0;
  int     n_cmd [8], n_err = 0, n_full = 0, n_ref = 0, n_stall = 0;

  function automatic addr_t mkaddr(int bank, int row, int cb);
    return addr_t'({bank[BANK_BITS-1:0], row[ROW_BITS-1:0], cb[COL_BITS-4:0], 6'b0});
  endfunction

  function automatic cmd_e next_cmd(rq_t r);
    if (!open_b) return CMD_ACT;
    if (open_row != r.row) return CMD_PRE;
    return r.we ? CMD_WR : CMD_RD;
  endfunction

  function automatic bit cons_ok(cmd_e c);
    case (c)
      CMD_ACT: return (n - t_pre >= RP) && (n - t_act >= RC);
      CMD_PRE: return (n - t_act >= RAS) && (n - t_rd >= RTP) && (n - t_wr >= WRT);
      CMD_RD:  return (n - t_act >= RCD) && (n - t_wr >= WTR);
      default: return (n - t_act >= RCD) && (n - t_rd >= RTW);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) n_cmd[i] = 0;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    enq_allow = 1; own_issue = 0; serviced = 0; ref_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (n = 0; n < 40000; n++) begin
      bit head_here, exp_enq, exp_err, exp_rsp;
      cmd_e nc;
      // ---------------- inputs of this cycle
      own_issue = waiting && (n == issue_at);
      serviced  = waiting && (n == srv_at);
      if (blocked_left == 0 && $urandom_range(0, 599) == 0) begin
        blocked_left = $urandom_range(10, 40); ref_pending = 1;
      end
      enq_allow = (blocked_left == 0);
      ref_done  = 0;
      if (blocked_left == 1 && ref_pending && !waiting) begin
        ref_done = 1; ref_pending = 0; n_ref++;
      end
      if (blocked_left > 0 && (waiting || blocked_left > 1)) blocked_left = (blocked_left > 1) ? blocked_left - 1 : 1;
      else if (blocked_left == 1) blocked_left = 0;
      if (!req_valid || req_ready) begin
        // new request offer (kept until accepted)
        req_valid = ($urandom_range(0, 2) == 0);
        req_we    = ($urandom_range(0, 99) < 40);
        begin
          int bank;
          bank = ($urandom_range(0, 49) == 0) ? 5 : RID;
          req_addr = mkaddr(bank, $urandom_range(0, 3), $urandom_range(0, 127));
        end
        for (int i = 0; i < LINE_BITS / 32; i++) req_wdata[i*32 +: 32] = $urandom;
      end
      #0;
      // ---------------- reference outputs
      head_here = (reqq.size() > 0) && (reqq[0].arr < n);
      exp_err = !waiting && head_here && !reqq[0].ok;
      nc = head_here ? next_cmd(reqq[0]) : CMD_NOP;
      exp_enq = !waiting && head_here && reqq[0].ok && enq_allow && cons_ok(nc);
      exp_rsp = exp_err || (serviced && (wcmd == CMD_RD || wcmd == CMD_WR));
      if (!waiting && head_here && reqq[0].ok && enq_allow && !cons_ok(nc)) n_stall++;

      check(req_ready == (reqq.size() < DEPTH), "req_ready");
      if (!req_ready) n_full++;
      check(enq_valid == exp_enq, $sformatf("enq_valid %0d expected %0d (next %s)", enq_valid, exp_enq, nc.name()));
      if (exp_enq && enq_valid) begin
        check(enq_cmd.cmd == nc, $sformatf("command %s expected %s", enq_cmd.cmd.name(), nc.name()));
        check(enq_cmd.bank == bank_t'(RID) && enq_cmd.row == row_t'(reqq[0].row)
              && enq_cmd.col == col_t'(reqq[0].cb * 8), "command address");
      end
      check(rsp_valid == exp_rsp, "rsp_valid");
      if (exp_rsp && rsp_valid) begin
        check(rsp_err == exp_err, "rsp_err");
        check(rsp_we == reqq[0].we, "rsp_we");
      end
      check(pre_ok == ((n - t_act >= RAS) && (n - t_rd >= RTP) && (n - t_wr >= WRT)), "pre_ok");
      if (own_issue && wcmd == CMD_WR) check(head_wdata == reqq[0].d, "store data at write issue");

      // ---------------- reference update at the clock edge
      if (own_issue) begin
        case (wcmd)
          CMD_PRE: begin open_b = 0; t_pre = n; end
          CMD_ACT: begin open_b = 1; open_row = reqq[0].row; t_act = n; end
          CMD_RD:  t_rd = n;
          CMD_WR:  t_wr = n;
          default: ;
        endcase
      end
      if (ref_done) open_b = 0;
      if (serviced) waiting = 0;
      if (exp_rsp) begin
        if (exp_err) n_err++;
        void'(reqq.pop_front());
      end
      if (exp_enq) begin
        int d;
        d = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 4);
        waiting = 1; wcmd = nc; n_cmd[int'(nc)]++;
        issue_at = n + 1 + d;
        srv_at = (nc == CMD_RD) ? issue_at + RL + BUS - 1 :
                 (nc == CMD_WR) ? issue_at + WL + BUS - 1 : issue_at;
      end
      if (req_valid && req_ready) begin
        rq_t r;
        r.we = req_we; r.ok = (req_addr[30:28] == 3'(RID)); r.row = int'(req_addr[27:13]);
        r.cb = int'(req_addr[12:6]); r.d = req_wdata; r.arr = n;
        reqq.push_back(r);
      end
      @(negedge clk);
    end
    check(n_cmd[int'(CMD_PRE)] > 0 && n_cmd[int'(CMD_ACT)] > 0 && n_cmd[int'(CMD_RD)] > 0 &&
          n_cmd[int'(CMD_WR)] > 0 && n_err > 0 && n_full > 0 && n_ref > 0 && n_stall > 0, "coverage");
    $display("coverage: PRE=%0d ACT=%0d RD=%0d WR=%0d err=%0d full=%0d ref=%0d rule2_stall=%0d",
             n_cmd[int'(CMD_PRE)], n_cmd[int'(CMD_ACT)], n_cmd[int'(CMD_RD)], n_cmd[int'(CMD_WR)],
             n_err, n_full, n_ref, n_stall);
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
