// Testbench of the cross-bank timing tracker.
// A random command stream is issued, each command only when a reference model
// built from issue timestamps says it is legal. Every cycle the tracker's
// act_ok / rd_ok / wr_ok are compared with that model:
//   ACT:   now - last ACT >= tRRD and now - fourth last ACT >= tFAW
//   read:  now >= last write + tWL + tBUS + tWTR, burst start now + tRL after
//          the end of the last reserved burst
//   write: now - last read >= tRTW, burst start now + tWL after it
// It also requires that tFAW alone blocked an ACT at least once.
//
// The constraints are the JEDEC ones the design names; the random stream
// and its read-heavy and write-heavy phases are this testbench's own.
module tb_bus_timing;
  import mc_pkg::*;

  localparam timing_t TT = DDR3_1333H;
  localparam longint RRD = TT.RRD, FAW = TT.FAW, RL = TT.RL, WL = TT.WL, BUS = TT.BUS,
                     WTR = TT.WTR, RTW = TT.RTW;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic issue_valid;
  cmd_e issue_cmd;
  logic act_ok, rd_ok, wr_ok;

  bus_timing #(.T(TT)) dut (.clk, .rst_n, .issue_valid, .issue_cmd, .act_ok, .rd_ok, .wr_ok);

  int checks = 0, failures = 0;
  longint now = 0;
  longint acts [4];
  longint last_rd, last_wr, bus_free;
  int faw_only = 0, n_cmd [5];

  function automatic bit ref_act();
    return (now - acts[0] >= RRD) && (now - acts[3] >= FAW);
  endfunction
  function automatic bit ref_rd();
    return (now >= last_wr + WL + BUS + WTR) && (now + RL >= bus_free);
  endfunction
  function automatic bit ref_wr();
    return (now - last_rd >= RTW) && (now + WL >= bus_free);
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) acts[i] = -1000;
    last_rd = -1000; last_wr = -1000; bus_free = 0;
    for (int i = 0; i < 5; i++) n_cmd[i] = 0;
    issue_valid = 0; issue_cmd = CMD_NOP;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int pick;
      @(negedge clk);
      checks++;
      if (act_ok != ref_act() || rd_ok != ref_rd() || wr_ok != ref_wr()) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: act %0d/%0d rd %0d/%0d wr %0d/%0d",
                                    now, act_ok, ref_act(), rd_ok, ref_rd(), wr_ok, ref_wr());
      end
      if ((now - acts[0] >= RRD) && !(now - acts[3] >= FAW)) faw_only++;
      // choose a command; bias towards ACT bursts so tFAW matters
      pick = $urandom_range(0, 9);
      issue_valid = 0; issue_cmd = CMD_NOP;
      if (pick < 4 && ref_act()) begin
        issue_valid = 1; issue_cmd = CMD_ACT;
        for (int i = 3; i > 0; i--) acts[i] = acts[i-1];
        acts[0] = now; n_cmd[0]++;
      end else if (((pick < 8) == ((c / 300) % 2 == 0)) && pick < 9 && ref_rd()) begin
        issue_valid = 1; issue_cmd = CMD_RD;
        last_rd = now; bus_free = now + RL + BUS; n_cmd[1]++;
      end else if (((pick < 8) == ((c / 300) % 2 == 1)) && pick < 9 && ref_wr()) begin
        issue_valid = 1; issue_cmd = CMD_WR;
        last_wr = now; bus_free = now + WL + BUS; n_cmd[2]++;
      end else if (pick == 9) begin
        issue_valid = 1; issue_cmd = CMD_PRE; n_cmd[3]++;
      end
      @(posedge clk);
      now++;
    end
    checks++;
    if (faw_only == 0 || n_cmd[0] == 0 || n_cmd[1] == 0 || n_cmd[2] == 0) begin
      failures++;
      $display("FAIL coverage: faw_only=%0d act=%0d rd=%0d wr=%0d", faw_only, n_cmd[0], n_cmd[1], n_cmd[2]);
    end
    $display("coverage: faw_only=%0d act=%0d rd=%0d wr=%0d pre=%0d", faw_only, n_cmd[0], n_cmd[1], n_cmd[2], n_cmd[3]);
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
