// Testbench of the refresh controller (DDR3-1333H: tREFI = 5200, tRFC = 107,
// tRP = 9 cycles). The environment keeps the global FIFO non-empty, the data
// bus busy and the banks not yet ready for precharge for random stretches.
// Checked:
//  * one refresh falls due every tREFI cycles and every due refresh is served
//    (REF count after eight periods);
//  * new commands are blocked (enq_allow low) from one cycle after the refresh
//    falls due until it has finished, and allowed otherwise;
//  * PREA is issued only when the FIFO is empty, the data bus idle and every
//    bank may be precharged, and in the first such cycle;
//  * REF follows PREA after exactly tRP, ref_done follows REF after exactly tRFC;
//  * no other command is ever issued.
//
// tREFI and tRFC follow the design; the drain and the precharge-all before
// REF are this implementation's choices and are checked too.
module tb_refresh_ctrl;
  import mc_pkg::*;

  localparam timing_t TT = DDR3_1333H;
  localparam longint REFI = TT.REFI, RP = TT.RP, RFC = TT.RFC;
  localparam int PERIODS = 8;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic fifo_empty, data_busy, all_pre_ok, enq_allow, cmd_valid, ref_done, refreshing;
  cmd_e cmd;

  refresh_ctrl #(.T(TT)) dut (
    .clk, .rst_n, .fifo_empty, .data_busy, .all_pre_ok,
    .enq_allow, .cmd_valid, .cmd, .ref_done, .refreshing
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

  longint t_due = -1, t_prea = -1, t_ref = -1;
  int n_ref = 0, n_prea = 0, n_done = 0, n_wait_drain = 0;
  bit in_ref = 0;

  initial begin
    int hold_cnt;
    fifo_empty = 1; data_busy = 0; all_pre_ok = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    hold_cnt = 0;
    for (n = 0; n < PERIODS * REFI + 400; n++) begin
      bit cond;
      // environment: random stretches of "not ready"
      if (hold_cnt == 0) begin
        hold_cnt = $urandom_range(1, 60);
        fifo_empty = ($urandom_range(0, 2) != 0);
        data_busy  = ($urandom_range(0, 3) == 0);
        all_pre_ok = ($urandom_range(0, 3) != 0);
      end
      hold_cnt--;
      #0;
      cond = fifo_empty && !data_busy && all_pre_ok;

      if (n % REFI == REFI - 1) begin
        check(!in_ref, "previous refresh finished before the next one is due");
        t_due = n; in_ref = 1;
      end
      // enq_allow: low from t_due + 1 until ref_done
      if (in_ref && n > t_due) check(!enq_allow, "enq_allow low while a refresh is pending");
      if (!in_ref) check(enq_allow, "enq_allow high without a refresh");
      check(refreshing == (in_ref && n > t_due + 1), "refreshing flag");

      // commands
      if (in_ref && t_prea < t_due && n > t_due + 1 && cond) begin
        check(cmd_valid && cmd == CMD_PREA, "PREA in the first cycle the banks can be closed");
        t_prea = n; n_prea++;
      end else if (in_ref && t_prea > t_due && n == t_prea + RP) begin
        check(cmd_valid && cmd == CMD_REF, "REF exactly tRP after PREA");
        t_ref = n; n_ref++;
      end else begin
        check(!cmd_valid, "no command outside the refresh sequence");
      end
      if (in_ref && t_prea < t_due && n > t_due + 1 && !cond) n_wait_drain++;
      if (in_ref && t_ref > t_due && n == t_ref + RFC) begin
        check(ref_done, "ref_done exactly tRFC after REF");
        n_done++;
        in_ref = 0;
      end else check(!ref_done, "no ref_done outside");
      @(negedge clk);
    end
    check(n_ref == PERIODS && n_done == PERIODS && n_prea == PERIODS, $sformatf("refresh count %0d/%0d/%0d", n_prea, n_ref, n_done));
    check(n_wait_drain > 0, "coverage: a refresh waited for the drain");
    $display("coverage: prea=%0d ref=%0d done=%0d drain_wait_cycles=%0d", n_prea, n_ref, n_done, n_wait_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIODS * REFI + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
