// Directed worst-case patterns for the memory controller at its default size
// (eight requestors, DDR3-1333H).
//
// The latency bound assumes that, in the worst case, all other requestors
// put a command into the global FIFO in the same cycle as the requestor under
// analysis, which lands last. This testbench builds exactly those situations
// with requestor 7 as the one under analysis (simultaneous offers join the
// FIFO in requestor-index order, so it is last) and checks every command's
// issue cycle against the schedule worked out from the timing rules:
//
//  A. ACT pattern: all banks closed, all eight requestors load at once. ACT k
//     (k = 0..7 in FIFO order) may issue only tRRD after the previous one and
//     tFAW after the one four places earlier, so it issues
//     (k / 4) * tFAW + (k % 4) * tRRD cycles after the first; the last one
//     waits exactly t_IA = floor((M-1)/4) tFAW + ((M-1) mod 4) tRRD.
//  B. Write last: rows open, requestors 0..7 issue R, W, R, W, ... W at once.
//     Each read-write pair costs tRTW from read to write, then tWL + tBUS of
//     write data and tWTR before the next read, so CAS k issues at
//     (k / 2) * (tRTW + tWL + tBUS + tWTR) + (k % 2) * tRTW. No write ends just
//     before the pattern, so the last write ends tWTR earlier than the worst
//     case of t_CD(write).
//  C. Read last: requestors 0..7 issue W, R, W, R, ... R at once. CAS k issues
//     at (k / 2) * (tWL + tBUS + tWTR + tRTW) + (k % 2) * (tWL + tBUS + tWTR)
//     and the read of requestor 7 ends exactly t_CD(read) after the first CAS
//     could issue: this pattern is the worst case for a read.
// Latencies are measured from the clock edge that accepts the request to the
// last data cycle, inclusive. The controller adds PIPE = 2 register stages in
// front of the first command (request buffer, FIFO), which the checks include.
// Loads must return the DRAM's initial contents (no line they read was
// written), and the DRAM model must see no timing violation.
//
// The patterns follow the worst cases of the latency analysis; the register
// allowance PIPE is this implementation's.
module tb_worst_case;
  import mc_pkg::*;

  localparam int      M    = 8;
  localparam timing_t TT   = DDR3_1333H;
  localparam int      PIPE = 2;
  localparam int      WATCHDOG = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [M-1:0] req_valid, req_ready, req_we, rsp_valid, rsp_we, rsp_err;
  addr_t        req_addr  [M];
  line_t        req_wdata [M];
  line_t        rsp_rdata;
  dram_cmd_t    cmd_out;
  dq_t          dq_out, dq_in;
  logic         dq_oe, refreshing, stat_rule4_hold, stat_reorder;

  mem_ctrl dut (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_we, .rsp_err, .rsp_rdata,
    .cmd_out, .dq_out, .dq_oe, .dq_in, .refreshing, .stat_rule4_hold, .stat_reorder
  );

  int errors, n_act, n_pre, n_rd, n_wr, n_prea, n_ref;
  dram_model #(.T(TT)) u_dram (
    .clk, .rst_n, .cmd(cmd_out), .dq_wr(dq_out), .dq_oe, .dq_rd(dq_in),
    .errors, .n_act, .n_pre, .n_rd, .n_wr, .n_prea, .n_ref
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic addr_t mkaddr(int bank, int row, int colburst);
    return addr_t'({bank[BANK_BITS-1:0], row[ROW_BITS-1:0], colburst[COL_BITS-4:0], 6'b0});
  endfunction

  function automatic line_t init_line(addr_t a);
    logic [31:0] k;
    line_t l;
    k = 32'({a[30:28], a[27:13], a[12:6], 3'b000});
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = k ^ (32'h9e37_0000 * (i + 1));
    return l;
  endfunction

  // ------------------------------------------------------------- monitors
  longint t_act [M], t_cas [M], t_done [M];
  line_t  got   [M];
  always @(posedge clk) if (rst_n) begin
    if (cmd_out.cmd == CMD_ACT) t_act[cmd_out.bank] = cyc;
    if (cmd_out.cmd == CMD_RD || cmd_out.cmd == CMD_WR) t_cas[cmd_out.bank] = cyc;
    for (int r = 0; r < M; r++) if (rsp_valid[r]) begin
      t_done[r] = cyc;
      got[r]    = rsp_rdata;
      check(!rsp_err[r], $sformatf("r%0d error flag", r));
      check(rsp_we[r] == req_we[r], $sformatf("r%0d store flag", r));
    end
  end

  // All requestors present a request at the same falling edge; returns after
  // every response. ta is the cyc value of the accepting edge.
  task automatic burst(input logic [M-1:0] we, input int row, input int cb, output longint ta);
    for (int r = 0; r < M; r++) begin
      req_we[r]    = we[r];
      req_addr[r]  = mkaddr(r, row, cb);
      req_wdata[r] = {16{32'hc0de_0000 | 32'(r)}};
      t_done[r]    = -1;
    end
    req_valid = '1;
    ta = cyc;
    check(req_ready == '1, "all private buffers ready");
    @(negedge clk);
    req_valid = '0;
    for (int r = 0; r < M; r++) while (t_done[r] < 0) @(negedge clk);
    for (int r = 0; r < M; r++)
      if (!we[r]) check(got[r] == init_line(mkaddr(r, row, cb)), $sformatf("r%0d load data", r));
    @(negedge clk);
  endtask

  int t_ia, tcd_wr, tcd_rd, pair;
  initial begin
    longint ta;
    req_valid = '0; req_we = '0;
    for (int r = 0; r < M; r++) begin req_addr[r] = '0; req_wdata[r] = '0; end
    t_ia   = ((M - 1) / 4) * TT.FAW + ((M - 1) % 4) * TT.RRD;
    tcd_wr = (M / 2) * (TT.WTR + TT.RTW) + ((M + 1) / 2) * (TT.WL + TT.BUS);
    tcd_rd = TT.WTR + TT.RL + TT.BUS + ((M - 1) / 2) * (TT.WTR + TT.RTW) + (M / 2) * (TT.WL + TT.BUS);
    pair   = TT.RTW + TT.WL + TT.BUS + TT.WTR;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);

    // A: simultaneous ACTs (all loads, banks closed)
    burst('0, 1, 0, ta);
    for (int k = 0; k < M; k++)
      check(t_act[k] - ta == PIPE + (k / 4) * TT.FAW + (k % 4) * TT.RRD,
            $sformatf("A: ACT %0d at +%0d, expected +%0d", k, t_act[k] - ta,
                      PIPE + (k / 4) * TT.FAW + (k % 4) * TT.RRD));
    check(t_act[M-1] - t_act[0] == t_ia, $sformatf("A: last ACT waits %0d, t_IA = %0d", t_act[M-1] - t_act[0], t_ia));
    repeat (100) @(negedge clk);

    // B: alternating R, W, ..., W with the write of requestor 7 last
    burst(8'b1010_1010, 1, 1, ta);
    for (int k = 0; k < M; k++)
      check(t_cas[k] - ta == PIPE + (k / 2) * pair + (k % 2) * TT.RTW,
            $sformatf("B: CAS %0d at +%0d, expected +%0d", k, t_cas[k] - ta, PIPE + (k / 2) * pair + (k % 2) * TT.RTW));
    check(t_done[M-1] - ta + 1 == PIPE + tcd_wr - TT.WTR,
          $sformatf("B: write latency %0d, expected %0d (t_CD(write) %0d less tWTR, plus %0d)",
                    t_done[M-1] - ta + 1, PIPE + tcd_wr - TT.WTR, tcd_wr, PIPE));
    repeat (100) @(negedge clk);

    // C: alternating W, R, ..., R with the read of requestor 7 last
    burst(8'b0101_0101, 1, 2, ta);
    for (int k = 0; k < M; k++)
      check(t_cas[k] - ta == PIPE + (k / 2) * pair + (k % 2) * (TT.WL + TT.BUS + TT.WTR),
            $sformatf("C: CAS %0d at +%0d, expected +%0d", k, t_cas[k] - ta,
                      PIPE + (k / 2) * pair + (k % 2) * (TT.WL + TT.BUS + TT.WTR)));
    check(t_done[M-1] - ta + 1 == PIPE + tcd_rd,
          $sformatf("C: read latency %0d, expected t_CD(read) %0d plus %0d", t_done[M-1] - ta + 1, tcd_rd, PIPE));

    repeat (50) @(negedge clk);
    check(errors == 0, $sformatf("%0d DRAM timing violations", errors));
    check(n_act == M && n_rd == 3 * M / 2 + M / 2 && n_wr == M, "command counts");
    $display("t_IA=%0d t_CD(write)=%0d t_CD(read)=%0d", t_ia, tcd_wr, tcd_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
