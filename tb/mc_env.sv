// Reusable test environment: the memory controller with NUM_REQ = M, a
// behavioural DDR3 rank, M-1 greedy interfering requestors and one requestor
// under analysis (requestor 0: in-order, one request outstanding).
//
// Requestor 0 issues N0 requests. Each one is a row hit with probability
// HIT_PCT % (same row as its previous request) and otherwise goes to another
// row; it is a store with probability ST_PCT %. Every load's data, every
// completion, and the DRAM timing are checked. Every request that does not
// meet a refresh is checked against the per-request worst-case bound
// t_AC + t_CD for M requestors, plus the controller's own pipeline stages (one
// cycle for the request buffer, one per command for the registered FIFO).
//
// The environment runs on its own clock from time zero and raises `done` when
// finished. It reports its check counts, the number of bounded requests, the
// sum of their latencies and the sum of their bounds, so that the caller can
// compare average latencies with published averages.
//
// The bound follows the per-request latency analysis the controller was
// designed for; the traffic generators are this environment's own.
module mc_env
  import mc_pkg::*;
#(
  parameter int unsigned M       = 4,
  parameter int unsigned N0      = 300,
  parameter int unsigned HIT_PCT = 50,
  parameter int unsigned ST_PCT  = 20,
  parameter timing_t     T       = DDR3_1333H
) (
  output bit     done,
  output int     checks,
  output int     failures,
  output int     n_bounded,
  output longint sum_lat,
  output longint sum_bound
);

  localparam timing_t TT = T;

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

  mem_ctrl #(.NUM_REQ(M), .T(TT)) dut (
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

  initial begin checks = 0; failures = 0; done = 1'b0; n_bounded = 0; sum_lat = 0; sum_bound = 0; end
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ reference
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

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // shadow memory per requestor, and expected responses in order
  line_t shadow [M][addr_t];
  typedef struct { logic we; logic err; line_t exp; } exp_t;
  exp_t  expq [M][$];

  function automatic line_t expect_rd(int r, addr_t a);
    if (shadow[r].exists(a)) return shadow[r][a];
    return init_line(a);
  endfunction

  // Worst-case latency bound of the analysis, in cycles.
  function automatic int bound(bit cur_st, bit cur_close, bit prev_st, bit prev_close);
    int tac, tcd, tprev, tdp, tip, tda, tia, q;
    if (!cur_close) begin
      if (!cur_st && prev_st)      tac = TT.WTR;
      else if (cur_st && !prev_st) tac = (int'(TT.RTW) - int'(TT.RL) - int'(TT.BUS) > 0)
                                         ? int'(TT.RTW) - int'(TT.RL) - int'(TT.BUS) : 0;
      else                         tac = 0;
    end else begin
      q     = prev_close ? 1 : 0;
      tprev = TT.RCD + (prev_st ? TT.WL : TT.RL) + TT.BUS;
      if (!prev_st) tdp = int'(TT.RTP) - int'(TT.RL) - int'(TT.BUS);
      else          tdp = TT.WR;
      if (q * (int'(TT.RAS) - tprev) > tdp) tdp = q * (int'(TT.RAS) - tprev);
      if (tdp < 0) tdp = 0;
      tip = M - 1;
      tda = tdp + tip + TT.RP;
      if (q * (int'(TT.RC) - tprev) > tda) tda = q * (int'(TT.RC) - tprev);
      tia = ((M - 1) / 4) * TT.FAW + ((M - 1) % 4) * TT.RRD;
      tac = tda + tia + TT.RCD;
    end
    if (cur_st) tcd = (M / 2) * (TT.WTR + TT.RTW) + ((M + 1) / 2) * (TT.WL + TT.BUS);
    else        tcd = TT.WTR + TT.RL + TT.BUS + ((M - 1) / 2) * (TT.WTR + TT.RTW)
                      + (M / 2) * (TT.WL + TT.BUS);
    return tac + tcd;
  endfunction

  // ------------------------------------------------------------ mechanisms
  int m_rule4 = 0, m_reorder = 0, m_full = 0, m_drain = 0, m_err = 0;
  int m_hit = 0, m_miss = 0, m_bounded = 0, max_excess = -1000;
  always @(posedge clk) if (rst_n) begin
    if (stat_rule4_hold) m_rule4++;
    if (stat_reorder)    m_reorder++;
    if (req_valid != 0 && (req_valid & ~req_ready) != 0) m_full++;
    if (!dut.enq_allow && !dut.fifo_empty) m_drain++;
  end

  // --------------------------------------------------------- response check
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < M; r++) if (rsp_valid[r]) begin
      if (expq[r].size() == 0) check(0, $sformatf("unexpected response r%0d", r));
      else begin
        exp_t e;
        e = expq[r].pop_front();
        check(rsp_err[r] == e.err, $sformatf("r%0d err flag", r));
        check(rsp_we[r] == e.we, $sformatf("r%0d we flag", r));
        if (!e.we && !e.err) check(rsp_rdata == e.exp, $sformatf("r%0d load data", r));
        if (e.err) m_err++;
      end
    end
  end

  // ------------------------------------------------------------ requestors
  bit stop_others = 0, go_others = 0;
  int issued_other [M];

  // Called at a falling edge; returns at the falling edge after acceptance.
  task automatic drive(int r, bit we, addr_t a, line_t d, bit bad);
    exp_t e;
    req_we[r]    = we;
    req_addr[r]  = a;
    req_wdata[r] = d;
    req_valid[r] = 1'b1;
    while (!req_ready[r]) @(negedge clk);
    @(negedge clk);
    req_valid[r] = 1'b0;
    e.we = we; e.err = bad; e.exp = bad ? '0 : expect_rd(r, a);
    if (we && !bad) shadow[r][a] = d;
    expq[r].push_back(e);
  endtask

  for (genvar g = 1; g < M; g++) begin : g_other
    initial begin
      wait (go_others);
      @(negedge clk);
      while (!stop_others) begin
        int row, cb;
        bit we, bad;
        row = $urandom_range(0, 3);
        cb  = $urandom_range(0, 3);
        we  = ($urandom_range(0, 99) < 45);
        bad = 1'b0;
        drive(g, we, mkaddr(bad ? (g + 1) % NUM_BANKS : g, row, cb), rnd_line(), bad);
        issued_other[g]++;
        if ($urandom_range(0, 9) == 0) repeat ($urandom_range(1, 40)) @(negedge clk);
      end
    end
  end

  // requestor 0: the task under analysis
  longint t_arr;
  bit     hit_refresh;
  always @(negedge clk) if (refreshing || !dut.enq_allow) hit_refresh = 1'b1;

  task automatic one_req0(bit we, int row, int cb, bit prev_st, bit prev_close, bit known,
                          output bit close, output int lat, output bit clean);
    exp_t  e;
    addr_t a;
    line_t d;
    a = mkaddr(0, row, cb);
    d = rnd_line();
    close = !(u_dram.open[0] && u_dram.open_row[0] == row_t'(row));
    req_we[0] = we; req_addr[0] = a; req_wdata[0] = d; req_valid[0] = 1'b1;
    while (!req_ready[0]) @(negedge clk);
    t_arr = cyc;       // request presented and accepted in cycle t_arr
    hit_refresh = refreshing || !dut.enq_allow;
    @(negedge clk);
    req_valid[0] = 1'b0;
    e.we = we; e.err = 0; e.exp = expect_rd(0, a);
    if (we) shadow[0][a] = d;
    expq[0].push_back(e);
    while (!rsp_valid[0]) @(negedge clk);
    lat   = int'(cyc - t_arr) + 1;  // through the end of the last data cycle
    clean = !hit_refresh;
    @(negedge clk);
    if (clean && known) begin
      int b, slack;
      b = bound(we, close, prev_st, prev_close);
      slack = 1 + (close ? 3 : 1);
      check(lat <= b + slack, $sformatf("req0 latency %0d > bound %0d + %0d (st=%0d close=%0d pst=%0d pcl=%0d)",
            lat, b, slack, we, close, prev_st, prev_close));
      if (lat - b > max_excess) max_excess = lat - b;
      m_bounded++;
      n_bounded++;
      sum_lat += lat;
      sum_bound += b;
    end
    if (close) m_miss++; else m_hit++;
  endtask

  initial begin
    bit prev_st, prev_close, known, close, clean;
    int lat, row;
    req_valid = '0; req_we = '0;
    for (int r = 0; r < M; r++) begin req_addr[r] = '0; req_wdata[r] = '0; issued_other[r] = 0; end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    go_others = 1;
    known = 0; prev_st = 1; prev_close = 1; row = 0;
    for (int i = 0; i < N0; i++) begin
      bit we;
      we = ($urandom_range(0, 99) < ST_PCT);
      if ($urandom_range(0, 99) >= HIT_PCT) row = (row + $urandom_range(1, 7)) % 8;
      one_req0(we, row, $urandom_range(0, 7), prev_st, prev_close, known, close, lat, clean);
      prev_st = we; prev_close = close; known = 1;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    stop_others = 1;
    repeat (3000) @(posedge clk);
    for (int r = 0; r < M; r++) check(expq[r].size() == 0, $sformatf("M=%0d r%0d has unanswered requests", M, r));
    check(errors == 0, $sformatf("M=%0d: %0d DRAM timing violations", M, errors));
    check(m_hit > 0 && m_miss > 0, "row hits and misses for requestor 0");
    check(m_bounded > N0 / 2, "most requests of requestor 0 checked against the bound");
    $display("M=%0d RL=%0d: hit=%0d miss=%0d bounded=%0d max(lat-bound)=%0d ACT=%0d RD=%0d WR=%0d REF=%0d",
             M, TT.RL, m_hit, m_miss, m_bounded, max_excess, n_act, n_rd, n_wr, n_ref);
    done = 1'b1;
  end

endmodule
