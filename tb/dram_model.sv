// Behavioural model of one rank of DDR3 DRAM, for simulation only (not
// synthesizable; the real part is a commercial DRAM device).
//
// It takes the controller's command bus and data bus, keeps the state of
// every bank (open row or empty) and the contents written so far, and checks
// every JEDEC constraint the controller has to respect, independently of the
// controller's own bookkeeping:
//   ACT:  bank empty, tRP after PRE/PREA, tRC after the bank's last ACT,
//         tRRD after any ACT, at most four ACTs in tFAW, tRFC after REF
//   PRE:  tRAS after ACT, tRTP after a read, tWR after the end of write data
//   RD:   bank open, tRCD after ACT, tWTR after the end of any write data,
//         no overlap with another burst on the data bus
//   WR:   bank open, tRCD after ACT, tRTW after any read, no bus overlap
//   REF:  every bank empty, tRP after the last precharge
//   any command during tRFC after REF is an error.
// Write data must be driven (dq_oe) exactly in the tBUS cycles that start tWL
// after the write; read data is driven on dq_rd tRL after the read. Both beats
// of a clock travel together on one 2*W_BUS word. A line never written reads
// as init_line(bank, row, col). Every violation increments `errors`.
//
// The constraint set is the JEDEC DDR3 one that the controller relies on; the
// initial-content pattern and the per-cycle schedule are this model's own.
module dram_model
  import mc_pkg::*;
#(
  parameter timing_t T = DDR3_1333H
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dram_cmd_t cmd,
  input  dq_t       dq_wr,
  input  logic      dq_oe,
  output dq_t       dq_rd,
  output int        errors,
  output int        n_act,
  output int        n_pre,
  output int        n_rd,
  output int        n_wr,
  output int        n_prea,
  output int        n_ref
);

  localparam int SCH = 64;
  localparam longint NEVER = -100000;

  typedef logic [31:0] key_t;

  function automatic key_t mkkey(bank_t b, row_t r, col_t c);
    return key_t'({b, r, c});
  endfunction

  line_t mem [key_t];

  logic [NUM_BANKS-1:0] open;
  row_t   open_row  [NUM_BANKS];
  longint last_act  [NUM_BANKS];
  longint last_pre  [NUM_BANKS];
  longint last_rd   [NUM_BANKS];
  longint wr_end    [NUM_BANKS];
  longint act_hist  [4];
  longint last_act_any, last_rd_any, wr_end_any, last_pre_any, last_ref, bus_free;
  longint now;

  // data-bus schedule, indexed by cycle modulo SCH
  logic   s_valid [SCH];
  logic   s_we    [SCH];
  key_t   s_key   [SCH];
  int     s_beat  [SCH];

  localparam int BEATS = LINE_BITS / DQ_BITS;

  function automatic line_t rd_line(key_t k);
    if (mem.exists(k)) return mem[k];
    return init_line(k);
  endfunction

  function automatic line_t init_line(key_t k);
    line_t l;
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = k ^ (32'h9e37_0000 * (i + 1));
    return l;
  endfunction

  task automatic err(string what);
    errors++;
    if (errors <= 20) $display("DRAM VIOLATION @%0d: %s", now, what);
  endtask

  always_comb begin
    int s;
    s = int'(now % SCH);
    dq_rd = '0;
    if (s_valid[s] && !s_we[s]) begin
      line_t l;
      l = rd_line(s_key[s]);
      dq_rd = l[s_beat[s]*DQ_BITS +: DQ_BITS];
    end
  end

  task automatic check_pre(int b);
    if (now - last_act[b] < T.RAS) err($sformatf("tRAS bank %0d", b));
    if (now - last_rd[b]  < T.RTP) err($sformatf("tRTP bank %0d", b));
    if (now - wr_end[b]   < T.WR)  err($sformatf("tWR bank %0d", b));
  endtask

  task automatic schedule(longint start, logic we, key_t k);
    if (start < bus_free) err("data bus overlap");
    for (int i = 0; i < BEATS; i++) begin
      int s;
      s = int'((start + i) % SCH);
      s_valid[s] <= 1'b1;
      s_we[s]    <= we;
      s_key[s]   <= k;
      s_beat[s]  <= i;
    end
    bus_free = start + BEATS;
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0;
      errors = 0;
      n_act = 0; n_pre = 0; n_rd = 0; n_wr = 0; n_prea = 0; n_ref = 0;
      open = '0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        open_row[b] = '0;
        last_act[b] = NEVER; last_pre[b] = NEVER; last_rd[b] = NEVER; wr_end[b] = NEVER;
      end
      for (int i = 0; i < 4; i++) act_hist[i] = NEVER;
      last_act_any = NEVER; last_rd_any = NEVER; wr_end_any = NEVER;
      last_pre_any = NEVER; last_ref = NEVER; bus_free = 0;
      for (int s = 0; s < SCH; s++) s_valid[s] <= 1'b0;
    end else begin
      int s;
      s = int'(now % SCH);
      // data bus of this cycle
      if (s_valid[s]) begin
        if (s_we[s]) begin
          line_t l;
          if (!dq_oe) err("write data not driven");
          l = rd_line(s_key[s]);
          l[s_beat[s]*DQ_BITS +: DQ_BITS] = dq_wr;
          mem[s_key[s]] = l;
        end else if (dq_oe) err("controller drives the bus during a read burst");
        s_valid[s] <= 1'b0;
      end else if (dq_oe) err("controller drives an idle data bus");

      if (cmd.cmd != CMD_NOP && now - last_ref < T.RFC) err("command during tRFC");

      unique case (cmd.cmd)
        CMD_NOP: ;
        CMD_ACT: begin
          int b;
          b = int'(cmd.bank);
          n_act++;
          if (open[b]) err($sformatf("ACT to open bank %0d", b));
          if (now - last_pre[b] < T.RP)  err($sformatf("tRP bank %0d", b));
          if (now - last_act[b] < T.RC)  err($sformatf("tRC bank %0d", b));
          if (now - last_act_any < T.RRD) err("tRRD");
          if (now - act_hist[3] < T.FAW) err("tFAW");
          for (int i = 3; i > 0; i--) act_hist[i] = act_hist[i-1];
          act_hist[0] = now;
          last_act[b] = now; last_act_any = now;
          open[b] = 1'b1; open_row[b] = cmd.row;
        end
        CMD_PRE: begin
          int b;
          b = int'(cmd.bank);
          n_pre++;
          if (open[b]) check_pre(b);
          open[b] = 1'b0;
          last_pre[b] = now; last_pre_any = now;
        end
        CMD_PREA: begin
          n_prea++;
          for (int b = 0; b < NUM_BANKS; b++) begin
            if (open[b]) check_pre(b);
            open[b] = 1'b0;
            last_pre[b] = now;
          end
          last_pre_any = now;
        end
        CMD_REF: begin
          n_ref++;
          if (open != '0) err("REF with a bank open");
          if (now - last_pre_any < T.RP) err("tRP before REF");
          last_ref = now;
        end
        CMD_RD: begin
          int b;
          b = int'(cmd.bank);
          n_rd++;
          if (!open[b] || open_row[b] != cmd.row) err($sformatf("RD to closed row, bank %0d", b));
          if (now - last_act[b] < T.RCD) err($sformatf("tRCD bank %0d", b));
          if (now - wr_end_any < T.WTR) err("tWTR");
          schedule(now + T.RL, 1'b0, mkkey(cmd.bank, cmd.row, cmd.col));
          last_rd[b] = now; last_rd_any = now;
        end
        CMD_WR: begin
          int b;
          b = int'(cmd.bank);
          n_wr++;
          if (!open[b] || open_row[b] != cmd.row) err($sformatf("WR to closed row, bank %0d", b));
          if (now - last_act[b] < T.RCD) err($sformatf("tRCD bank %0d", b));
          if (now - last_rd_any < T.RTW) err("tRTW");
          schedule(now + T.WL, 1'b1, mkkey(cmd.bank, cmd.row, cmd.col));
          wr_end[b] = now + T.WL + T.BUS; wr_end_any = wr_end[b];
        end
        default: err("unknown command");
      endcase
      now <= now + 1;
    end
  end

endmodule
