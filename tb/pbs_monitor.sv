// pbs_monitor: scoreboard and coverage for the whole memory system, shared by
// the system-level testbenches. It watches the masters' requests and grants,
// the command stream at the controller user port, the read lines returned to
// the masters and the refresh handshake, and checks them against models kept
// here:
//  - arbitration: its own per-period budget counters and period counter; each
//    grant must go to the highest-priority requesting master with budget left,
//    no grant while the port is closed, no idle port while a master is eligible
//    and the splitter is ready, replenish exactly every 12*sum(BUDGET) cycles;
//  - splitting: each granted line must appear as four auto-precharged chunk
//    commands to banks 0..3 with its row, column and data slices;
//  - data: a shadow memory updated by write chunks predicts every read line and
//    the master it goes to, and each master's final read checksum;
//  - refresh: requests exactly TREFI cycles apart, none lost.
// It also counts how often each mechanism happened and fails a mechanism that
// never did. When `finish_now` rises it does the end-of-run checks, prints
// the TB_RESULT line and raises report_done; the testbench then finishes.
module pbs_monitor
  import pbs_pkg::*;
#(
  parameter int unsigned BUDGET [N_MASTERS] = '{4, 4, 4, 4, 4, 4},
  parameter int unsigned PRIO [N_MASTERS]   = '{6, 5, 4, 3, 2, 1},
  parameter int unsigned TOTAL [N_MASTERS]  = '{2048, 2048, 2048, 2048, 2048, 2048},
  parameter int unsigned TREFI              = TREFI_CYC
) (
  input logic                       clk,
  input logic                       rst_n,
  input logic [N_MASTERS-1:0]       m_req,
  input logic [N_MASTERS-1:0]       m_ack,
  input line_req_t                  gnt_req,
  input logic                       gnt_ready,
  input logic                       cmd_valid,
  input logic                       cmd_ready,
  input chunk_cmd_t                 cmd,
  input logic                       line_rvalid,
  input logic [MID_W-1:0]           line_rid,
  input logic [LINE_W-1:0]          line_rdata,
  input logic                       ref_req,
  input logic                       ref_ack,
  input logic                       port_closed,
  input logic                       replenish,
  input logic [N_MASTERS-1:0]       done,
  input logic [N_MASTERS-1:0][31:0] exec_cycles,
  input logic [N_MASTERS-1:0][31:0] acc_count,
  input logic [N_MASTERS-1:0][31:0] rd_checksum,
  input logic [31:0]                refresh_count,
  input logic                       finish_now,
  input logic                       timed_out,
  output logic                      report_done
);

  function automatic int unsigned total_budget();
    int unsigned s = 0;
    for (int i = 0; i < N_MASTERS; i++) s += BUDGET[i];
    return s;
  endfunction
  localparam int unsigned RP = WC_CMD_WD * total_budget();

  int checks = 0, failures = 0, cyc = 0;
  int used [N_MASTERS];
  logic [31:0] csum [N_MASTERS];

  typedef struct { int id; line_req_t r; } acc_t;
  acc_t issued [$];
  int   chunk_k = 0;
  logic [LINE_W-1:0] cur_line;
  logic [CHUNK_W-1:0] shadow [logic [31:0]];
  typedef struct { int id; logic [LINE_W-1:0] d; } exp_t;
  exp_t exp_rd [$];
  int   outstanding_rd = 0;
  int   last_rise = -1, n_rises = 0, n_acks = 0;
  bit   prev_ref = 0, have_dir = 0, last_dir = 0;

  // mechanism counters
  int n_conflict = 0, n_exhausted = 0, n_repl = 0, n_closed = 0;
  int n_switch = 0, n_b2b = 0, n_bp = 0, n_multi_rd = 0, n_lines = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    report_done = 1'b0;
    for (int i = 0; i < N_MASTERS; i++) begin used[i] = 0; csum[i] = '0; end
  end

  always @(posedge clk) if (rst_n) begin
    int best, nelig;
    bit exhausted_wait;
    // ---------------- arbitration
    best = -1; nelig = 0; exhausted_wait = 0;
    for (int i = 0; i < N_MASTERS; i++) begin
      if (m_req[i] && used[i] < BUDGET[i]) begin
        nelig++;
        if (best < 0 || PRIO[i] < PRIO[best]) best = i;
      end
      if (m_req[i] && used[i] >= BUDGET[i]) exhausted_wait = 1;
    end
    if (exhausted_wait) n_exhausted++;
    check($onehot0(m_ack), "one grant at a time");
    if (m_ack != '0) begin
      check(!port_closed, "grant while port closed");
      check(best >= 0 && m_ack[best], $sformatf("grant %b, expected master index %0d", m_ack, best));
      if (nelig > 1) n_conflict++;
      for (int i = 0; i < N_MASTERS; i++) if (m_ack[i]) begin
        used[i]++;
        issued.push_back('{i, gnt_req});
        if (cmd_valid && cmd_ready && chunk_k == N_BANKS - 1) n_b2b++;
      end
    end else if (best >= 0) begin
      if (port_closed) n_closed++;
      else check(!gnt_ready, "port idle while a master is eligible");
    end
    check(replenish == ((cyc % RP) == RP - 1), "replenishment period");
    if (replenish) begin
      n_repl++;
      for (int i = 0; i < N_MASTERS; i++) used[i] = 0;
    end
    // ---------------- command stream
    if (cmd_valid && !cmd_ready) n_bp++;
    if (cmd_valid && cmd_ready) begin
      acc_t a;
      logic [31:0] k;
      check(issued.size() > 0, "command without grant");
      if (issued.size() > 0) begin
        a = issued[0];
        check(cmd.bank == BANK_W'(chunk_k), "bank order");
        check(cmd.autopch, "auto precharge");
        check(cmd.write == a.r.write, "direction");
        check(cmd.row == a.r.addr[LINE_AW-1 -: ROW_W], "row");
        check(cmd.col == {a.r.addr[CHUNK_COL_W-1:0], {(COL_W-CHUNK_COL_W){1'b0}}}, "column");
        k = 32'({cmd.bank, cmd.row, cmd.col});
        if (cmd.write) begin
          check(cmd.wdata == a.r.wdata[chunk_k*CHUNK_W +: CHUNK_W], "write slice");
          shadow[k] = cmd.wdata;
        end else begin
          cur_line[chunk_k*CHUNK_W +: CHUNK_W] = shadow.exists(k) ? shadow[k] : CHUNK_W'(k);
        end
        if (chunk_k == 0) begin
          if (have_dir && last_dir != cmd.write) n_switch++;
          have_dir = 1; last_dir = cmd.write;
        end
        if (chunk_k == N_BANKS - 1) begin
          if (!a.r.write) begin
            exp_rd.push_back('{a.id, cur_line});
            outstanding_rd++;
            if (outstanding_rd > 1) n_multi_rd++;
          end
          void'(issued.pop_front());
          chunk_k = 0;
          n_lines++;
        end else chunk_k++;
      end
    end
    // ---------------- read return
    if (line_rvalid) begin
      check(exp_rd.size() > 0, "unexpected read line");
      if (exp_rd.size() > 0) begin
        check(int'(line_rid) == exp_rd[0].id, "read routed to wrong master");
        check(line_rdata == exp_rd[0].d, "read data");
        for (int w = 0; w < LINE_W / 32; w++) csum[exp_rd[0].id] ^= exp_rd[0].d[w*32 +: 32];
        void'(exp_rd.pop_front());
        outstanding_rd--;
      end
    end
    // ---------------- refresh
    if (ref_req && !prev_ref) begin
      if (last_rise >= 0) check(cyc - last_rise == TREFI, "refresh spacing");
      check(port_closed, "port closed at refresh");
      last_rise = cyc;
      n_rises++;
    end
    if (ref_req && ref_ack) n_acks++;
    prev_ref = ref_req;
    cyc++;
  end

  always @(posedge finish_now) begin
    check(!timed_out, "finished before the watchdog");
    for (int i = 0; i < N_MASTERS; i++) begin
      check(done[i], $sformatf("master%0d done", i + 1));
      check(acc_count[i] == TOTAL[i], $sformatf("master%0d access count", i + 1));
      check(rd_checksum[i] == csum[i], $sformatf("master%0d read checksum", i + 1));
      check(exec_cycles[i] >= 2 * TOTAL[i], $sformatf("master%0d execution time", i + 1));
      $display("master%0d: accesses=%0d OET=%0d cycles", i + 1, acc_count[i], exec_cycles[i]);
    end
    check(exp_rd.size() == 0 && issued.size() == 0, "nothing left in flight");
    check(refresh_count == 32'(n_acks), "refresh count");
    check(n_rises >= cyc / TREFI - 1, "refresh every interval");
    $display("mechanisms: priority_conflicts=%0d budget_exhausted_waits=%0d replenishments=%0d",
             n_conflict, n_exhausted, n_repl);
    $display("            refreshes=%0d closed_port_waits=%0d rw_switches=%0d back_to_back=%0d",
             n_acks, n_closed, n_switch, n_b2b);
    $display("            controller_backpressure=%0d overlapping_reads=%0d lines=%0d cycles=%0d",
             n_bp, n_multi_rd, n_lines, cyc);
    check(n_conflict > 0, "priority conflict happened");
    check(n_exhausted > 0, "budget exhaustion happened");
    check(n_repl > 0, "replenishment happened");
    check(n_acks > 0, "refresh happened");
    check(n_closed > 0, "port closing happened");
    check(n_switch > 0, "read/write switch happened");
    check(n_b2b > 0, "back-to-back line issue happened");
    check(n_bp > 0, "controller backpressure happened");
    check(n_multi_rd > 0, "overlapping reads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    report_done = 1'b1;
  end

endmodule
