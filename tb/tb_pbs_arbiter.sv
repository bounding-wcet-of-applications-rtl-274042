// tb_pbs_arbiter: self-checking test of the Priority Based Budget Scheduler.
//
// Drives random requests, random downstream readiness and occasional hold
// periods into the arbiter with the incremental-density budgets
// {32,16,8,4,2,1} and priorities {6..1}. A reference model kept in this
// testbench (its own budget counters and period counter) predicts, every
// cycle, which master must be granted; the arbiter's grant, eligibility and
// replenish pulse are compared with it. The replenishment period must be
// exactly 12 * 63 = 756 cycles. Also counts the situations the scheduler is
// there for: priority conflicts, masters waiting with an exhausted budget,
// and grants blocked by hold.
module tb_pbs_arbiter;
  import pbs_pkg::*;

  localparam int unsigned N = 6;
  localparam int unsigned BUD [N] = '{32, 16, 8, 4, 2, 1};
  localparam int unsigned PRI [N] = '{6, 5, 4, 3, 2, 1};
  localparam int unsigned RP = 12 * 63;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic hold, gnt_ready, gnt_valid, replenish;
  logic [$clog2(N)-1:0] gnt_id;
  logic [N-1:0] gnt, eligible;
  logic [N-1:0][BUD_W-1:0] budget_left;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_exhausted = 0, n_held = 0, n_repl = 0;
  int model_bud [N];
  int cyc = 0, last_repl = -1;

  pbs_arbiter #(.N(N), .BUDGET(BUD), .PRIO(PRI)) dut (
    .clk, .rst_n, .req, .hold, .gnt_ready, .gnt_valid, .gnt_id, .gnt,
    .eligible, .replenish, .budget_left
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Reference prediction, evaluated just before the clock edge.
  logic [N-1:0] prev_gnt = '0;

  always @(negedge clk) if (rst_n) begin
    int best, nreq;
    logic [N-1:0] exp_gnt;
    // new stimulus for this cycle; a request stays until it is granted
    for (int i = 0; i < N; i++)
      if (prev_gnt[i] || !req[i]) req[i] = ($urandom_range(0, 99) < 45);
    hold      = ($urandom_range(0, 99) < 5);
    gnt_ready = ($urandom_range(0, 99) < 70);
    #1;
    best = -1; nreq = 0; exp_gnt = '0;
    for (int i = 0; i < N; i++) begin
      if (req[i] && model_bud[i] > 0) begin
        nreq++;
        if (best < 0 || PRI[i] < PRI[best]) best = i;
      end
      if (req[i] && model_bud[i] == 0) n_exhausted++;
      check(eligible[i] == (model_bud[i] > 0), "eligible");
    end
    if (nreq > 1 && !hold && gnt_ready) n_conflict++;
    if (best >= 0 && hold) n_held++;
    if (best >= 0 && !hold && gnt_ready) exp_gnt[best] = 1'b1;
    check(gnt == exp_gnt, $sformatf("grant %b expected %b", gnt, exp_gnt));
    check(gnt_valid == (best >= 0 && !hold), "gnt_valid");
    check(replenish == ((cyc % RP) == RP - 1), "replenish timing");
    // update model for the coming edge
    for (int i = 0; i < N; i++) begin
      if ((cyc % RP) == RP - 1) model_bud[i] = BUD[i];
      else if (exp_gnt[i]) model_bud[i]--;
    end
    if (replenish) begin
      if (last_repl >= 0) check(cyc - last_repl == RP, "period length");
      last_repl = cyc;
      n_repl++;
    end
    prev_gnt = exp_gnt;
    cyc++;
  end

  initial begin
    req = '0; hold = 0; gnt_ready = 1;
    for (int i = 0; i < N; i++) model_bud[i] = BUD[i];
    repeat (3) @(posedge clk);
    @(posedge clk); #2 rst_n = 1;
    wait (cyc == 8 * RP + 10);
    check(n_repl == 8, "number of periods");
    check(n_conflict > 0, "priority conflicts seen");
    check(n_exhausted > 0, "budget exhaustion seen");
    check(n_held > 0, "hold seen");
    $display("conflicts=%0d exhausted=%0d held=%0d periods=%0d", n_conflict, n_exhausted, n_held, n_repl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
