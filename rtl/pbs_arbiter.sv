// pbs_arbiter: Priority Based Budget Scheduler for one shared memory port.
//
// Every master has a fixed priority and a fixed budget, both set at design
// time through parameters. Among the masters that request and still have
// budget left (the eligible ones), the one with the highest priority (lowest
// PRIO value, 1 = highest) is offered the port. A grant fires when the
// downstream splitter is ready; that master's budget then drops by one. A
// master whose budget is zero is not eligible and waits, even if the port is
// idle, until the replenishment period ends. The replenishment period is
//   RP = CMD_WD * sum(BUDGET)   cycles (CMD_WD = worst-case command width),
// counted by a free-running counter from reset; on its last cycle all budgets
// are restored (a grant in that cycle is still served, the restore wins).
// `hold` closes the port for everybody (used by the refresh controller).
//
// Interface: req[i] is level-sensitive and must stay high until gnt[i].
// gnt_valid/gnt_id are combinational from req and the budget registers;
// gnt is one-hot and only high in the cycle the grant fires.
// Policy, budget and period follow the source design; the ready/valid
// handshake and the tie-break (lower index wins between equal priorities)
// are this implementation's choices.
module pbs_arbiter
  import pbs_pkg::*;
#(
  parameter int unsigned N              = N_MASTERS,
  parameter int unsigned BUDGET [N]     = '{4, 4, 4, 4, 4, 4},
  parameter int unsigned PRIO [N]       = '{6, 5, 4, 3, 2, 1},
  parameter int unsigned CMD_WD         = WC_CMD_WD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           req,
  input  logic                   hold,
  input  logic                   gnt_ready,
  output logic                   gnt_valid,
  output logic [$clog2(N)-1:0]   gnt_id,
  output logic [N-1:0]           gnt,
  output logic [N-1:0]           eligible,
  output logic                   replenish,
  output logic [N-1:0][BUD_W-1:0] budget_left
);

  function automatic int unsigned total_budget();
    int unsigned s = 0;
    for (int i = 0; i < N; i++) s += BUDGET[i];
    return s;
  endfunction

  localparam int unsigned RP   = CMD_WD * total_budget();
  localparam int unsigned RP_W = $clog2(RP + 1);

  logic [RP_W-1:0]           rp_cnt;
  logic [N-1:0][BUD_W-1:0]   budget_q;
  logic [N-1:0]              cand;
  logic                      found;
  logic [$clog2(N)-1:0]      best_id;
  int unsigned               best_p;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      eligible[i] = (budget_q[i] != '0);
      cand[i]     = req[i] && eligible[i];
    end
  end

  // Highest priority among eligible requesters.
  always_comb begin
    found   = 1'b0;
    best_id = '0;
    best_p  = 0;
    for (int i = 0; i < N; i++) begin
      if (cand[i] && (!found || PRIO[i] < best_p)) begin
        found   = 1'b1;
        best_id = ($clog2(N))'(i);
        best_p  = PRIO[i];
      end
    end
  end

  assign gnt_valid = found && !hold;
  assign gnt_id    = best_id;

  always_comb begin
    gnt = '0;
    if (gnt_valid && gnt_ready) gnt[best_id] = 1'b1;
  end

  assign replenish   = (rp_cnt == RP_W'(RP - 1));
  assign budget_left = budget_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp_cnt <= '0;
      for (int i = 0; i < N; i++) budget_q[i] <= BUD_W'(BUDGET[i]);
    end else begin
      rp_cnt <= replenish ? '0 : rp_cnt + 1'b1;
      for (int i = 0; i < N; i++) begin
        if (replenish)   budget_q[i] <= BUD_W'(BUDGET[i]);
        else if (gnt[i]) budget_q[i] <= budget_q[i] - 1'b1;
      end
    end
  end

  // A grant goes to exactly one requesting master that still has budget.
  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(gnt));
  a_gnt_eligible: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt & ~(req & eligible)) == '0);
  a_gnt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    hold |-> (gnt == '0));

endmodule
