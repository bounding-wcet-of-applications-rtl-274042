// tb_workload_incr: the incremental-density workload. Budgets 32,16,8,4,2,1
// and mean on-chip gaps 1,2,4,8,8,16 cycles for master1..master6, master1
// lowest priority; each master makes 100 x its budget alternating random line
// accesses (3200 down to 100). Same controller model and scoreboard as the
// default-configuration test; prints each master's observed execution time.
module tb_workload_incr;
  import pbs_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic cmd_valid, cmd_ready, rd_valid, ref_req, ref_ack, refreshing;
  chunk_cmd_t cmd;
  logic [CHUNK_W-1:0] rd_data;
  logic [N_MASTERS-1:0] done, eligible;
  logic [N_MASTERS-1:0][31:0] exec_cycles, acc_count, rd_checksum;
  logic [N_MASTERS-1:0][BUD_W-1:0] budget_left;
  logic [31:0] refresh_count;
  logic replenish, port_closed, split_busy;
  logic [N_MASTERS-1:0] trace_req, trace_gnt;
  line_req_t trace_gnt_line;
  logic trace_gnt_ready, trace_rvalid;
  logic [MID_W-1:0] trace_rid;
  logic [LINE_W-1:0] trace_rdata;
  logic finish_now = 0, timed_out = 0, report_done;

  localparam int unsigned BUD [N_MASTERS] = '{32, 16, 8, 4, 2, 1};
  localparam int unsigned PRI [N_MASTERS] = '{6, 5, 4, 3, 2, 1};
  localparam int unsigned OCP [N_MASTERS] = '{1, 2, 4, 8, 8, 16};
  localparam int unsigned TOT [N_MASTERS] = '{3200, 1600, 800, 400, 200, 100};

  pbs_mem_system #(.BUDGET(BUD), .PRIO(PRI), .AVG_OCP(OCP), .TOTAL(TOT)) dut (.*);

  sdram_ctrl_model u_mem (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rd_valid, .rd_data,
    .ref_req, .ref_ack, .refreshing
  );

  pbs_monitor #(.BUDGET(BUD), .PRIO(PRI), .TOTAL(TOT)) u_mon (
    .clk, .rst_n,
    .m_req       (trace_req),
    .m_ack       (trace_gnt),
    .gnt_req     (trace_gnt_line),
    .gnt_ready   (trace_gnt_ready),
    .cmd_valid, .cmd_ready, .cmd,
    .line_rvalid (trace_rvalid),
    .line_rid    (trace_rid),
    .line_rdata  (trace_rdata),
    .ref_req, .ref_ack, .port_closed, .replenish, .done, .exec_cycles,
    .acc_count, .rd_checksum, .refresh_count, .finish_now, .timed_out,
    .report_done
  );

  initial begin
    wait (report_done);
    $finish;
  end

  always #4 clk = ~clk;   // 125 MHz

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (2) @(posedge clk);
    #2 start = 1;
    @(posedge clk);
    #2 start = 0;
    wait (&done);
    repeat (50) @(posedge clk);
    finish_now = 1;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    timed_out  = 1;
    finish_now = 1;
  end
endmodule
