// tb_pbs_mem_system: end-to-end run of the memory system at its default
// (equal-density) configuration: six masters, budget 4 each, priorities 6..1,
// mean on-chip gap 8 cycles, 2048 alternating random line accesses per master,
// tREFI 975 cycles, against a behavioural model of the SDRAM controller and
// device. pbs_monitor checks arbitration, splitting, data and refresh
// throughout, counts every mechanism and prints each master's observed
// execution time. Runs to completion (about 150 000 cycles).
module tb_pbs_mem_system;
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

  pbs_mem_system dut (.*);

  sdram_ctrl_model u_mem (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rd_valid, .rd_data,
    .ref_req, .ref_ack, .refreshing
  );

  pbs_monitor u_mon (
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
