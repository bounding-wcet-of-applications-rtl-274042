// pbs_mem_system: six traffic-generating masters sharing one DDR2 SDRAM through
// a Priority Based Budget Scheduler, bank-interleaved accesses and
// user-controlled refresh.
//
// Structure (left to right): N traffic generators -> pbs_arbiter, which picks
// one line access per grant and multiplexes that master's request into the
// bi_splitter -> the splitter turns the line into one auto-precharged chunk
// command per bank at the controller user port ("point 1") -> the SDRAM
// controller and DDR2 device, which sit outside this module. Read chunks
// coming back are assembled into lines and routed to the master that asked.
// refresh_ctrl closes the arbiter's port shortly before every tREFI and then
// asks the controller for a refresh, so refreshes happen at fixed times.
//
// Ports: start launches all generators at once. The controller user port is
// cmd_valid/cmd_ready/cmd (one chunk command per handshake), rd_valid/rd_data
// (read chunks in command order) and ref_req/ref_ack. Per-master status: done,
// observed execution time in cycles, completed accesses and a read checksum;
// arbiter state (eligibility, budgets, replenish pulse, port closed) for monitoring.
// The trace_* ports expose the masters' requests, each grant with the granted
// line, and every read line with its master, for measurement and checking.
// Defaults are the equal-density configuration: budget 4 per master, priority
// 6 (master1, lowest) to 1 (master6, highest), mean gap 8 cycles and 2048
// alternating accesses per master. Index 0 is master1.
module pbs_mem_system
  import pbs_pkg::*;
#(
  parameter int unsigned BUDGET [N_MASTERS]  = '{4, 4, 4, 4, 4, 4},
  parameter int unsigned PRIO [N_MASTERS]    = '{6, 5, 4, 3, 2, 1},
  parameter int unsigned AVG_OCP [N_MASTERS] = '{8, 8, 8, 8, 8, 8},
  parameter int unsigned TOTAL [N_MASTERS]   = '{2048, 2048, 2048, 2048, 2048, 2048},
  parameter int unsigned TREFI               = TREFI_CYC,
  parameter int unsigned REF_GUARD           = 48,
  parameter int unsigned TAG_DEPTH           = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  // controller user port
  output logic                          cmd_valid,
  input  logic                          cmd_ready,
  output chunk_cmd_t                    cmd,
  input  logic                          rd_valid,
  input  logic [CHUNK_W-1:0]            rd_data,
  output logic                          ref_req,
  input  logic                          ref_ack,
  // status
  output logic [N_MASTERS-1:0]          done,
  output logic [N_MASTERS-1:0][31:0]    exec_cycles,
  output logic [N_MASTERS-1:0][31:0]    acc_count,
  output logic [N_MASTERS-1:0][31:0]    rd_checksum,
  output logic [31:0]                   refresh_count,
  output logic [N_MASTERS-1:0]          eligible,
  output logic [N_MASTERS-1:0][BUD_W-1:0] budget_left,
  output logic                          replenish,
  output logic                          port_closed,
  output logic                          split_busy,
  // trace of the arbitration and read-return points
  output logic [N_MASTERS-1:0]          trace_req,
  output logic [N_MASTERS-1:0]          trace_gnt,
  output line_req_t                     trace_gnt_line,
  output logic                          trace_gnt_ready,
  output logic                          trace_rvalid,
  output logic [MID_W-1:0]              trace_rid,
  output logic [LINE_W-1:0]             trace_rdata
);

  logic [N_MASTERS-1:0]            m_req, m_ack, m_rvalid;
  line_req_t                       m_req_data [N_MASTERS];
  logic                            gnt_valid, gnt_ready;
  logic [MID_W-1:0]                gnt_id;
  logic                            close;
  logic                            line_rvalid;
  logic [MID_W-1:0]                line_rid;
  logic [LINE_W-1:0]               line_rdata;

  for (genvar i = 0; i < N_MASTERS; i++) begin : g_master
    traffic_gen #(
      .MID     (i),
      .TOTAL   (TOTAL[i]),
      .AVG_OCP (AVG_OCP[i]),
      .SEED    (32'h9E37_79B9 * (i + 1))
    ) u_gen (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (start),
      .req         (m_req[i]),
      .req_data    (m_req_data[i]),
      .ack         (m_ack[i]),
      .rvalid      (m_rvalid[i]),
      .rdata       (line_rdata),
      .done        (done[i]),
      .exec_cycles (exec_cycles[i]),
      .acc_count   (acc_count[i]),
      .rd_checksum (rd_checksum[i])
    );
    assign m_rvalid[i] = line_rvalid && (line_rid == MID_W'(i));
  end

  pbs_arbiter #(
    .N      (N_MASTERS),
    .BUDGET (BUDGET),
    .PRIO   (PRIO)
  ) u_arb (
    .clk         (clk),
    .rst_n       (rst_n),
    .req         (m_req),
    .hold        (close),
    .gnt_ready   (gnt_ready),
    .gnt_valid   (gnt_valid),
    .gnt_id      (gnt_id),
    .gnt         (m_ack),
    .eligible    (eligible),
    .replenish   (replenish),
    .budget_left (budget_left)
  );

  bi_splitter #(.TAG_DEPTH(TAG_DEPTH)) u_split (
    .clk         (clk),
    .rst_n       (rst_n),
    .gnt_valid   (gnt_valid),
    .gnt_id      (gnt_id),
    .gnt_req     (m_req_data[gnt_id]),
    .gnt_ready   (gnt_ready),
    .cmd_valid   (cmd_valid),
    .cmd_ready   (cmd_ready),
    .cmd         (cmd),
    .rd_valid    (rd_valid),
    .rd_data     (rd_data),
    .line_rvalid (line_rvalid),
    .line_rid    (line_rid),
    .line_rdata  (line_rdata),
    .busy        (split_busy)
  );

  assign port_closed     = close;
  assign trace_req       = m_req;
  assign trace_gnt       = m_ack;
  assign trace_gnt_line  = m_req_data[gnt_id];
  assign trace_gnt_ready = gnt_ready;
  assign trace_rvalid    = line_rvalid;
  assign trace_rid       = line_rid;
  assign trace_rdata     = line_rdata;

  refresh_ctrl #(.TREFI(TREFI), .GUARD(REF_GUARD)) u_ref (
    .clk           (clk),
    .rst_n         (rst_n),
    .close         (close),
    .ref_req       (ref_req),
    .ref_ack       (ref_ack),
    .refresh_count (refresh_count)
  );

endmodule
