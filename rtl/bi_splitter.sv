// bi_splitter: bank-interleaving access splitter with user auto-precharge.
//
// The memory controller underneath does not interleave banks by itself, so
// every cache-line access granted by the arbiter is split here into
// N_BANKS chunk commands, one per bank (bank 0 first), each carrying the
// same row and burst-aligned column and the auto-precharge flag. A line
// address {row, chunk column} therefore occupies the same row and column in
// all four banks, and each bank is precharged as early as the device allows.
//
// Reads: the master id is queued in a tag FIFO when the read is granted.
// Read chunks come back from the controller in order; four of them are
// assembled into one line, which is returned with the id at the FIFO head.
//
// Interface and timing: gnt_ready is high when no line is being issued, or
// in the cycle the last chunk of the current line is accepted, so lines can
// be issued back to back. One chunk command per cycle at most (cmd_valid /
// cmd_ready, command held stable until accepted). line_rvalid is a one-cycle
// pulse one cycle after the last read chunk arrives. Splitting a line into
// one chunk per bank with auto-precharge follows the source design; the
// chunk order, the command format and the tag FIFO are this design's own.
module bi_splitter
  import pbs_pkg::*;
#(
  parameter int unsigned TAG_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // granted line access from the arbiter / master mux
  input  logic               gnt_valid,
  input  logic [MID_W-1:0]   gnt_id,
  input  line_req_t          gnt_req,
  output logic               gnt_ready,
  // controller user port
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output chunk_cmd_t         cmd,
  input  logic               rd_valid,
  input  logic [CHUNK_W-1:0] rd_data,
  // assembled read lines back to the masters
  output logic               line_rvalid,
  output logic [MID_W-1:0]   line_rid,
  output logic [LINE_W-1:0]  line_rdata,
  output logic               busy
);

  logic              active;
  logic [BANK_W-1:0] chunk;
  line_req_t         cur;
  logic              cmd_fire, last_fire, gnt_fire;

  logic              tag_full, tag_empty;
  logic [MID_W-1:0]  tag_head;

  logic [BANK_W-1:0]               rd_cnt;
  logic [N_BANKS-1:0][CHUNK_W-1:0] rd_buf;

  assign cmd_fire  = cmd_valid && cmd_ready;
  assign last_fire = cmd_fire && (chunk == BANK_W'(N_BANKS - 1));
  assign gnt_ready = (!active || last_fire) && !tag_full;
  assign gnt_fire  = gnt_valid && gnt_ready;
  assign busy      = active;

  assign cmd_valid     = active;
  assign cmd.write     = cur.write;
  assign cmd.autopch   = 1'b1;
  assign cmd.bank      = chunk;
  assign cmd.row       = cur.addr[LINE_AW-1 -: ROW_W];
  assign cmd.col       = {cur.addr[CHUNK_COL_W-1:0], {(COL_W-CHUNK_COL_W){1'b0}}};
  assign cmd.wdata     = cur.wdata[chunk*CHUNK_W +: CHUNK_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      chunk  <= '0;
      cur    <= '0;
    end else begin
      if (gnt_fire) begin
        active <= 1'b1;
        chunk  <= '0;
        cur    <= gnt_req;
      end else if (last_fire) begin
        active <= 1'b0;
        chunk  <= '0;
      end else if (cmd_fire) begin
        chunk  <= chunk + 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH(MID_W), .DEPTH(TAG_DEPTH)) u_tags (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (gnt_fire && !gnt_req.write),
    .wdata (gnt_id),
    .pop   (line_rvalid),
    .rdata (tag_head),
    .full  (tag_full),
    .empty (tag_empty)
  );

  // Read return: gather N_BANKS chunks into one line.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_cnt      <= '0;
      rd_buf      <= '0;
      line_rvalid <= 1'b0;
    end else begin
      line_rvalid <= 1'b0;
      if (rd_valid) begin
        rd_buf[rd_cnt] <= rd_data;
        rd_cnt         <= rd_cnt + 1'b1;
        if (rd_cnt == BANK_W'(N_BANKS - 1)) line_rvalid <= 1'b1;
      end
    end
  end

  assign line_rid   = tag_head;
  assign line_rdata = rd_buf;

  // Commands stay stable until accepted; read data only for granted reads.
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));
  a_rd_tagged: assert property (@(posedge clk) disable iff (!rst_n)
    line_rvalid |-> !tag_empty);

endmodule
