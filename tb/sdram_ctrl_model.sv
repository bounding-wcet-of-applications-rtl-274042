// sdram_ctrl_model: behavioural model of the SDRAM controller plus DDR2 device
// as seen from the controller's user port. Not synthesizable logic; used by
// the system testbenches only.
//
// Chunk commands enter a QDEPTH-deep command queue. The queue is served in
// order; each chunk occupies the command bus CCD cycles, and the first chunk
// of a line whose direction differs from the previous line pays a turnaround
// penalty, so that a line costs 8 cycles in a steady stream, 10 cycles for a
// write after a read and 13 cycles for a read after a write (the worst-case
// command widths of the memory system). Read data for a chunk comes back
// RD_LAT cycles after its command is served, in order. Data is kept in a
// sparse memory keyed by {bank,row,col}; never-written words read as their
// own key. A refresh starts once ref_req is high and the queue and bus are
// idle, keeps the port not ready for TRFC cycles and ends with a one-cycle
// ref_ack.
module sdram_ctrl_model
  import pbs_pkg::*;
#(
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned CCD       = 2,
  parameter int unsigned WR2RD_PEN = WC_RD_CMD_WD - N_BANKS * 2,
  parameter int unsigned RD2WR_PEN = WC_WR_CMD_WD - N_BANKS * 2,
  parameter int unsigned RD_LAT    = WC_RD_LAT,
  parameter int unsigned TRFC      = TRFC_CYC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  chunk_cmd_t         cmd,
  output logic               rd_valid,
  output logic [CHUNK_W-1:0] rd_data,
  input  logic               ref_req,
  output logic               ref_ack,
  output logic               refreshing
);

  chunk_cmd_t q [$];
  logic [CHUNK_W-1:0] mem [logic [31:0]];
  logic [RD_LAT-1:0]               pipe_v;
  logic [RD_LAT-1:0][CHUNK_W-1:0]  pipe_d;
  int unsigned bus_wait;
  int unsigned ref_cnt;
  logic        last_write;

  assign cmd_ready = (q.size() < QDEPTH) && !refreshing;
  assign rd_valid  = pipe_v[RD_LAT-1];
  assign rd_data   = pipe_d[RD_LAT-1];

  function automatic logic [31:0] key(input chunk_cmd_t c);
    return 32'({c.bank, c.row, c.col});
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      pipe_v     <= '0;
      pipe_d     <= '0;
      bus_wait   <= 0;
      ref_cnt    <= 0;
      refreshing <= 1'b0;
      ref_ack    <= 1'b0;
      last_write <= 1'b0;
    end else begin
      logic               new_v;
      logic [CHUNK_W-1:0] new_d;
      chunk_cmd_t         c;
      new_v   = 1'b0;
      new_d   = '0;
      ref_ack <= 1'b0;

      if (cmd_valid && cmd_ready) q.push_back(cmd);

      if (refreshing) begin
        if (ref_cnt <= 1) begin
          refreshing <= 1'b0;
          ref_ack    <= 1'b1;
        end
        ref_cnt <= ref_cnt - 1;
      end else if (bus_wait > 1) begin
        bus_wait <= bus_wait - 1;
      end else if (q.size() > 0) begin
        c = q.pop_front();
        bus_wait <= CCD;
        if (c.bank == '0 && c.write != last_write)
          bus_wait <= CCD + (c.write ? RD2WR_PEN : WR2RD_PEN);
        last_write <= c.write;
        if (c.write) mem[key(c)] = c.wdata;
        else begin
          new_v = 1'b1;
          new_d = mem.exists(key(c)) ? mem[key(c)] : CHUNK_W'(key(c));
        end
      end else begin
        bus_wait <= 0;
        if (ref_req && !ref_ack && !(cmd_valid && cmd_ready)) begin
          refreshing <= 1'b1;
          ref_cnt    <= TRFC;
        end
      end

      pipe_v <= {pipe_v[RD_LAT-2:0], new_v};
      pipe_d <= {pipe_d[RD_LAT-2:0], new_d};
    end
  end

endmodule
