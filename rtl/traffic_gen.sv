// traffic_gen: hardware traffic generator standing in for one processing core.
//
// It models an application that alternates on-chip processing with cache-line
// accesses to the shared SDRAM: after `start` it waits an OnChipProcTime,
// issues one line access, and repeats until TOTAL accesses are done. Accesses
// alternate write, read, write, ... and go to pseudo-random line addresses.
// The OnChipProcTime of each gap is pseudo-random with mean AVG_OCP + 0.5
// cycles: 1 + (r mod 2*AVG_OCP) where r is the random word (AVG_OCP must be a
// power of two). A write completes when the arbiter accepts it (the master
// proceeds while data moves into the controller); a read completes when its
// line comes back, and the core stalls until then. exec_cycles counts from
// start to completion of the last access: the observed execution time.
//
// Interface: req/req_data held until ack (one-cycle grant pulse). rvalid is
// the read-return pulse already filtered for this master. done stays high.
// Write data is {master id, access number, random bits} repeated over the line;
// rd_checksum is the XOR of every 32-bit word read, for end-to-end checks.
// Alternating random accesses, their counts and the mean gap follow the source
// design; the random generator, gap distribution and data pattern are this
// design's own.
module traffic_gen
  import pbs_pkg::*;
#(
  parameter int unsigned    MID     = 0,
  parameter int unsigned    TOTAL   = 2048,
  parameter int unsigned    AVG_OCP = 8,
  parameter logic [31:0]    SEED    = 32'h1234_5678
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              req,
  output line_req_t         req_data,
  input  logic              ack,
  input  logic              rvalid,
  input  logic [LINE_W-1:0] rdata,
  output logic              done,
  output logic [31:0]       exec_cycles,
  output logic [31:0]       acc_count,
  output logic [31:0]       rd_checksum
);

  typedef enum logic [2:0] {S_IDLE, S_OCP, S_REQ, S_WAIT_RD, S_DONE} state_t;

  state_t      state;
  logic [31:0] lfsr;
  logic [31:0] gap;
  logic        next_write;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] draw_gap(input logic [31:0] r);
    return 32'd1 + (r & (2 * AVG_OCP - 1));
  endfunction

  // XOR of all 32-bit words of a line, accumulated over the reads.
  function automatic logic [31:0] fold(input logic [LINE_W-1:0] d);
    logic [31:0] f = '0;
    for (int k = 0; k < LINE_W / 32; k++) f ^= d[k*32 +: 32];
    return f;
  endfunction

  assign req  = (state == S_REQ);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      lfsr        <= (SEED == '0) ? 32'h1 : SEED;
      gap         <= '0;
      next_write  <= 1'b1;
      req_data    <= '0;
      exec_cycles <= '0;
      acc_count   <= '0;
      rd_checksum <= '0;
    end else begin
      if (state != S_IDLE && state != S_DONE) exec_cycles <= exec_cycles + 1;
      unique case (state)
        S_IDLE: if (start) begin
          state       <= (TOTAL == 0) ? S_DONE : S_OCP;
          gap         <= draw_gap(lfsr);
          lfsr        <= xorshift(lfsr);
          exec_cycles <= 32'd1;
        end
        S_OCP: begin
          if (gap <= 32'd1) begin
            state              <= S_REQ;
            req_data.write     <= next_write;
            req_data.addr      <= lfsr[LINE_AW-1:0];
            req_data.wdata     <= {(LINE_W/64){MID[7:0], acc_count[23:0], lfsr}};
            lfsr               <= xorshift(lfsr);
          end else begin
            gap <= gap - 1;
          end
        end
        S_REQ: if (ack) begin
          next_write <= !next_write;
          if (req_data.write) begin
            acc_count <= acc_count + 1;
            if (acc_count + 1 == TOTAL) state <= S_DONE;
            else begin
              state <= S_OCP;
              gap   <= draw_gap(lfsr);
              lfsr  <= xorshift(lfsr);
            end
          end else begin
            state <= S_WAIT_RD;
          end
        end
        S_WAIT_RD: if (rvalid) begin
          acc_count   <= acc_count + 1;
          rd_checksum <= rd_checksum ^ fold(rdata);
          if (acc_count + 1 == TOTAL) state <= S_DONE;
          else begin
            state <= S_OCP;
            gap   <= draw_gap(lfsr);
            lfsr  <= xorshift(lfsr);
          end
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req && !ack |=> req && $stable(req_data));

endmodule
