// tb_bi_splitter: self-checking test of the bank-interleaving access splitter.
//
// Feeds random line accesses (random master id, direction, address, data)
// with random gaps, while the controller side accepts commands with random
// backpressure. This testbench plays the memory: it stores written chunks
// by {bank,row,col} and answers each read chunk after a random 1..8 cycles,
// in order. Checked: every line becomes four commands to banks 0,1,2,3 in
// that order, all with auto-precharge, the line's row and the burst-aligned
// column, and the right 64-bit slice of write data; each read line comes back
// once, to the master that asked, with the stored data; the next line is
// taken in the same cycle the last chunk is accepted (back-to-back issue).
module tb_bi_splitter;
  import pbs_pkg::*;

  logic clk = 0, rst_n = 0;
  logic gnt_valid, gnt_ready, cmd_valid, cmd_ready, rd_valid, line_rvalid, busy;
  logic [MID_W-1:0] gnt_id, line_rid;
  line_req_t gnt_req;
  chunk_cmd_t cmd;
  logic [CHUNK_W-1:0] rd_data;
  logic [LINE_W-1:0] line_rdata;

  bi_splitter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_lines = 0, n_reads_back = 0, n_b2b = 0, n_stall = 0;

  typedef struct { logic [MID_W-1:0] id; line_req_t r; } acc_t;
  acc_t         issued [$];     // lines granted, in order
  int           chunk_k = 0;
  logic [CHUNK_W-1:0] memory [logic [31:0]];
  typedef struct { logic [MID_W-1:0] id; logic [LINE_W-1:0] d; } exp_t;
  exp_t         exp_rd [$];
  logic [LINE_W-1:0] cur_line;
  // read chunks waiting to be answered: data and due cycle
  logic [CHUNK_W-1:0] rq_d [$];
  int           rq_t [$];
  int           to_send = 400;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [31:0] key(input logic [BANK_W-1:0] b, input logic [ROW_W-1:0] r, input logic [COL_W-1:0] c);
    return 32'({b, r, c});
  endfunction

  logic gnt_fired = 1'b0;

  // Monitor: sample the handshakes at the clock edge.
  always @(posedge clk) if (rst_n) begin
    logic last_fire;
    // controller side: accept, store, queue read answers
    if (cmd_valid && cmd_ready) begin
      acc_t a;
      logic [COL_W-1:0] exp_col;
      a = issued[0];
      exp_col = {a.r.addr[CHUNK_COL_W-1:0], {(COL_W-CHUNK_COL_W){1'b0}}};
      check(cmd.bank == BANK_W'(chunk_k), "bank order");
      check(cmd.autopch, "auto precharge");
      check(cmd.write == a.r.write, "direction");
      check(cmd.row == a.r.addr[LINE_AW-1 -: ROW_W], "row");
      check(cmd.col == exp_col, "column");
      if (a.r.write) begin
        check(cmd.wdata == a.r.wdata[chunk_k*CHUNK_W +: CHUNK_W], "write data slice");
        memory[key(cmd.bank, cmd.row, cmd.col)] = cmd.wdata;
      end else begin
        logic [CHUNK_W-1:0] d;
        d = memory.exists(key(cmd.bank, cmd.row, cmd.col)) ? memory[key(cmd.bank, cmd.row, cmd.col)] : {$urandom, $urandom};
        cur_line[chunk_k*CHUNK_W +: CHUNK_W] = d;
        rq_d.push_back(d);
        rq_t.push_back(cyc + $urandom_range(1, 8));
      end
      last_fire = (chunk_k == N_BANKS - 1);
      if (last_fire) begin
        if (!a.r.write) exp_rd.push_back('{a.id, cur_line});
        void'(issued.pop_front());
        chunk_k = 0;
        n_lines++;
        if (gnt_valid && gnt_ready) n_b2b++;
        if (gnt_valid && !dut.tag_full) check(gnt_ready, "ready on last chunk");
      end else chunk_k++;
    end
    if (cmd_valid && !cmd_ready) n_stall++;
    // returned lines
    if (line_rvalid) begin
      check(exp_rd.size() > 0, "unexpected read line");
      if (exp_rd.size() > 0) begin
        check(line_rid == exp_rd[0].id, "read id");
        check(line_rdata == exp_rd[0].d, "read data");
        void'(exp_rd.pop_front());
        n_reads_back++;
      end
    end
    // grant side
    gnt_fired = gnt_valid && gnt_ready;
    if (gnt_fired) begin
      issued.push_back('{gnt_id, gnt_req});
      to_send--;
    end
    cyc++;
  end

  // Driver: new stimulus half a cycle later.
  always @(negedge clk) if (rst_n) begin
    rd_valid = 1'b0;
    if (rq_t.size() > 0 && rq_t[0] <= cyc) begin
      rd_valid = 1'b1;
      rd_data  = rq_d.pop_front();
      void'(rq_t.pop_front());
    end
    cmd_ready = ($urandom_range(0, 99) < 75);
    if (!gnt_valid || gnt_fired) begin
      gnt_valid = (to_send > 0) && ($urandom_range(0, 99) < 80);
      gnt_id    = MID_W'($urandom_range(0, N_MASTERS - 1));
      gnt_req.write = $urandom_range(0, 1);
      gnt_req.addr  = LINE_AW'($urandom_range(0, 63));
      for (int k = 0; k < LINE_W / 32; k++) gnt_req.wdata[k*32 +: 32] = $urandom;
    end
  end

  initial begin
    gnt_valid = 0; gnt_id = '0; gnt_req = '0; cmd_ready = 0; rd_valid = 0; rd_data = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    wait (to_send == 0 && issued.size() == 0 && exp_rd.size() == 0 && rq_t.size() == 0);
    repeat (5) @(posedge clk);
    check(n_lines == 400, "all lines issued");
    check(n_reads_back > 100, "reads returned");
    check(n_b2b > 0, "back-to-back issue seen");
    check(n_stall > 0, "backpressure seen");
    $display("lines=%0d reads=%0d b2b=%0d stalls=%0d", n_lines, n_reads_back, n_b2b, n_stall);
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
