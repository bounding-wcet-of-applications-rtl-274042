// tb_traffic_gen: self-checking test of one traffic generator.
//
// A generator with TOTAL = 300 accesses and a mean gap of 4 cycles is started;
// this testbench grants its requests after random delays and answers reads
// with random lines after random delays. Checked: accesses alternate write /
// read starting with a write; every on-chip gap (cycles from completing one
// access, or from start, to raising the next request) lies in 1..2*AVG_OCP
// and their mean is near AVG_OCP + 0.5; the request holds its contents until
// granted; the generator stops after exactly TOTAL accesses; exec_cycles
// equals the cycles from start to the last completion, both counted; and
// rd_checksum is the XOR of every 32-bit word it was given.
module tb_traffic_gen;
  import pbs_pkg::*;

  localparam int unsigned TOTAL = 300;
  localparam int unsigned AVG   = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic req, ack, rvalid, done;
  line_req_t req_data;
  logic [LINE_W-1:0] rdata;
  logic [31:0] exec_cycles, acc_count, rd_checksum;

  traffic_gen #(.MID(3), .TOTAL(TOTAL), .AVG_OCP(AVG), .SEED(32'hC0FFEE11)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int t_start = -1, t_prev_done = -1, t_last_done = -1, n_acc = 0, gap_sum = 0;
  int grant_at = -1, rv_at = -1;
  bit in_req = 0, expect_write = 1, wait_rd = 0;
  line_req_t held;
  logic [31:0] csum = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (req && !in_req) begin
      int gap;
      gap = cyc - t_prev_done - 1;
      check(gap >= 1 && gap <= 2 * AVG, $sformatf("gap %0d out of range", gap));
      gap_sum += gap;
      check(req_data.write == expect_write, "alternating direction");
      held   = req_data;
      in_req = 1;
      grant_at = cyc + $urandom_range(0, 6);
    end else if (req) begin
      check(req_data == held, "request stable");
    end
    if (req && ack) begin
      in_req = 0;
      expect_write = !expect_write;
      if (req_data.write) begin
        n_acc++; t_prev_done = cyc; t_last_done = cyc;
      end else begin
        wait_rd = 1; rv_at = cyc + $urandom_range(1, 12);
      end
    end
    if (rvalid) begin
      for (int k = 0; k < LINE_W / 32; k++) csum ^= rdata[k*32 +: 32];
      n_acc++; t_prev_done = cyc; t_last_done = cyc;
    end
    check(!(req && done), "no request after done");
    cyc++;
  end

  always @(negedge clk) if (rst_n) begin
    ack    = in_req && cyc >= grant_at;
    rvalid = wait_rd && cyc >= rv_at;
    if (rvalid) begin
      wait_rd = 0;
      for (int k = 0; k < LINE_W / 32; k++) rdata[k*32 +: 32] = $urandom;
    end
  end

  initial begin
    ack = 0; rvalid = 0; rdata = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) start = 1;
    t_start = cyc; t_prev_done = cyc;
    @(negedge clk) start = 0;
    wait (done);
    repeat (20) @(posedge clk);
    check(n_acc == TOTAL, "access count seen");
    check(acc_count == TOTAL, "acc_count output");
    check(exec_cycles == 32'(t_last_done - t_start + 1), $sformatf("exec_cycles %0d vs %0d", exec_cycles, t_last_done - t_start + 1));
    check(rd_checksum == csum, "read checksum");
    // mean gap AVG+0.5 = 4.5; allow a wide margin for 300 samples
    check(gap_sum >= TOTAL * 4 && gap_sum <= TOTAL * 5, $sformatf("mean gap %0d/%0d", gap_sum, TOTAL));
    $display("accesses=%0d exec=%0d mean_gap=%0.2f", n_acc, exec_cycles, real'(gap_sum) / TOTAL);
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
