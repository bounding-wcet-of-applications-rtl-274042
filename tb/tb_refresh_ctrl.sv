// tb_refresh_ctrl: self-checking test of the user-controlled refresh circuit.
//
// Runs the block at its default tREFI (975 cycles) and guard (48 cycles) for
// six intervals while the testbench, acting as the controller, acknowledges
// each refresh after a random 1..40 cycles. Checked every cycle against
// times worked out here: close is high exactly from cycle k*TREFI-GUARD of
// each interval until the cycle after the acknowledge; ref_req rises on cycle
// k*TREFI-1 (exact spacing of TREFI cycles, whatever the acknowledge delay)
// and is held until acknowledged; refresh_count counts the acknowledges.
module tb_refresh_ctrl;
  import pbs_pkg::*;

  localparam int unsigned TREFI = TREFI_CYC;
  localparam int unsigned GUARD = 48;

  logic clk = 0, rst_n = 0;
  logic close, ref_req, ref_ack;
  logic [31:0] refresh_count;

  refresh_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int ack_due = -1, acks = 0, last_rise = -1, rises = 0;
  bit pending = 0, prev_req = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // cyc counts clock edges since reset release; checks use pre-edge values.
  always @(posedge clk) if (rst_n) begin
    int phase;
    phase = cyc % TREFI;
    // expected request: raised after the edge at phase TREFI-1, until acked
    check(ref_req == pending, "ref_req level");
    check(close == (pending || phase >= TREFI - GUARD), "close window");
    check(refresh_count == 32'(acks), "refresh count");
    if (ref_req && !prev_req) begin
      if (last_rise >= 0) check(cyc - last_rise == TREFI, "refresh spacing");
      last_rise = cyc;
      rises++;
    end
    prev_req = ref_req;
    if (pending && ref_ack) begin pending = 0; acks++; end
    if (phase == TREFI - 1) pending = 1;
    cyc++;
  end

  always @(negedge clk) if (rst_n) begin
    if (ref_req && ack_due < 0) ack_due = cyc + $urandom_range(1, 40);
    ref_ack = (ack_due >= 0 && cyc >= ack_due);
    if (ack_due >= 0 && cyc > ack_due) ack_due = -1;
  end

  initial begin
    ref_ack = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    wait (cyc == 6 * TREFI + 60);
    check(rises == 6, "six refreshes requested");
    check(acks == 6, "six refreshes acknowledged");
    $display("refreshes=%0d", acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
