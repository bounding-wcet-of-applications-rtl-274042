// refresh_ctrl: user-controlled SDRAM refresh at exact tREFI intervals.
//
// A controller that refreshes on its own does so at tREFI give or take a few
// tens of cycles, depending on the traffic in flight, which makes the
// refresh interference unpredictable. This block takes refresh away from the
// controller: a free-running timer counts TREFI cycles. GUARD cycles before
// it expires, `close` goes high and shuts the arbiter's port, so no new
// access enters and the controller's command queue drains. When the timer
// expires `ref_req` is raised and held until the controller answers with
// `ref_ack`; `close` is released in the cycle after the acknowledge. The
// timer never stops, so refreshes are requested exactly every TREFI cycles.
//
// Timing: ref_req rises on the cycle the timer wraps (cycle TREFI-1, TREFI*2-1,
// ... after reset) and falls the cycle after ref_ack. refresh_count counts
// acknowledged refreshes. The interval and the close-early scheme follow the
// source design; the guard length is this design's choice (it must cover the
// longest access plus the queue contents of the controller).
module refresh_ctrl
  import pbs_pkg::*;
#(
  parameter int unsigned TREFI = TREFI_CYC,
  parameter int unsigned GUARD = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        close,
  output logic        ref_req,
  input  logic        ref_ack,
  output logic [31:0] refresh_count
);

  localparam int unsigned TW = $clog2(TREFI + 1);

  logic [TW-1:0] timer;
  logic          expire;

  assign expire = (timer == TW'(TREFI - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer         <= '0;
      ref_req       <= 1'b0;
      refresh_count <= '0;
    end else begin
      timer <= expire ? '0 : timer + 1'b1;
      if (ref_req && ref_ack) begin
        ref_req       <= 1'b0;
        refresh_count <= refresh_count + 1;
      end
      if (expire) ref_req <= 1'b1;
    end
  end

  // Close ahead of the expiry and keep closed until the refresh is taken.
  assign close = (timer >= TW'(TREFI - GUARD)) || ref_req;

  a_guard: assert property (@(posedge clk) disable iff (!rst_n)
    expire |-> close);

endmodule
