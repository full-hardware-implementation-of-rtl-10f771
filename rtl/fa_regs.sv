// fa_regs: the F and A control registers of one task, with its stall gate.
//
// A task module asks for a kernel service the way a software stub would:
// it writes the arguments into A0/A1, then the service/method code into F.
// A non-zero F is a pending request. The request is offered to the request
// arbiter (req) only while the task is not stalled, i.e. while its status is
// Running and the CPU is not locked by another task. A non-running task may
// keep computing, but its service calls and shared-variable accesses wait
// here, so it cannot affect the rest of the system.
//
// When the arbiter takes the request (grant), F is cleared and the call is
// in flight. The manager writes the result into A0/A1 (res_we); the result
// is then handed to the task with a valid/acknowledge handshake
// (res_valid/res_ack), again only while the task is not stalled, so a task
// released from waiting resumes only once it is Running.
// kill (task termination) drops any request, in-flight call or result.
//
// Timing: a request written in cycle t is visible on req in cycle t+1.
// res_valid rises the cycle after res_we (if not stalled) and stays high
// until acknowledged.
// The handshake style (a valid/acknowledge read port rather than a stall
// port on the task) follows the described scheme; the exact signal set is
// this design's choice.
module fa_regs
  import rtos_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // task side
  input  logic          f_we,
  input  logic [DW-1:0] f_wdata,
  input  logic          a0_we,
  input  logic [DW-1:0] a0_wdata,
  input  logic          a1_we,
  input  logic [DW-1:0] a1_wdata,
  output logic          res_valid,
  input  logic          res_ack,
  output logic [DW-1:0] a0,
  output logic [DW-1:0] a1,
  // manager side
  input  logic          stall,
  output logic          req,
  output logic [DW-1:0] f,
  input  logic          grant,
  input  logic          res_we,
  input  logic [DW-1:0] res_a0,
  input  logic [DW-1:0] res_a1,
  input  logic          kill,
  output logic          busy      // a call is in flight or its result is unread
);

  logic inflight, rpend;

  assign req       = (f != '0) && !stall && !inflight && !rpend;
  assign res_valid = rpend && !stall;
  assign busy      = inflight || rpend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f        <= '0;
      a0       <= '0;
      a1       <= '0;
      inflight <= 1'b0;
      rpend    <= 1'b0;
    end else if (kill) begin
      f        <= '0;
      inflight <= 1'b0;
      rpend    <= 1'b0;
    end else begin
      if (f_we)  f  <= f_wdata;
      if (a0_we) a0 <= a0_wdata;
      if (a1_we) a1 <= a1_wdata;
      if (grant) begin
        f        <= '0;
        inflight <= 1'b1;
      end
      if (res_we) begin
        a0       <= res_a0;
        a1       <= res_a1;
        inflight <= 1'b0;
        rpend    <= 1'b1;
      end else if (res_valid && res_ack) begin
        rpend <= 1'b0;
      end
    end
  end

  // A task issues a new call only when the previous one has been answered.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    f_we && f_wdata != '0 |-> !busy && f == '0);
  // The arbiter only grants an offered request.
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);

endmodule
