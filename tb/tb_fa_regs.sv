// tb_fa_regs: self-checking test of one task's F/A registers.
// Covers: a request is offered only when F is non-zero and the task is not
// stalled; grant consumes it; a result written while the task is stalled is
// held back until the stall ends; the valid/acknowledge handshake; kill
// drops a pending call.
module tb_fa_regs;
  import rtos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic f_we, a0_we, a1_we, res_ack, stall, grant, res_we, kill;
  logic [31:0] f_wdata, a0_wdata, a1_wdata, res_a0, res_a1;
  logic res_valid, req, busy;
  logic [31:0] a0, a1, f;
  int checks = 0, failures = 0;

  fa_regs dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {f_we, a0_we, a1_we, res_ack, grant, res_we, kill} = '0;
    stall = 1; f_wdata = 0; a0_wdata = 0; a1_wdata = 0; res_a0 = 0; res_a1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      logic [31:0] va0, va1, vf, r0, r1;
      va0 = $urandom; va1 = $urandom; vf = $urandom | 32'h1; r0 = $urandom; r1 = $urandom;
      stall = (round % 2 == 0);
      @(negedge clk);
      a0_we = 1; a0_wdata = va0; a1_we = 1; a1_wdata = va1;
      @(negedge clk);
      a0_we = 0; a1_we = 0;
      chk(a0 == va0 && a1 == va1, "A registers written");
      chk(!req, "no request before F");
      f_we = 1; f_wdata = vf;
      @(negedge clk);
      f_we = 0;
      chk(f == vf, "F written");
      chk(req == !stall, "request gated by stall");
      if (stall) begin
        repeat (3) @(negedge clk);
        chk(!req, "stalled task keeps its request back");
        stall = 0;
        #1;
        chk(req, "request offered once running");
      end
      grant = 1;
      @(negedge clk);
      grant = 0;
      chk(f == 0 && !req && busy, "grant consumes F");
      if (round == 7) begin
        kill = 1;
        @(negedge clk);
        kill = 0;
        chk(!busy && f == 0 && !res_valid, "kill drops the call");
        continue;
      end
      stall = (round % 3 == 0);
      res_we = 1; res_a0 = r0; res_a1 = r1;
      @(negedge clk);
      res_we = 0;
      chk(a0 == r0 && a1 == r1, "result stored in A");
      chk(res_valid == !stall, "result gated by stall");
      if (stall) begin
        repeat (2) @(negedge clk);
        chk(!res_valid, "stalled task does not receive result");
        stall = 0;
        #1;
      end
      chk(res_valid, "result offered");
      @(negedge clk);
      chk(res_valid, "result held until acknowledged");
      res_ack = 1;
      @(negedge clk);
      res_ack = 0;
      chk(!res_valid && !busy, "result taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
