// tb_task_status_regs: self-checking test of the task status registers.
// Checks reset values (task 1 active, the rest Dormant, sample priorities),
// the Ready-to-Running promotion in the next cycle, the stall outputs and
// the start/kill strobes one cycle after a write.
module tb_task_status_regs;
  import rtos_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  stw_t stw;
  tstat_t st [N];
  logic [N-1:0] stall, start, kill;
  int checks = 0, failures = 0;
  int boot_start = 0;

  task_status_regs #(.NUM_TASKS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stw = STW_NONE;
    @(posedge clk); #1;
    chk(st[0].tskstat == TTS_RDY && st[1].tskstat == TTS_DMT, "reset states");
    chk(st[0].pri == 5 && st[1].pri == 10 && st[4].pri == 9 && st[4].bpri == 9, "reset priorities");
    chk(stall == 5'b11111, "all stalled in reset");
    @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    chk(st[0].tskstat == TTS_RUN, "ready task promoted to running");
    chk(stall == 5'b11110, "running task not stalled");
    chk(start == 5'b00001, "start strobe of the initially active task");
    @(posedge clk); #1;
    chk(start == 0, "start strobe lasts one cycle");
    // activate task 3 with a start strobe
    @(negedge clk);
    stw.we = 1; stw.id = 3; stw.val = st[2]; stw.val.tskstat = TTS_RDY; stw.start = 1;
    @(negedge clk);
    stw = STW_NONE;
    chk(st[2].tskstat == TTS_RDY && start == 5'b00100, "write and start strobe");
    @(negedge clk);
    chk(st[2].tskstat == TTS_RUN && start == 0 && stall[2] == 0, "task 3 running");
    // suspend task 3: no promotion for other states
    stw.we = 1; stw.id = 3; stw.val = st[2]; stw.val.tskstat = TTS_SUS; stw.val.pri = 7;
    @(negedge clk);
    stw = STW_NONE;
    repeat (2) @(negedge clk);
    chk(st[2].tskstat == TTS_SUS && st[2].pri == 7 && stall[2], "suspended task stays suspended");
    // terminate task 1
    stw.we = 1; stw.id = 1; stw.val = st[0]; stw.val.tskstat = TTS_DMT; stw.kill = 1;
    @(negedge clk);
    stw = STW_NONE;
    chk(kill == 5'b00001 && st[0].tskstat == TTS_DMT && stall[0], "kill strobe and dormant");
    @(negedge clk);
    chk(kill == 0, "kill strobe lasts one cycle");
    chk(st[1].tskstat == TTS_DMT && st[3].tskstat == TTS_DMT, "untouched tasks unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
