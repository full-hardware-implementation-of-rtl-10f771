// task_status_regs: one status register per task, and the task-module
// start/kill strobes.
//
// Each register holds the task's state (Dormant, Ready, Running, Waiting,
// Suspended, Waiting-Suspended), its base and current priority, its queued
// activation and wakeup counts and what it waits for. Service modules change
// a register through a single write port (stw); the manager serves one call
// at a time, so one port is enough.
//
// All tasks run in parallel, so there is no ready queue: a task that becomes
// Ready is forced to Running in the next clock cycle. The stall output of a
// task is high whenever its state is not Running; the manager uses it to
// block that task's service requests, never to stop the task module.
//
// start[i] pulses one cycle after a write with start = 1 (activation), and
// after reset for the tasks in INIT_ACT; kill[i] pulses one cycle after a
// write with kill = 1 (termination). Task IDs on the write port are 1-based.
// Default priorities and start-up set follow the sample application of the
// reference kernel (task 1 = main task, priority 5, activated at start;
// tasks 2-4 priority 10; task 5 priority 9); that assignment is this
// design's choice.
module task_status_regs
  import rtos_pkg::*;
#(
  parameter int NUM_TASKS = 5,
  parameter logic [MAX_TASKS-1:0][PRI_W-1:0] INIT_PRI =
    {{11{5'd16}}, 5'd9, 5'd10, 5'd10, 5'd10, 5'd5},
  parameter logic [MAX_TASKS-1:0] INIT_ACT = 16'h0001
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  stw_t                 stw,
  output tstat_t               st    [NUM_TASKS],
  output logic [NUM_TASKS-1:0] stall,
  output logic [NUM_TASKS-1:0] start,
  output logic [NUM_TASKS-1:0] kill
);

  logic boot;   // first cycle after reset: start the INIT_ACT tasks

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      boot  <= 1'b1;
      start <= '0;
      kill  <= '0;
      for (int i = 0; i < NUM_TASKS; i++) begin
        st[i].tskstat <= INIT_ACT[i] ? TTS_RDY : TTS_DMT;
        st[i].bpri    <= INIT_PRI[i];
        st[i].pri     <= INIT_PRI[i];
        st[i].actcnt  <= '0;
        st[i].wupcnt  <= '0;
        st[i].wobj    <= TTW_NONE;
        st[i].wid     <= '0;
      end
    end else begin
      boot <= 1'b0;
      for (int i = 0; i < NUM_TASKS; i++) begin
        // Ready tasks are dispatched at once: every task has its own hardware.
        if (st[i].tskstat == TTS_RDY) st[i].tskstat <= TTS_RUN;
        start[i] <= (boot && INIT_ACT[i]) ||
                    (stw.we && stw.start && stw.id == TID_W'(i + 1));
        kill[i]  <= stw.we && stw.kill && stw.id == TID_W'(i + 1);
        if (stw.we && stw.id == TID_W'(i + 1)) st[i] <= stw.val;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_TASKS; i++) stall[i] = (st[i].tskstat != TTS_RUN);
  end

  a_id_range: assert property (@(posedge clk) disable iff (!rst_n)
    stw.we |-> stw.id >= 1 && stw.id <= TID_W'(NUM_TASKS));

endmodule
