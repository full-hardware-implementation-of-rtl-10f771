// tb_serv_ctrl_tsk: self-checking test of the task-control service module.
// The testbench keeps the task status registers itself (applying every
// status write and promoting Ready to Running one cycle later), issues
// calls as the arbiter would, and checks error codes, returned values,
// status changes, wake/kill/start requests and the two-cycle execution.
module tb_serv_ctrl_tsk;
  import rtos_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic start, done, cpu_locked;
  sreq_t sreq;
  tstat_t st [N];
  sres_t res;
  stw_t stw;
  logic [TID_W-1:0] lock_owner;
  int checks = 0, failures = 0;

  serv_ctrl_tsk #(.NUM_TASKS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // status register model
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (st[i].tskstat == TTS_RDY) st[i].tskstat <= TTS_RUN;
      if (stw.we) st[stw.id - 1] <= stw.val;
    end
  end

  sres_t r;
  stw_t  w;
  task automatic call(input int caller, input logic [7:0] method,
                      input logic [31:0] arg0, input logic [31:0] arg1 = 0);
    @(negedge clk);
    start = 1;
    sreq.caller = TID_W'(caller); sreq.method = method; sreq.a0 = arg0; sreq.a1 = arg1;
    @(negedge clk);
    start = 0;
    chk(done, "done one cycle after start");
    r = res; w = stw;
    @(negedge clk);   // status write applied, promotion visible one cycle later
    @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sreq = '0;
    for (int i = 0; i < N; i++) begin
      st[i] = '{tskstat: TTS_DMT, bpri: 10, pri: 10, actcnt: 0, wupcnt: 0, wobj: TTW_NONE, wid: 0};
    end
    st[0].tskstat = TTS_RUN; st[0].bpri = 5; st[0].pri = 5;
    repeat (2) @(posedge clk);
    rst_n = 1;

    call(1, METHOD_GET_PRI, 0);
    chk(r.a0 == E_OK && r.a1 == 5 && !w.we, "get_pri(TSK_SELF)");
    call(1, METHOD_ACT_TSK, 2);
    chk(r.a0 == E_OK && w.we && w.start && w.id == 2, "act_tsk on dormant task starts it");
    chk(st[1].tskstat == TTS_RUN, "activated task running");
    call(1, METHOD_ACT_TSK, 2);
    chk(r.a0 == E_OK && st[1].actcnt == 1 && !w.start, "act_tsk queued");
    call(1, METHOD_ACT_TSK, 2);
    chk(r.a0 == E_QOVR, "act_tsk queue overflow");
    call(1, METHOD_CAN_ACT, 2);
    chk(r.a0 == 1 && st[1].actcnt == 0, "can_act returns and clears count");
    call(1, METHOD_ACT_TSK, 9);
    chk(r.a0 == E_ID, "act_tsk bad ID");
    call(1, METHOD_CHG_PRI, 2, 3);
    chk(r.a0 == E_OK && st[1].pri == 3 && st[1].bpri == 3, "chg_pri");
    call(1, METHOD_GET_PRI, 2);
    chk(r.a0 == E_OK && r.a1 == 3, "get_pri after chg_pri");
    call(1, METHOD_CHG_PRI, 2, 20);
    chk(r.a0 == E_PAR, "chg_pri out of range");
    call(1, METHOD_CHG_PRI, 2, 0);
    chk(r.a0 == E_OK && st[1].pri == 10, "chg_pri TPRI_INI restores initial priority");
    call(1, METHOD_GET_PRI, 3);
    chk(r.a0 == E_OBJ, "get_pri on dormant task");
    // sleep / wakeup
    call(2, METHOD_SLP_TSK, 0);
    chk(r.defer && st[1].tskstat == TTS_WAI && st[1].wobj == TTW_SLP, "slp_tsk blocks caller");
    call(1, METHOD_WUP_TSK, 2);
    chk(r.a0 == E_OK && w.wake && w.wake_code == E_OK && w.id == 2, "wup_tsk wakes sleeper");
    chk(st[1].tskstat == TTS_RUN, "woken task running");
    call(1, METHOD_WUP_TSK, 2);
    chk(r.a0 == E_OK && st[1].wupcnt == 1 && !w.wake, "wup_tsk queued");
    call(1, METHOD_WUP_TSK, 2);
    chk(r.a0 == E_QOVR, "wup_tsk queue overflow");
    call(1, METHOD_CAN_WUP, 2);
    chk(r.a0 == 1 && st[1].wupcnt == 0, "can_wup");
    call(1, METHOD_WUP_TSK, 2);
    call(2, METHOD_SLP_TSK, 0);
    chk(!r.defer && r.a0 == E_OK && st[1].wupcnt == 0 && st[1].tskstat == TTS_RUN,
        "slp_tsk consumes queued wakeup");
    // suspend while waiting, forced release
    call(2, METHOD_SLP_TSK, 0);
    call(1, METHOD_SUS_TSK, 2);
    chk(r.a0 == E_OK && st[1].tskstat == TTS_WAS, "sus_tsk on waiting task");
    call(1, METHOD_REL_WAI, 2);
    chk(r.a0 == E_OK && w.wake && w.wake_code == E_RLWAI && st[1].tskstat == TTS_SUS,
        "rel_wai releases with E_RLWAI, stays suspended");
    call(1, METHOD_REL_WAI, 2);
    chk(r.a0 == E_OBJ, "rel_wai on non-waiting task");
    call(1, METHOD_SUS_TSK, 2);
    chk(r.a0 == E_QOVR, "sus_tsk on suspended task");
    call(1, METHOD_RSM_TSK, 2);
    chk(r.a0 == E_OK && st[1].tskstat == TTS_RUN, "rsm_tsk");
    call(1, METHOD_RSM_TSK, 2);
    chk(r.a0 == E_OBJ, "rsm_tsk on non-suspended task");
    // termination
    call(1, METHOD_TER_TSK, 1);
    chk(r.a0 == E_ILUSE, "ter_tsk on self");
    call(1, METHOD_TER_TSK, 3);
    chk(r.a0 == E_OBJ, "ter_tsk on dormant task");
    call(1, METHOD_ACT_TSK, 2);
    call(1, METHOD_CHG_PRI, 2, 7);
    call(1, METHOD_TER_TSK, 2);
    chk(r.a0 == E_OK && w.kill && w.start && st[1].actcnt == 0 && st[1].pri == 7,
        "ter_tsk with queued activation restarts");
    // CPU lock
    call(1, METHOD_LOC_CPU, 0);
    chk(r.a0 == E_OK && cpu_locked && lock_owner == 1, "loc_cpu");
    call(1, METHOD_ACT_TSK, 3);
    chk(r.a0 == E_CTX && st[2].tskstat == TTS_DMT, "act_tsk under CPU lock");
    call(1, METHOD_SLP_TSK, 0);
    chk(r.a0 == E_CTX && !r.defer, "slp_tsk under CPU lock");
    call(1, METHOD_UNL_CPU, 0);
    chk(r.a0 == E_OK && !cpu_locked, "unl_cpu");
    // exit and self-termination
    call(2, METHOD_EXT_TSK, 0);
    chk(r.defer && w.kill && w.id == 2 && st[1].tskstat == TTS_DMT, "ext_tsk");
    call(1, METHOD_ACT_TSK, 3);
    call(1, METHOD_RAS_TER, 3);
    chk(r.a0 == E_OK && !r.defer && w.kill && st[2].tskstat == TTS_DMT, "ras_ter on other task");
    call(1, METHOD_RAS_TER, 0);
    chk(r.defer && w.kill && w.id == 1 && st[0].tskstat == TTS_DMT, "ras_ter on self");
    call(4, 8'd99, 0);
    chk(r.a0 == E_NOSPT, "unknown method");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
