// tb_rtos_hw_top: end-to-end test of the RTOS hardware with five scripted
// task models standing in for the synthesized task modules.
//
// The scenario follows the shape of the kernel's sample application: a main
// task (ID 1, priority 5, started at reset) activates three worker tasks
// (IDs 2-4, priority 10) and later an exception-handling task (ID 5,
// priority 9), and exercises the task-control calls on them.
//   * Workers increment a shared counter under mutex 1, so mutex waits,
//     hand-overs and simultaneous requests (arbitration) occur; then sleep.
//   * Main checks the counter, wakes a worker (wup_tsk), forces another
//     out of its wait (rel_wai), suspends a busy worker and checks that its
//     shared-variable writes stop while suspended (request blocked), locks
//     the CPU and checks that other tasks are held off, changes and reads
//     priorities, terminates tasks (ter_tsk, ras_ter), and lets task 5 exit
//     and restart through a queued activation (ext_tsk).
// Latencies, counted from the task's argument write to the cycle the result
// is offered, are checked against the response cycle counts reported for
// the reference implementation (act_tsk 10, wup_tsk 10, ter_tsk 7,
// ras_ter 9, slp_tsk 15, ext_tsk 10) as upper bounds.
// Every mechanism is counted; one that never occurs counts as a failure.
module tb_rtos_hw_top;
  import rtos_pkg::*;
  localparam int N = 5;
  localparam int N_INC = 4;
  localparam logic [31:0] X_ADDR = GRW_BASE + 0;
  localparam logic [31:0] Y_ADDR = GRW_BASE + 4;
  localparam logic [31:0] C_ADDR = GRW_BASE + 8;
  localparam logic [31:0] H_ADDR = GRW_BASE + 12;
  localparam logic [31:0] E_ADDR = GRW_BASE + 16;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] t_f_we, t_a0_we, t_a1_we, t_res_valid, t_res_ack, task_start, task_kill;
  logic [DW-1:0] t_f_wdata [N], t_a0_wdata [N], t_a1_wdata [N], t_a0 [N], t_a1 [N];
  tts_e task_state [N];
  logic cpu_locked;

  rtos_hw_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_contention = 0, n_blocked_req = 0, n_held_result = 0, n_mtx_wait = 0,
      n_lock_block = 0, n_kill = 0, n_start = 0, n_nospt = 0, n_sleep = 0,
      n_rlwai = 0, n_restart = 0, n_grw_rd = 0, n_grw_wr = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if ($countones(dut.u_manager.req) > 1) n_contention <= n_contention + 1;
    for (int i = 0; i < N; i++) begin
      if (dut.u_manager.f[i] != 0 && dut.u_manager.st_stall[i]) n_blocked_req <= n_blocked_req + 1;
      if (dut.u_manager.f[i] != 0 && !dut.u_manager.st_stall[i] && dut.u_manager.stall[i])
        n_lock_block <= n_lock_block + 1;
      if (dut.u_manager.busy[i] && dut.u_manager.stall[i] && task_state[i] == TTS_SUS)
        n_held_result <= n_held_result + 1;
      if (task_kill[i]) n_kill <= n_kill + 1;
      if (task_start[i]) n_start <= n_start + 1;
      if (task_kill[i] && task_start[i]) n_restart <= n_restart + 1;
    end
    if (dut.u_manager.stw.we && dut.u_manager.stw.val.wobj == TTW_MTX) n_mtx_wait <= n_mtx_wait + 1;
    if (dut.u_manager.stw.we && dut.u_manager.stw.val.wobj == TTW_SLP) n_sleep <= n_sleep + 1;
    if (dut.mem_re) n_grw_rd <= n_grw_rd + 1;
    if (dut.mem_we) n_grw_wr <= n_grw_wr + 1;
  end

  // ------------------------------------------------ task-model plumbing
  int   starts [N];       // start strobes seen
  logic killed [N];       // set by a kill strobe, cleared when restarted
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N; i++) begin starts[i] <= 0; killed[i] <= 0; end
    else for (int i = 0; i < N; i++) begin
      if (task_start[i]) starts[i] <= starts[i] + 1;
      if (task_kill[i])  killed[i] <= 1'b1;
    end
  end

  // One service call, as the synthesized stub does it: arguments, then F,
  // then wait for the result. lat counts cycles from the argument write to
  // the cycle the result is offered. A kill ends the wait.
  task automatic svc(input int i, input logic [7:0] serv, input logic [7:0] meth,
                     input logic [31:0] x0, input logic [31:0] x1,
                     output logic [31:0] r0, output logic [31:0] r1, output int lat);
    r0 = 32'hdead_beef; r1 = 0; lat = 0;
    if (killed[i]) return;
    @(negedge clk);
    t_a0_we[i] = 1; t_a0_wdata[i] = x0; t_a1_we[i] = 1; t_a1_wdata[i] = x1;
    @(negedge clk);
    t_a0_we[i] = 0; t_a1_we[i] = 0;
    t_f_we[i] = 1; t_f_wdata[i] = {16'h0, serv, meth};
    lat = 1;
    @(negedge clk);
    t_f_we[i] = 0;
    lat = 2;
    while (!t_res_valid[i] && !killed[i]) begin @(negedge clk); lat++; end
    if (killed[i]) return;
    r0 = t_a0[i]; r1 = t_a1[i];
    t_res_ack[i] = 1;
    @(negedge clk);
    t_res_ack[i] = 0;
  endtask

  task automatic ctrl(input int i, input logic [7:0] meth, input logic [31:0] x0,
                      input logic [31:0] x1, output logic [31:0] r0, output int lat);
    logic [31:0] r1;
    svc(i, SERV_CTRL_TSK, meth, x0, x1, r0, r1, lat);
  endtask

  task automatic gwrite(input int i, input logic [31:0] addr, input logic [31:0] v);
    logic [31:0] r0, r1; int lat;
    svc(i, SERV_GRW, METHOD_WRITE, addr, v, r0, r1, lat);
  endtask

  task automatic gread(input int i, input logic [31:0] addr, output logic [31:0] v);
    logic [31:0] r1; int lat;
    svc(i, SERV_GRW, METHOD_READ, addr, 0, v, r1, lat);
  endtask

  task automatic mtx(input int i, input logic [7:0] meth, input int id, output logic [31:0] r0);
    logic [31:0] r1; int lat;
    svc(i, SERV_MTX, meth, id, 0, r0, r1, lat);
  endtask

  task automatic wait_state(input int i, input tts_e s);
    int n = 0;
    while (task_state[i] != s && n < 3000) begin @(negedge clk); n++; end
    chk(task_state[i] == s, $sformatf("task %0d reaches state %0h", i + 1, s));
  endtask

  task automatic wait_sleep(input int i);
    int n = 0;
    while (!(task_state[i] == TTS_WAI && dut.u_manager.st[i].wobj == TTW_SLP) && n < 3000) begin
      @(negedge clk); n++;
    end
    chk(task_state[i] == TTS_WAI, $sformatf("task %0d sleeps", i + 1));
  endtask

  // ------------------------------------------------ task programs
  logic main_done = 0;
  int   exc_runs = 0;
  int   hb = 0;
  int   t2_wakes = 0;

  task automatic worker(input int i);
    logic [31:0] r, v; int lat;
    for (int k = 0; k < N_INC; k++) begin
      mtx(i, METHOD_LOC_MTX, 1, r);
      if (!killed[i]) chk(r == E_OK, "loc_mtx eventually succeeds");
      gread(i, C_ADDR, v);
      repeat (3) @(negedge clk);      // hold the mutex across some work
      gwrite(i, C_ADDR, v + 1);
      mtx(i, METHOD_UNL_MTX, 1, r);
      if (!killed[i]) chk(r == E_OK, "unl_mtx by owner");
    end
    ctrl(i, METHOD_SLP_TSK, 0, 0, r, lat);
    if (killed[i]) return;
    if (i == 1) begin
      chk(r == E_OK, "task 2 woken by wup_tsk");
      ctrl(i, METHOD_GET_PRI, 0, 0, r, lat);
      chk(dut.t_a1[i] == 10, "get_pri(TSK_SELF) in woken task");
      ctrl(i, METHOD_SLP_TSK, 0, 0, r, lat);
      chk(r == E_OK, "task 2 woken a second time");
      t2_wakes++;
    end else if (i == 2) begin
      chk(r == E_RLWAI, "task 3 forced out of wait");
      if (r == E_RLWAI) n_rlwai++;
      while (!killed[i]) begin         // heartbeat: keeps issuing writes
        hb++;
        gwrite(i, H_ADDR, hb);
      end
    end
  endtask

  task automatic exc_task(input int i);
    logic [31:0] r; int lat;
    exc_runs++;
    if (exc_runs == 1) begin
      gwrite(i, E_ADDR, 32'h55);
      ctrl(i, METHOD_ACT_TSK, 0, 0, r, lat);     // queue own re-activation
      chk(r == E_OK, "act_tsk(TSK_SELF) queues activation");
    end else begin
      gwrite(i, E_ADDR, 32'haa);
    end
    ctrl(i, METHOD_EXT_TSK, 0, 0, r, lat);
    chk(killed[i], "ext_tsk is not answered");
  endtask

  int ext_lat = -1;
  int ext_f_cycle;
  always @(posedge clk) begin
    if (t_f_we[4] && t_f_wdata[4][7:0] == METHOD_EXT_TSK && t_f_wdata[4][15:8] == SERV_CTRL_TSK)
      ext_f_cycle = int'($time / 10);
    if (task_start[4] && task_kill[4]) ext_lat = int'($time / 10) - ext_f_cycle + 1;
  end

  task automatic main_task(input int i);
    logic [31:0] r, v, h0; int lat;
    // shared variables, as in "x = 1; y = x + 2;"
    gwrite(i, X_ADDR, 1);
    gread(i, X_ADDR, v);
    gwrite(i, Y_ADDR, v + 2);
    gread(i, Y_ADDR, v);
    chk(v == 3, "y = x + 2 through the shared-variable service");
    // activate workers
    ctrl(i, METHOD_ACT_TSK, 2, 0, r, lat);
    $display("latency act_tsk %0d", lat);
    chk(r == E_OK && lat <= 10, $sformatf("act_tsk ok, %0d cycles (<= 10)", lat));
    ctrl(i, METHOD_ACT_TSK, 3, 0, r, lat);
    ctrl(i, METHOD_ACT_TSK, 4, 0, r, lat);
    ctrl(i, METHOD_ACT_TSK, 4, 0, r, lat);
    chk(r == E_OK, "second act_tsk queued");
    ctrl(i, METHOD_CAN_ACT, 4, 0, r, lat);
    chk(r == 1, "can_act returns one queued activation");
    ctrl(i, METHOD_ACT_TSK, 9, 0, r, lat);
    chk(r == E_ID, "act_tsk with bad ID");
    for (int w = 1; w <= 3; w++) wait_sleep(w);
    gread(i, C_ADDR, v);
    chk(v == 3 * N_INC, $sformatf("shared counter %0d under mutex (expect %0d)", v, 3 * N_INC));
    // wake task 2
    ctrl(i, METHOD_WUP_TSK, 2, 0, r, lat);
    $display("latency wup_tsk %0d", lat);
    chk(r == E_OK && lat <= 10, $sformatf("wup_tsk ok, %0d cycles (<= 10)", lat));
    repeat (20) @(negedge clk);
    wait_sleep(1);
    ctrl(i, METHOD_CAN_WUP, 2, 0, r, lat);
    chk(r == 0, "can_wup: nothing queued");
    // wake a suspended sleeper: its answer is held until it is resumed
    ctrl(i, METHOD_SUS_TSK, 2, 0, r, lat);
    chk(r == E_OK && task_state[1] == TTS_WAS, "sus_tsk on sleeping task");
    ctrl(i, METHOD_WUP_TSK, 2, 0, r, lat);
    chk(r == E_OK && task_state[1] == TTS_SUS, "wup_tsk leaves it suspended");
    repeat (20) @(negedge clk);
    chk(t2_wakes == 0, "result held while suspended");
    ctrl(i, METHOD_RSM_TSK, 2, 0, r, lat);
    repeat (10) @(negedge clk);
    chk(t2_wakes == 1, "result delivered after rsm_tsk");
    // force task 3 out of its wait; it starts a heartbeat
    ctrl(i, METHOD_REL_WAI, 3, 0, r, lat);
    chk(r == E_OK, "rel_wai");
    repeat (40) @(negedge clk);
    // suspend the busy task 3: its writes must stop
    ctrl(i, METHOD_SUS_TSK, 3, 0, r, lat);
    chk(r == E_OK, "sus_tsk");
    repeat (5) @(negedge clk);
    gread(i, H_ADDR, h0);
    repeat (40) @(negedge clk);
    gread(i, H_ADDR, v);
    chk(v == h0, "suspended task cannot write shared variables");
    ctrl(i, METHOD_RSM_TSK, 3, 0, r, lat);
    chk(r == E_OK, "rsm_tsk");
    repeat (40) @(negedge clk);
    gread(i, H_ADDR, v);
    chk(v != h0, "resumed task writes again");
    // priorities
    ctrl(i, METHOD_CHG_PRI, 4, 3, r, lat);
    chk(r == E_OK, "chg_pri");
    ctrl(i, METHOD_GET_PRI, 4, 0, r, lat);
    chk(r == E_OK && dut.t_a1[i] == 3, "get_pri after chg_pri");
    // CPU lock: task 3's heartbeat is held off
    ctrl(i, METHOD_LOC_CPU, 0, 0, r, lat);
    chk(r == E_OK && cpu_locked, "loc_cpu");
    repeat (5) @(negedge clk);
    gread(i, H_ADDR, h0);
    repeat (30) @(negedge clk);
    gread(i, H_ADDR, v);
    chk(v == h0, "other tasks held off while CPU locked");
    ctrl(i, METHOD_ACT_TSK, 5, 0, r, lat);
    chk(r == E_CTX, "act_tsk under CPU lock");
    ctrl(i, METHOD_UNL_CPU, 0, 0, r, lat);
    chk(r == E_OK && !cpu_locked, "unl_cpu");
    // terminate the heartbeat task
    ctrl(i, METHOD_TER_TSK, 3, 0, r, lat);
    $display("latency ter_tsk %0d", lat);
    chk(r == E_OK && lat <= 7, $sformatf("ter_tsk ok, %0d cycles (<= 7)", lat));
    wait_state(2, TTS_DMT);
    ctrl(i, METHOD_TER_TSK, 1, 0, r, lat);
    chk(r == E_ILUSE, "ter_tsk on self rejected");
    // exception task: runs, exits, restarts through queued activation, exits
    ctrl(i, METHOD_ACT_TSK, 5, 0, r, lat);
    chk(r == E_OK, "act_tsk(5)");
    repeat (10) @(negedge clk);
    wait_state(4, TTS_DMT);
    gread(i, E_ADDR, v);
    chk(v == 32'haa && exc_runs == 2, "task 5 ran twice (restart after ext_tsk)");
    $display("latency ext_tsk %0d", ext_lat);
    chk(ext_lat > 0 && ext_lat <= 10, $sformatf("ext_tsk to restart %0d cycles (<= 10)", ext_lat));
    // ras_ter on sleeping task 4
    ctrl(i, METHOD_RAS_TER, 4, 0, r, lat);
    $display("latency ras_ter %0d", lat);
    chk(r == E_OK && lat <= 9, $sformatf("ras_ter ok, %0d cycles (<= 9)", lat));
    wait_state(3, TTS_DMT);
    // slp_tsk with a queued wakeup returns at once
    ctrl(i, METHOD_WUP_TSK, 0, 0, r, lat);
    ctrl(i, METHOD_SLP_TSK, 0, 0, r, lat);
    $display("latency slp_tsk %0d", lat);
    chk(r == E_OK && lat <= 15, $sformatf("slp_tsk ok, %0d cycles (<= 15)", lat));
    // unknown service
    svc(i, 8'h07, 8'h01, 0, 0, r, v, lat);
    chk(r == E_NOSPT, "unknown service answered with E_NOSPT");
    if (r == E_NOSPT) n_nospt++;
    main_done = 1;
    ctrl(i, METHOD_RAS_TER, 0, 0, r, lat);
    chk(killed[i], "ras_ter(TSK_SELF) terminates the caller");
  endtask

  // One thread per task: wait for a start strobe, run the program.
  for (genvar g = 0; g < N; g++) begin : g_model
    initial begin
      int seen = 0;
      @(posedge rst_n);
      forever begin
        while (starts[g] <= seen) @(negedge clk);
        seen = starts[g];
        @(negedge clk);
        killed[g] = 1'b0;
        case (g)
          0: main_task(g);
          4: exc_task(g);
          default: worker(g);
        endcase
        while (!killed[g]) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_f_we = 0; t_a0_we = 0; t_a1_we = 0; t_res_ack = 0;
    for (int i = 0; i < N; i++) begin t_f_wdata[i] = 0; t_a0_wdata[i] = 0; t_a1_wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (main_done);
    wait_state(0, TTS_DMT);
    repeat (5) @(negedge clk);
    $display("mechanisms: contention=%0d blocked_req=%0d held_result=%0d mtx_wait=%0d lock_block=%0d",
             n_contention, n_blocked_req, n_held_result, n_mtx_wait, n_lock_block);
    $display("            sleep=%0d rel_wai=%0d kill=%0d start=%0d restart=%0d nospt=%0d grw_rd=%0d grw_wr=%0d",
             n_sleep, n_rlwai, n_kill, n_start, n_restart, n_nospt, n_grw_rd, n_grw_wr);
    chk(n_contention > 0, "simultaneous requests arbitrated");
    chk(n_blocked_req > 0, "request of non-running task blocked");
    chk(n_held_result > 0, "result held for suspended task");
    chk(n_mtx_wait > 0, "mutex wait");
    chk(n_lock_block > 0, "request held off by CPU lock");
    chk(n_sleep > 0 && n_rlwai > 0, "sleep and forced release");
    chk(n_kill >= 4 && n_start >= 6, "terminations and activations");
    chk(n_restart > 0, "restart from queued activation");
    chk(n_nospt > 0, "unknown service");
    chk(n_grw_rd > 0 && n_grw_wr > 0, "shared-variable reads and writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
