// manager: the hardware that stands in for the RTOS kernel.
//
// Every application task is a separate hardware module (a task module) that
// runs in parallel with the others. The manager keeps the kernel state and
// executes the kernel services for all of them, in one place, so no task
// module carries its own copy of service hardware:
//   * per task, the F/A control registers (fa_regs) through which the task
//     requests a service and receives the result;
//   * the task status registers (task_status_regs);
//   * the request arbiter (request_arbiter), which admits one request at a
//     time, chosen by task priority;
//   * the service modules: task control (serv_ctrl_tsk), mutex (serv_mtx)
//     and shared-variable access (serv_grw, on the data memory outside).
//
// Task control without stall ports. Task modules are never stopped. A task
// whose state is not Running (or any task but the locking one while the CPU
// is locked) simply has its requests held in its F register, and a result
// addressed to it is held in its A registers, until it runs again. Since
// every system call and every shared-variable access is a request, a
// non-running task cannot affect other tasks or the outputs.
//
// Task interface, per task i (all signals synchronous to clk):
//   t_a0_we/t_a0_wdata, t_a1_we/t_a1_wdata : write arguments into A0, A1
//   t_f_we/t_f_wdata                       : write the service/method code
//                                            into F; this issues the call
//   t_res_valid/t_res_ack                  : result handshake; the result
//                                            is in t_a0 (and t_a1)
//   task_start / task_kill                 : one-cycle strobes that start
//                                            (activate) or reset (terminate)
//                                            the task module
// A simple call (no blocking) written to F in cycle t is answered with
// t_res_valid in cycle t+4 (t+5 for a shared-variable read), when the task
// is Running and no other call is being served.
// The partition into these blocks follows the reference architecture; the
// signal-level protocol is this design's own.
module manager
  import rtos_pkg::*;
#(
  parameter int NUM_TASKS = 5,
  parameter int NUM_MTX   = 2,
  parameter int DMEM_WORDS = 32,
  parameter int DMEM_AW   = $clog2(DMEM_WORDS),
  parameter logic [MAX_TASKS-1:0][PRI_W-1:0] INIT_PRI =
    {{11{5'd16}}, 5'd9, 5'd10, 5'd10, 5'd10, 5'd5},
  parameter logic [MAX_TASKS-1:0] INIT_ACT = 16'h0001
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // task modules
  input  logic [NUM_TASKS-1:0] t_f_we,
  input  logic [DW-1:0]        t_f_wdata  [NUM_TASKS],
  input  logic [NUM_TASKS-1:0] t_a0_we,
  input  logic [DW-1:0]        t_a0_wdata [NUM_TASKS],
  input  logic [NUM_TASKS-1:0] t_a1_we,
  input  logic [DW-1:0]        t_a1_wdata [NUM_TASKS],
  output logic [NUM_TASKS-1:0] t_res_valid,
  input  logic [NUM_TASKS-1:0] t_res_ack,
  output logic [DW-1:0]        t_a0       [NUM_TASKS],
  output logic [DW-1:0]        t_a1       [NUM_TASKS],
  output logic [NUM_TASKS-1:0] task_start,
  output logic [NUM_TASKS-1:0] task_kill,
  // observation of the kernel state
  output tts_e                 task_state [NUM_TASKS],
  output logic                 cpu_locked,
  // data memory
  output logic                 mem_re,
  output logic                 mem_we,
  output logic [DMEM_AW-1:0]   mem_addr,
  output logic [DW-1:0]        mem_wdata,
  input  logic [DW-1:0]        mem_rdata
);

  tstat_t                 st [NUM_TASKS];
  logic [NUM_TASKS-1:0]   st_stall, stall, req, grant, res_we, busy;
  logic [DW-1:0]          f  [NUM_TASKS];
  logic [DW-1:0]          res_a0 [NUM_TASKS];
  logic [DW-1:0]          res_a1 [NUM_TASKS];
  logic [PRI_W-1:0]       pri [NUM_TASKS];
  logic [TID_W-1:0]       lock_owner;

  sreq_t                  sreq;
  logic [NSERV-1:0]       svc_start, svc_done;
  sres_t                  svc_res [NSERV];
  logic                   ra_valid;
  logic [TID_W-1:0]       ra_id;
  sres_t                  ra_res;
  logic                   ra_busy;
  stw_t                   stw_ctrl, stw_mtx, stw;

  // ---------------------------------------------------------------- status
  task_status_regs #(.NUM_TASKS(NUM_TASKS), .INIT_PRI(INIT_PRI), .INIT_ACT(INIT_ACT)) u_status (
    .clk, .rst_n, .stw, .st, .stall(st_stall), .start(task_start), .kill(task_kill)
  );

  // Only one service module is active at a time, so at most one writes.
  assign stw = stw_ctrl.we ? stw_ctrl : stw_mtx;

  always_comb begin
    for (int i = 0; i < NUM_TASKS; i++) begin
      task_state[i] = st[i].tskstat;
      pri[i]        = st[i].pri;
      stall[i]      = st_stall[i] || (cpu_locked && lock_owner != TID_W'(i + 1));
    end
  end

  // ------------------------------------------------------- F/A registers
  for (genvar i = 0; i < NUM_TASKS; i++) begin : g_task
    logic wake_me, res_me;
    assign wake_me   = stw.we && stw.wake && stw.id == TID_W'(i + 1);
    assign res_me    = ra_valid && !ra_res.defer && ra_id == TID_W'(i + 1);
    assign res_we[i] = wake_me || res_me;
    assign res_a0[i] = wake_me ? stw.wake_code : ra_res.a0;
    assign res_a1[i] = wake_me ? t_a1[i]       : ra_res.a1;

    fa_regs u_fa (
      .clk, .rst_n,
      .f_we(t_f_we[i]),   .f_wdata(t_f_wdata[i]),
      .a0_we(t_a0_we[i]), .a0_wdata(t_a0_wdata[i]),
      .a1_we(t_a1_we[i]), .a1_wdata(t_a1_wdata[i]),
      .res_valid(t_res_valid[i]), .res_ack(t_res_ack[i]),
      .a0(t_a0[i]), .a1(t_a1[i]),
      .stall(stall[i]), .req(req[i]), .f(f[i]), .grant(grant[i]),
      .res_we(res_we[i]), .res_a0(res_a0[i]), .res_a1(res_a1[i]),
      .kill(task_kill[i]), .busy(busy[i])
    );
  end

  // ----------------------------------------------------- request arbiter
  request_arbiter #(.NUM_TASKS(NUM_TASKS)) u_ra (
    .clk, .rst_n, .req, .pri, .f, .a0(t_a0), .a1(t_a1), .grant,
    .sreq, .svc_start, .svc_done, .svc_res,
    .res_valid(ra_valid), .res_id(ra_id), .res(ra_res), .busy(ra_busy)
  );

  // ----------------------------------------------------- service modules
  serv_ctrl_tsk #(.NUM_TASKS(NUM_TASKS), .INIT_PRI(INIT_PRI)) u_ctrl_tsk (
    .clk, .rst_n, .start(svc_start[0]), .sreq, .st,
    .done(svc_done[0]), .res(svc_res[0]), .stw(stw_ctrl),
    .cpu_locked, .lock_owner
  );

  serv_mtx #(.NUM_TASKS(NUM_TASKS), .NUM_MTX(NUM_MTX)) u_mtx (
    .clk, .rst_n, .start(svc_start[1]), .sreq, .st, .cpu_locked,
    .done(svc_done[1]), .res(svc_res[1]), .stw(stw_mtx)
  );

  serv_grw #(.WORDS(DMEM_WORDS), .AW(DMEM_AW)) u_grw (
    .clk, .rst_n, .start(svc_start[2]), .sreq,
    .done(svc_done[2]), .res(svc_res[2]),
    .mem_re, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(stw_ctrl.we && stw_mtx.we));
  // A result or wake-up only goes to a task that has a call outstanding.
  a_res_to_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (res_we & ~busy) == '0);
  // The arbiter grants nothing while a call is in service.
  a_serial: assert property (@(posedge clk) disable iff (!rst_n)
    ra_busy |-> grant == '0);

endmodule
