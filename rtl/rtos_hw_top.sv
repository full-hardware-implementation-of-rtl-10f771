// rtos_hw_top: an RTOS-based system in hardware, without its task modules.
//
// The kernel is replaced by the manager, and its data memory (DMEM) holds
// the variables the tasks share. The task modules themselves are produced
// from the application's C code by a high-level synthesis tool; they attach
// to the per-task ports below, one set per task:
//   write A0/A1 (arguments), then F (service/method code) to call a service;
//   wait for t_res_valid, read the result from t_a0/t_a1, raise t_res_ack;
//   start when task_start pulses, return to the initial state on task_kill.
// See manager.sv for the protocol and its timing. task_state and cpu_locked
// expose the kernel state for observation.
// Defaults: 5 tasks (the size of the kernel's sample application), 2
// mutexes and 32 shared words; these are this design's choices apart from
// the task count. At most 16 tasks are supported.
module rtos_hw_top
  import rtos_pkg::*;
#(
  parameter int NUM_TASKS  = 5,
  parameter int NUM_MTX    = 2,
  parameter int DMEM_WORDS = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
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
  output tts_e                 task_state [NUM_TASKS],
  output logic                 cpu_locked
);

  localparam int AW = $clog2(DMEM_WORDS);

  logic          mem_re, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;

  manager #(.NUM_TASKS(NUM_TASKS), .NUM_MTX(NUM_MTX), .DMEM_WORDS(DMEM_WORDS)) u_manager (
    .clk, .rst_n,
    .t_f_we, .t_f_wdata, .t_a0_we, .t_a0_wdata, .t_a1_we, .t_a1_wdata,
    .t_res_valid, .t_res_ack, .t_a0, .t_a1, .task_start, .task_kill,
    .task_state, .cpu_locked,
    .mem_re, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  dmem #(.WORDS(DMEM_WORDS), .DW(DW)) u_dmem (
    .clk, .rst_n, .re(mem_re), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

endmodule
