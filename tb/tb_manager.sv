// tb_manager: self-checking test of the manager with a behavioural data
// memory. All five tasks are active from reset. Checks:
//   * five simultaneous calls are served one at a time in priority order
//     (priority 5, then 9, then the three tasks of priority 10 by ID);
//   * an uncontended task-control call is answered 4 cycles after the F
//     write, a shared-variable read 5 cycles after, a write 4 cycles after;
//   * a suspended task's request is not served until it is resumed;
//   * while the CPU is locked, only the locking task's calls are served;
//   * shared-variable values written by one task are read by another.
module tb_manager;
  import rtos_pkg::*;
  localparam int N = 5;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] t_f_we, t_a0_we, t_a1_we, t_res_valid, t_res_ack, task_start, task_kill;
  logic [DW-1:0] t_f_wdata [N], t_a0_wdata [N], t_a1_wdata [N], t_a0 [N], t_a1 [N];
  tts_e task_state [N];
  logic cpu_locked;
  logic mem_re, mem_we;
  logic [$clog2(W)-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic [DW-1:0] mem [W];

  manager #(.NUM_TASKS(N), .INIT_ACT(16'h001f)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_re) mem_rdata <= mem[mem_addr];
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Issue a call: A0/A1 in one cycle, F in the next; returns the number of
  // cycles from the F write to the cycle the result is offered.
  task automatic issue(input int i, input logic [7:0] serv, input logic [7:0] meth,
                       input logic [31:0] x0, input logic [31:0] x1);
    t_a0_we[i] = 1; t_a0_wdata[i] = x0; t_a1_we[i] = 1; t_a1_wdata[i] = x1;
    @(negedge clk);
    t_a0_we[i] = 0; t_a1_we[i] = 0;
    t_f_we[i] = 1; t_f_wdata[i] = {16'h0, serv, meth};
  endtask

  task automatic call(input int i, input logic [7:0] serv, input logic [7:0] meth,
                      input logic [31:0] x0, input logic [31:0] x1,
                      output logic [31:0] r0, output int lat);
    @(negedge clk);
    issue(i, serv, meth, x0, x1);
    lat = 0;
    @(negedge clk);
    t_f_we[i] = 0;
    lat = 1;
    while (!t_res_valid[i] && lat < 100) begin @(negedge clk); lat++; end
    r0 = t_a0[i];
    t_res_ack[i] = 1;
    @(negedge clk);
    t_res_ack[i] = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int order [$];
  int done_at [N];
  initial begin
    logic [31:0] r; int lat;
    t_f_we = 0; t_a0_we = 0; t_a1_we = 0; t_res_ack = 0;
    for (int i = 0; i < N; i++) begin t_f_wdata[i] = 0; t_a0_wdata[i] = 0; t_a1_wdata[i] = 0; end
    for (int i = 0; i < W; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++) chk(task_state[i] == TTS_RUN, "all tasks running");
    // five simultaneous get_pri(TSK_SELF)
    for (int i = 0; i < N; i++) begin
      t_a0_we[i] = 1; t_a0_wdata[i] = 0; t_a1_we[i] = 1; t_a1_wdata[i] = 0;
    end
    @(negedge clk);
    t_a0_we = 0; t_a1_we = 0;
    for (int i = 0; i < N; i++) begin
      t_f_we[i] = 1; t_f_wdata[i] = {16'h0, SERV_CTRL_TSK, METHOD_GET_PRI};
    end
    @(negedge clk);
    t_f_we = 0;
    for (int c = 1; c < 40 && order.size() < N; c++) begin
      for (int i = 0; i < N; i++) if (t_res_valid[i]) begin
        order.push_back(i + 1);
        done_at[i] = c;
        chk(t_a0[i] == E_OK, "get_pri result");
      end
      t_res_ack = t_res_valid;
      @(negedge clk);
      t_res_ack = 0;
    end
    chk(order.size() == N && order[0] == 1 && order[1] == 5 && order[2] == 2 &&
        order[3] == 3 && order[4] == 4, "served in priority order");
    chk(done_at[0] == 4, $sformatf("first answer 4 cycles after F write (got %0d)", done_at[0]));
    // latencies of single calls
    call(2, SERV_CTRL_TSK, METHOD_GET_PRI, 0, 0, r, lat);
    chk(r == E_OK && t_a1[2] == 10 && lat == 4, $sformatf("get_pri latency %0d (expect 4)", lat));
    call(3, SERV_GRW, METHOD_WRITE, GRW_BASE + 8, 32'hcafe, r, lat);
    chk(r == E_OK && lat == 4, $sformatf("shared write latency %0d (expect 4)", lat));
    call(4, SERV_GRW, METHOD_READ, GRW_BASE + 8, 0, r, lat);
    chk(r == 32'hcafe && lat == 5, $sformatf("shared read latency %0d (expect 5)", lat));
    // a suspended task's request waits
    call(0, SERV_CTRL_TSK, METHOD_SUS_TSK, 2, 0, r, lat);
    chk(r == E_OK && task_state[1] == TTS_SUS, "task 2 suspended");
    @(negedge clk);
    issue(1, SERV_GRW, METHOD_WRITE, GRW_BASE + 12, 32'h1234);
    @(negedge clk);
    t_f_we[1] = 0;
    repeat (20) @(negedge clk);
    chk(!t_res_valid[1] && mem[3] == 0, "suspended task's request not served");
    call(0, SERV_CTRL_TSK, METHOD_RSM_TSK, 2, 0, r, lat);
    chk(r == E_OK, "rsm_tsk");
    lat = 0;
    while (!t_res_valid[1] && lat < 20) begin @(negedge clk); lat++; end
    chk(t_res_valid[1] && mem[3] == 32'h1234, "request served after resume");
    t_res_ack[1] = 1;
    @(negedge clk);
    t_res_ack[1] = 0;
    // CPU lock: another running task's request waits until unl_cpu
    call(0, SERV_CTRL_TSK, METHOD_LOC_CPU, 0, 0, r, lat);
    chk(r == E_OK && cpu_locked, "loc_cpu");
    @(negedge clk);
    issue(2, SERV_GRW, METHOD_WRITE, GRW_BASE + 16, 32'h777);
    @(negedge clk);
    t_f_we[2] = 0;
    repeat (20) @(negedge clk);
    chk(!t_res_valid[2] && mem[4] == 0, "request held off while CPU locked");
    call(0, SERV_GRW, METHOD_READ, GRW_BASE + 8, 0, r, lat);
    chk(r == 32'hcafe, "locking task still reaches shared variables");
    call(0, SERV_CTRL_TSK, METHOD_UNL_CPU, 0, 0, r, lat);
    chk(r == E_OK && !cpu_locked, "unl_cpu");
    lat = 0;
    while (!t_res_valid[2] && lat < 20) begin @(negedge clk); lat++; end
    chk(t_res_valid[2] && mem[4] == 32'h777, "held request served after unl_cpu");
    t_res_ack[2] = 1;
    @(negedge clk);
    t_res_ack[2] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
