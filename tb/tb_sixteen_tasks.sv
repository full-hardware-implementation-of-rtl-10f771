// tb_sixteen_tasks: the largest configuration the manager supports, 16
// tasks. Task 1 (active from reset) activates tasks 2..16 one after the
// other; each of those locks mutex 1, increments a shared counter, unlocks
// and exits. With 15 tasks competing for one mutex and one arbiter, the
// counter must end at 15, every task must end Dormant, and the mutex must
// have been contended.
module tb_sixteen_tasks;
  import rtos_pkg::*;
  localparam int N = 16;
  localparam logic [31:0] C_ADDR = GRW_BASE + 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] t_f_we, t_a0_we, t_a1_we, t_res_valid, t_res_ack, task_start, task_kill;
  logic [DW-1:0] t_f_wdata [N], t_a0_wdata [N], t_a1_wdata [N], t_a0 [N], t_a1 [N];
  tts_e task_state [N];
  logic cpu_locked;

  rtos_hw_top #(.NUM_TASKS(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  int starts [N];
  logic killed [N];
  int n_mtx_wait = 0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N; i++) begin starts[i] <= 0; killed[i] <= 0; end
    else begin
      for (int i = 0; i < N; i++) begin
        if (task_start[i]) starts[i] <= starts[i] + 1;
        if (task_kill[i])  killed[i] <= 1'b1;
      end
      if (dut.u_manager.stw.we && dut.u_manager.stw.val.wobj == TTW_MTX) n_mtx_wait <= n_mtx_wait + 1;
    end
  end

  task automatic svc(input int i, input logic [7:0] serv, input logic [7:0] meth,
                     input logic [31:0] x0, input logic [31:0] x1, output logic [31:0] r0);
    r0 = 32'hdead_beef;
    if (killed[i]) return;
    @(negedge clk);
    t_a0_we[i] = 1; t_a0_wdata[i] = x0; t_a1_we[i] = 1; t_a1_wdata[i] = x1;
    @(negedge clk);
    t_a0_we[i] = 0; t_a1_we[i] = 0;
    t_f_we[i] = 1; t_f_wdata[i] = {16'h0, serv, meth};
    @(negedge clk);
    t_f_we[i] = 0;
    while (!t_res_valid[i] && !killed[i]) @(negedge clk);
    if (killed[i]) return;
    r0 = t_a0[i];
    t_res_ack[i] = 1;
    @(negedge clk);
    t_res_ack[i] = 0;
  endtask

  logic main_done = 0;
  task automatic program_of(input int i);
    logic [31:0] r, v;
    if (i == 0) begin
      for (int k = 2; k <= N; k++) begin
        svc(i, SERV_CTRL_TSK, METHOD_ACT_TSK, k, 0, r);
        chk(r == E_OK, $sformatf("act_tsk(%0d)", k));
      end
      main_done = 1;
    end else begin
      svc(i, SERV_MTX, METHOD_LOC_MTX, 1, 0, r);
      chk(r == E_OK, "loc_mtx");
      svc(i, SERV_GRW, METHOD_READ, C_ADDR, 0, v);
      repeat (4) @(negedge clk);
      svc(i, SERV_GRW, METHOD_WRITE, C_ADDR, v + 1, r);
      svc(i, SERV_MTX, METHOD_UNL_MTX, 1, 0, r);
      chk(r == E_OK, "unl_mtx");
      svc(i, SERV_CTRL_TSK, METHOD_EXT_TSK, 0, 0, r);
    end
  endtask

  for (genvar g = 0; g < N; g++) begin : g_model
    initial begin
      int seen = 0;
      @(posedge rst_n);
      forever begin
        while (starts[g] <= seen) @(negedge clk);
        seen = starts[g];
        @(negedge clk);
        killed[g] = 1'b0;
        program_of(g);
        while (!killed[g] && g != 0) @(negedge clk);
        if (g == 0) forever @(negedge clk);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic all_dmt;
    t_f_we = 0; t_a0_we = 0; t_a1_we = 0; t_res_ack = 0;
    for (int i = 0; i < N; i++) begin t_f_wdata[i] = 0; t_a0_wdata[i] = 0; t_a1_wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (main_done);
    n = 0;
    all_dmt = 0;
    while (!all_dmt && n < 5000) begin
      @(negedge clk); n++;
      all_dmt = 1;
      for (int i = 1; i < N; i++) if (task_state[i] != TTS_DMT) all_dmt = 0;
    end
    chk(all_dmt, "all 15 worker tasks ran and exited");
    chk(dut.u_dmem.mem[2] == N - 1, $sformatf("shared counter %0d (expect %0d)", dut.u_dmem.mem[2], N - 1));
    chk(n_mtx_wait > 0, "mutex contended");
    $display("mutex waits: %0d", n_mtx_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
