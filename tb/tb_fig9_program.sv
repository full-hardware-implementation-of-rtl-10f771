// tb_fig9_program: a task program with shared variables, run as a task
// module would run it after conversion for synthesis.
//
// Task 1 executes, through the shared-variable service, the program
//     x = 1; y = x + 2; chg_pri(TSK1, LOW_PRI); sub();
//     sub(): x = x + 3; y = y + x;
// where x and y are shared variables allocated in declaration order at
// 0x8000_0000 and 0x8000_0004, as a wrapper class that hands out
// consecutive addresses would. Expected: x = 4, y = 7, task 1 at priority
// LOW_PRI = 11. A second task keeps reading x while it runs; every value it
// sees must be one the program actually stored (1 or 4).
module tb_fig9_program;
  import rtos_pkg::*;
  localparam int N = 5;
  localparam logic [31:0] X_ADDR = 32'h8000_0000;
  localparam logic [31:0] Y_ADDR = 32'h8000_0004;
  localparam int LOW_PRI = 11;
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

  task automatic svc(input int i, input logic [7:0] serv, input logic [7:0] meth,
                     input logic [31:0] x0, input logic [31:0] x1, output logic [31:0] r0);
    @(negedge clk);
    t_a0_we[i] = 1; t_a0_wdata[i] = x0; t_a1_we[i] = 1; t_a1_wdata[i] = x1;
    @(negedge clk);
    t_a0_we[i] = 0; t_a1_we[i] = 0;
    t_f_we[i] = 1; t_f_wdata[i] = {16'h0, serv, meth};
    @(negedge clk);
    t_f_we[i] = 0;
    while (!t_res_valid[i]) @(negedge clk);
    r0 = t_a0[i];
    t_res_ack[i] = 1;
    @(negedge clk);
    t_res_ack[i] = 0;
  endtask


  task automatic get(input int i, input logic [31:0] a, output logic [31:0] v);
    svc(i, SERV_GRW, METHOD_READ, a, 0, v);
  endtask
  task automatic put(input int i, input logic [31:0] a, input logic [31:0] v);
    logic [31:0] r;
    svc(i, SERV_GRW, METHOD_WRITE, a, v, r);
    chk(r == E_OK, "write completed");
  endtask

  logic prog_done = 0;
  int   reads = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, r;
    t_f_we = 0; t_a0_we = 0; t_a1_we = 0; t_res_ack = 0;
    for (int i = 0; i < N; i++) begin t_f_wdata[i] = 0; t_a0_wdata[i] = 0; t_a1_wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge task_start[0]);
    // start an observer task first
    svc(0, SERV_CTRL_TSK, METHOD_ACT_TSK, 2, 0, r);
    chk(r == E_OK, "observer activated");
    // tsk(): x = 1; y = x + 2;
    put(0, X_ADDR, 1);
    get(0, X_ADDR, v);
    put(0, Y_ADDR, v + 2);
    // chg_pri(TSK1, LOW_PRI)
    svc(0, SERV_CTRL_TSK, METHOD_CHG_PRI, 1, LOW_PRI, r);
    chk(r == E_OK, "chg_pri returns E_OK");
    // sub(): x = x + 3; y = y + x;
    get(0, X_ADDR, v);
    put(0, X_ADDR, v + 3);
    get(0, Y_ADDR, v);
    get(0, X_ADDR, r);
    put(0, Y_ADDR, v + r);
    prog_done = 1;
    get(0, X_ADDR, v);
    chk(v == 4, $sformatf("x = %0d (expect 4)", v));
    get(0, Y_ADDR, v);
    chk(v == 7, $sformatf("y = %0d (expect 7)", v));
    svc(0, SERV_CTRL_TSK, METHOD_GET_PRI, 0, 0, r);
    chk(r == E_OK && t_a1[0] == LOW_PRI, "task 1 now at LOW_PRI");
    chk(reads > 0, "observer read x concurrently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observer task 2
  initial begin
    logic [31:0] v;
    @(posedge task_start[1]);
    @(negedge clk);
    while (!prog_done) begin
      get(1, X_ADDR, v);
      reads++;
      chk(v == 0 || v == 1 || v == 4, $sformatf("observer sees a stored value of x (%0d)", v));
    end
  end
endmodule
