// tb_serv_mtx: self-checking test of the mutex service module.
// The testbench keeps the status registers. Checks: lock of a free mutex,
// relock by the owner (E_OBJ), blocking of a second and third locker,
// unlock by a non-owner (E_OBJ), hand-over to the highest-priority waiter
// with a wake-up, freeing when nobody waits, bad IDs and the CPU lock.
module tb_serv_mtx;
  import rtos_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic start, done, cpu_locked;
  sreq_t sreq;
  tstat_t st [N];
  sres_t res;
  stw_t stw;
  int checks = 0, failures = 0;

  serv_mtx #(.NUM_TASKS(N), .NUM_MTX(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (st[i].tskstat == TTS_RDY) st[i].tskstat <= TTS_RUN;
      if (stw.we) st[stw.id - 1] <= stw.val;
    end
  end

  sres_t r;
  stw_t  w;
  task automatic call(input int caller, input logic [7:0] method, input logic [31:0] arg0);
    @(negedge clk);
    start = 1;
    sreq.caller = TID_W'(caller); sreq.method = method; sreq.a0 = arg0; sreq.a1 = 0;
    @(negedge clk);
    start = 0;
    chk(done, "done one cycle after start");
    r = res; w = stw;
    @(negedge clk);
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
    start = 0; sreq = '0; cpu_locked = 0;
    for (int i = 0; i < N; i++)
      st[i] = '{tskstat: TTS_RUN, bpri: 8, pri: 8, actcnt: 0, wupcnt: 0, wobj: TTW_NONE, wid: 0};
    st[2].pri = 4;   // task 3 has the highest priority
    st[3].pri = 12;  // task 4 the lowest
    repeat (2) @(posedge clk);
    rst_n = 1;

    call(1, METHOD_LOC_MTX, 1);
    chk(r.a0 == E_OK && !r.defer && !w.we, "lock free mutex");
    call(1, METHOD_LOC_MTX, 1);
    chk(r.a0 == E_OBJ, "relock by owner");
    call(4, METHOD_LOC_MTX, 1);
    chk(r.defer && st[3].tskstat == TTS_WAI && st[3].wobj == TTW_MTX && st[3].wid == 0,
        "second locker waits");
    call(3, METHOD_LOC_MTX, 1);
    chk(r.defer && st[2].tskstat == TTS_WAI, "third locker waits");
    call(2, METHOD_UNL_MTX, 1);
    chk(r.a0 == E_OBJ, "unlock by non-owner");
    call(2, METHOD_LOC_MTX, 2);
    chk(r.a0 == E_OK, "other mutex independent");
    call(1, METHOD_UNL_MTX, 1);
    chk(r.a0 == E_OK && w.we && w.wake && w.id == 3 && w.wake_code == E_OK,
        "hand-over to highest-priority waiter");
    chk(st[2].tskstat == TTS_RUN && st[3].tskstat == TTS_WAI, "only that waiter released");
    call(3, METHOD_UNL_MTX, 1);
    chk(r.a0 == E_OK && w.wake && w.id == 4, "hand-over to next waiter");
    call(4, METHOD_UNL_MTX, 1);
    chk(r.a0 == E_OK && !w.we, "unlock with no waiter frees");
    call(5, METHOD_LOC_MTX, 1);
    chk(r.a0 == E_OK, "freed mutex can be locked");
    call(5, METHOD_LOC_MTX, 3);
    chk(r.a0 == E_ID, "bad mutex ID");
    cpu_locked = 1;
    call(5, METHOD_UNL_MTX, 1);
    chk(r.a0 == E_CTX, "CPU locked");
    cpu_locked = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
