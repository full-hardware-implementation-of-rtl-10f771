// tb_request_arbiter: self-checking test of the request arbiter.
// Random sets of pending requests with random priorities and service codes.
// Checks that the grant goes to the highest-priority request (lowest ID on
// ties), that the call reaches the named service with its arguments, that
// the service's result is routed back under the caller's ID, that unknown
// services are answered with E_NOSPT, and that only one call is in service.
module tb_request_arbiter;
  import rtos_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [PRI_W-1:0] pri [N];
  logic [DW-1:0] f [N], a0 [N], a1 [N];
  sreq_t sreq;
  logic [NSERV-1:0] svc_start, svc_done;
  sres_t svc_res [NSERV];
  logic res_valid, busy;
  logic [TID_W-1:0] res_id;
  sres_t res;
  int checks = 0, failures = 0;
  int nospt_seen = 0, contention_seen = 0;

  request_arbiter #(.NUM_TASKS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Fake service modules: answer after 1..3 cycles with a0 ^ tag(service).
  int delay [NSERV];
  int svc_busy [NSERV];
  sreq_t held [NSERV];
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSERV; s++) begin
      if (svc_start[s]) begin
        held[s] <= sreq;
        svc_busy[s] <= $urandom_range(3, 1);
      end else if (svc_busy[s] > 0) svc_busy[s] <= svc_busy[s] - 1;
    end
  end
  always_comb begin
    for (int s = 0; s < NSERV; s++) begin
      svc_done[s] = (svc_busy[s] == 1);
      svc_res[s].defer = 1'b0;
      svc_res[s].a0 = held[s].a0 ^ (32'h1111_0000 * (s + 1));
      svc_res[s].a1 = {24'h0, held[s].method};
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
    int exp, cyc;
    logic [7:0] serv;
    req = 0;
    for (int s = 0; s < NSERV; s++) svc_busy[s] = 0;
    for (int i = 0; i < N; i++) begin pri[i] = 1; f[i] = 0; a0[i] = 0; a1[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      while (busy) @(negedge clk);
      req = N'($urandom_range((1 << N) - 1, 1));
      if ($countones(req) > 1) contention_seen++;
      for (int i = 0; i < N; i++) begin
        pri[i] = PRI_W'($urandom_range(4, 1));
        serv = ($urandom_range(9) == 0) ? 8'd7 : 8'($urandom_range(NSERV, 1));
        f[i] = {16'h0, serv, 8'($urandom_range(15, 1))};
        a0[i] = $urandom; a1[i] = $urandom;
      end
      // reference choice
      exp = -1;
      for (int i = 0; i < N; i++)
        if (req[i] && (exp < 0 || pri[i] < pri[exp])) exp = i;
      #1;
      chk(grant == N'(1) << exp, "grant to highest priority, lowest ID");
      serv = f[exp][15:8];
      @(negedge clk);
      req = 0;
      chk(grant == 0 && busy, "one call at a time");
      chk(sreq.caller == TID_W'(exp + 1) && sreq.a0 == a0[exp] && sreq.a1 == a1[exp] &&
          sreq.method == f[exp][7:0], "request latched");
      if (serv == 8'd7) chk(svc_start == 0, "no service started for unknown code");
      else chk(svc_start == NSERV'(1) << (serv - 1), "dispatched to named service");
      cyc = 0;
      while (!res_valid && cyc < 10) begin
        @(negedge clk); cyc++;
      end
      chk(res_valid && res_id == TID_W'(exp + 1), "result routed to caller");
      if (serv == 8'd7) begin
        nospt_seen++;
        chk(res.a0 == E_NOSPT && cyc == 0, "unknown service answered at once");
      end else
        chk(res.a0 == (a0[exp] ^ (32'h1111_0000 * serv)), "result from the right service");
    end
    chk(nospt_seen > 0 && contention_seen > 0, "unknown-service and contention cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
