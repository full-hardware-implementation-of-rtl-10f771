// serv_mtx: mutex service module of the RTOS manager (loc_mtx, unl_mtx).
//
// Holds the owner of each of NUM_MTX mutexes (0 = free). The mutex ID comes
// in A0 (1..NUM_MTX), the error code goes back in A0.
//   loc_mtx: a free mutex is given to the caller (E_OK); a mutex the caller
//            already owns gives E_OBJ; otherwise the caller enters the
//            Waiting state on that mutex and its answer is deferred.
//   unl_mtx: only the owner may unlock (else E_OBJ). If tasks wait on the
//            mutex, ownership passes to the waiter of highest current
//            priority (lowest ID among equals), which is released with
//            E_OK; otherwise the mutex becomes free.
// Waiters are found by scanning the task status registers for state
// Waiting (or Waiting-Suspended) on this mutex, so no wait queue is stored;
// a terminated waiter simply stops matching.
// Timing: a call is latched on start; done, res and the status write come
// in the next cycle. The service names follow the reference architecture;
// the semantics follow the reference kernel's mutexes without priority
// ceiling, and releasing the mutexes of a terminated owner is not done.
// While the CPU is locked both calls return E_CTX.
module serv_mtx
  import rtos_pkg::*;
#(
  parameter int NUM_TASKS = 5,
  parameter int NUM_MTX   = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  sreq_t  sreq,
  input  tstat_t st [NUM_TASKS],
  input  logic   cpu_locked,
  output logic   done,
  output sres_t  res,
  output stw_t   stw
);

  sreq_t            r;
  logic             exec;
  logic [TID_W-1:0] owner [NUM_MTX];

  logic             mid_ok;
  int unsigned      m;          // 0-based mutex index
  logic             wt_found;
  int unsigned      wt;         // 0-based index of the chosen waiter
  tstat_t           cs;         // caller's register
  logic             set_owner;
  logic [TID_W-1:0] new_owner;

  always_comb begin
    mid_ok = ($signed(r.a0) >= 1) && ($signed(r.a0) <= NUM_MTX);
    m      = mid_ok ? int'(r.a0) - 1 : 0;
    cs     = st[0];
    for (int i = 0; i < NUM_TASKS; i++) if (r.caller == TID_W'(i + 1)) cs = st[i];
    // highest-priority waiter on mutex m
    wt_found = 1'b0;
    wt       = 0;
    for (int i = 0; i < NUM_TASKS; i++) begin
      if ((st[i].tskstat == TTS_WAI || st[i].tskstat == TTS_WAS) &&
          st[i].wobj == TTW_MTX && st[i].wid == MID_W'(m) &&
          (!wt_found || st[i].pri < st[wt].pri)) begin
        wt_found = 1'b1;
        wt       = i;
      end
    end
  end

  always_comb begin
    done      = exec;
    res.defer = 1'b0;
    res.a0    = E_OK;
    res.a1    = r.a1;
    stw       = STW_NONE;
    set_owner = 1'b0;
    new_owner = '0;
    if (exec) begin
      if (!mid_ok)         res.a0 = E_ID;
      else if (cpu_locked) res.a0 = E_CTX;
      else if (r.method == METHOD_LOC_MTX) begin
        if (owner[m] == '0) begin
          set_owner = 1'b1;
          new_owner = r.caller;
        end else if (owner[m] == r.caller) begin
          res.a0 = E_OBJ;
        end else begin
          stw.we          = 1'b1;
          stw.id          = r.caller;
          stw.val         = cs;
          stw.val.tskstat = TTS_WAI;
          stw.val.wobj    = TTW_MTX;
          stw.val.wid     = MID_W'(m);
          res.defer       = 1'b1;
        end
      end else if (r.method == METHOD_UNL_MTX) begin
        if (owner[m] != r.caller) res.a0 = E_OBJ;
        else begin
          set_owner = 1'b1;
          if (wt_found) begin
            new_owner       = TID_W'(wt + 1);
            stw.we          = 1'b1;
            stw.id          = TID_W'(wt + 1);
            stw.val         = st[wt];
            stw.val.tskstat = (st[wt].tskstat == TTS_WAS) ? TTS_SUS : TTS_RDY;
            stw.val.wobj    = TTW_NONE;
            stw.val.wid     = '0;
            stw.wake        = 1'b1;
            stw.wake_code   = E_OK;
          end
        end
      end else res.a0 = E_NOSPT;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      exec <= 1'b0;
      for (int i = 0; i < NUM_MTX; i++) owner[i] <= '0;
    end else begin
      exec <= start;
      if (start) r <= sreq;
      if (set_owner) owner[m] <= new_owner;
    end
  end

endmodule
