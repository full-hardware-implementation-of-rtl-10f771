// serv_ctrl_tsk: task-control service module of the RTOS manager.
//
// Executes the task-management and task-synchronisation calls of the
// reference kernel on the task status registers:
//   act_tsk can_act ter_tsk ras_ter ext_tsk chg_pri get_pri
//   slp_tsk wup_tsk can_wup rel_wai sus_tsk rsm_tsk loc_cpu unl_cpu
// The target task ID comes in A0 (0 = the caller itself), a second argument
// (a priority) in A1. The error code is returned in A0; get_pri returns the
// priority in A1, can_act/can_wup return the cancelled count in A0.
//
// A call is latched on start and executed in the next cycle, in which done
// is high together with the result (res) and at most one status-register
// write (stw). Hence every call takes two cycles in this module.
//
// Blocking and termination. slp_tsk with no queued wakeup puts the caller in
// the Waiting state and defers its answer; wup_tsk (E_OK) or rel_wai
// (E_RLWAI) later answers it through stw.wake. ext_tsk, and ras_ter on the
// caller, end the caller: the call is never answered and the task module is
// reset (stw.kill). Termination of a task with a queued activation restarts
// it at once (stw.start as well).
//
// CPU lock. loc_cpu records the locking task; while locked the manager
// offers only that task's requests, and every call here except loc_cpu,
// unl_cpu and ext_tsk returns E_CTX, as the kernel does. ext_tsk releases
// the lock.
//
// Checking order (ID, then CPU lock, then object state) follows the kernel's
// act_tsk. Queuing of activations (actcnt) and wakeups (wupcnt) up to
// TMAX_ACTCNT/TMAX_WUPCNT follows the kernel; the status-write interface and
// the single-cycle execution are this design's own.
module serv_ctrl_tsk
  import rtos_pkg::*;
#(
  parameter int NUM_TASKS = 5,
  parameter logic [MAX_TASKS-1:0][PRI_W-1:0] INIT_PRI =
    {{11{5'd16}}, 5'd9, 5'd10, 5'd10, 5'd10, 5'd5}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  sreq_t            sreq,
  input  tstat_t           st [NUM_TASKS],
  output logic             done,
  output sres_t            res,
  output stw_t             stw,
  output logic             cpu_locked,
  output logic [TID_W-1:0] lock_owner
);

  sreq_t r;
  logic  exec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      exec <= 1'b0;
    end else begin
      exec <= start;
      if (start) r <= sreq;
    end
  end

  // Target of the call.
  logic             id_ok;
  logic [TID_W-1:0] tid;
  tstat_t           ts;
  tstat_t           nv;       // new value of the target's register
  tstat_t           cs;       // caller's register

  always_comb begin
    id_ok = 1'b0;
    tid   = r.caller;
    if (r.a0 == '0) begin
      id_ok = 1'b1;
    end else if ($signed(r.a0) >= 1 && $signed(r.a0) <= NUM_TASKS) begin
      id_ok = 1'b1;
      tid   = r.a0[TID_W-1:0];
    end
    ts = st[0];
    cs = st[0];
    for (int i = 0; i < NUM_TASKS; i++) begin
      if (tid == TID_W'(i + 1))      ts = st[i];
      if (r.caller == TID_W'(i + 1)) cs = st[i];
    end
  end

  function automatic logic is_wait(tts_e s);
    return s == TTS_WAI || s == TTS_WAS;
  endfunction

  // Register value of a task after termination (restarted if an activation
  // is queued).
  function automatic tstat_t terminated(tstat_t s);
    tstat_t v = s;
    v.tskstat = (s.actcnt != '0) ? TTS_RDY : TTS_DMT;
    v.actcnt  = (s.actcnt != '0) ? s.actcnt - 1'b1 : '0;
    v.pri     = s.bpri;
    v.wupcnt  = '0;
    v.wobj    = TTW_NONE;
    v.wid     = '0;
    return v;
  endfunction

  logic lock_set, lock_clr;

  always_comb begin
    done     = exec;
    res.defer = 1'b0;
    res.a0   = E_OK;
    res.a1   = r.a1;
    stw      = STW_NONE;
    stw.id   = tid;
    nv       = ts;
    lock_set = 1'b0;
    lock_clr = 1'b0;

    if (exec) begin
      if (r.method == METHOD_LOC_CPU) begin
        lock_set = 1'b1;
      end else if (r.method == METHOD_UNL_CPU) begin
        lock_clr = 1'b1;
      end else if (r.method == METHOD_EXT_TSK) begin
        lock_clr      = 1'b1;
        res.defer     = 1'b1;
        stw.id        = r.caller;
        stw.we        = 1'b1;
        stw.kill      = 1'b1;
        stw.val       = terminated(cs);
        stw.start     = cs.actcnt != '0;
      end else if (r.method == METHOD_SLP_TSK) begin
        stw.id = r.caller;
        nv     = cs;
        if (cpu_locked) res.a0 = E_CTX;
        else if (nv.wupcnt != '0) begin
          nv.wupcnt = nv.wupcnt - 1'b1;
          stw.we    = 1'b1;
          stw.val   = nv;
        end else begin
          nv.tskstat = TTS_WAI;
          nv.wobj    = TTW_SLP;
          stw.we     = 1'b1;
          stw.val    = nv;
          res.defer  = 1'b1;
        end
      end else if (!id_ok) begin
        res.a0 = (r.method >= METHOD_ACT_TSK && r.method <= METHOD_RSM_TSK ||
                  r.method == METHOD_RAS_TER) ? E_ID : E_NOSPT;
      end else if (cpu_locked) begin
        res.a0 = (r.method >= METHOD_ACT_TSK && r.method <= METHOD_RSM_TSK ||
                  r.method == METHOD_RAS_TER) ? E_CTX : E_NOSPT;
      end else begin
        unique case (r.method)
          METHOD_ACT_TSK: begin
            if (ts.tskstat == TTS_DMT) begin
              nv.tskstat = TTS_RDY;
              nv.pri     = ts.bpri;
              stw.we     = 1'b1;
              stw.start  = 1'b1;
            end else if (ts.actcnt < CNT_W'(TMAX_ACTCNT)) begin
              nv.actcnt = ts.actcnt + 1'b1;
              stw.we    = 1'b1;
            end else res.a0 = E_QOVR;
          end
          METHOD_CAN_ACT: begin
            res.a0    = DW'(ts.actcnt);
            nv.actcnt = '0;
            stw.we    = 1'b1;
          end
          METHOD_TER_TSK, METHOD_RAS_TER: begin
            if (r.method == METHOD_TER_TSK && tid == r.caller) res.a0 = E_ILUSE;
            else if (ts.tskstat == TTS_DMT) res.a0 = E_OBJ;
            else begin
              nv        = terminated(ts);
              stw.we    = 1'b1;
              stw.kill  = 1'b1;
              stw.start = ts.actcnt != '0;
              res.defer = (tid == r.caller);
            end
          end
          METHOD_CHG_PRI: begin
            if (r.a1 != '0 && (r.a1 < DW'(TMAX_TPRI) || r.a1 > DW'(TMIN_TPRI)))
              res.a0 = E_PAR;
            else if (ts.tskstat == TTS_DMT) res.a0 = E_OBJ;
            else begin
              nv.bpri = (r.a1 == '0) ? INIT_PRI[tid - 1'b1] : r.a1[PRI_W-1:0];
              nv.pri  = nv.bpri;
              stw.we  = 1'b1;
            end
          end
          METHOD_GET_PRI: begin
            if (ts.tskstat == TTS_DMT) res.a0 = E_OBJ;
            else res.a1 = DW'(ts.pri);
          end
          METHOD_WUP_TSK: begin
            if (ts.tskstat == TTS_DMT) res.a0 = E_OBJ;
            else if (is_wait(ts.tskstat) && ts.wobj == TTW_SLP) begin
              nv.tskstat    = (ts.tskstat == TTS_WAS) ? TTS_SUS : TTS_RDY;
              nv.wobj       = TTW_NONE;
              stw.we        = 1'b1;
              stw.wake      = 1'b1;
              stw.wake_code = E_OK;
            end else if (ts.wupcnt < CNT_W'(TMAX_WUPCNT)) begin
              nv.wupcnt = ts.wupcnt + 1'b1;
              stw.we    = 1'b1;
            end else res.a0 = E_QOVR;
          end
          METHOD_CAN_WUP: begin
            if (ts.tskstat == TTS_DMT) res.a0 = E_OBJ;
            else begin
              res.a0    = DW'(ts.wupcnt);
              nv.wupcnt = '0;
              stw.we    = 1'b1;
            end
          end
          METHOD_REL_WAI: begin
            if (!is_wait(ts.tskstat)) res.a0 = E_OBJ;
            else begin
              nv.tskstat    = (ts.tskstat == TTS_WAS) ? TTS_SUS : TTS_RDY;
              nv.wobj       = TTW_NONE;
              nv.wid        = '0;
              stw.we        = 1'b1;
              stw.wake      = 1'b1;
              stw.wake_code = E_RLWAI;
            end
          end
          METHOD_SUS_TSK: begin
            unique case (ts.tskstat)
              TTS_RUN, TTS_RDY: begin nv.tskstat = TTS_SUS; stw.we = 1'b1; end
              TTS_WAI:          begin nv.tskstat = TTS_WAS; stw.we = 1'b1; end
              TTS_DMT:          res.a0 = E_OBJ;
              default:          res.a0 = E_QOVR;
            endcase
          end
          METHOD_RSM_TSK: begin
            if (ts.tskstat == TTS_SUS) begin nv.tskstat = TTS_RDY; stw.we = 1'b1; end
            else if (ts.tskstat == TTS_WAS) begin nv.tskstat = TTS_WAI; stw.we = 1'b1; end
            else res.a0 = E_OBJ;
          end
          default: res.a0 = E_NOSPT;
        endcase
        stw.val = nv;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_locked <= 1'b0;
      lock_owner <= '0;
    end else if (lock_set) begin
      cpu_locked <= 1'b1;
      lock_owner <= r.caller;
    end else if (lock_clr) begin
      cpu_locked <= 1'b0;
      lock_owner <= '0;
    end
  end

  a_caller_range: assert property (@(posedge clk) disable iff (!rst_n)
    exec |-> r.caller >= 1 && r.caller <= TID_W'(NUM_TASKS));

endmodule
