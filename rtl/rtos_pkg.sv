// rtos_pkg: types and constants shared by the RTOS manager hardware.
//
// The manager replaces an RTOS kernel: every task is its own hardware
// module, and a task asks for a kernel service by writing a service/method
// code into its F register and the arguments into A0/A1. This package fixes
// the encodings that the task stubs and the manager agree on:
//   * F register: F[15:8] selects the service module, F[7:0] the method.
//     A zero F means "no request". The field split is this design's choice.
//   * Task states use the TOPPERS/ASP3 kernel values (TTS_RUN = 1, TTS_RDY = 2,
//     TTS_WAI = 4, TTS_SUS = 8, TTS_WAS = 12, TTS_DMT = 16) and error codes use
//     the ITRON values (E_OK = 0, E_ID = -18, E_QOVR = -43, ...), so that
//     unmodified service-call semantics carry over.
//   * Task IDs are 1-based as in the kernel API; 0 (TSK_SELF) names the caller.
// Status-register layout, counter widths and the service-module result
// record are this design's own.
package rtos_pkg;

  localparam int DW         = 32;   // data width of F, A0, A1 and shared variables
  localparam int MAX_TASKS  = 16;   // upper bound on tasks the manager supports
  localparam int TID_W      = 5;    // task ID width (IDs 0..16)
  localparam int PRI_W      = 5;    // priority width (1..16)
  localparam int CNT_W      = 4;    // activation / wakeup queue counter width
  localparam int MID_W      = 4;    // mutex ID width
  localparam int TMIN_TPRI  = 16;   // lowest priority (largest number)
  localparam int TMAX_TPRI  = 1;    // highest priority
  localparam int TMAX_ACTCNT = 1;   // activation requests that may be queued
  localparam int TMAX_WUPCNT = 1;   // wakeup requests that may be queued

  localparam logic [TID_W-1:0] TSK_SELF = '0;
  localparam logic [PRI_W-1:0] TPRI_INI = '0;

  // Task states (kernel encoding).
  typedef enum logic [4:0] {
    TTS_RUN = 5'h01,
    TTS_RDY = 5'h02,
    TTS_WAI = 5'h04,
    TTS_SUS = 5'h08,
    TTS_WAS = 5'h0c,
    TTS_DMT = 5'h10
  } tts_e;

  // What a waiting task waits for.
  typedef enum logic [1:0] {
    TTW_NONE = 2'd0,
    TTW_SLP  = 2'd1,
    TTW_MTX  = 2'd2
  } ttw_e;

  // One task status register.
  typedef struct packed {
    tts_e              tskstat;
    logic [PRI_W-1:0]  bpri;     // base priority
    logic [PRI_W-1:0]  pri;      // current priority
    logic [CNT_W-1:0]  actcnt;   // queued activation requests
    logic [CNT_W-1:0]  wupcnt;   // queued wakeup requests
    ttw_e              wobj;     // wait reason
    logic [MID_W-1:0]  wid;      // mutex waited for (wobj == TTW_MTX)
  } tstat_t;

  // Error codes (32-bit two's complement).
  localparam logic [DW-1:0] E_OK    = 32'd0;
  localparam logic [DW-1:0] E_NOSPT = -32'sd9;
  localparam logic [DW-1:0] E_PAR   = -32'sd17;
  localparam logic [DW-1:0] E_ID    = -32'sd18;
  localparam logic [DW-1:0] E_CTX   = -32'sd25;
  localparam logic [DW-1:0] E_ILUSE = -32'sd28;
  localparam logic [DW-1:0] E_OBJ   = -32'sd41;
  localparam logic [DW-1:0] E_QOVR  = -32'sd43;
  localparam logic [DW-1:0] E_RLWAI = -32'sd49;

  // Service codes, F[15:8].
  localparam logic [7:0] SERV_CTRL_TSK = 8'h01;
  localparam logic [7:0] SERV_MTX      = 8'h02;
  localparam logic [7:0] SERV_GRW      = 8'h03;
  localparam int         NSERV         = 3;   // service modules behind the arbiter

  // Methods of SERV_CTRL_TSK, F[7:0].
  localparam logic [7:0] METHOD_ACT_TSK = 8'd1;
  localparam logic [7:0] METHOD_CAN_ACT = 8'd2;
  localparam logic [7:0] METHOD_TER_TSK = 8'd3;
  localparam logic [7:0] METHOD_CHG_PRI = 8'd4;
  localparam logic [7:0] METHOD_GET_PRI = 8'd5;
  localparam logic [7:0] METHOD_WUP_TSK = 8'd6;
  localparam logic [7:0] METHOD_CAN_WUP = 8'd7;
  localparam logic [7:0] METHOD_REL_WAI = 8'd8;
  localparam logic [7:0] METHOD_SUS_TSK = 8'd9;
  localparam logic [7:0] METHOD_RSM_TSK = 8'd10;
  localparam logic [7:0] METHOD_LOC_CPU = 8'd11;
  localparam logic [7:0] METHOD_UNL_CPU = 8'd12;
  localparam logic [7:0] METHOD_SLP_TSK = 8'd13;
  localparam logic [7:0] METHOD_EXT_TSK = 8'd14;
  localparam logic [7:0] METHOD_RAS_TER = 8'd15;

  // Methods of SERV_MTX.
  localparam logic [7:0] METHOD_LOC_MTX = 8'd1;
  localparam logic [7:0] METHOD_UNL_MTX = 8'd2;

  // Methods of SERV_GRW (shared variable read / write).
  localparam logic [7:0] METHOD_READ  = 8'd1;
  localparam logic [7:0] METHOD_WRITE = 8'd2;

  // Base address of the shared-variable space seen by the task stubs.
  localparam logic [DW-1:0] GRW_BASE = 32'h8000_0000;

  // A request as handed to a service module.
  typedef struct packed {
    logic [7:0]       method;
    logic [TID_W-1:0] caller;   // 1-based ID of the requesting task
    logic [DW-1:0]    a0;
    logic [DW-1:0]    a1;
  } sreq_t;

  // Result of a service module, valid in its done cycle.
  //   defer : the caller gets no answer now (it waits, or it terminated);
  //           a later status write with wake = 1 answers it.
  typedef struct packed {
    logic          defer;
    logic [DW-1:0] a0;
    logic [DW-1:0] a1;
  } sres_t;

  // Status-register write issued by a service module in its done cycle.
  //   wake  : also deliver wake_code to task id (ends a deferred call)
  //   start : pulse the task module's start (activation)
  //   kill  : reset the task module and drop its F/A state (termination)
  typedef struct packed {
    logic             we;
    logic [TID_W-1:0] id;
    tstat_t           val;
    logic             wake;
    logic [DW-1:0]    wake_code;
    logic             start;
    logic             kill;
  } stw_t;

  localparam stw_t STW_NONE = '{we: 1'b0, id: '0, val: '0, wake: 1'b0,
                                wake_code: '0, start: 1'b0, kill: 1'b0};

endpackage
