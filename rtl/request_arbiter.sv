// request_arbiter: the manager's request arbiter (RA).
//
// Tasks run in parallel but kernel services are executed one at a time, so
// that two calls never interfere. When several tasks have a request pending
// (req, already gated by their stall signals), the arbiter picks the one
// whose task has the highest current priority (smallest number); among equal
// priorities the lowest task ID wins, which is this design's choice.
//
// Operation, one call at a time:
//   cycle t   : idle and some req high -> grant[i] pulses (the task's F is
//               consumed), the call is latched into sreq.
//   cycle t+1 : svc_start pulses to the service module named by F[15:8].
//   done      : when that module raises its done, its result is passed on
//               (res_valid, res_id, res) and the arbiter is idle again in
//               the next cycle.
// A call naming no existing service is answered by the arbiter itself with
// E_NOSPT in cycle t+1 (this design's choice).
// Shared-variable reads and writes are services too, so this one arbiter
// also orders all accesses to the data memory.
module request_arbiter
  import rtos_pkg::*;
#(
  parameter int NUM_TASKS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_TASKS-1:0] req,
  input  logic [PRI_W-1:0]     pri      [NUM_TASKS],
  input  logic [DW-1:0]        f        [NUM_TASKS],
  input  logic [DW-1:0]        a0       [NUM_TASKS],
  input  logic [DW-1:0]        a1       [NUM_TASKS],
  output logic [NUM_TASKS-1:0] grant,
  // to / from the service modules
  output sreq_t                sreq,
  output logic [NSERV-1:0]     svc_start,
  input  logic [NSERV-1:0]     svc_done,
  input  sres_t                svc_res  [NSERV],
  // result of the call in service
  output logic                 res_valid,
  output logic [TID_W-1:0]     res_id,
  output sres_t                res,
  output logic                 busy
);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_NOSPT} state_e;
  state_e state;

  logic [NSERV-1:0] sel_svc;     // one-hot service of the call in service
  logic             win_valid;
  int unsigned      win;

  // Priority selection: smallest priority number, then smallest index.
  always_comb begin
    win_valid = 1'b0;
    win       = 0;
    for (int i = 0; i < NUM_TASKS; i++) begin
      if (req[i] && (!win_valid || pri[i] < pri[win])) begin
        win_valid = 1'b1;
        win       = i;
      end
    end
  end

  always_comb begin
    grant = '0;
    if (state == S_IDLE && win_valid) grant[win] = 1'b1;
  end

  logic [7:0] win_serv;
  assign win_serv = f[win][15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sreq      <= '0;
      sel_svc   <= '0;
      svc_start <= '0;
    end else begin
      svc_start <= '0;
      unique case (state)
        S_IDLE: if (win_valid) begin
          sreq.method <= f[win][7:0];
          sreq.caller <= TID_W'(win + 1);
          sreq.a0     <= a0[win];
          sreq.a1     <= a1[win];
          if (win_serv >= 8'd1 && win_serv <= 8'(NSERV)) begin
            sel_svc   <= NSERV'(1) << (win_serv - 8'd1);
            svc_start <= NSERV'(1) << (win_serv - 8'd1);
            state     <= S_BUSY;
          end else begin
            sel_svc <= '0;
            state   <= S_NOSPT;
          end
        end
        S_BUSY:  if ((svc_done & sel_svc) != '0) state <= S_IDLE;
        S_NOSPT: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    res_valid = 1'b0;
    res       = '0;
    res_id    = sreq.caller;
    if (state == S_NOSPT) begin
      res_valid = 1'b1;
      res.a0    = E_NOSPT;
      res.a1    = sreq.a1;
    end else if (state == S_BUSY) begin
      for (int s = 0; s < NSERV; s++) begin
        if (sel_svc[s] && svc_done[s]) begin
          res_valid = 1'b1;
          res       = svc_res[s];
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_done_only_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (svc_done & ~sel_svc) == '0 || state != S_BUSY);

endmodule
