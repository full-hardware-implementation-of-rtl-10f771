// serv_grw: shared-variable (global read/write) service module.
//
// Task code reaches global variables only through this service, so that a
// non-running task cannot touch them and concurrent accesses are ordered by
// the request arbiter. A variable is named by its byte address in A0; the
// shared space starts at GRW_BASE (0x8000_0000) with one 32-bit word per
// variable, consecutive variables 4 bytes apart.
//   read  (METHOD_READ) : A0 = address          -> A0 = value
//   write (METHOD_WRITE): A0 = address, A1 = value -> A0 = E_OK
// An address outside the WORDS words or not word-aligned returns E_PAR
// (this design's choice; a read then cannot be told from data).
// Timing: the call is latched on start; a write completes in the next cycle,
// a read one cycle later because the data memory is synchronous.
module serv_grw
  import rtos_pkg::*;
#(
  parameter int WORDS = 32,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  sreq_t         sreq,
  output logic          done,
  output sres_t         res,
  // data memory port
  output logic          mem_re,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic [DW-1:0] mem_rdata
);

  typedef enum logic [1:0] {G_IDLE, G_EXEC, G_READ} gstate_e;
  gstate_e state;
  sreq_t   r;

  logic [DW-1:0] off;
  logic          addr_ok;

  assign off       = r.a0 - GRW_BASE;
  assign addr_ok   = (off[1:0] == 2'b00) && (off[DW-1:2] < (DW-2)'(WORDS));
  assign mem_addr  = off[AW+1:2];
  assign mem_wdata = r.a1;
  assign mem_re    = (state == G_EXEC) && addr_ok && r.method == METHOD_READ;
  assign mem_we    = (state == G_EXEC) && addr_ok && r.method == METHOD_WRITE;

  always_comb begin
    done      = 1'b0;
    res.defer = 1'b0;
    res.a0    = E_OK;
    res.a1    = r.a1;
    if (state == G_EXEC) begin
      if (!addr_ok) begin
        done   = 1'b1;
        res.a0 = E_PAR;
      end else if (r.method == METHOD_WRITE) begin
        done = 1'b1;
      end else if (r.method != METHOD_READ) begin
        done   = 1'b1;
        res.a0 = E_NOSPT;
      end
    end else if (state == G_READ) begin
      done   = 1'b1;
      res.a0 = mem_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      r     <= '0;
    end else begin
      unique case (state)
        G_IDLE: if (start) begin
          r     <= sreq;
          state <= G_EXEC;
        end
        G_EXEC: state <= mem_re ? G_READ : G_IDLE;
        G_READ: state <= G_IDLE;
        default: state <= G_IDLE;
      endcase
    end
  end

endmodule
