// dmem: data memory holding the tasks' shared (global) variables.
//
// A single-port synchronous RAM of WORDS words of DW bits. A write takes
// effect at the clock edge where we = 1; a read returns the addressed word
// one cycle after re is asserted (rdata is registered). Only the shared
// variable service (serv_grw) drives this port, so accesses from parallel
// tasks are already serialised by the request arbiter in front of it.
// The memory is cleared by reset so that an unwritten variable reads 0,
// as a C global without initialiser would.
// The default of 32 words is this design's choice: it matches the register
// count of the shared-variable service of the reference implementation
// (about one thousand flip-flops, i.e. 32 words of 32 bits).
module dmem #(
  parameter int WORDS = 32,
  parameter int DW    = 32,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem[addr] <= wdata;
      if (re) rdata <= mem[addr];
    end
  end

endmodule
