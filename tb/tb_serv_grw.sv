// tb_serv_grw: self-checking test of the shared-variable service module.
// A behavioural word memory stands in for the data memory. Random reads and
// writes of shared variables at 0x8000_0000 + 4*k are checked against a
// reference copy, together with the completion cycle (write: one cycle
// after start, read: two cycles) and E_PAR for bad addresses.
module tb_serv_grw;
  import rtos_pkg::*;
  localparam int WORDS = 32;
  localparam int AW = $clog2(WORDS);
  logic clk = 0, rst_n = 0;
  logic start, done;
  sreq_t sreq;
  sres_t res;
  logic mem_re, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic [DW-1:0] mem [WORDS];
  logic [DW-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  serv_grw #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_re) mem_rdata <= mem[mem_addr];
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  int lat;
  sres_t r;
  task automatic call(input logic [7:0] method, input logic [31:0] arg0, input logic [31:0] arg1);
    @(negedge clk);
    start = 1;
    sreq.caller = 1; sreq.method = method; sreq.a0 = arg0; sreq.a1 = arg1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    r = res;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic [31:0] v;
    start = 0; sreq = '0;
    for (int i = 0; i < WORDS; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      k = $urandom_range(WORDS - 1);
      if ($urandom_range(1) == 1) begin
        v = $urandom;
        call(METHOD_WRITE, GRW_BASE + 32'(4 * k), v);
        ref_mem[k] = v;
        chk(r.a0 == E_OK && lat == 1, "write completes one cycle after start");
      end else begin
        call(METHOD_READ, GRW_BASE + 32'(4 * k), 0);
        chk(r.a0 == ref_mem[k] && lat == 2, "read returns stored value after two cycles");
      end
    end
    call(METHOD_READ, GRW_BASE + 32'(4 * WORDS), 0);
    chk(r.a0 == E_PAR, "read beyond shared space");
    call(METHOD_WRITE, GRW_BASE + 2, 5);
    chk(r.a0 == E_PAR, "unaligned write");
    call(METHOD_WRITE, 32'h0000_0010, 5);
    chk(r.a0 == E_PAR, "write below shared space");
    call(METHOD_READ, GRW_BASE, 0);
    chk(r.a0 == ref_mem[0], "rejected writes left memory unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
