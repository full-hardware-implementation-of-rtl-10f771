// tb_dmem: self-checking test of the data memory.
// Writes random words to random addresses, keeps a reference copy and
// checks every read (one-cycle latency) against it, including the reset
// value of words never written.
module tb_dmem;
  localparam int WORDS = 32;
  localparam int AW = $clog2(WORDS);
  logic clk = 0, rst_n = 0;
  logic re, we;
  logic [AW-1:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      addr  = AW'($urandom_range(WORDS - 1));
      we    = ($urandom_range(1) == 1);
      re    = !we;
      wdata = $urandom;
      if (we) ref_mem[addr] = wdata;
      @(negedge clk);
      if (re) begin
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++;
          $display("read mismatch at %0d: got %h expected %h", addr, rdata, ref_mem[addr]);
        end
      end
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
