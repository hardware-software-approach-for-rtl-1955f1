// tb_sram_bank: self-checking test of one memory bank.
//
// Fills a reduced-depth bank with pseudo-random words, then reads every word
// back in random order and checks each against a reference array one cycle
// after the request (the bank's read latency). Also checks that the read
// port holds its value while no request is made and that a write does not
// disturb the read port.
module tb_sram_bank;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned WIDTH = 24;

  logic clk = 1'b0;
  logic req, we;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sram_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] last;
    req = 0; we = 0; addr = '0; wdata = '0;
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      req = 1; we = 1; addr = a[$clog2(DEPTH)-1:0]; wdata = WIDTH'($urandom);
      ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2 * DEPTH; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      req = 1; we = 0; addr = a[$clog2(DEPTH)-1:0];
      @(posedge clk); #1;
      req = 0;
      check(rdata, ref_mem[a], "read data after one cycle");
      last = rdata;
      // idle cycle with another address and a write: the read port must hold
      addr = addr + 1'b1;
      @(posedge clk); #1;
      check(rdata, last, "read port holds while idle");
      req = 1; we = 1; addr = a[$clog2(DEPTH)-1:0]; wdata = WIDTH'($urandom);
      ref_mem[a] = wdata;
      @(posedge clk); #1;
      req = 0;
      check(rdata, last, "write leaves read port unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
