// tb_synchronizer: self-checking test of the synchronizer.
//
// Four cores are modelled by tasks that issue an instruction and hold it until
// it completes (sync_ready on an enabled clock edge). Shared data memory is a
// reference array behind a port that delays some grants, like a busy bank.
// Scenarios:
//  1. register window: configuration read-back and per-core identifier;
//  2. producer/consumer: core 3 registers with SNOP and sleeps, cores 0-2
//     issue SINC in the same cycle (one merged update), then SDEC one by one;
//     core 3 must stay asleep until the last SDEC and then wake;
//  3. lock-step branch: cores 0 and 1 SINC together, core 0 SDECs and sleeps,
//     core 1 SDECs; both must continue, core 1's SLEEP finishing at once;
//  4. interrupt: core 2 subscribes to line 1 and sleeps; a rise on line 0
//     must not wake it, a rise on line 1 must, with status and pulse;
//  5. an instruction naming a point beyond the configured count completes
//     at once without a memory access;
//  6. a core with a memory stall has its clock disabled.
// The synchronization point words are checked against hand-computed values,
// and the latency of an uncontended update is checked to be 4 cycles.
module tb_synchronizer;
  import wbsn_pkg::*;
  localparam int unsigned N = 4, N_IRQ = 3, AW = 15, DW = 16, LIT_W = 8;
  localparam int unsigned CNT_W = DW - N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic     [N-1:0]            sync_valid, sync_ready, core_sleeping, mem_stall, core_clk_en, core_irq;
  sync_op_e [N-1:0]            sync_op;
  logic     [N-1:0][LIT_W-1:0] sync_lit;
  logic     [N_IRQ-1:0]        irq;
  logic     [N-1:0]            mmio_req, mmio_we;
  logic     [N-1:0][3:0]       mmio_addr;
  logic     [N-1:0][DW-1:0]    mmio_wdata, mmio_rdata;
  logic     [3:0]              priv_bits;
  logic                        dm_req, dm_we, dm_gnt, dm_rvalid;
  logic     [AW-1:0]           dm_addr;
  logic     [DW-1:0]           dm_wdata, dm_rdata;

  int checks = 0, failures = 0;
  int dm_writes = 0, dm_reads = 0;
  logic [DW-1:0] mem [1 << AW];
  logic busy;            // makes the memory refuse grants
  logic [N-1:0] done;    // per-core completion flags set by the core tasks

  synchronizer #(.N_CORES(N), .N_IRQ(N_IRQ), .DM_AW(AW), .DW(DW), .LIT_W(LIT_W)) dut (.*);

  always #5 clk = ~clk;

  // shared data memory model
  assign dm_gnt = dm_req && !busy;
  always_ff @(posedge clk) begin
    dm_rvalid <= dm_req && dm_gnt && !dm_we;
    if (dm_req && dm_gnt) begin
      if (dm_we) begin mem[dm_addr] <= dm_wdata; dm_writes <= dm_writes + 1; end
      else begin dm_rdata <= mem[dm_addr]; dm_reads <= dm_reads + 1; end
    end
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  // A core issues one instruction and holds it until it completes.
  task automatic issue(input int c, input sync_op_e op, input int lit, output int cycles);
    bit r;
    sync_valid[c] = 1'b1; sync_op[c] = op; sync_lit[c] = LIT_W'(lit);
    cycles = 0;
    do begin
      @(negedge clk);
      r = sync_ready[c] && core_clk_en[c];
      check(core_clk_en[c] == r, "clock enabled only when the instruction completes");
      @(posedge clk); #1;
      cycles++;
    end while (!r);
    sync_valid[c] = 1'b0;
  endtask

  task automatic reg_write(input int c, input logic [3:0] a, input logic [DW-1:0] d);
    mmio_req[c] = 1; mmio_we[c] = 1; mmio_addr[c] = a; mmio_wdata[c] = d;
    @(posedge clk); #1;
    mmio_req[c] = 0; mmio_we[c] = 0;
  endtask

  task automatic reg_read(input int c, input logic [3:0] a, output logic [DW-1:0] d);
    mmio_req[c] = 1; mmio_we[c] = 0; mmio_addr[c] = a;
    @(posedge clk); #1;
    mmio_req[c] = 0;
    d = mmio_rdata[c];
  endtask

  function automatic logic [DW-1:0] point(input int flags, input int cnt);
    return {N'(flags), CNT_W'(cnt)};
  endfunction

  localparam int BASE = 100;
  logic [DW-1:0] rd;
  int cyc, cyc2, w0;

  initial begin
    sync_valid = '0; sync_op = '{default: SYNC_SNOP}; sync_lit = '0;
    mem_stall = '0; irq = '0; busy = 0; done = '0;
    mmio_req = '0; mmio_we = '0; mmio_addr = '0; mmio_wdata = '0;
    for (int a = 0; a < (1 << AW); a++) mem[a] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- 1. registers
    reg_write(0, REG_SYNC_BASE, DW'(BASE));
    reg_write(1, REG_SYNC_COUNT, 16'd8);
    reg_write(2, REG_PRIV_BITS, 16'd6);
    reg_read(3, REG_SYNC_BASE, rd);  check(rd == BASE, "sync base read back");
    reg_read(3, REG_SYNC_COUNT, rd); check(rd == 8, "sync count read back");
    reg_read(0, REG_PRIV_BITS, rd);  check(rd == 6 && priv_bits == 6, "private bits");
    for (int c = 0; c < N; c++) begin
      reg_read(c, REG_CORE_ID, rd); check(rd == c, $sformatf("core identifier %0d read %0d", c, rd));
    end

    // ---- 2. producer/consumer on point 1
    issue(3, SYNC_SNOP, 1, cyc);
    check(cyc == 4, $sformatf("uncontended update takes 4 cycles (took %0d)", cyc));
    check(mem[BASE + 1] == point(4'b1000, 0), "SNOP sets the consumer flag only");
    fork
      begin issue(3, SYNC_SLEEP, 0, cyc); done[3] = 1; end
      begin
        w0 = dm_writes;
        fork
          issue(0, SYNC_SINC, 1, cyc2);
          issue(1, SYNC_SINC, 1, cyc2);
          issue(2, SYNC_SINC, 1, cyc2);
        join
        check(dm_writes - w0 == 1, "three SINCs merged into one memory update");
        check(mem[BASE + 1] == point(4'b1111, 3), "flags of producers and consumer, count 3");
        issue(0, SYNC_SDEC, 1, cyc2);
        check(mem[BASE + 1] == point(4'b1111, 2), "count 2 after one SDEC");
        repeat (5) @(posedge clk); #1;
        check(!done[3] && core_sleeping[3] && !core_clk_en[3], "consumer still asleep");
        busy = 1;                 // memory busy for a while: update must wait
        fork
          issue(1, SYNC_SDEC, 1, cyc2);
          begin repeat (4) @(posedge clk); #1 busy = 0; end
        join
        check(cyc2 > 4, "update waits for the memory grant");
        check(!done[3], "consumer still asleep after second SDEC");
        issue(2, SYNC_SDEC, 1, cyc2);
        check(mem[BASE + 1] == point(0, 0), "point cleared when count reaches zero");
        repeat (3) @(posedge clk); #1;
        check(done[3], "consumer woken when data is complete");
      end
    join
    done = '0;

    // ---- 3. lock-step branch on point 2
    fork
      issue(0, SYNC_SINC, 2, cyc);
      issue(1, SYNC_SINC, 2, cyc);
    join
    check(mem[BASE + 2] == point(4'b0011, 2), "branch entry registers both cores");
    issue(0, SYNC_SDEC, 2, cyc);
    fork
      begin issue(0, SYNC_SLEEP, 0, cyc); done[0] = 1; end
      begin
        repeat (6) @(posedge clk); #1;
        check(!done[0] && core_sleeping[0], "first core waits at the end of the branch");
        issue(1, SYNC_SDEC, 2, cyc2);
        issue(1, SYNC_SLEEP, 0, cyc2);
        check(cyc2 == 1, "last core's SLEEP completes at once");
        @(posedge clk); #1;
        check(done[0], "first core resumed together with the last one");
      end
    join
    check(mem[BASE + 2] == point(0, 0), "branch point cleared");
    done = '0;

    // ---- 4. interrupt forwarding
    reg_write(2, REG_SUB, 16'b010);
    fork
      begin issue(2, SYNC_SLEEP, 0, cyc); done[2] = 1; end
      begin
        repeat (3) @(posedge clk); #1 irq = 3'b001;
        repeat (3) @(posedge clk); #1;
        check(!done[2] && core_irq == '0, "unsubscribed line does not wake");
        irq = 3'b011;
        @(posedge clk); #1;
        check(core_irq == 4'b0100, "interrupt pulse forwarded to the subscriber only");
        repeat (2) @(posedge clk); #1;
        check(done[2], "subscribed line wakes the core");
        irq = '0;
      end
    join
    reg_read(2, REG_IRQ_STATUS, rd); check(rd == 3'b010, "interrupt status");
    reg_write(2, REG_IRQ_STATUS, 16'b010);
    reg_read(2, REG_IRQ_STATUS, rd); check(rd == 0, "status cleared by writing one");
    reg_read(1, REG_IRQ_STATUS, rd); check(rd == 0, "other core has no status");

    // ---- 5. point beyond the configured count
    w0 = dm_reads;
    issue(0, SYNC_SINC, 9, cyc);
    check(cyc == 1 && dm_reads == w0, "out-of-range point completes without memory access");

    // ---- 6. memory stall gates the clock
    mem_stall[1] = 1'b1;
    @(negedge clk);
    check(!core_clk_en[1] && core_clk_en[0], "stalled core gated, others run");
    mem_stall[1] = 1'b0;
    @(negedge clk);
    check(core_clk_en[1], "core runs again after the stall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
