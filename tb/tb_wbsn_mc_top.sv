// tb_wbsn_mc_top: end-to-end test of the platform at its full size.
//
// The eight cores are replaced by tasks that drive each core's fetch, data
// and synchronization ports as a core would: a request is held until it is
// granted, read data is taken one cycle later, and a synchronization
// instruction is held until it completes. The test follows the mapping of a
// three-lead filter + delineation application: cores 0-2 filter one lead
// each from instruction bank 0, core 3 combines their results from bank 1 and
// core 4 waits for ADC samples. It checks data values against values computed
// here and counts how often each mechanism of the platform occurred:
// program load, instruction broadcast, instruction bank conflict, data
// broadcast, data bank conflict, private (translated) access, register window
// access, merged synchronization update, producer/consumer wake-up, lock-step
// wake-up after a branch, interrupt wake-up and clock gating of a sleeping
// core. A mechanism that never occurred counts as a failure.
module tb_wbsn_mc_top;
  import wbsn_pkg::*;
  localparam int N = 8, IM_AW = 15, DM_AW = 15, IM_W = 24, DW = 16, LIT_W = 8, N_IRQ = 3;
  localparam int IM_BANK_WORDS = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  logic     [N-1:0]             i_req, i_gnt, i_rvalid;
  logic     [N-1:0][IM_AW-1:0]  i_addr;
  logic     [N-1:0][IM_W-1:0]   i_rdata;
  logic     [N-1:0]             d_req, d_we, d_gnt, d_rvalid;
  logic     [N-1:0][DM_AW-1:0]  d_addr;
  logic     [N-1:0][DW-1:0]     d_wdata, d_rdata;
  logic     [N-1:0]             d_private;
  logic     [N-1:0]             sync_valid, sync_ready, core_sleeping, core_irq, core_clk_en, core_clk;
  sync_op_e [N-1:0]             sync_op;
  logic     [N-1:0][LIT_W-1:0]  sync_lit;
  logic     [N_IRQ-1:0]         irq;
  logic     [N_IRQ-1:0][DW-1:0] adc_data;
  logic                         load_req, load_gnt;
  logic     [IM_AW-1:0]         load_addr;
  logic     [IM_W-1:0]          load_wdata;
  logic     [7:0]               im_bcast;
  logic     [15:0]              dm_bcast;

  wbsn_mc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {M_LOAD, M_IM_BCAST, M_IM_CONFLICT, M_DM_BCAST, M_DM_CONFLICT, M_PRIVATE,
                    M_REGS, M_MERGE, M_PC_WAKE, M_LOCKSTEP_WAKE, M_IRQ_WAKE, M_SLEEP_GATED, M_NUM} mech_e;
  int seen [M_NUM];
  string mech_name [M_NUM] = '{"program load", "instruction broadcast", "instruction bank conflict",
                               "data broadcast", "data bank conflict", "private access",
                               "register window", "merged sync update", "producer/consumer wake",
                               "lock-step wake", "interrupt wake", "sleeping core clock gated"};

  initial begin
    repeat (200000) @(posedge clk);
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

  // program word stored at instruction address a
  function automatic logic [IM_W-1:0] prog(input int a);
    return IM_W'(a * 40503 + 17);
  endfunction

  // monitors: broadcast and conflicts, gated clock edges of each core
  int gated_edges [N];
  for (genvar c = 0; c < N; c++) begin : g_mon
    always @(posedge core_clk[c]) gated_edges[c]++;
  end
  always @(negedge clk) begin
    if (rst_n) begin
      if (im_bcast != '0) seen[M_IM_BCAST]++;
      if (dm_bcast != '0) seen[M_DM_BCAST]++;
      if ((i_req & ~i_gnt) != '0) seen[M_IM_CONFLICT]++;
      if ((d_req & ~d_gnt) != '0) seen[M_DM_CONFLICT]++;
      for (int c = 0; c < N; c++) begin
        // a core that waits for anything must not be clocked
        if ((i_req[c] && !i_gnt[c]) || (d_req[c] && !d_gnt[c]) || (sync_valid[c] && !sync_ready[c])) begin
          checks++;
          if (core_clk_en[c]) begin
            failures++;
            $display("FAIL at %0t: core %0d clocked while waiting", $time, c);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ core port tasks
  task automatic fetch(input int c, input int a, output logic [IM_W-1:0] w, output int waited);
    i_req[c] = 1'b1; i_addr[c] = IM_AW'(a); waited = 0;
    forever begin
      @(negedge clk);
      if (i_gnt[c]) break;
      waited++;
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    i_req[c] = 1'b0;
    check(i_rvalid[c], "fetch data valid one cycle after grant");
    w = i_rdata[c];
  endtask

  task automatic dacc(input int c, input bit we, input int a, input logic [DW-1:0] wd,
                      output logic [DW-1:0] rd, output int waited);
    d_req[c] = 1'b1; d_we[c] = we; d_addr[c] = DM_AW'(a); d_wdata[c] = wd; waited = 0;
    forever begin
      @(negedge clk);
      if (d_gnt[c]) break;
      waited++;
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    d_req[c] = 1'b0; d_we[c] = 1'b0;
    if (!we) begin
      check(d_rvalid[c], "data valid one cycle after grant");
      rd = d_rdata[c];
    end else rd = '0;
  endtask

  task automatic dwrite(input int c, input int a, input logic [DW-1:0] wd);
    logic [DW-1:0] rd; int w;
    dacc(c, 1'b1, a, wd, rd, w);
  endtask

  task automatic dread(input int c, input int a, output logic [DW-1:0] rd);
    int w;
    dacc(c, 1'b0, a, '0, rd, w);
  endtask

  task automatic sync(input int c, input sync_op_e op, input int lit, output int cycles);
    bit r;
    sync_valid[c] = 1'b1; sync_op[c] = op; sync_lit[c] = LIT_W'(lit); cycles = 0;
    do begin
      @(negedge clk);
      r = sync_ready[c] && core_clk_en[c];
      @(posedge clk); #1;
      cycles++;
    end while (!r);
    sync_valid[c] = 1'b0;
  endtask

  // end of a data-dependent branch of core c, whose length depends on c
  task automatic branch(input int c);
    int cyc;
    idle(1 + 7 * c);
    sync(c, SYNC_SDEC, 2, cyc);
    sync(c, SYNC_SLEEP, 0, cyc);
    resumed[c] = 1'b1;
    resume_time[c] = int'($time);
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // synchronization point word in DM, read through core 7's shared space
  localparam int SYNC_BASE = 16;
  function automatic logic [DW-1:0] point(input int flags, input int cnt);
    return {8'(flags), 8'(cnt)};
  endfunction

  logic [IM_W-1:0] w0, w1, w2;
  logic [DW-1:0] r0, r1, r2, r3;
  int wt0, wt1, wt2, cy;
  logic [N-1:0] resumed;
  int resume_time [N];
  int edges_before;

  initial begin
    i_req = '0; i_addr = '0; d_req = '0; d_we = '0; d_addr = '0; d_wdata = '0;
    sync_valid = '0; sync_op = '{default: SYNC_SNOP}; sync_lit = '0;
    irq = '0; adc_data = '{16'h0a11, 16'h0b22, 16'h0c33};
    load_req = 0; load_addr = '0; load_wdata = '0;
    for (int c = 0; c < N; c++) gated_edges[c] = 0;
    for (int m = 0; m < M_NUM; m++) seen[m] = 0;
    idle(3);
    rst_n = 1'b1;
    idle(1);

    // ---- program load: phase code into banks 0 (filter) and 1 (combine)
    $display("[%0t] step: program load: phase code into banks 0 (filter) and 1 (combine)", $time);
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 2; b++) begin
        load_req = 1; load_addr = IM_AW'(b * IM_BANK_WORDS + a); load_wdata = prog(b * IM_BANK_WORDS + a);
        @(negedge clk);
        check(load_gnt, "loader granted on an idle memory");
        @(posedge clk); #1;
        seen[M_LOAD]++;
      end
    end
    load_req = 0;

    // ---- lock-step fetch: cores 0-2 run the filter phase from bank 0
    $display("[%0t] step: lock-step fetch: cores 0-2 run the filter phase from bank 0", $time);
    for (int pc = 0; pc < 16; pc++) begin
      fork
        fetch(0, pc, w0, wt0);
        fetch(1, pc, w1, wt1);
        fetch(2, pc, w2, wt2);
      join
      check(w0 == prog(pc) && w1 == prog(pc) && w2 == prog(pc), "broadcast instruction word");
      check(wt0 == 0 && wt1 == 0 && wt2 == 0, "lock-step fetch never stalls");
    end
    // core 3 runs the combine phase from bank 1 in parallel: no conflict
    fork
      fetch(0, 20, w0, wt0);
      fetch(3, IM_BANK_WORDS + 20, w1, wt1);
    join
    check(w0 == prog(20) && w1 == prog(IM_BANK_WORDS + 20) && wt0 == 0 && wt1 == 0,
          "different banks fetched in parallel");
    // a core that leaves lock-step in bank 0 conflicts with the others
    fork
      fetch(0, 30, w0, wt0);
      fetch(1, 31, w1, wt1);
    join
    check(w0 == prog(30) && w1 == prog(31), "conflicting fetches both served");
    check(wt0 + wt1 == 1, "one of two conflicting fetches waits one cycle");

    // ---- register window
    $display("[%0t] step: register window", $time);
    for (int c = 0; c < N; c++) begin
      dread(c, REG_CORE_ID, r0);
      check(r0 == c, "core identifier register");
      seen[M_REGS]++;
    end
    dread(4, REG_ADC0 + 1, r0);
    check(r0 == adc_data[1], "ADC channel 1 sample register");
    dread(4, REG_SYNC_BASE, r0);
    check(r0 == SYNC_BASE, "synchronization point base after reset");
    dread(4, REG_PRIV_BITS, r0);
    check(r0 == 8, "private window size after reset");

    // ---- private sections: every core writes its own word at logical 0x7FFF
    $display("[%0t] step: private sections: every core writes its own word at logical 0x7FFF", $time);
    d_addr[0] = 15'h7FFF;
    d_addr[1] = 15'h7EFF;
    #1 check(d_private[0] && !d_private[1], "private window decoded");
    fork
      dwrite(0, 15'h7FFF, 16'hA000);
      dwrite(1, 15'h7FFF, 16'hA001);
      dwrite(2, 15'h7FFF, 16'hA002);
      dwrite(3, 15'h7FFF, 16'hA003);
      dwrite(4, 15'h7FFF, 16'hA004);
      dwrite(5, 15'h7FFF, 16'hA005);
      dwrite(6, 15'h7FFF, 16'hA006);
      dwrite(7, 15'h7FFF, 16'hA007);
    join
    idle(1);
    for (int c = 0; c < N; c++) begin
      dread(c, 15'h7FFF, r0);
      check(r0 == 16'hA000 + c, $sformatf("core %0d reads its own private word", c));
      seen[M_PRIVATE]++;
    end
    // physical placement: window of core c at 0x7800 + c*256 (shared view)
    for (int c = 0; c < 7; c++) begin
      dread(7, 15'h7800 + c * 256 + 255, r0);
      check(r0 == 16'hA000 + c, $sformatf("private word of core %0d at its physical address", c));
    end

    // ---- shared data: core 0 writes a sample, cores 0-2 read it together
    $display("[%0t] step: shared data: core 0 writes a sample, cores 0-2 read it together", $time);
    dwrite(0, 200, 16'h1234);
    fork
      dread(0, 200, r0);
      dread(1, 200, r1);
      dread(2, 200, r2);
    join
    check(r0 == 16'h1234 && r1 == 16'h1234 && r2 == 16'h1234, "broadcast data read");

    // ---- software clears the synchronization points it uses
    dwrite(7, SYNC_BASE + 1, 16'h0000);
    dwrite(7, SYNC_BASE + 2, 16'h0000);

    // ---- producer/consumer: core 3 consumes what cores 0-2 produce (point 1)
    $display("[%0t] step: producer/consumer: core 3 consumes what cores 0-2 produce (point 1)", $time);
    sync(3, SYNC_SNOP, 1, cy);
    resumed = '0;
    fork
      begin
        sync(3, SYNC_SLEEP, 0, cy);
        resumed[3] = 1'b1;
        seen[M_PC_WAKE]++;
      end
      begin
        fork
          sync(0, SYNC_SINC, 1, cy);
          sync(1, SYNC_SINC, 1, cy);
          sync(2, SYNC_SINC, 1, cy);
        join
        dread(7, SYNC_BASE + 1, r0);
        check(r0 == point(8'b0000_1111, 3), "merged SINC update of point 1");
        if (r0 == point(8'b0000_1111, 3)) seen[M_MERGE]++;
        edges_before = gated_edges[3];
        // producers filter their lead and store results at 300+c
        for (int c = 0; c < 3; c++) begin
          dwrite(c, 300 + c, DW'(100 + c));
          sync(c, SYNC_SDEC, 1, cy);
          if (c < 2) begin
            idle(3);
            check(!resumed[3] && core_sleeping[3], "consumer sleeps until all producers finish");
          end
        end
        check(gated_edges[3] == edges_before, "sleeping consumer received no clock edge");
        if (gated_edges[3] == edges_before) seen[M_SLEEP_GATED]++;
        idle(3);
        check(resumed[3], "consumer resumed");
      end
    join
    dread(3, 300, r0); dread(3, 301, r1); dread(3, 302, r2);
    check(r0 == 100 && r1 == 101 && r2 == 102, "consumer reads the produced data");
    dread(7, SYNC_BASE + 1, r0);
    check(r0 == 0, "point 1 cleared after wake-up");

    // ---- lock-step recovery after a data-dependent branch (point 2)
    $display("[%0t] step: lock-step recovery after a data-dependent branch (point 2)", $time);
    fork
      sync(0, SYNC_SINC, 2, cy);
      sync(1, SYNC_SINC, 2, cy);
      sync(2, SYNC_SINC, 2, cy);
    join
    resumed = '0;
    fork
      branch(0);
      branch(1);
      branch(2);
    join
    check(resume_time[0] == resume_time[1] && resume_time[1] == resume_time[2],
          "cores leave the branch in lock-step");
    if (resume_time[0] == resume_time[1] && resume_time[1] == resume_time[2]) seen[M_LOCKSTEP_WAKE]++;
    fork
      fetch(0, 40, w0, wt0);
      fetch(1, 40, w1, wt1);
      fetch(2, 40, w2, wt2);
    join
    check(wt0 == 0 && wt1 == 0 && wt2 == 0 && w0 == prog(40), "broadcast fetch after re-synchronization");

    // ---- ADC data-ready interrupt wakes the sampling core 4
    $display("[%0t] step: ADC data-ready interrupt wakes the sampling core 4", $time);
    dwrite(4, REG_SUB, 16'b001);
    resumed = '0;
    fork
      begin
        sync(4, SYNC_SLEEP, 0, cy);
        resumed[4] = 1'b1;
      end
      begin
        idle(5);
        adc_data[0] = 16'h0d44;
        irq[2] = 1'b1;                          // another channel: stays asleep
        idle(4);
        check(!resumed[4], "unsubscribed channel does not wake the core");
        irq[0] = 1'b1;
        idle(4);
        check(resumed[4], "data-ready interrupt wakes the subscribed core");
        if (resumed[4]) seen[M_IRQ_WAKE]++;
        irq = '0;
      end
    join
    dread(4, REG_ADC0, r0);
    check(r0 == 16'h0d44, "new ADC sample read after wake-up");
    dread(4, REG_IRQ_STATUS, r0);
    check(r0 == 16'b001, "interrupt status shows channel 0");

    // ---- data bank conflict: two cores write different words of bank 5
    $display("[%0t] step: data bank conflict: two cores write different words of bank 5", $time);
    fork
      dacc(5, 1'b1, 16 * 40 + 5, 16'h5555, r0, wt0);
      dacc(6, 1'b1, 16 * 41 + 5, 16'h6666, r1, wt1);
    join
    check(wt0 + wt1 == 1, "conflicting data writes serialized");
    dread(5, 16 * 41 + 5, r0);
    dread(6, 16 * 40 + 5, r1);
    check(r0 == 16'h6666 && r1 == 16'h5555, "both conflicting writes landed");

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %-28s occurred %0d times", mech_name[m], seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never occurred", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
