// tb_workload_mappings: the synchronization structure of the three ECG
// benchmark mappings, run on the full-size platform over a stream of samples.
//
// An ADC model raises all three data-ready lines every PERIOD cycles with a
// new sample per channel; every fifth beat is marked pathological (bit 15 of
// channel 0), i.e. 20% abnormal beats. Cores are tasks that follow the
// software protocol of the platform; their "computation" is a run of
// instruction fetches from their phase's bank plus a data result computed
// from the sample, so every result word can be checked against a value
// computed here.
//  3L-MF   cores 0-2 filter one lead each: wait for their ADC line, enter a
//          data-dependent branch (length depends on the sample) bracketed by
//          SINC/SDEC+SLEEP on point 0, then fetch in lock-step and store.
//  3L-MMD  as 3L-MF, and the filters are producers (point 1) for core 3,
//          which sums the three leads and produces (point 2) for core 4,
//          which derives a fiducial value.
//  RP-CLASS core 0 filters lead 0 on every beat and produces (point 4) for
//          core 5, which classifies the beat; on a pathological beat core 5
//          releases the four-core analysis chain through point 3: cores 1-2
//          filter leads 1-2 in lock-step, core 3 combines all three leads,
//          core 4 delineates. The chain runs only for those beats. Run once
//          with 20% pathological beats and once with none.
// Checks: every result word; that the filters always leave a branch in
// lock-step (their next fetches are never stalled); that the chain ran
// exactly once per pathological beat; that each mapping meets the sample
// period. Reports the share of fetch cycles served by broadcast.
module tb_workload_mappings;
  import wbsn_pkg::*;
  localparam int N = 8, IM_AW = 15, DM_AW = 15, IM_W = 24, DW = 16, LIT_W = 8, N_IRQ = 3;
  localparam int NS     = 20;     // samples per mapping
  localparam int PERIOD = 300;    // cycles between ADC samples
  localparam int RES    = 1024;   // result area: RES + k*8 + core
  localparam int IDX    = 1000;   // beat index handed from classifier to chain
  localparam int SYNC_BASE = 16;
  localparam int P_LS = 0, P_A = 1, P_B = 2, P_C = 3, P_D = 4;

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
  int fetch_cycles = 0, bcast_fetches = 0, chain_runs = 0, resyncs = 0;
  int adc_k = 0;            // index of the latest sample
  int done_k [N];           // samples finished per core

  initial begin
    repeat (3 * NS * PERIOD * 3 + 20000) @(posedge clk);
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

  // share of granted fetches that were part of a broadcast
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) if (i_req[c] && i_gnt[c]) begin
      fetch_cycles++;
      for (int o = 0; o < N; o++)
        if (o != c && i_req[o] && i_gnt[o] && i_addr[o] == i_addr[c]) begin
          bcast_fetches++;
          break;
        end
    end
  end

  // ------------------------------------------------------------ stimulus values
  bit with_pathological = 1'b1;   // every fifth beat pathological, or none
  function automatic bit abnormal(input int k);
    return with_pathological && (k % 5 == 2);
  endfunction
  function automatic logic [DW-1:0] sample(input int ch, input int k);
    logic [DW-1:0] v;
    v = DW'((k * 37 + ch * 101 + 5) & 16'h0fff);
    if (ch == 0 && abnormal(k)) v[15] = 1'b1;     // pathological beat marker
    return v;
  endfunction
  function automatic logic [DW-1:0] filt(input int ch, input int k);
    return DW'(sample(ch, k) * 3 + ch);
  endfunction
  function automatic logic [DW-1:0] comb(input int k);
    return filt(0, k) + filt(1, k) + filt(2, k);
  endfunction
  function automatic logic [DW-1:0] fid(input int k);
    return comb(k) ^ 16'h5a5a;
  endfunction

  // ------------------------------------------------------------ core port tasks
  task automatic fetch(input int c, input int a, output int waited);
    i_req[c] = 1'b1; i_addr[c] = IM_AW'(a); waited = 0;
    forever begin
      @(negedge clk);
      if (i_gnt[c]) break;
      waited++;
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    i_req[c] = 1'b0;
  endtask

  task automatic dacc(input int c, input bit we, input int a, input logic [DW-1:0] wd,
                      output logic [DW-1:0] rd);
    d_req[c] = 1'b1; d_we[c] = we; d_addr[c] = DM_AW'(a); d_wdata[c] = wd;
    forever begin
      @(negedge clk);
      if (d_gnt[c]) break;
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    d_req[c] = 1'b0; d_we[c] = 1'b0;
    rd = d_rdata[c];
  endtask

  task automatic dwrite(input int c, input int a, input logic [DW-1:0] wd);
    logic [DW-1:0] rd;
    dacc(c, 1'b1, a, wd, rd);
  endtask

  task automatic dread(input int c, input int a, output logic [DW-1:0] rd);
    dacc(c, 1'b0, a, '0, rd);
  endtask

  task automatic sync(input int c, input sync_op_e op, input int lit);
    bit r;
    sync_valid[c] = 1'b1; sync_op[c] = op; sync_lit[c] = LIT_W'(lit);
    do begin
      @(negedge clk);
      r = sync_ready[c] && core_clk_en[c];
      @(posedge clk); #1;
    end while (!r);
    sync_valid[c] = 1'b0;
  endtask

  // ------------------------------------------------------------ core programs
  // Filter core c (lead c). chained: released by the classifier (point 3)
  // instead of the ADC line. prod_pt: point it produces for (-1: none).
  // lockstep: bracket the data-dependent branch with point 0.
  task automatic filter_core(input int c, input int n, input int prod_pt, input bit lockstep,
                             input bit chained);
    logic [DW-1:0] x, kk;
    int w, wsum, k;
    for (int it = 0; it < n; it++) begin
      if (chained) begin
        sync(c, SYNC_SNOP, P_C);
        sync(c, SYNC_SLEEP, 0);
        dread(c, IDX, kk);
        k = int'(kk);
      end else begin
        dwrite(c, REG_SUB, DW'(1 << c));
        sync(c, SYNC_SLEEP, 0);
        k = adc_k;
      end
      dread(c, REG_ADC0 + c, x);
      check(x == sample(c, k), $sformatf("core %0d read sample %0d", c, k));
      if (prod_pt >= 0) sync(c, SYNC_SINC, prod_pt);
      if (lockstep) sync(c, SYNC_SINC, P_LS);
      // data-dependent branch: length and code differ per lead
      for (int i = 0; i < 1 + int'(x % 5); i++) fetch(c, 512 + c * 64 + i, w);
      if (lockstep) begin
        sync(c, SYNC_SDEC, P_LS);
        sync(c, SYNC_SLEEP, 0);
      end
      // common code, fetched once for all leads when in lock-step
      wsum = 0;   // cycles spent waiting for a fetch grant
      for (int i = 0; i < 6; i++) begin fetch(c, 64 + i, w); wsum += w; end
      if (lockstep) begin
        check(wsum == 0, $sformatf("core %0d left the branch in lock-step", c));
        if (c == 1 && wsum == 0) resyncs++;
      end
      dwrite(c, RES + k * 8 + c, filt(c, k));
      if (prod_pt >= 0) sync(c, SYNC_SDEC, prod_pt);
      done_k[c]++;
    end
  endtask

  // Combine core 3: consumer of point 1, producer of point 2 (bank 1 code).
  task automatic combine_core(input int n, input bit chained);
    logic [DW-1:0] a0, a1, a2, kk;
    int w, k;
    for (int it = 0; it < n; it++) begin
      sync(3, SYNC_SNOP, P_A);
      sync(3, SYNC_SLEEP, 0);
      if (chained) begin dread(3, IDX, kk); k = int'(kk); end
      else k = it;
      sync(3, SYNC_SINC, P_B);
      for (int i = 0; i < 8; i++) fetch(3, 4096 + i, w);
      dread(3, RES + k * 8 + 0, a0);
      dread(3, RES + k * 8 + 1, a1);
      dread(3, RES + k * 8 + 2, a2);
      check(a0 == filt(0, k) && a1 == filt(1, k) && a2 == filt(2, k),
            $sformatf("combine core sees the filtered leads of sample %0d", k));
      dwrite(3, RES + k * 8 + 3, a0 + a1 + a2);
      sync(3, SYNC_SDEC, P_B);
      done_k[3]++;
    end
  endtask

  // Delineation core 4: consumer of point 2 (bank 2 code).
  task automatic delineate_core(input int n, input bit chained);
    logic [DW-1:0] s, kk;
    int w, k;
    for (int it = 0; it < n; it++) begin
      sync(4, SYNC_SNOP, P_B);
      sync(4, SYNC_SLEEP, 0);
      if (chained) begin dread(4, IDX, kk); k = int'(kk); end
      else k = it;
      for (int i = 0; i < 10; i++) fetch(4, 8192 + i, w);
      dread(4, RES + k * 8 + 3, s);
      check(s == comb(k), $sformatf("delineation core sees the combined sample %0d", k));
      dwrite(4, RES + k * 8 + 4, s ^ 16'h5a5a);
      if (chained) chain_runs++;
      done_k[4]++;
    end
  endtask

  // Classifier core 5: consumer of filtered lead 0 (point 4), every beat
  // (bank 3 code); releases the analysis chain on a pathological beat.
  task automatic classify_core(input int n);
    logic [DW-1:0] x, f0;
    int w, k;
    for (int it = 0; it < n; it++) begin
      sync(5, SYNC_SNOP, P_D);
      sync(5, SYNC_SLEEP, 0);
      k = it;
      dread(5, RES + k * 8, f0);
      check(f0 == filt(0, k), $sformatf("classifier sees filtered lead 0 of beat %0d", k));
      dread(5, REG_ADC0, x);
      for (int i = 0; i < 5; i++) fetch(5, 12288 + i, w);
      dwrite(5, RES + k * 8 + 5, DW'(x[15]));
      if (x[15]) begin
        dwrite(5, IDX, DW'(k));
        sync(5, SYNC_SINC, P_C);
        sync(5, SYNC_SDEC, P_C);
      end
      done_k[5]++;
    end
  endtask

  task automatic adc(input int n);
    for (int k = 0; k < n; k++) begin
      repeat (PERIOD) @(posedge clk);
      #1;
      // every core must be done with the previous sample: real-time check
      adc_k = k;
      for (int ch = 0; ch < N_IRQ; ch++) adc_data[ch] = sample(ch, k);
      irq = '1;
      repeat (2) @(posedge clk);
      #1 irq = '0;
    end
  endtask

  task automatic restart();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < N; c++) done_k[c] = 0;
    // software clears the points and the result area
    for (int p = 0; p < 5; p++) dwrite(7, SYNC_BASE + p, '0);
    for (int a = 0; a < NS * 8; a++) dwrite(7, RES + a, 16'hdead);
  endtask

  task automatic check_results(input string name, input bit mmd, input bit rp);
    logic [DW-1:0] v;
    for (int k = 0; k < NS; k++) begin
      bit active;
      active = !rp || abnormal(k);
      for (int c = 0; c < 3; c++) begin
        dread(7, RES + k * 8 + c, v);
        check(v == ((active || c == 0) ? filt(c, k) : 16'hdead),
              $sformatf("%s: filtered lead %0d sample %0d", name, c, k));
      end
      if (mmd || rp) begin
        dread(7, RES + k * 8 + 3, v);
        check(v == (active ? comb(k) : 16'hdead), $sformatf("%s: combined sample %0d", name, k));
        dread(7, RES + k * 8 + 4, v);
        check(v == (active ? fid(k) : 16'hdead), $sformatf("%s: fiducial of sample %0d", name, k));
      end
      if (rp) begin
        dread(7, RES + k * 8 + 5, v);
        check(v == DW'(abnormal(k)), $sformatf("%s: class of beat %0d", name, k));
      end
    end
  endtask

  // a core that has not finished a sample when the next one arrives misses it
  bit rt_check = 1'b0;   // mappings where the filters take every sample
  always @(posedge irq[0]) if (rst_n && rt_check) begin
    for (int c = 0; c < 3; c++)
      if (core_sleeping[c] == 1'b0 && sync_valid[c] == 1'b0 && i_req[c] == 1'b0 && d_req[c] == 1'b0 &&
          done_k[c] < adc_k) begin
        failures++;
        $display("FAIL at %0t: core %0d missed the sample period", $time, c);
      end
  end

  int n_abn;
  initial begin
    i_req = '0; i_addr = '0; d_req = '0; d_we = '0; d_addr = '0; d_wdata = '0;
    sync_valid = '0; sync_op = '{default: SYNC_SNOP}; sync_lit = '0;
    irq = '0; adc_data = '0;
    load_req = 0; load_addr = '0; load_wdata = '0;
    // program: the phase code regions of banks 0-3, through the loader port
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 768; a++) begin
        load_req = 1; load_addr = IM_AW'(b * 4096 + a); load_wdata = IM_W'(b * 4096 + a);
        @(posedge clk); #1;
      end
    load_req = 0;

    rt_check = 1'b1;
    $display("3L-MF: %0d samples on 3 cores", NS);
    restart();
    fork
      adc(NS);
      filter_core(0, NS, -1, 1'b1, 1'b0);
      filter_core(1, NS, -1, 1'b1, 1'b0);
      filter_core(2, NS, -1, 1'b1, 1'b0);
    join
    check_results("3L-MF", 1'b0, 1'b0);
    check(resyncs == NS, "3L-MF: every sample re-synchronized");

    $display("3L-MMD: %0d samples on 5 cores", NS);
    restart();
    resyncs = 0;
    fork
      adc(NS);
      filter_core(0, NS, P_A, 1'b1, 1'b0);
      filter_core(1, NS, P_A, 1'b1, 1'b0);
      filter_core(2, NS, P_A, 1'b1, 1'b0);
      combine_core(NS, 1'b0);
      delineate_core(NS, 1'b0);
    join
    repeat (50) @(posedge clk);
    check(done_k[4] == NS, "3L-MMD: every sample delineated");
    check_results("3L-MMD", 1'b1, 1'b0);

    rt_check = 1'b0;
    for (int run = 0; run < 2; run++) begin
      with_pathological = (run == 0);
      n_abn = 0;
      for (int k = 0; k < NS; k++) if (abnormal(k)) n_abn++;
      chain_runs = 0;
      $display("RP-CLASS: %0d beats, %0d pathological, on 6 cores", NS, n_abn);
      restart();
      fork
        adc(NS);
        classify_core(NS);
        filter_core(0, NS, P_D, 1'b0, 1'b0);
        filter_core(1, n_abn, P_A, 1'b1, 1'b1);
        filter_core(2, n_abn, P_A, 1'b1, 1'b1);
        combine_core(n_abn, 1'b1);
        delineate_core(n_abn, 1'b1);
      join
      repeat (50) @(posedge clk);
      check(chain_runs == n_abn, $sformatf("RP-CLASS: chain ran %0d times for %0d pathological beats", chain_runs, n_abn));
      check_results("RP-CLASS", 1'b0, 1'b1);
    end

    $display("fetches served by broadcast: %0d of %0d", bcast_fetches, fetch_cycles);
    check(bcast_fetches > 0, "instruction broadcast occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
