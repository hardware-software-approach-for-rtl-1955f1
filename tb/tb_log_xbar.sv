// tb_log_xbar: self-checking test of the broadcast crossbar.
//
// Four masters share four interleaved banks of a 64-word memory. Each master
// issues random reads and writes, concentrated on a few addresses so that
// bank conflicts and same-word reads are frequent, and holds a request until
// it is granted, as a clock-gated core does. Checks, every cycle:
//  - a master alone on its bank is granted at once;
//  - each bank serves at most one word, and a write is never shared;
//  - every read of the word being read from a bank is granted (broadcast),
//    and bcast flags exactly the banks that served several masters;
//  - read data, one cycle after the grant, matches a reference memory;
//  - no master waits more than N_M-1 cycles (round-robin fairness).
// Counts broadcasts and conflicts and fails if either never happened.
module tb_log_xbar;
  localparam int unsigned N_M = 4, N_B = 4, AW = 6, DW = 8;
  localparam int unsigned RW  = AW - $clog2(N_B);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_M-1:0] m_req, m_we, m_gnt, m_rvalid;
  logic [N_M-1:0][AW-1:0] m_addr;
  logic [N_M-1:0][DW-1:0] m_wdata, m_rdata;
  logic [N_B-1:0] b_req, b_we, bcast;
  logic [N_B-1:0][RW-1:0] b_addr;
  logic [N_B-1:0][DW-1:0] b_wdata, b_rdata;

  int checks = 0, failures = 0, n_bcast = 0, n_conflict = 0;
  logic [DW-1:0] ref_mem [1 << AW];
  logic [N_M-1:0] exp_rv;
  logic [N_M-1:0][DW-1:0] exp_rd;
  int wait_cnt [N_M];

  log_xbar #(.N_M(N_M), .N_B(N_B), .AW(AW), .DW(DW), .INTERLEAVED(1'b1)) dut (.*);

  for (genvar b = 0; b < N_B; b++) begin : g_bank
    sram_bank #(.DEPTH(1 << RW), .WIDTH(DW)) u_bank (
      .clk, .req(b_req[b]), .we(b_we[b]), .addr(b_addr[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic new_request(input int m);
    int pick;
    pick = $urandom_range(7);
    m_req[m]   = ($urandom_range(9) < 8);
    m_we[m]    = ($urandom_range(3) == 0);
    // a few hot addresses make conflicts and broadcasts likely
    m_addr[m]  = (pick < 5) ? AW'(pick * 3) : AW'($urandom);
    m_wdata[m] = DW'($urandom);
  endtask

  initial begin
    m_req = '0; m_we = '0; m_addr = '0; m_wdata = '0;
    exp_rv = '0; exp_rd = '0;
    for (int m = 0; m < N_M; m++) wait_cnt[m] = 0;
    // initialise memory and reference through master 0
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < (1 << AW); a++) begin
      m_req[0] = 1; m_we[0] = 1; m_addr[0] = AW'(a); m_wdata[0] = DW'(a * 7 + 1);
      ref_mem[a] = DW'(a * 7 + 1);
      @(posedge clk); #1;
    end
    m_req = '0;
    @(posedge clk); #1;
    for (int m = 0; m < N_M; m++) new_request(m);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [N_M-1:0] g;
      @(negedge clk);
      g = m_gnt;
      // ---- grant rules
      for (int b = 0; b < N_B; b++) begin
        int nserved, nreq, wr_served;
        logic [AW-1:0] word;
        bit have_word;
        nserved = 0; nreq = 0; wr_served = 0; have_word = 0; word = '0;
        for (int m = 0; m < N_M; m++) begin
          if (m_req[m] && int'(m_addr[m] % N_B) == b) begin
            nreq++;
            if (g[m]) begin
              nserved++;
              if (m_we[m]) wr_served++;
              checks++;
              if (have_word && m_addr[m] != word) fail("two words served by one bank");
              have_word = 1; word = m_addr[m];
            end
          end
        end
        if (nreq > 0) begin
          checks++;
          if (nserved == 0) fail($sformatf("bank %0d idle with requests", b));
        end
        if (nreq > 1) n_conflict++;
        checks++;
        if (wr_served > 0 && nserved != 1) fail("write shared with another master");
        if (have_word && wr_served == 0) begin
          for (int m = 0; m < N_M; m++) begin
            if (m_req[m] && !m_we[m] && m_addr[m] == word) begin
              checks++;
              if (!g[m]) fail($sformatf("master %0d not given broadcast data", m));
            end
          end
        end
        checks++;
        if (bcast[b] !== (nserved > 1)) fail($sformatf("bcast flag of bank %0d", b));
        if (nserved > 1) n_bcast++;
      end
      // ---- fairness
      for (int m = 0; m < N_M; m++) begin
        if (m_req[m] && !g[m]) begin
          wait_cnt[m]++;
          checks++;
          if (wait_cnt[m] >= N_M) fail($sformatf("master %0d starved", m));
        end else wait_cnt[m] = 0;
      end
      // ---- reference model and next requests
      exp_rv = '0;
      for (int m = 0; m < N_M; m++) begin
        if (m_req[m] && g[m] && !m_we[m]) begin
          exp_rv[m] = 1'b1;
          exp_rd[m] = ref_mem[m_addr[m]];
        end
      end
      for (int m = 0; m < N_M; m++)
        if (m_req[m] && g[m] && m_we[m]) ref_mem[m_addr[m]] = m_wdata[m];
      @(posedge clk); #1;
      for (int m = 0; m < N_M; m++) begin
        if (exp_rv[m]) begin
          checks++;
          if (!m_rvalid[m]) fail($sformatf("master %0d: rvalid missing", m));
          else if (m_rdata[m] !== exp_rd[m])
            fail($sformatf("master %0d: read %h expected %h", m, m_rdata[m], exp_rd[m]));
        end else begin
          checks++;
          if (m_rvalid[m]) fail($sformatf("master %0d: spurious rvalid", m));
        end
      end
      for (int m = 0; m < N_M; m++)
        if (!m_req[m] || g[m]) new_request(m);
    end
    checks++;
    if (n_bcast == 0)    fail("no broadcast happened");
    checks++;
    if (n_conflict == 0) fail("no bank conflict happened");
    $display("broadcasts=%0d conflicts=%0d", n_bcast, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
