// log_xbar: crossbar between N_M masters and N_B memory banks with broadcast.
//
// Every master can reach every bank in a single cycle: the request (req, we,
// addr, wdata) is routed combinationally to the bank selected by its address
// and the grant comes back in the same cycle, while read data returns one
// cycle after the grant (rvalid, rdata), as the banks are synchronous RAMs.
// Each bank has its own round-robin arbiter. When several masters address one
// bank, the winner is the first requester at or after the bank's priority
// pointer; every other master reading exactly the same word in the same cycle
// is granted as well and receives the same data (broadcast), so the bank is
// read once. Writes are never merged. The pointer moves past the winner after
// every granted access. A master that is not granted must hold its request;
// in the platform its clock is gated until it wins.
//
// INTERLEAVED selects how a word address maps to a bank: 1 takes the bank from
// the low address bits (consecutive words in consecutive banks, used for the
// shared data memory), 0 from the high bits (contiguous banks, used for the
// instruction memory so that each program phase sits in its own bank).
// bcast[b] is high in a cycle where bank b served more than one master.
//
// Full connectivity, single-cycle access and broadcast follow the platform
// description; the round-robin policy and the one-cycle read latency are this
// implementation's choices.
module log_xbar #(
  parameter int unsigned N_M         = 9,
  parameter int unsigned N_B         = 16,
  parameter int unsigned AW          = 15,
  parameter int unsigned DW          = 16,
  parameter bit          INTERLEAVED = 1'b1,
  localparam int unsigned BW         = $clog2(N_B),
  localparam int unsigned RW         = AW - BW,
  localparam int unsigned MW         = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // master side
  input  logic [N_M-1:0]      m_req,
  input  logic [N_M-1:0]      m_we,
  input  logic [N_M-1:0][AW-1:0] m_addr,
  input  logic [N_M-1:0][DW-1:0] m_wdata,
  output logic [N_M-1:0]      m_gnt,
  output logic [N_M-1:0]      m_rvalid,
  output logic [N_M-1:0][DW-1:0] m_rdata,
  // bank side
  output logic [N_B-1:0]      b_req,
  output logic [N_B-1:0]      b_we,
  output logic [N_B-1:0][RW-1:0] b_addr,
  output logic [N_B-1:0][DW-1:0] b_wdata,
  input  logic [N_B-1:0][DW-1:0] b_rdata,
  output logic [N_B-1:0]      bcast
);

  logic [N_M-1:0][BW-1:0] m_bank;
  logic [N_M-1:0][RW-1:0] m_row;
  logic [N_B-1:0][MW-1:0] ptr_q;
  logic [N_B-1:0][MW-1:0] win;
  logic [N_B-1:0]         win_valid;
  logic [N_B-1:0][N_M-1:0] served;

  logic [N_M-1:0]         rvalid_q;
  logic [N_M-1:0][BW-1:0] rbank_q;

  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      if (INTERLEAVED) begin
        m_bank[m] = m_addr[m][BW-1:0];
        m_row[m]  = m_addr[m][AW-1:BW];
      end else begin
        m_bank[m] = m_addr[m][AW-1:RW];
        m_row[m]  = m_addr[m][RW-1:0];
      end
    end
  end

  // Per-bank arbitration with read merging.
  always_comb begin
    m_gnt = '0;
    for (int b = 0; b < N_B; b++) begin
      int unsigned idx;
      win[b]       = '0;
      win_valid[b] = 1'b0;
      served[b]    = '0;
      for (int k = 0; k < N_M; k++) begin
        idx = int'(ptr_q[b]) + k;
        if (idx >= N_M) idx = idx - N_M;
        if (!win_valid[b] && m_req[idx] && (m_bank[idx] == BW'(b))) begin
          win_valid[b] = 1'b1;
          win[b]       = MW'(idx);
        end
      end
      if (win_valid[b]) begin
        for (int m = 0; m < N_M; m++) begin
          if (MW'(m) == win[b])
            served[b][m] = 1'b1;
          else if (m_req[m] && !m_we[m] && !m_we[win[b]] &&
                   (m_bank[m] == BW'(b)) && (m_row[m] == m_row[win[b]]))
            served[b][m] = 1'b1;
        end
      end
      m_gnt = m_gnt | served[b];
      b_req[b]   = win_valid[b];
      b_we[b]    = win_valid[b] & m_we[win[b]];
      b_addr[b]  = m_row[win[b]];
      b_wdata[b] = m_wdata[win[b]];
      bcast[b]   = win_valid[b] && ($countones(served[b]) > 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q    <= '0;
      rvalid_q <= '0;
      rbank_q  <= '0;
    end else begin
      for (int b = 0; b < N_B; b++) begin
        if (win_valid[b])
          ptr_q[b] <= (int'(win[b]) == N_M - 1) ? '0 : MW'(int'(win[b]) + 1);
      end
      for (int m = 0; m < N_M; m++) begin
        rvalid_q[m] <= m_gnt[m] & ~m_we[m];
        if (m_gnt[m]) rbank_q[m] <= m_bank[m];
      end
    end
  end

  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      m_rvalid[m] = rvalid_q[m];
      m_rdata[m]  = b_rdata[rbank_q[m]];
    end
  end

  // A bank performs at most one write per cycle, and a write is never shared.
  for (genvar b = 0; b < N_B; b++) begin : g_chk
    a_write_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
      b_we[b] |-> $countones(served[b]) == 1);
  end

endmodule
