// synchronizer: hardware side of the barrier-based code synchronization.
//
// Cores issue four extension instructions to this unit. SNOP(lit), SINC(lit)
// and SDEC(lit) modify synchronization point number lit, a word in shared data
// memory at address sync_base + lit. Its top N_CORES bits are one flag per core
// and its low DW-N_CORES bits an up/down counter: SNOP sets the issuing core's
// flag, SINC sets the flag and adds one to the counter, SDEC subtracts one.
// SLEEP pauses the issuing core until its next wake event.
//
// Operation. All pending SNOP/SINC/SDEC instructions that name the same point
// as the lowest-numbered pending core are merged into one read-modify-write:
// the point is read through this unit's port on the data crossbar, all flags
// of the group are ORed in, the counter moves by (#SINC - #SDEC), and the
// word is written back. If the group held an SDEC and the counter is now zero,
// every flagged core receives a wake event and the flags are cleared. A wake
// event is also produced for each core subscribed (REG_SUB) to an interrupt
// line that rises; the line is recorded in that core's REG_IRQ_STATUS and a
// one-cycle pulse is given on core_irq. Wake events stay pending until the
// core executes SLEEP, which then completes at once, so a wake can never be
// lost by arriving before the SLEEP.
//
// Handshake. A core holds sync_valid/sync_op/sync_lit until an edge where
// sync_ready is high and its clock is enabled. While it waits, its clock is
// gated: core_clk_en[i] = !(sync_valid & !sync_ready) & !mem_stall. mem_stall
// marks a core that lost a memory arbitration in this cycle, so the same gate
// also resolves memory conflicts. An instruction naming a point at or above
// REG_SYNC_COUNT completes at once without touching memory.
//
// Registers. Each core reaches a 16-word register window through its own
// mmio_* port; reads return data one cycle after the request. Offsets are in
// wbsn_pkg. Subscription and interrupt status are per core, the rest global.
//
// Timing. A merged update takes a read (granted at once when the bank is
// free), the read latency, and a write: the cores are released three cycles
// after the request in the absence of conflicts.
//
// The instructions, the point format, merging, wake-up on a zero counter,
// SLEEP, clock gating and interrupt subscription follow the design; the FSM,
// the register map, rising-edge interrupts, pending wake events and the
// counter being free to wrap are this implementation's choices.
module synchronizer
  import wbsn_pkg::*;
#(
  parameter int unsigned N_CORES = 8,
  parameter int unsigned N_IRQ   = 3,
  parameter int unsigned DM_AW   = 15,
  parameter int unsigned DW      = 16,
  parameter int unsigned LIT_W   = 8,
  localparam int unsigned CNT_W  = DW - N_CORES,
  localparam int unsigned PBW    = $clog2(DM_AW + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // synchronization instructions
  input  logic     [N_CORES-1:0]             sync_valid,
  input  sync_op_e [N_CORES-1:0]             sync_op,
  input  logic     [N_CORES-1:0][LIT_W-1:0]  sync_lit,
  output logic     [N_CORES-1:0]             sync_ready,
  output logic     [N_CORES-1:0]             core_sleeping,
  // clock control
  input  logic     [N_CORES-1:0]             mem_stall,
  output logic     [N_CORES-1:0]             core_clk_en,
  // interrupts
  input  logic     [N_IRQ-1:0]               irq,
  output logic     [N_CORES-1:0]             core_irq,
  // memory-mapped registers, one port per core
  input  logic     [N_CORES-1:0]             mmio_req,
  input  logic     [N_CORES-1:0]             mmio_we,
  input  logic     [N_CORES-1:0][MMIO_OFS_W-1:0] mmio_addr,
  input  logic     [N_CORES-1:0][DW-1:0]     mmio_wdata,
  output logic     [N_CORES-1:0][DW-1:0]     mmio_rdata,
  // configuration seen by the address translation units
  output logic     [PBW-1:0]                 priv_bits,
  // master port on the data crossbar
  output logic                               dm_req,
  output logic                               dm_we,
  output logic     [DM_AW-1:0]               dm_addr,
  output logic     [DW-1:0]                  dm_wdata,
  input  logic                               dm_gnt,
  input  logic                               dm_rvalid,
  input  logic     [DW-1:0]                  dm_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_WRITE} state_e;

  state_e                  state_q;
  logic [N_CORES-1:0]      grp_q;       // cores merged into the update in flight
  logic [N_CORES-1:0]      set_q;       // flags to set
  logic [CNT_W-1:0]        ninc_q, ndec_q;
  logic [DM_AW-1:0]        addr_q;
  logic [DW-1:0]           wdata_q;
  logic [N_CORES-1:0]      done_q;      // update written, waiting for the core to move on
  logic [N_CORES-1:0]      wake_q;      // pending wake events
  logic [N_CORES-1:0]      zero_wake;   // wake from a point reaching zero
  logic [N_CORES-1:0]      irq_wake;

  logic [N_IRQ-1:0]                 irq_q;
  logic [N_IRQ-1:0]                 irq_rise;
  logic [N_CORES-1:0][N_IRQ-1:0]    sub_q;
  logic [N_CORES-1:0][N_IRQ-1:0]    irq_st_q;
  logic [DM_AW-1:0]                 sync_base_q;
  logic [LIT_W:0]                   sync_count_q;
  logic [PBW-1:0]                   priv_bits_q;

  logic [N_CORES-1:0] is_sleep, is_point, in_range, cand, fire;
  logic               lead_valid;
  logic [LIT_W-1:0]   lead_lit;

  assign priv_bits = priv_bits_q;

  // ---------------------------------------------------------------- decode
  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      is_sleep[i] = sync_valid[i] && (sync_op[i] == SYNC_SLEEP);
      is_point[i] = sync_valid[i] && (sync_op[i] != SYNC_SLEEP);
      in_range[i] = ({1'b0, sync_lit[i]} < sync_count_q);
      cand[i]     = is_point[i] && in_range[i] && !done_q[i] && !grp_q[i];
    end
    lead_valid = 1'b0;
    lead_lit   = '0;
    for (int i = N_CORES - 1; i >= 0; i--) begin
      if (cand[i]) begin
        lead_valid = 1'b1;
        lead_lit   = sync_lit[i];
      end
    end
  end

  // ---------------------------------------------------------------- handshake
  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      sync_ready[i]    = (is_sleep[i] && wake_q[i]) ||
                         (is_point[i] && (done_q[i] || !in_range[i])) ||
                         (is_point[i] && grp_q[i] && (state_q == S_WRITE) && dm_gnt);
      core_clk_en[i]   = !(sync_valid[i] && !sync_ready[i]) && !mem_stall[i];
      fire[i]          = sync_valid[i] && sync_ready[i] && !mem_stall[i];
      core_sleeping[i] = is_sleep[i] && !wake_q[i];
    end
  end

  // ---------------------------------------------------------------- memory port
  always_comb begin
    dm_req   = (state_q == S_READ) || (state_q == S_WRITE);
    dm_we    = (state_q == S_WRITE);
    dm_addr  = addr_q;
    dm_wdata = wdata_q;
  end

  // ---------------------------------------------------------------- update FSM
  logic [N_CORES-1:0] flags_new;
  logic [CNT_W-1:0]   cnt_new;
  always_comb begin
    flags_new = dm_rdata[DW-1:CNT_W] | set_q;
    cnt_new   = dm_rdata[CNT_W-1:0] + ninc_q - ndec_q;
    zero_wake = '0;
    if ((ndec_q != '0) && (cnt_new == '0)) begin
      zero_wake = flags_new;
      flags_new = '0;
    end
  end

  // Group of requests merged with the lowest-numbered waiting core.
  logic [N_CORES-1:0] grp_new, set_new;
  logic [CNT_W-1:0]   ninc_new, ndec_new;
  always_comb begin
    grp_new  = '0;
    set_new  = '0;
    ninc_new = '0;
    ndec_new = '0;
    for (int i = 0; i < N_CORES; i++) begin
      if (cand[i] && (sync_lit[i] == lead_lit)) begin
        grp_new[i] = 1'b1;
        set_new[i] = (sync_op[i] != SYNC_SDEC);
        if (sync_op[i] == SYNC_SINC) ninc_new = ninc_new + 1'b1;
        if (sync_op[i] == SYNC_SDEC) ndec_new = ndec_new + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      grp_q   <= '0;
      set_q   <= '0;
      ninc_q  <= '0;
      ndec_q  <= '0;
      addr_q  <= '0;
      wdata_q <= '0;
      done_q  <= '0;
    end else begin
      done_q <= done_q & ~fire;
      unique case (state_q)
        S_IDLE: if (lead_valid) begin
          grp_q   <= grp_new;
          ninc_q  <= ninc_new;
          ndec_q  <= ndec_new;
          set_q   <= set_new;
          addr_q  <= sync_base_q + DM_AW'(lead_lit);
          state_q <= S_READ;
        end
        S_READ:  if (dm_gnt) state_q <= S_WAIT;
        S_WAIT:  if (dm_rvalid) begin
          wdata_q <= {flags_new, cnt_new};
          state_q <= S_WRITE;
        end
        S_WRITE: if (dm_gnt) begin
          done_q  <= (done_q | grp_q) & ~fire;
          grp_q   <= '0;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Wake events from a point reaching zero are registered with the write-back.
  logic [N_CORES-1:0] zero_wake_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) zero_wake_q <= '0;
    else if (state_q == S_WAIT && dm_rvalid) zero_wake_q <= zero_wake;
    else if (state_q == S_WRITE && dm_gnt)   zero_wake_q <= '0;
  end

  // ---------------------------------------------------------------- interrupts and wake events
  assign irq_rise = irq & ~irq_q;
  always_comb begin
    for (int i = 0; i < N_CORES; i++)
      irq_wake[i] = |(irq_rise & sub_q[i]);
  end

  // Registering in a point (SNOP/SINC) or rewriting the subscription discards
  // wake events left over from earlier points or interrupts.
  logic [N_CORES-1:0] sleep_done, stale;
  always_comb begin
    sleep_done = fire & is_sleep;
    stale      = (state_q == S_WRITE && dm_gnt) ? set_q : '0;
    for (int i = 0; i < N_CORES; i++)
      if (mmio_req[i] && mmio_we[i] && mmio_addr[i] == REG_SUB) stale[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q    <= '0;
      wake_q   <= '0;
      core_irq <= '0;
    end else begin
      irq_q    <= irq;
      core_irq <= irq_wake;
      wake_q   <= (wake_q & ~sleep_done & ~stale) | irq_wake |
                  ((state_q == S_WRITE && dm_gnt) ? zero_wake_q : '0);
    end
  end

  // ---------------------------------------------------------------- registers
  // Interrupt status: set by subscribed rising lines, cleared by writing ones.
  logic [N_CORES-1:0][N_IRQ-1:0] irq_st_new;
  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      irq_st_new[i] = irq_st_q[i] | (irq_rise & sub_q[i]);
      if (mmio_req[i] && mmio_we[i] && mmio_addr[i] == REG_IRQ_STATUS)
        irq_st_new[i] = irq_st_new[i] & ~mmio_wdata[i][N_IRQ-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_q        <= '0;
      irq_st_q     <= '0;
      sync_base_q  <= DM_AW'(MMIO_WORDS);
      sync_count_q <= (LIT_W + 1)'(1 << LIT_W);
      priv_bits_q  <= PBW'(8);
      mmio_rdata   <= '0;
    end else begin
      for (int i = 0; i < N_CORES; i++) begin
        if (mmio_req[i] && mmio_we[i]) begin
          unique case (mmio_addr[i])
            REG_SUB:        sub_q[i]     <= mmio_wdata[i][N_IRQ-1:0];
            REG_IRQ_STATUS: ;
            REG_SYNC_BASE:  sync_base_q  <= mmio_wdata[i][DM_AW-1:0];
            REG_SYNC_COUNT: sync_count_q <= mmio_wdata[i][LIT_W:0];
            REG_PRIV_BITS:  priv_bits_q  <= mmio_wdata[i][PBW-1:0];
            default: ;
          endcase
        end
        irq_st_q[i] <= irq_st_new[i];
        if (mmio_req[i] && !mmio_we[i]) begin
          unique case (mmio_addr[i])
            REG_SUB:        mmio_rdata[i] <= DW'(sub_q[i]);
            REG_IRQ_STATUS: mmio_rdata[i] <= DW'(irq_st_q[i]);
            REG_SYNC_BASE:  mmio_rdata[i] <= DW'(sync_base_q);
            REG_SYNC_COUNT: mmio_rdata[i] <= DW'(sync_count_q);
            REG_PRIV_BITS:  mmio_rdata[i] <= DW'(priv_bits_q);
            REG_CORE_ID:    mmio_rdata[i] <= DW'(i);
            default:        mmio_rdata[i] <= '0;
          endcase
        end
      end
    end
  end

  // ---------------------------------------------------------------- checks
  for (genvar i = 0; i < N_CORES; i++) begin : g_chk
    // A waiting instruction is held unchanged by the (clock-gated) core.
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (sync_valid[i] && !fire[i]) |=> (sync_valid[i] && $stable(sync_op[i]) && $stable(sync_lit[i])));
  end

endmodule
