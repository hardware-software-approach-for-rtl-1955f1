// wbsn_mc_top: memory system and synchronization hardware of the multi-core
// wireless body sensor node.
//
// N_CORES processing cores (outside this module: their instruction fetch,
// data and synchronization-instruction ports are this module's ports) share
//  - an instruction memory of IM_WORDS words of IM_W bits in IM_BANKS banks,
//    reached through a broadcast crossbar with contiguous bank mapping, so
//    cores that fetch the same instruction in the same cycle share one read;
//  - a data memory of DM_WORDS words of DW bits in DM_BANKS banks, reached
//    through a broadcast crossbar with interleaved bank mapping; each core's
//    data address first passes an address translation unit that maps its
//    private window onto its own physical region;
//  - a synchronizer that executes SNOP/SINC/SDEC/SLEEP, updates the
//    synchronization points in data memory through its own crossbar port,
//    forwards ADC data-ready interrupts and gates each core's clock.
// Data addresses 0..15 of every core are a register window instead of memory:
// offsets 0..7 are the synchronizer's registers, offsets 8..8+N_IRQ-1 read the
// ADC channels' latest samples (adc_data). A register access is always
// granted and reads return one cycle later, like memory reads.
//
// Timing. Requests are granted combinationally in the cycle they are made and
// read data is valid one cycle after the grant (i_rvalid/d_rvalid). A core
// whose fetch or data request is not granted, that waits on a synchronization
// instruction, or that sleeps has core_clk_en low; core_clk is the gated
// clock to drive it with. The loader port writes program words into the
// instruction memory through the same crossbar.
//
// Sizes (8 cores, 32 Kword x 24 bit IM in 8 banks, 32 Kword x 16 bit DM in 16
// banks, 3 ADC channels) follow the design; the register window, the loader
// port and the split of work between the modules are this implementation's.
module wbsn_mc_top
  import wbsn_pkg::*;
#(
  parameter int unsigned N_CORES  = 8,
  parameter int unsigned IM_WORDS = 32768,
  parameter int unsigned IM_W     = 24,
  parameter int unsigned IM_BANKS = 8,
  parameter int unsigned DM_WORDS = 32768,
  parameter int unsigned DW       = 16,
  parameter int unsigned DM_BANKS = 16,
  parameter int unsigned N_IRQ    = 3,
  parameter int unsigned LIT_W    = 8,
  localparam int unsigned IM_AW   = $clog2(IM_WORDS),
  localparam int unsigned DM_AW   = $clog2(DM_WORDS),
  localparam int unsigned ID_W    = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned PBW     = $clog2(DM_AW + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // instruction fetch, per core
  input  logic     [N_CORES-1:0]             i_req,
  input  logic     [N_CORES-1:0][IM_AW-1:0]  i_addr,
  output logic     [N_CORES-1:0]             i_gnt,
  output logic     [N_CORES-1:0]             i_rvalid,
  output logic     [N_CORES-1:0][IM_W-1:0]   i_rdata,
  // data access, per core (logical addresses)
  input  logic     [N_CORES-1:0]             d_req,
  input  logic     [N_CORES-1:0]             d_we,
  input  logic     [N_CORES-1:0][DM_AW-1:0]  d_addr,
  input  logic     [N_CORES-1:0][DW-1:0]     d_wdata,
  output logic     [N_CORES-1:0]             d_gnt,
  output logic     [N_CORES-1:0]             d_rvalid,
  output logic     [N_CORES-1:0][DW-1:0]     d_rdata,
  output logic     [N_CORES-1:0]             d_private,  // access falls in the core's private window
  // synchronization instructions, per core
  input  logic     [N_CORES-1:0]             sync_valid,
  input  sync_op_e [N_CORES-1:0]             sync_op,
  input  logic     [N_CORES-1:0][LIT_W-1:0]  sync_lit,
  output logic     [N_CORES-1:0]             sync_ready,
  output logic     [N_CORES-1:0]             core_sleeping,
  output logic     [N_CORES-1:0]             core_irq,
  // core clocks
  output logic     [N_CORES-1:0]             core_clk_en,
  output logic     [N_CORES-1:0]             core_clk,
  // ADC: data-ready interrupt lines and latest samples
  input  logic     [N_IRQ-1:0]               irq,
  input  logic     [N_IRQ-1:0][DW-1:0]       adc_data,
  // program loader
  input  logic                               load_req,
  input  logic     [IM_AW-1:0]               load_addr,
  input  logic     [IM_W-1:0]                load_wdata,
  output logic                               load_gnt,
  // broadcast activity per bank
  output logic     [IM_BANKS-1:0]            im_bcast,
  output logic     [DM_BANKS-1:0]            dm_bcast
);

  localparam int unsigned IM_DEPTH = IM_WORDS / IM_BANKS;
  localparam int unsigned DM_DEPTH = DM_WORDS / DM_BANKS;
  localparam int unsigned IM_RW    = $clog2(IM_DEPTH);
  localparam int unsigned DM_RW    = $clog2(DM_DEPTH);
  localparam int unsigned NM       = N_CORES + 1;   // cores plus loader / synchronizer

  // ------------------------------------------------------------ instruction side
  logic [NM-1:0]                 im_m_req, im_m_we, im_m_gnt, im_m_rvalid;
  logic [NM-1:0][IM_AW-1:0]      im_m_addr;
  logic [NM-1:0][IM_W-1:0]       im_m_wdata, im_m_rdata;
  logic [IM_BANKS-1:0]           im_b_req, im_b_we;
  logic [IM_BANKS-1:0][IM_RW-1:0] im_b_addr;
  logic [IM_BANKS-1:0][IM_W-1:0] im_b_wdata, im_b_rdata;

  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      im_m_req[i]   = i_req[i];
      im_m_we[i]    = 1'b0;
      im_m_addr[i]  = i_addr[i];
      im_m_wdata[i] = '0;
      i_gnt[i]      = im_m_gnt[i];
      i_rvalid[i]   = im_m_rvalid[i];
      i_rdata[i]    = im_m_rdata[i];
    end
    im_m_req[N_CORES]   = load_req;
    im_m_we[N_CORES]    = 1'b1;
    im_m_addr[N_CORES]  = load_addr;
    im_m_wdata[N_CORES] = load_wdata;
    load_gnt            = im_m_gnt[N_CORES];
  end

  log_xbar #(
    .N_M(NM), .N_B(IM_BANKS), .AW(IM_AW), .DW(IM_W), .INTERLEAVED(1'b0)
  ) u_im_xbar (
    .clk, .rst_n,
    .m_req(im_m_req), .m_we(im_m_we), .m_addr(im_m_addr), .m_wdata(im_m_wdata),
    .m_gnt(im_m_gnt), .m_rvalid(im_m_rvalid), .m_rdata(im_m_rdata),
    .b_req(im_b_req), .b_we(im_b_we), .b_addr(im_b_addr), .b_wdata(im_b_wdata),
    .b_rdata(im_b_rdata), .bcast(im_bcast)
  );

  for (genvar b = 0; b < IM_BANKS; b++) begin : g_im
    sram_bank #(.DEPTH(IM_DEPTH), .WIDTH(IM_W)) u_bank (
      .clk, .req(im_b_req[b]), .we(im_b_we[b]), .addr(im_b_addr[b]),
      .wdata(im_b_wdata[b]), .rdata(im_b_rdata[b])
    );
  end

  // ------------------------------------------------------------ data side
  logic [NM-1:0]                 dm_m_req, dm_m_we, dm_m_gnt, dm_m_rvalid;
  logic [NM-1:0][DM_AW-1:0]      dm_m_addr;
  logic [NM-1:0][DW-1:0]         dm_m_wdata, dm_m_rdata;
  logic [DM_BANKS-1:0]           dm_b_req, dm_b_we;
  logic [DM_BANKS-1:0][DM_RW-1:0] dm_b_addr;
  logic [DM_BANKS-1:0][DW-1:0]   dm_b_wdata, dm_b_rdata;

  logic [PBW-1:0]                priv_bits;
  logic [N_CORES-1:0]            is_reg, is_adc;
  logic [N_CORES-1:0][DM_AW-1:0] paddr;
  logic [N_CORES-1:0]            sy_mmio_req;
  logic [N_CORES-1:0][DW-1:0]    sy_mmio_rdata;
  logic [N_CORES-1:0]            reg_rv_q, adc_sel_q;
  logic [N_CORES-1:0][DW-1:0]    adc_rdata_q;
  logic [N_CORES-1:0]            mem_stall;
  logic [N_CORES-1:0][MMIO_OFS_W-1:0] reg_ofs;
  logic [N_CORES-1:0][MMIO_OFS_W-2:0] adc_ch;
  logic                          sy_dm_req, sy_dm_we;
  logic [DM_AW-1:0]              sy_dm_addr;
  logic [DW-1:0]                 sy_dm_wdata;

  for (genvar i = 0; i < N_CORES; i++) begin : g_atu
    atu #(.AW(DM_AW), .ID_W(ID_W)) u_atu (
      .core_id(ID_W'(i)), .priv_bits, .laddr(d_addr[i]),
      .paddr(paddr[i]), .is_private(d_private[i])
    );
  end

  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      is_reg[i]      = d_req[i] && (d_addr[i][DM_AW-1:MMIO_OFS_W] == '0);
      is_adc[i]      = is_reg[i] && (d_addr[i][MMIO_OFS_W-1:0] >= REG_ADC0);
      sy_mmio_req[i] = is_reg[i] && (d_addr[i][MMIO_OFS_W-1:0] < REG_ADC0);
      dm_m_req[i]    = d_req[i] && !is_reg[i];
      dm_m_we[i]     = d_we[i];
      dm_m_addr[i]   = paddr[i];
      dm_m_wdata[i]  = d_wdata[i];
      d_gnt[i]       = is_reg[i] || dm_m_gnt[i];
      d_rvalid[i]    = dm_m_rvalid[i] || reg_rv_q[i];
      d_rdata[i]     = !reg_rv_q[i] ? dm_m_rdata[i] :
                       adc_sel_q[i]  ? adc_rdata_q[i] : sy_mmio_rdata[i];
      mem_stall[i]   = (i_req[i] && !i_gnt[i]) || (d_req[i] && !d_gnt[i]);
      reg_ofs[i]     = d_addr[i][MMIO_OFS_W-1:0];
      adc_ch[i]      = d_addr[i][MMIO_OFS_W-2:0];
    end
    dm_m_req[N_CORES]   = sy_dm_req;
    dm_m_we[N_CORES]    = sy_dm_we;
    dm_m_addr[N_CORES]  = sy_dm_addr;
    dm_m_wdata[N_CORES] = sy_dm_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rv_q    <= '0;
      adc_sel_q   <= '0;
      adc_rdata_q <= '0;
    end else begin
      for (int i = 0; i < N_CORES; i++) begin
        reg_rv_q[i]  <= is_reg[i] && !d_we[i];
        adc_sel_q[i] <= is_adc[i];
        if (is_adc[i] && !d_we[i])
          adc_rdata_q[i] <= (int'(adc_ch[i]) < N_IRQ) ? adc_data[adc_ch[i]] : '0;
      end
    end
  end

  log_xbar #(
    .N_M(NM), .N_B(DM_BANKS), .AW(DM_AW), .DW(DW), .INTERLEAVED(1'b1)
  ) u_dm_xbar (
    .clk, .rst_n,
    .m_req(dm_m_req), .m_we(dm_m_we), .m_addr(dm_m_addr), .m_wdata(dm_m_wdata),
    .m_gnt(dm_m_gnt), .m_rvalid(dm_m_rvalid), .m_rdata(dm_m_rdata),
    .b_req(dm_b_req), .b_we(dm_b_we), .b_addr(dm_b_addr), .b_wdata(dm_b_wdata),
    .b_rdata(dm_b_rdata), .bcast(dm_bcast)
  );

  for (genvar b = 0; b < DM_BANKS; b++) begin : g_dm
    sram_bank #(.DEPTH(DM_DEPTH), .WIDTH(DW)) u_bank (
      .clk, .req(dm_b_req[b]), .we(dm_b_we[b]), .addr(dm_b_addr[b]),
      .wdata(dm_b_wdata[b]), .rdata(dm_b_rdata[b])
    );
  end

  // ------------------------------------------------------------ synchronizer
  synchronizer #(
    .N_CORES(N_CORES), .N_IRQ(N_IRQ), .DM_AW(DM_AW), .DW(DW), .LIT_W(LIT_W)
  ) u_sync (
    .clk, .rst_n,
    .sync_valid, .sync_op, .sync_lit, .sync_ready, .core_sleeping,
    .mem_stall, .core_clk_en,
    .irq, .core_irq,
    .mmio_req(sy_mmio_req), .mmio_we(d_we), .mmio_addr(reg_ofs),
    .mmio_wdata(d_wdata), .mmio_rdata(sy_mmio_rdata),
    .priv_bits,
    .dm_req(sy_dm_req), .dm_we(sy_dm_we), .dm_addr(sy_dm_addr),
    .dm_wdata(sy_dm_wdata), .dm_gnt(dm_m_gnt[N_CORES]),
    .dm_rvalid(dm_m_rvalid[N_CORES]), .dm_rdata(dm_m_rdata[N_CORES])
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_cg
    clock_gate u_cg (.clk, .en(core_clk_en[i]), .gclk(core_clk[i]));
  end

endmodule
