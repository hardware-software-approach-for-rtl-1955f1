// wbsn_pkg: types and constants shared by the multi-core sensor-node platform.
//
// Holds the encoding of the synchronization instruction set extension (SNOP,
// SINC, SDEC, SLEEP) as seen by the synchronizer, and the word offsets of the
// memory-mapped register window that every core sees at the bottom of its
// data address space. The instruction names follow the design; the 2-bit
// encoding and the register map are choices of this implementation.
package wbsn_pkg;

  // Synchronization instruction issued by a core to the synchronizer.
  typedef enum logic [1:0] {
    SYNC_SNOP  = 2'd0,  // register core flag in a synchronization point
    SYNC_SINC  = 2'd1,  // register core flag and increment the counter
    SYNC_SDEC  = 2'd2,  // decrement the counter
    SYNC_SLEEP = 2'd3   // clock-gate the core until its next wake event
  } sync_op_e;

  // Memory-mapped register window: logical data addresses 0 .. MMIO_WORDS-1.
  localparam int unsigned MMIO_WORDS = 16;
  localparam int unsigned MMIO_OFS_W = 4;

  // Registers served by the synchronizer (offsets 0..7).
  localparam logic [MMIO_OFS_W-1:0] REG_SUB        = 4'd0;  // own interrupt subscription mask
  localparam logic [MMIO_OFS_W-1:0] REG_IRQ_STATUS = 4'd1;  // own forwarded interrupts, write 1 to clear
  localparam logic [MMIO_OFS_W-1:0] REG_SYNC_BASE  = 4'd2;  // DM address of synchronization point 0
  localparam logic [MMIO_OFS_W-1:0] REG_SYNC_COUNT = 4'd3;  // number of synchronization points
  localparam logic [MMIO_OFS_W-1:0] REG_PRIV_BITS  = 4'd4;  // log2 of each core's private DM words
  localparam logic [MMIO_OFS_W-1:0] REG_CORE_ID    = 4'd5;  // identifier of the reading core

  // Peripheral registers (offsets 8..15): ADC sample of channel (offset - 8).
  localparam logic [MMIO_OFS_W-1:0] REG_ADC0       = 4'd8;

endpackage
