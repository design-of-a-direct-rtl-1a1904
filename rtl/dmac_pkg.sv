// dmac_pkg: types and constants shared by the units of the four-channel DMA
// controller (datapath, timing and control, priority).
//
// The controller has four channels, 16-bit address and word-count registers
// and an 8-bit data bus. The bit layout of the command and mode registers
// follows the register descriptions of the design (command bits 0..7, mode
// bits 7..2 with bits 1..0 selecting the channel on a write). The state
// encoding, the cascade state SC and the register-access strobe bundle are
// choices of this implementation.
package dmac_pkg;

  // Number of DMA channels and width of the address / word-count registers.
  localparam int unsigned NCH = 4;
  localparam int unsigned AW  = 16;
  localparam int unsigned DW  = 8;

  // Timing-and-control states. SI is the idle cycle, S0 waits for the hold
  // acknowledge, S1..S4 are the states of one transfer, SC is the cascade
  // pass-through state.
  typedef enum logic [2:0] {
    ST_SI = 3'd0,
    ST_S0 = 3'd1,
    ST_S1 = 3'd2,
    ST_S2 = 3'd3,
    ST_S3 = 3'd4,
    ST_S4 = 3'd5,
    ST_SC = 3'd6
  } dma_state_e;

  // Mode register bits 3:2: transfer type.
  typedef enum logic [1:0] {
    XF_VERIFY  = 2'b00,
    XF_WRITE   = 2'b01,   // I/O -> memory: IOR and MEMW active
    XF_READ    = 2'b10,   // memory -> I/O: MEMR and IOW active
    XF_ILLEGAL = 2'b11
  } xfer_e;

  // Mode register bits 7:6: service mode.
  typedef enum logic [1:0] {
    MD_DEMAND  = 2'b00,
    MD_SINGLE  = 2'b01,
    MD_BLOCK   = 2'b10,
    MD_CASCADE = 2'b11
  } svc_mode_e;

  // The six stored mode bits (register bits 7:2).
  typedef struct packed {
    svc_mode_e mode;      // bits 7:6
    logic      dec;       // bit 5: address decrement
    logic      autoinit;  // bit 4: autoinitialize
    xfer_e     xfer;      // bits 3:2
  } mode_t;

  // Command register, bit 7 down to bit 0.
  typedef struct packed {
    logic dack_hi;     // 7: DACK active high
    logic dreq_lo;     // 6: DREQ active low
    logic ext_write;   // 5: extended write
    logic rotate;      // 4: rotating priority
    logic compressed;  // 3: compressed timing
    logic disable_c;   // 2: controller disable
    logic ch0_hold;    // 1: channel 0 address hold (memory-to-memory)
    logic mem2mem;     // 0: memory-to-memory enable
  } cmd_t;

  // One-cycle strobes for CPU accesses to the A3=1 command codes, decoded in
  // the datapath and consumed by the unit that owns the register.
  typedef struct packed {
    logic wr_cmd;        // 1000 write: command register
    logic wr_req;        // 1001 write: request register bit
    logic wr_smask;      // 1010 write: single mask bit
    logic wr_mode;       // 1011 write: mode register
    logic rd_mode;       // 1011 read finished: advance mode read counter
    logic clr_mode_cnt;  // 1110 read: clear mode register counter
    logic clr_mask;      // 1110 write: clear all mask bits
    logic wr_allmask;    // 1111 write: all mask bits
    logic master_clr;    // 1101 write: master clear
    logic rd_status;     // 1000 read finished: clear the TC bits
  } regop_t;

endpackage
