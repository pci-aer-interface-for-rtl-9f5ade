// Shared types and constants of the PCI-AER interface.
//
// An AER event travels between host memory and the AER ports as one 32-bit
// word: the low 16 bits are the address of the pixel that spiked, the high
// 16 bits the time difference to the previous event, counted in clock ticks
// (one tick is one clock cycle, or 16 cycles when the prescaler is on).
// A word whose time field and address are both all ones is a wait-only word:
// it stands for the longest time the 16-bit field can hold and carries no
// event. That encoding, the register map offsets and all bit assignments
// inside the registers are choices of this design; the register names and
// their order follow the board's BAR0 map.
package pci_aer_pkg;

  localparam int unsigned EVW  = 32;  // event word width
  localparam int unsigned ADRW = 16;  // AER address width
  localparam int unsigned TSW  = 16;  // time-difference width

  typedef struct packed {
    logic [TSW-1:0]  dt;    // ticks since the previous event
    logic [ADRW-1:0] addr;  // AER address
  } aer_word_t;

  localparam logic [EVW-1:0] WAIT_WORD = '1;
  localparam int unsigned    PRESCALE  = 16; // tick length with prescaler on

  // BAR0 register byte offsets (target accesses use addr[5:2])
  localparam logic [5:0] REG_MST_COUNT = 6'h00; // R   words moved by last master transfer
  localparam logic [5:0] REG_MST_ADDR  = 6'h04; // R/W host memory address for master access
  localparam logic [5:0] REG_FIFO      = 6'h08; // R/W write: push OFIFO, read: pop IFIFO
  localparam logic [5:0] REG_INT       = 6'h0C; // R/W interrupt pending/enable
  localparam logic [5:0] REG_STATUS    = 6'h10; // R   FIFO levels and busy flags
  localparam logic [5:0] REG_CONFIG    = 6'h14; // R/W enables, prescalers, master transfer

  // CONFIG register fields
  typedef struct packed {
    logic [15:0] dma_len;   // [31:16] words to move in the next master transfer
    logic [9:0]  rsvd;      // [15:6]
    logic        dma_dir;   // [5] 0: host memory -> OFIFO, 1: IFIFO -> host memory
    logic        dma_start; // [4] write 1 to start a transfer (reads back 0)
    logic        in_presc;  // [3] IN-AER tick = 16 clocks
    logic        out_presc; // [2] OUT-AER tick = 16 clocks
    logic        in_en;     // [1] IN-AER state machine enable
    logic        out_en;    // [0] OUT-AER state machine enable
  } config_t;

  // Interrupt sources, bit positions in the pending and enable fields
  localparam int unsigned NIRQ         = 4;
  localparam int unsigned IRQ_DMA_DONE = 0; // master transfer finished
  localparam int unsigned IRQ_OF_EMPTY = 1; // OFIFO ran empty
  localparam int unsigned IRQ_IF_HALF  = 2; // IFIFO at least half full
  localparam int unsigned IRQ_IF_FULL  = 3; // IFIFO full, the AER input stalls

endpackage
