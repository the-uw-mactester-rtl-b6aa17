// mactester_pkg: sizes, register map and shared types of the functional tester.
//
// The tester drives 128 DUT pins from a 64-bit internal data bus. The host
// reaches it over a 32-bit parallel port with a 16-bit address, so every
// host transfer moves one half of the internal bus. The test vector memory
// is eight 32K x 8 SRAMs side by side (64 bits wide); one test vector takes
// six 64-bit words of it: two words of pin values, two of pin directions
// and two of captured responses. These widths and counts follow the
// tester's published architecture.
//
// The host register map below, the control-bus struct and all encodings
// are this design's own choices; the original only says that the host
// writes up to eight 32-bit level-1 words, reads four 32-bit level-3 words,
// loads an address and a length counter, starts the off-line run and polls
// a done bit.
package mactester_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned BUS_W     = 64;            // internal data bus
  localparam int unsigned HOST_W    = 32;            // host data port
  localparam int unsigned HADDR_W   = 16;            // host address lines
  localparam int unsigned NPINS     = 2 * BUS_W;     // DUT pins (128)
  localparam int unsigned MEM_AW    = 15;            // 32K words per SRAM
  localparam int unsigned COARSE_W  = 8;             // coarse delay count
  localparam int unsigned FINE_W    = 3;             // fine delay tap select
  localparam int unsigned LEN_W     = 16;            // off-line length counter

  // Level-1 registers, each one internal bus word wide.
  //   L1_VAL_LO : pin values 0..63      L1_VAL_HI : pin values 64..127
  //   L1_DIR_LO : pin enables 0..63     L1_DIR_HI : pin enables 64..127
  typedef enum logic [1:0] {
    L1_VAL_LO = 2'd0,
    L1_VAL_HI = 2'd1,
    L1_DIR_LO = 2'd2,
    L1_DIR_HI = 2'd3
  } l1_reg_e;

  // Who drives the internal data bus.
  typedef enum logic [1:0] {
    BUS_HOST = 2'd0,   // host write data, copied onto both halves
    BUS_MEM  = 2'd1,   // test vector memory read data
    BUS_L3   = 2'd2,   // selected level-3 register
    BUS_IDLE = 2'd3
  } bus_src_e;

  // One cycle of internal bus control. Produced by the host register decoder
  // (on-line mode) or by the off-line sequencer, and selected in the top.
  typedef struct packed {
    bus_src_e            src;      // bus driver
    logic [3:0]          l1_we;    // level-1 register write, one per l1_reg_e
    logic [1:0]          half;     // bus halves written: [0] bits 31:0, [1] 63:32
    logic                l3_sel;   // level-3 word on the bus: 0 pins 0..63, 1 pins 64..127
    logic                mem_we;   // write the bus into the test vector memory
    logic [MEM_AW-1:0]   mem_addr; // test vector memory word address
    logic                xfer;     // copy level 1 to level 2 and start the latch delay
  } bus_ctrl_t;

  localparam bus_ctrl_t BUS_CTRL_IDLE = '{src: BUS_IDLE, l1_we: '0, half: '0,
                                        l3_sel: 1'b0, mem_we: 1'b0,
                                        mem_addr: '0, xfer: 1'b0};

  // ------------------------------------------------- host register map
  // Word addresses on the host port (host_addr[7:0]; upper bits ignored).
  localparam logic [7:0] A_L1_FIRST = 8'h00; // 0x00..0x07 level 1, write
                                             //   addr[2:1] = l1_reg_e, addr[0] = half
  localparam logic [7:0] A_L3_FIRST = 8'h08; // 0x08..0x0B level 3, read
                                             //   addr[1] = 64-pin word, addr[0] = half
  localparam logic [7:0] A_CMD      = 8'h10; // write: [0] step, [1] start off-line, [2] stop
  localparam logic [7:0] A_STATUS   = 8'h11; // read:  [0] step busy, [1] off-line running,
                                             //        [2] off-line done, [3] level 3 valid,
                                             //        [31:16] vectors left in the run
  localparam logic [7:0] A_DELAY    = 8'h12; // rw: [7:0] coarse (bus clocks), [10:8] fine tap
  localparam logic [7:0] A_OFF_ADDR = 8'h13; // rw: off-line start word address
  localparam logic [7:0] A_OFF_LEN  = 8'h14; // rw: off-line vector count
  localparam logic [7:0] A_OFF_CTRL = 8'h15; // rw: [0] loop
  localparam logic [7:0] A_MEM_PTR  = 8'h16; // rw: host pointer into vector memory
  localparam logic [7:0] A_MEM_LO   = 8'h17; // rw: bits 31:0 of the word at the pointer
  localparam logic [7:0] A_MEM_HI   = 8'h18; // rw: bits 63:32, then pointer + 1
  localparam logic [7:0] A_POWER    = 8'h19; // rw: [0] direct FET, [1] indirect FET, [2] ready
  localparam logic [7:0] A_SEQ_ADDR = 8'h1A; // read: sequencer's current word address
  // Only with the optional burst pipeline (mactester_top BURST_DEPTH > 0):
  localparam logic [7:0] A_BURST    = 8'h1B; // write: [0] burst mode, [1] go
                                             // read:  [0] burst mode, [1] burst busy
  localparam logic [7:0] A_BURST_RESP = 8'h20; // 0x20..0x2F read: captured responses,
                                               //   addr[3:2] = vector, addr[1:0] = 32 pins

  localparam logic [2:0] CMD_STEP  = 3'b001;
  localparam logic [2:0] CMD_START = 3'b010;
  localparam logic [2:0] CMD_STOP  = 3'b100;

endpackage
