// pac_pkg: types and constants shared by the preaccelerator control cards.
//
// Every card of a station sits on the M6800 backplane bus and is reached as
// memory. A bus cycle is carried as one bus_req_t: it is valid for exactly one
// station clock when vma is high; rw follows the 6800 sense (1 = read). The
// selected card returns its byte combinationally on its rdata output, and any
// side effect of a read (clearing a flag) or a write happens on the clock edge
// that ends the cycle.
//
// The address map is this design's own choice, except that the ground-station
// PROM occupies E000-FFFF: RAM from 0000, sixteen I/O slots of 16 bytes at
// 8000-80FF, a station control register at 8100 and PROM at the top of memory.
package pac_pkg;

  typedef struct packed {
    logic        vma;    // valid memory address: a bus cycle this clock
    logic        rw;     // 1 = read, 0 = write
    logic [15:0] addr;
    logic [7:0]  wdata;
  } bus_req_t;

  localparam logic [15:0] IO_BASE   = 16'h8000;  // slot s at IO_BASE + 16*s
  localparam logic [15:0] CTL_ADDR  = 16'h8100;  // station control register
  localparam int          N_SLOTS   = 16;

  // ACIA status register bits (6850 layout)
  localparam int ST_RDRF = 0;
  localparam int ST_TDRE = 1;
  localparam int ST_FE   = 4;
  localparam int ST_OVRN = 5;
  localparam int ST_PE   = 6;
  localparam int ST_IRQ  = 7;

  // Timer start sources
  typedef enum logic [1:0] {
    START_EXT   = 2'd0,  // external pulse (the beam-cycle 1-gap)
    START_CPU   = 2'd1,  // CPU start command only
    START_CHAIN = 2'd2   // output of the other timer channel
  } start_src_e;

  function automatic logic is_write(bus_req_t r);
    return r.vma && !r.rw;
  endfunction

  function automatic logic is_read(bus_req_t r);
    return r.vma && r.rw;
  endfunction

endpackage
