// amb_pkg: shared types and constants of the Autonomous Memory Block (AMB).
//
// The AMB is an FPGA block RAM with its own address generation unit (AGU).
// Its configuration (held in FPGA configuration memory in a real device) is
// one packed struct, amb_cfg_t, that selects the access mode and sizes the
// buffer and the access patterns. Configuration fields are CFG_W bits wide so
// that one layout serves every address width up to MAX_AW bits (the largest
// block RAM discussed, 16 address bits); a module uses the low ADDR_W+1 bits.
// The six modes follow the document (five AGU modes plus random access); the
// field layout and the encodings are this design's own.
package amb_pkg;

  // Largest supported address width and width of the configuration fields
  // (one more bit so a length of 2**MAX_AW can be written).
  localparam int unsigned MAX_AW = 16;
  localparam int unsigned CFG_W  = MAX_AW + 1;

  typedef enum logic [2:0] {
    MODE_FIFO   = 3'd0,  // first-in-first-out circular buffer
    MODE_FIMO   = 3'd1,  // first-in-multiple-out circular buffer
    MODE_LIFO   = 3'd2,  // stack
    MODE_SWING  = 3'd3,  // swinging (ping-pong) buffer
    MODE_STRIPE = 3'd4,  // striped access, 1-D or 2-D
    MODE_RANDOM = 3'd5   // AGU bypassed, external addresses
  } amb_mode_e;

  // One striped access pattern (Fig. 3). Addresses visited, in order:
  //   start + s*offset + r*pitch + i
  // for s = 0..stripes-1, r = 0..rows-1, i = 0..n-1 (i fastest), then the
  // pattern repeats. rows = 1 gives the 1-D pattern of Fig. 3 (a).
  typedef struct packed {
    logic [CFG_W-1:0] start;    // A1, first address of the first stripe
    logic [CFG_W-1:0] n;        // items per stripe row (>= 1)
    logic [CFG_W-1:0] rows;     // rows per stripe (>= 1)
    logic [CFG_W-1:0] pitch;    // address distance between rows (image width)
    logic [CFG_W-1:0] offset;   // A2 - A1, distance between stripe starts
    logic [CFG_W-1:0] stripes;  // stripes before the pattern repeats (>= 1)
  } stripe_cfg_t;

  typedef struct packed {
    amb_mode_e        mode;
    logic [CFG_W-1:0] base;     // first address of the buffer region
    logic [CFG_W-1:0] length;   // buffer length L (>= 1); swinging: size of each half
    logic [CFG_W-1:0] taps;     // FIMO: items read out per item written, 1..L
    stripe_cfg_t      wr_stripe; // striped mode: write-port pattern
    stripe_cfg_t      rd_stripe; // striped mode: read-port pattern
  } amb_cfg_t;

endpackage
