// thinning_pkg: types and constants shared by the pipelined Zhang-Suen
// thinning processor.
//
// The processor works on a binary image stored eight pixels to a byte
// ("column"), line after line, with bit 7 of a byte the leftmost pixel.
// One column is processed per six-clock execution cycle; the six clock
// steps are named by phase_e and follow the order of the published
// schedule (load l, load m, RAM load, store, load r, execute).
// ctl_t bundles every strobe the controller drives into the datapath.
package thinning_pkg;

  // Pixels in one column byte and in one register-set word (l + m + r).
  localparam int unsigned PIX      = 8;
  localparam int unsigned ROW_BITS = PIX + 2;

  // Default image geometry: 512 x 512 pixels, 64 columns of 8 pixels per line.
  localparam int unsigned DEF_IMG_W = 512;
  localparam int unsigned DEF_IMG_H = 512;

  // The six clock steps of one execution cycle.
  typedef enum logic [2:0] {
    PH_LOAD_L  = 3'd0,  // l <= m[0]; RAM fetch column k; main memory fetch
    PH_LOAD_M  = 3'd1,  // m <= RAM data; main memory fetch (2nd clock)
    PH_RAM_LD  = 3'd2,  // RAM bank loads column k (lines shift up one)
    PH_STORE   = 3'd3,  // RAM fetch column k+1; main memory store
    PH_LOAD_R  = 3'd4,  // r <= RAM data bit 7; main memory store (2nd clock)
    PH_EXECUTE = 3'd5   // modification unit array result -> temporal register
  } phase_e;

  // Controller outputs (the control lines of the processor block diagram).
  typedef struct packed {
    logic lr_load;       // load l subgroups
    logic mr_load;       // load m subgroups
    logic rr_load;       // load r subgroups
    logic ram_read;      // RAM bank fetch
    logic ram_write;     // RAM bank load (chained shift)
    logic ram_addr_inc;  // advance RAM column address
    logic mem_read;      // main memory read
    logic mem_write;     // main memory write
    logic fetch_inc;     // advance main memory fetch pointer
    logic store_inc;     // advance main memory store pointer
    logic sel_store;     // main memory address = store pointer
    logic init;          // clear all address pointers
    logic tmp_load;      // temporal register load
    logic exec_valid;    // this execute step produces a real result
    logic cont_clear;    // start of an iteration: clear continue flag
    logic step;          // 1: conditions (c),(d); 0: (c'),(d')
    logic first_col;     // column 0: left neighbour is background
    logic last_col;      // last column: right neighbour is background
    logic top_line;      // line 0: upper line is background
    logic bottom_line;   // last line: lower line is background
  } ctl_t;

endpackage
