// tsd_pkg: types and constants shared by the trusted-detection system.
//
// The system guards a 128-bit AES block cipher chip of unknown provenance.
// A trusted layer sends every job both to the untrusted chip (over a narrow
// serial board-to-board link) and to a trusted software AES engine, and stops
// the system when the two answers differ. The constants here fix the widths
// of that link and of the job words exchanged with the software engine.
package tsd_pkg;

  // AES-128: both the key and a text block are 128 bits wide.
  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned KEY_BITS   = 128;

  // Fast Simplex Link word width (32-bit processor links).
  localparam int unsigned FSL_WIDTH  = 32;

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [KEY_BITS-1:0]   key_t;

  // Header word sent to the software engine (control bit set) ahead of the
  // key and text words. Bit 0 selects the direction.
  typedef enum logic [0:0] {
    OP_DECRYPT = 1'b0,
    OP_ENCRYPT = 1'b1
  } aes_op_e;

  // One direction of the board-to-board link for one AES core:
  // trusted board -> untrusted board.
  typedef struct packed {
    logic rst;    // holds the untrusted core and its wrapper in reset
    logic load;   // frame strobe: high while key/txtin bits are shifted
    logic key;    // serial key bit, MSB first
    logic txtin;  // serial input text bit, MSB first
  } link_down_t;

  // untrusted board -> trusted board.
  typedef struct packed {
    logic done;   // frame strobe: high while txtout bits are shifted
    logic txtout; // serial result bit, MSB first
  } link_up_t;

  // Clock cycles in a given number of microseconds, never fewer than one.
  function automatic int unsigned us_to_cycles(int unsigned clk_khz, int unsigned us);
    int unsigned c;
    c = (clk_khz * us) / 1000;
    return (c == 0) ? 1 : c;
  endfunction

endpackage
