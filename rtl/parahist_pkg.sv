// parahist_pkg: types and constants shared by the event histogram pipeline.
//
// The AER event word follows the AEDAT 2.0 layout: a 64-bit word whose upper
// half carries polarity ("type"), the y and x pixel address, the APS read flag
// and an ADC sample, and whose lower half (bits 31:0) is the microsecond
// timestamp. The field boundaries at bits 63, 48, 32, 31, 16 and 0 are the
// published ones; the field widths (1/9/10/2/10 bits from the top) are the
// usual AEDAT 2.0 widths and are this design's reading of the layout.
package parahist_pkg;

  // One AEDAT 2.0 event, most significant field first.
  typedef struct packed {
    logic        polarity;   // "type" field, bit 63
    logic [8:0]  y_addr;     // bits 62:54
    logic [9:0]  x_addr;     // bits 53:44
    logic [1:0]  read_aps;   // bits 43:42
    logic [9:0]  adc;        // bits 41:32
    logic [31:0] timestamp;  // bits 31:0, microseconds
  } aer_event_t;

  localparam int unsigned AER_W  = $bits(aer_event_t);  // 64
  localparam int unsigned X_W    = 10;
  localparam int unsigned Y_W    = 9;
  localparam int unsigned TIME_W = 32;

  // The pixel array is folded onto an 8x8 grid of RAM banks by the three
  // least significant bits of x and y.
  localparam int unsigned BANK_BITS = 3;
  localparam int unsigned BANK_DIM  = 1 << BANK_BITS;       // 8
  localparam int unsigned N_BANKS   = BANK_DIM * BANK_DIM;  // 64

  // Width of the ring buffer's size field: floor(log2(hs)).
  function automatic int unsigned floor_log2(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((v >> (r + 1)) != 0) r++;
    return r;
  endfunction

endpackage
