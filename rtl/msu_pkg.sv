// msu_pkg: widths, constants and record types shared by the LZ4 match
// search unit (MSU).
//
// The unit hashes eight overlapping 4-byte sequences per clock and looks each
// one up in a shared hash table whose entries hold both the position of the
// sequence in the input buffer (IBA, 14 bits for a 16 kB buffer) and the
// 32-bit sequence itself, so a 46-bit record. These sizes, the eight lanes and
// the 256-entry table are the ones the architecture is built around.
//
// The hash multiplier is the 32-bit Fibonacci constant used by LZ4
// (2654435761, a prime close to 2^32 divided by the golden ratio). Bytes are
// packed little-endian into the 32-bit sequence, as LZ4 reads them: the byte
// at the lowest address is bits [7:0]. Both are this design's choices where
// the architecture leaves them open.
package msu_pkg;

  localparam int unsigned IB_BYTES  = 16384;              // input buffer capacity
  localparam int unsigned IBA_W     = $clog2(IB_BYTES);    // 14-bit byte address
  localparam int unsigned DATA_W    = 32;                  // one LZ4 sequence
  localparam int unsigned WR_W      = 64;                  // buffer write port
  localparam int unsigned RD_W      = 128;                 // buffer read port
  localparam int unsigned LANES_DEF = 8;                   // bytes per clock
  localparam int unsigned HT_DEPTH_DEF = 256;              // hash table entries
  localparam int unsigned HASH_LAT_DEF = 6;                // hash pipeline depth

  localparam logic [31:0] FIB_MULT = 32'd2654435761;

  typedef logic [IBA_W-1:0]  iba_t;
  typedef logic [DATA_W-1:0] data_t;

  // One hash table record: "IBA pointer + related DATA" (46 bits).
  typedef struct packed {
    iba_t  iba;
    data_t data;
  } ht_rec_t;

  // A sequence entering a lane: its buffer address and its four bytes.
  typedef struct packed {
    logic  valid;
    iba_t  iba;
    data_t data;
  } seq_t;

endpackage
