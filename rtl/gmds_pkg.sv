// gmds_pkg: types and constants shared by the GMDS line-card modules.
//
// Data paths are 32 bits wide, matching the 32-bit memory path of the
// reference implementation. Every packet starts with one 32-bit packet
// header word, followed by ceil(len/4) payload words:
//
//   [31]    direct : 1 = destination field is a port bitmap (multicast),
//                    0 = destination field is an address matched against
//                        the Frame Filter's programmable patterns
//   [30:28] class  : traffic class (only the low bits below N_CLASS are used)
//   [27:16] len    : payload length in bytes (1..MAX_PKT_BYTES)
//   [15:0]  dest   : destination address or port bitmap
//
// The header layout, the multiframe word layout and the XOR check word are
// choices of this design; the document does not specify them.
package gmds_pkg;

  localparam int unsigned W          = 32;   // data path width
  localparam int unsigned LEN_W      = 12;   // header length field
  localparam int unsigned DEST_W     = 16;   // header destination field
  localparam logic [15:0] SYNC_PATTERN = 16'hC35A;  // multiframe alignment word

  typedef logic [W-1:0] word_t;

  typedef struct packed {
    logic              direct;
    logic [2:0]        cls;
    logic [LEN_W-1:0]  len;
    logic [DEST_W-1:0] dest;
  } pkt_hdr_t;

  // First word of every multiframe: alignment pattern, sender id, flags.
  typedef struct packed {
    logic [15:0] sync;
    logic [7:0]  src_id;
    logic [6:0]  rsvd;
    logic        has_pkt;
  } mf_sync_t;

  // Number of 32-bit payload words of a packet of len bytes.
  function automatic int unsigned payload_words(logic [LEN_W-1:0] len);
    return (int'(len) + 3) / 4;
  endfunction

endpackage
