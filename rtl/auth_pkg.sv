// auth_pkg: types and constants shared by the authentication gateway.
//
// The gateway moves 32-bit words between its units (the width of the
// processing-system S-GP AXI ports the DMA cores read through). A stream beat
// carries the word, a byte-valid mask and an end-of-packet flag; valid/ready
// travel beside it. Byte 0 of a packet is bits [7:0] of the first word.
//
// The Keccak constants follow the SHA3-256 instance (rate 1088 bits, 256-bit
// output). The document names Keccak as the MAC primitive but no instance,
// so this instance is a choice of this design.
package auth_pkg;

  localparam int unsigned DW       = 32;     // stream word width
  localparam int unsigned BW       = DW / 8; // bytes per word
  localparam int unsigned AW       = 32;     // DRAM address width
  localparam int unsigned LENW     = 16;     // packet length field, bytes

  // Keccak / MAC
  localparam int unsigned KECCAK_RATE_BITS = 1088;
  localparam int unsigned KECCAK_RATE_WORDS = KECCAK_RATE_BITS / DW;   // 34
  localparam int unsigned MAC_BITS   = 256;
  localparam int unsigned MAC_WORDS  = MAC_BITS / DW;                  // 8
  localparam int unsigned KEY_BITS   = 256;
  localparam int unsigned KEY_WORDS  = KEY_BITS / DW;                  // 8
  localparam logic [7:0]  SHA3_DOMAIN = 8'h06;

  // Parity frame: 14-byte Ethernet header + 2-byte XOR-region length
  localparam int unsigned HDR_WORDS = 4;

  typedef struct packed {
    logic [DW-1:0] data;
    logic [BW-1:0] keep;
    logic          last;
  } beat_t;

  // Descriptor written by the CPU into a descriptor queue.
  // len: bytes to read; xlen: bytes of XOR region (parity packets only).
  typedef struct packed {
    logic [AW-1:0]   addr;
    logic [LENW-1:0] len;
    logic [LENW-1:0] xlen;
  } desc_t;

  // Per-packet job handed from the controller to the datapath units.
  typedef struct packed {
    logic [LENW-1:0] v_words;   // video words
    logic [LENW-1:0] px_words;  // parity XOR-region words
    logic [LENW-1:0] pm_words;  // words of MACs already in the parity packet
  } job_t;

  function automatic logic [LENW-1:0] bytes_to_words(input logic [LENW-1:0] n);
    return LENW'((32'(n) + BW - 1) / BW);
  endfunction

endpackage
