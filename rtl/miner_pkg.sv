// miner_pkg: types and constants shared by the Bitcoin miner blocks.
//
// header_t is the 640-bit Bitcoin block header in hashing order: version,
// previous-block hash, Merkle root, timestamp, target ("bits") and nonce,
// 32 + 256 + 256 + 32 + 32 + 32 bits. Each 32-bit field is stored exactly as
// the SHA-256 message word it becomes (the firmware writes the words already
// in big-endian message order). The field order and widths follow the block
// header layout of the design; the word-level encoding is this design's
// choice.
//
// The padding constants complete the two SHA-256 messages: the 640-bit header
// is padded to 1024 bits (a 1 bit, zeros, length 640 = 0x280: 384 bits), and
// the 256-bit first digest is padded to 512 bits (length 256 = 0x100).
//
// The Wishbone register map (byte offsets from BASE_ADDR) is this design's
// choice:
//   0x00-0x4C  header words 0..19 (write; read back)      HDR_WORDS = 20
//   0x50-0x6C  256-bit threshold, word 0 most significant (write; read back)
//   0x70       CTRL   write bit 0 = done (leave the output state)
//   0x74       STATUS read  {found, busy, state[2:0]} in bits [4:0]
//   0x78       NONCE  read  current nonce
//   0x7C       TRIES  read  number of nonces checked since the last start
//   0x80-0x9C  RESULT read  winning double hash, word 0 = H0
package miner_pkg;

  typedef struct packed {
    logic [31:0]  version;
    logic [255:0] prev_hash;
    logic [255:0] merkle_root;
    logic [31:0]  timestamp;
    logic [31:0]  bits;
    logic [31:0]  nonce;
  } header_t;

  localparam int unsigned HDR_WORDS = 20;
  localparam int unsigned THR_WORDS = 8;
  localparam int unsigned WR_WORDS  = HDR_WORDS + THR_WORDS;   // 28

  localparam logic [383:0] HDR_PAD =
    {32'h80000000, 320'h0, 32'h00000280};
  localparam logic [255:0] HASH_PAD =
    {32'h80000000, 192'h0, 32'h00000100};

  localparam logic [31:0] BASE_ADDR = 32'h3000_0000;

  localparam logic [7:0] A_THR    = 8'h50;
  localparam logic [7:0] A_CTRL   = 8'h70;
  localparam logic [7:0] A_STATUS = 8'h74;
  localparam logic [7:0] A_NONCE  = 8'h78;
  localparam logic [7:0] A_TRIES  = 8'h7C;
  localparam logic [7:0] A_RESULT = 8'h80;

  // Miner controller states, in the order of the mining state machine.
  typedef enum logic [2:0] {
    ST_RESET   = 3'd0,
    ST_WAIT    = 3'd1,   // wait for la_data_in[0] = 1
    ST_LOAD    = 3'd2,   // read & store the header over Wishbone
    ST_COMPUTE = 3'd3,   // double SHA-256 running
    ST_CHECK   = 3'd4,   // target check & nonce++
    ST_OUTPUT  = 3'd5    // valid hash available until done
  } miner_state_e;

  // Bitcoin reads a double-SHA-256 digest as a little-endian 256-bit number:
  // the target compare uses the digest with its 32 bytes reversed.
  function automatic logic [255:0] byte_reverse256(logic [255:0] x);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[8*i +: 8] = x[255 - 8*i -: 8];
    return r;
  endfunction

endpackage
