// i2sems_pkg: types and constants shared by the I2SEMS security fabric.
//
// A message on the (untrusted) interconnect carries its own counter, so that
// the receiver can find or regenerate the keystream without any global
// synchronisation. The counter is 64 bits wide and a cache block is 32 bytes,
// as in the design's reference configuration. A "keystream" here is the
// material GCM needs for one 32-byte block: two 128-bit data pads and one
// 128-bit MAC pad, made by AES from the counter with three different
// prefixes (0..00, 0..01 and 0..11, as printed in the GCM diagram of the
// design). Widths that the design does not fix (address, destination ID) are
// this implementation's choices.
package i2sems_pkg;

  localparam int unsigned CNT_W   = 64;   // counter width (64 bits)
  localparam int unsigned BLK_W   = 256;  // 32-byte cache block
  localparam int unsigned ADDR_W  = 31;   // byte address of a 2 GB memory
  localparam int unsigned DEST_W  = 8;    // destination ID (processor or memory)
  localparam int unsigned AES_W   = 128;

  // Prefixes placed above the counter in the 128-bit AES input block.
  localparam logic [AES_W-CNT_W-1:0] PFX_MAC = 64'h0;  // AES(0..00||cnt) -> MAC pad
  localparam logic [AES_W-CNT_W-1:0] PFX_D1  = 64'h1;  // AES(0..01||cnt) -> pad of plaintext 1
  localparam logic [AES_W-CNT_W-1:0] PFX_D2  = 64'h3;  // AES(0..11||cnt) -> pad of plaintext 2

  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [BLK_W-1:0]  block_t;
  typedef logic [AES_W-1:0]  aes_blk_t;

  typedef struct packed {
    aes_blk_t mac_pad;   // AES_K(0..00 || cnt)
    aes_blk_t pad2;      // AES_K(0..11 || cnt), covers data[255:128]
    aes_blk_t pad1;      // AES_K(0..01 || cnt), covers data[127:0]
  } keystream_t;

  typedef struct packed {
    cnt_t       cnt;
    keystream_t ks;
  } ks_entry_t;

  // Message as it travels on the interconnect (Dest ID | Addr | Encrypted Data | Tag | cnt).
  typedef struct packed {
    logic [DEST_W-1:0] dest;
    addr_t             addr;
    block_t            data;
    aes_blk_t          tag;
    cnt_t              cnt;
  } msg_t;

  // Cache block state as reported by the system cache (MOESI names).
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,
    ST_E = 3'd2,
    ST_O = 3'd3,
    ST_M = 3'd4
  } cstate_t;

  // Outgoing block handed over by the system cache for encryption.
  typedef struct packed {
    logic [DEST_W-1:0] dest;
    addr_t             addr;
    block_t            data;
    cstate_t           state;
  } tx_req_t;

  // Destination of a generated keystream.
  typedef enum logic [1:0] {
    KD_QUEUE = 2'd0,   // keystream queue (counters assigned to this processor)
    KD_POOL  = 2'd1,   // keystream pool (broadcast or predicted counters)
    KD_RX    = 2'd2,   // the counter of a message that is waiting to be decrypted
    KD_HKEY  = 2'd3    // hash key H = AES_K(0^128)
  } ks_dest_t;

  // One-cycle event pulses of a processor's security unit, for counting.
  typedef struct packed {
    logic gcc_req;      // counter request sent to the GCC
    logic q_pop;        // fresh counter taken from the keystream queue
    logic q_stall;      // encryption waiting on an empty keystream queue
    logic kc_hit;       // Owned block re-sent with a cached counter
    logic pool_hit;     // incoming message found its keystream in the pool
    logic pool_miss;    // incoming message waited for AES
    logic bc_accept;    // broadcast assignment taken for precomputation
    logic bc_discard;   // broadcast older than the newest one seen, dropped
    logic auth_fail;    // tag mismatch on an incoming message
  } node_ev_t;

endpackage
