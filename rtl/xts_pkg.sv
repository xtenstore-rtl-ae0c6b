// Shared types and constants of the shielded key-value store engine.
//
// Keys are fixed at 16 bytes and values are 1..64 words of 16 bytes
// (16 B to 1024 B), the sizes the store is built and measured for. A value
// of exactly one word is kept inside the on-chip table; longer values live
// encrypted in host memory as a record [IV][MAC][ciphertext...], one 16-byte
// word per address step. Host memory is 64 GB, hence 36-bit byte addresses.
// The request/response beat formats and the table entry layout are this
// design's own choices.
package xts_pkg;

  localparam int unsigned WORD_W      = 128;              // one 16-byte word
  localparam int unsigned KEY_W       = 128;              // 16-byte keys
  localparam int unsigned HOST_ADDR_W = 36;               // 64 GB host memory
  localparam int unsigned MAX_WORDS   = 64;               // 1024-byte values
  localparam int unsigned LEN_W       = 8;                // holds 0..255 words
  localparam int unsigned HDR_WORDS   = 2;                // IV and MAC words

  typedef logic [WORD_W-1:0]      word_t;
  typedef logic [HOST_ADDR_W-1:0] haddr_t;
  typedef logic [LEN_W-1:0]       len_t;

  typedef enum logic [1:0] {
    OP_GET = 2'd0,
    OP_PUT = 2'd1
  } kvs_op_e;

  typedef enum logic [1:0] {
    ST_OK        = 2'd0,
    ST_NOT_FOUND = 2'd1,
    ST_MAC_FAIL  = 2'd2,
    ST_FULL      = 2'd3
  } kvs_status_e;

  // Request beat. The first beat of a request carries op, nwords and the
  // key in data; a PUT is followed by nwords value beats. last marks the
  // final beat of the request.
  typedef struct packed {
    kvs_op_e op;
    len_t    nwords;
    logic    last;
    word_t   data;
  } req_beat_t;

  // Response beat. The first beat carries status, nwords and the key; a
  // successful GET is followed by nwords value beats.
  typedef struct packed {
    kvs_status_e status;
    len_t        nwords;
    logic        last;
    word_t       data;
  } rsp_beat_t;

  // One entry of the 1st-tier table.
  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic             inl;      // value held in inl_val, not in host memory
    len_t             nwords;   // value length in words
    len_t             cap;      // words the host slot at ptr can hold (0: none)
    haddr_t           ptr;      // host address of the record
    logic [127:0]     secret;   // per-key secret, renewed by every PUT
    word_t            inl_val;  // inline 16-byte value
  } ht_entry_t;

  typedef enum logic [1:0] {
    HT_LOOKUP = 2'd0,
    HT_INSERT = 2'd1,
    HT_UPDATE = 2'd2
  } ht_op_e;

endpackage
