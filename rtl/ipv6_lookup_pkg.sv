// ipv6_lookup_pkg: constants and types shared by the two-level IPv6 lookup engine.
//
// The engine keeps prefixes whose length is a multiple of 8 (16..64) in seven
// hash RAMs HR(16)..HR(64) and the tails of the other prefixes (lengths 17..63,
// not a multiple of 8) in six groups of seven expanded RAMs ER(8g+1, 8g+7).
// A CAM holds whatever cannot be placed in the hash RAMs. All candidates meet
// in a priority comparator that keeps the longest match.
//
// The seven hash RAM lengths, the six expanded-RAM groups of seven RAMs each
// (42 in all), the 128-bit address and prefixes of at most 64 bits follow the
// design description. The next-hop width, the length encoding and the status
// codes are this design's own choices.
package ipv6_lookup_pkg;

  localparam int ADDR_W = 128;          // IPv6 destination address
  localparam int PFX_W  = 64;           // longest supported prefix
  localparam int LEN_W  = 7;            // prefix length 0..64
  localparam int NH_W   = 8;            // next-hop identifier width (own choice)

  localparam int N_HR   = 7;            // HR(16), HR(24), ..., HR(64)
  localparam int N_ER   = 6;            // ER(17,23), ..., ER(57,63)
  localparam int N_SUB  = 7;            // RAMs per ER group, one per tail length 1..7
  localparam int N_CAND = N_HR + N_ER * N_SUB + 1;  // comparator inputs: 7 + 42 + CAM

  localparam int MIN_HR_LEN = 16;       // length served by HR number 0

  // Prefix length held by hash RAM number k (k = 0..6): 16, 24, ..., 64.
  function automatic int hr_len(input int k);
    return MIN_HR_LEN + 8 * k;
  endfunction

  // One candidate match offered to the priority comparator.
  typedef struct packed {
    logic             hit;
    logic [LEN_W-1:0] len;
    logic [NH_W-1:0]  nh;
  } match_t;

  // Table maintenance operations.
  typedef enum logic {
    OP_INSERT = 1'b0,
    OP_DELETE = 1'b1
  } upd_op_e;

  // Outcome of a table maintenance operation.
  typedef enum logic [2:0] {
    ST_HR       = 3'd0,   // done in a hash RAM (hash prefix)
    ST_ER       = 3'd1,   // done in an expanded RAM (expanded prefix)
    ST_CAM      = 3'd2,   // done in the CAM
    ST_FULL     = 3'd3,   // insert failed: CAM full
    ST_NOTFOUND = 3'd4,   // delete failed: prefix not present
    ST_BADLEN   = 3'd5    // prefix longer than 64 bits
  } upd_status_e;

  // States of the table-update controller.
  typedef enum logic [2:0] {
    S_IDLE,   // waiting for a command
    S_READ,   // read the hash RAM word
    S_WAIT,   // read data settle
    S_DEC,    // decide and write the hash / expanded RAMs
    S_CAM,    // send the command to the CAM
    S_CAMW    // wait for the CAM's answer
  } upd_state_e;

  // What the table-update controller does with the hash RAM word it read.
  typedef enum logic [2:0] {
    A_NONE,    // nothing here: go to the CAM
    A_HP_SET,  // store a hash prefix
    A_EP_OLD,  // expanded prefix under an existing index
    A_EP_NEW,  // expanded prefix, new index from the counter
    A_DEL_HP,  // delete a hash prefix
    A_DEL_EP   // delete an expanded prefix
  } upd_act_e;

  // Mask with the top `len` bits of a 64-bit left-aligned prefix set.
  function automatic logic [PFX_W-1:0] len_mask(input logic [LEN_W-1:0] len);
    return ~({PFX_W{1'b1}} >> len);
  endfunction

endpackage
