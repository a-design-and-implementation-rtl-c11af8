// hash_ram: one first-level hash RAM HR(i), holding prefixes of length PLEN and
// the hash segments (first PLEN bits) of the longer prefixes that expand from it.
//
// Each of the 2**HASH_W words has the layout
//   { F, E, prefix[PLEN-1:0], next_hop[NH_W-1:0], index[IDX_W-1:0] }
// F  - a hash prefix of length PLEN occupies the word (a second, different
//      prefix hashing here collides and goes to the CAM);
// E  - the word's prefix is also the hash segment of expanded prefixes, whose
//      next hops sit in the expanded RAMs at base `index`.
// The four fields and their order follow the design description; the widths of
// the next hop and index fields are this design's choice.
//
// Two synchronous ports: a read-only lookup port (data one cycle after the
// address) and a read/write maintenance port (read data one cycle after
// up_rd, a write takes effect at the clock edge). The array starts all-zero
// (an empty table), as an FPGA block RAM initial value.
module hash_ram #(
  parameter int PLEN   = 24,
  parameter int HASH_W = 16,
  parameter int NH_W   = 8,
  parameter int IDX_W  = 8
) (
  input  logic              clk,
  // lookup port
  input  logic [HASH_W-1:0] lk_addr,
  output logic              lk_f,
  output logic              lk_e,
  output logic [PLEN-1:0]   lk_prefix,
  output logic [NH_W-1:0]   lk_nh,
  output logic [IDX_W-1:0]  lk_idx,
  // maintenance port
  input  logic [HASH_W-1:0] up_addr,
  input  logic              up_rd,
  input  logic              up_we,
  input  logic              up_wf,
  input  logic              up_we_flag,
  input  logic [PLEN-1:0]   up_wprefix,
  input  logic [NH_W-1:0]   up_wnh,
  input  logic [IDX_W-1:0]  up_widx,
  output logic              up_rf,
  output logic              up_re,
  output logic [PLEN-1:0]   up_rprefix,
  output logic [NH_W-1:0]   up_rnh,
  output logic [IDX_W-1:0]  up_ridx
);

  localparam int DW    = 2 + PLEN + NH_W + IDX_W;
  localparam int DEPTH = 1 << HASH_W;

  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] lk_q, up_q;

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = '0;
  end

  always_ff @(posedge clk) begin
    lk_q <= mem[lk_addr];
    if (up_rd) up_q <= mem[up_addr];
    if (up_we) mem[up_addr] <= {up_wf, up_we_flag, up_wprefix, up_wnh, up_widx};
  end

  assign {lk_f, lk_e, lk_prefix, lk_nh, lk_idx}      = lk_q;
  assign {up_rf, up_re, up_rprefix, up_rnh, up_ridx} = up_q;

endmodule
