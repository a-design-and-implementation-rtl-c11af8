// first_level_lookup: the first-level (hash) lookup machine. Seven hash RAMs
// HR(16), HR(24), ..., HR(64) are searched in parallel, each at the XOR-folded
// hash of the address's first 16, 24, ..., 64 bits.
//
// Pipeline (one address per cycle, three stages):
//   stage 1  hash the seven address prefixes, register the RAM addresses
//   stage 2  read the seven hash RAMs
//   stage 3  compare each stored prefix with the address and register
//            - hp_hit[k]: a hash prefix of length 16+8k matches, with its next hop
//            - ep_go[k] / ep_idx[k]: the word's prefix equals the address's hash
//              segment and E is set, so expanded RAM group k must be read at
//              base ep_idx[k] (HR(64) has no expanded group)
// out_valid/out_addr leave together with the results, three cycles after
// in_valid/in_addr.
//
// The maintenance port gives the table-update controller read and write access
// to hash RAM up_sel at the hash of up_prefix (64 bits, left-aligned; only the
// first 16+8*up_sel bits are used). Read data follow up_rd by one cycle.
// The parallel hash lookup follows the design description; the stage split is
// this design's choice.
module first_level_lookup
  import ipv6_lookup_pkg::*;
#(
  parameter int HASH_W = 16,
  parameter int IDX_W  = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [ADDR_W-1:0]   in_addr,
  output logic                out_valid,
  output logic [ADDR_W-1:0]   out_addr,
  output match_t              hp_hit [N_HR],
  output logic [N_ER-1:0]     ep_go,
  output logic [IDX_W-1:0]    ep_idx [N_ER],
  // maintenance port
  input  logic [2:0]          up_sel,
  input  logic [PFX_W-1:0]    up_prefix,
  input  logic                up_rd,
  input  logic                up_we,
  input  logic                up_wf,
  input  logic                up_we_flag,
  input  logic [NH_W-1:0]     up_wnh,
  input  logic [IDX_W-1:0]    up_widx,
  output logic                up_rf,
  output logic                up_re,
  output logic [PFX_W-1:0]    up_rprefix,
  output logic [NH_W-1:0]     up_rnh,
  output logic [IDX_W-1:0]    up_ridx
);

  logic              v1, v2;
  logic [ADDR_W-1:0] a1, a2;
  logic [2:0]        up_sel_q;

  // per-RAM maintenance read data, widened to 64 bits
  logic              rf_k [N_HR];
  logic              re_k [N_HR];
  logic [PFX_W-1:0]  rp_k [N_HR];
  logic [NH_W-1:0]   rn_k [N_HR];
  logic [IDX_W-1:0]  ri_k [N_HR];

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
    a1 <= in_addr;
    a2 <= a1;
    out_addr <= a2;
    if (up_rd) up_sel_q <= up_sel;
  end

  for (genvar k = 0; k < N_HR; k++) begin : g_hr
    localparam int PL = MIN_HR_LEN + 8 * k;

    logic [HASH_W-1:0] lk_hash, lk_hash_q, up_hash;
    logic              lk_f, lk_e;
    logic [PL-1:0]     lk_prefix, up_rp;
    logic [NH_W-1:0]   lk_nh;
    logic [IDX_W-1:0]  lk_idx;

    xor_hash #(.PLEN(PL), .HASH_W(HASH_W)) u_lk_hash (
      .prefix(in_addr[ADDR_W-1 -: PL]), .index(lk_hash));
    xor_hash #(.PLEN(PL), .HASH_W(HASH_W)) u_up_hash (
      .prefix(up_prefix[PFX_W-1 -: PL]), .index(up_hash));

    always_ff @(posedge clk) lk_hash_q <= lk_hash;

    hash_ram #(.PLEN(PL), .HASH_W(HASH_W), .NH_W(NH_W), .IDX_W(IDX_W)) u_hr (
      .clk        (clk),
      .lk_addr    (lk_hash_q),
      .lk_f       (lk_f),
      .lk_e       (lk_e),
      .lk_prefix  (lk_prefix),
      .lk_nh      (lk_nh),
      .lk_idx     (lk_idx),
      .up_addr    (up_hash),
      .up_rd      (up_rd && up_sel == 3'(k)),
      .up_we      (up_we && up_sel == 3'(k)),
      .up_wf      (up_wf),
      .up_we_flag (up_we_flag),
      .up_wprefix (up_prefix[PFX_W-1 -: PL]),
      .up_wnh     (up_wnh),
      .up_widx    (up_widx),
      .up_rf      (rf_k[k]),
      .up_re      (re_k[k]),
      .up_rprefix (up_rp),
      .up_rnh     (rn_k[k]),
      .up_ridx    (ri_k[k])
    );

    if (PL < PFX_W) begin : g_pad
      assign rp_k[k] = {up_rp, {(PFX_W - PL){1'b0}}};
    end else begin : g_nopad
      assign rp_k[k] = up_rp;
    end

    // stage 3: prefix compare
    logic same;
    assign same = (lk_prefix == a2[ADDR_W-1 -: PL]);

    always_ff @(posedge clk) begin
      hp_hit[k].hit <= lk_f && same;
      hp_hit[k].len <= LEN_W'(PL);
      hp_hit[k].nh  <= lk_nh;
    end

    if (k < N_ER) begin : g_ep
      always_ff @(posedge clk) begin
        ep_go[k]  <= lk_e && same;
        ep_idx[k] <= lk_idx;
      end
    end
  end

  assign up_rf      = rf_k[up_sel_q];
  assign up_re      = re_k[up_sel_q];
  assign up_rprefix = rp_k[up_sel_q];
  assign up_rnh     = rn_k[up_sel_q];
  assign up_ridx    = ri_k[up_sel_q];

endmodule
