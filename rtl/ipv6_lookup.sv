// ipv6_lookup: two-level IPv6 longest-prefix-match engine built from hash RAMs,
// expanded RAMs and a CAM, pipelined over eight stages so that it accepts one
// destination address per clock cycle.
//
// Prefixes of length 16, 24, ..., 64 sit in seven hash RAMs addressed by an
// XOR-folded hash of the prefix. A prefix of any other length 17..63 is split
// into its hash segment (its first 8*floor(L/8) bits), kept in the hash RAM of
// that length, and its tail of 1..7 bits, which with the hash RAM word's index
// addresses one of 42 expanded RAMs. Prefixes that collide in a hash RAM, and
// prefixes shorter than 16 bits, go to a CAM searched at the same time. A
// priority comparator keeps the longest of all matches.
//
// Lookup pipeline (lk_valid/lk_addr in, res_* out exactly 8 cycles later):
//   1 address register          5 expanded RAM read
//   2 XOR hash                  6 expanded-RAM candidates (CAM and hash-RAM
//   3 hash RAM read + CAM search  results wait in delay registers)
//   4 prefix compare            7 priority comparator
//                               8 output register
// res_hit is low when no prefix matches; res_len is the matched length.
//
// Table maintenance: upd_valid/upd_ready handshake, one insert or delete at a
// time, answered by upd_rsp_valid/upd_rsp_status (see table_update). Lookups
// continue meanwhile; a lookup that overlaps an update of the same prefix may
// see the table before or after it. The table starts empty; rst clears the
// pipeline, the CAM and the index counters but not the contents of the hash
// and expanded RAMs.
//
// The two-level structure, the seven hash RAMs, the 42 expanded RAMs, the CAM,
// the priority comparator and the 8-stage, one-lookup-per-cycle pipeline
// follow the design description; the stage boundaries, the widths not fixed
// there (next hop, index, CAM depth) and the maintenance interface are this
// design's choices.
module ipv6_lookup
  import ipv6_lookup_pkg::*;
#(
  parameter int HASH_W    = 16,
  parameter int IDX_W     = 8,
  parameter int CAM_DEPTH = 2944
) (
  input  logic                         clk,
  input  logic                         rst,
  // lookup
  input  logic                         lk_valid,
  input  logic [ADDR_W-1:0]            lk_addr,
  output logic                         res_valid,
  output logic                         res_hit,
  output logic [LEN_W-1:0]             res_len,
  output logic [NH_W-1:0]              res_nh,
  // table maintenance
  input  logic                         upd_valid,
  output logic                         upd_ready,
  input  upd_op_e                      upd_op,
  input  logic [PFX_W-1:0]             upd_prefix,
  input  logic [LEN_W-1:0]             upd_len,
  input  logic [NH_W-1:0]              upd_nh,
  output logic                         upd_rsp_valid,
  output upd_status_e                  upd_rsp_status,
  output logic [$clog2(CAM_DEPTH+1)-1:0] cam_used
);

  // ---------------- stage 1: address register ----------------
  logic              s1_v;
  logic [ADDR_W-1:0] s1_a;

  always_ff @(posedge clk) begin
    if (rst) s1_v <= 1'b0;
    else     s1_v <= lk_valid;
    s1_a <= lk_addr;
  end

  // ---------------- maintenance wiring ----------------
  logic [2:0]       hr_sel;
  logic [PFX_W-1:0] hr_prefix, hr_rprefix;
  logic             hr_rd, hr_we, hr_wf, hr_we_flag, hr_rf, hr_re;
  logic [NH_W-1:0]  hr_wnh, hr_rnh;
  logic [IDX_W-1:0] hr_widx, hr_ridx;
  logic             er_we, er_h;
  logic [2:0]       er_grp, er_d;
  logic [IDX_W-1:0] er_idx;
  logic [6:0]       er_tail;
  logic [NH_W-1:0]  er_nh;
  logic             cam_cmd_valid, cam_rsp_valid;
  upd_op_e          cam_op;
  logic [PFX_W-1:0] cam_prefix;
  logic [LEN_W-1:0] cam_len;
  logic [NH_W-1:0]  cam_nh;
  upd_status_e      cam_rsp_status;

  // ---------------- stages 2-4: first level ----------------
  logic              s4_v;
  logic [ADDR_W-1:0] s4_a;
  match_t            hp_hit [N_HR];
  logic [N_ER-1:0]   ep_go;
  logic [IDX_W-1:0]  ep_idx [N_ER];

  first_level_lookup #(.HASH_W(HASH_W), .IDX_W(IDX_W)) u_l1 (
    .clk        (clk),
    .rst        (rst),
    .in_valid   (s1_v),
    .in_addr    (s1_a),
    .out_valid  (s4_v),
    .out_addr   (s4_a),
    .hp_hit     (hp_hit),
    .ep_go      (ep_go),
    .ep_idx     (ep_idx),
    .up_sel     (hr_sel),
    .up_prefix  (hr_prefix),
    .up_rd      (hr_rd),
    .up_we      (hr_we),
    .up_wf      (hr_wf),
    .up_we_flag (hr_we_flag),
    .up_wnh     (hr_wnh),
    .up_widx    (hr_widx),
    .up_rf      (hr_rf),
    .up_re      (hr_re),
    .up_rprefix (hr_rprefix),
    .up_rnh     (hr_rnh),
    .up_ridx    (hr_ridx)
  );

  // ---------------- CAM: searched alongside stages 2-3 ----------------
  logic   cam_res_v;
  match_t cam_res;

  cam_lookup #(.DEPTH(CAM_DEPTH)) u_cam (
    .clk          (clk),
    .rst          (rst),
    .lk_valid     (s1_v),
    .lk_addr      (s1_a),
    .lk_res_valid (cam_res_v),
    .lk_res       (cam_res),
    .cmd_valid    (cam_cmd_valid),
    .cmd_op       (cam_op),
    .cmd_prefix   (cam_prefix),
    .cmd_len      (cam_len),
    .cmd_nh       (cam_nh),
    .rsp_valid    (cam_rsp_valid),
    .rsp_status   (cam_rsp_status),
    .used         (cam_used)
  );

  // ---------------- stages 5-6: second level ----------------
  logic   s6_v;
  match_t er_cand [N_ER*N_SUB];

  second_level_lookup #(.IDX_W(IDX_W)) u_l2 (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (s4_v),
    .in_addr   (s4_a),
    .ep_go     (ep_go),
    .ep_idx    (ep_idx),
    .out_valid (s6_v),
    .cand      (er_cand),
    .up_we     (er_we),
    .up_grp    (er_grp),
    .up_d      (er_d),
    .up_idx    (er_idx),
    .up_tail   (er_tail),
    .up_h      (er_h),
    .up_nh     (er_nh)
  );

  // delay the first-level results (stage 4) and the CAM result (stage 3)
  // to stage 6
  match_t hp_d5 [N_HR], hp_d6 [N_HR];
  match_t cam_d4, cam_d5, cam_d6;

  always_ff @(posedge clk) begin
    hp_d5  <= hp_hit;
    hp_d6  <= hp_d5;
    cam_d4 <= cam_res;
    cam_d5 <= cam_d4;
    cam_d6 <= cam_d5;
  end

  match_t cand [N_CAND];
  always_comb begin
    for (int c = 0; c < N_HR; c++) cand[c] = hp_d6[c];
    for (int c = 0; c < N_ER*N_SUB; c++) cand[N_HR + c] = er_cand[c];
    cand[N_CAND-1] = cam_d6;
  end

  // ---------------- stage 7: priority comparator ----------------
  logic   s7_v;
  match_t s7_best;

  priority_comparator #(.N(N_CAND)) u_pc (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (s6_v),
    .cand      (cand),
    .out_valid (s7_v),
    .out       (s7_best)
  );

  // ---------------- stage 8: output register ----------------
  always_ff @(posedge clk) begin
    if (rst) res_valid <= 1'b0;
    else     res_valid <= s7_v;
    res_hit <= s7_best.hit;
    res_len <= s7_best.len;
    res_nh  <= s7_best.nh;
  end

  // ---------------- table maintenance ----------------
  table_update #(.IDX_W(IDX_W)) u_upd (
    .clk            (clk),
    .rst            (rst),
    .cmd_valid      (upd_valid),
    .cmd_ready      (upd_ready),
    .cmd_op         (upd_op),
    .cmd_prefix     (upd_prefix),
    .cmd_len        (upd_len),
    .cmd_nh         (upd_nh),
    .rsp_valid      (upd_rsp_valid),
    .rsp_status     (upd_rsp_status),
    .hr_sel         (hr_sel),
    .hr_prefix      (hr_prefix),
    .hr_rd          (hr_rd),
    .hr_we          (hr_we),
    .hr_wf          (hr_wf),
    .hr_we_flag     (hr_we_flag),
    .hr_wnh         (hr_wnh),
    .hr_widx        (hr_widx),
    .hr_rf          (hr_rf),
    .hr_re          (hr_re),
    .hr_rprefix     (hr_rprefix),
    .hr_rnh         (hr_rnh),
    .hr_ridx        (hr_ridx),
    .er_we          (er_we),
    .er_grp         (er_grp),
    .er_d           (er_d),
    .er_idx         (er_idx),
    .er_tail        (er_tail),
    .er_h           (er_h),
    .er_nh          (er_nh),
    .cam_valid      (cam_cmd_valid),
    .cam_op         (cam_op),
    .cam_prefix     (cam_prefix),
    .cam_len        (cam_len),
    .cam_nh         (cam_nh),
    .cam_rsp_valid  (cam_rsp_valid),
    .cam_rsp_status (cam_rsp_status)
  );

  // CAM result and first-level stage stay in step
  a_cam_in_step: assert property (@(posedge clk) disable iff (rst)
    cam_res_v == u_l1.v2);

endmodule
