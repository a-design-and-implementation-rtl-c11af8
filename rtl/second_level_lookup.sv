// second_level_lookup: the second-level (expanded) lookup machine. Six groups of
// expanded RAMs, ER(17,23) behind HR(16) up to ER(57,63) behind HR(56), seven
// RAMs each (42 in all), are read in parallel.
//
// Group k is read only when the first level found the address's hash segment
// (its first 16+8k bits) in HR(16+8k) with E set (ep_go[k]); the index from
// that hash RAM word is the base address, and the seven address bits after the
// hash segment select the word inside the base block of each of the seven RAMs.
// The RAMs of a group that is not enabled are not read.
// Pipeline (two stages): stage 1 reads the RAMs, stage 2 turns each full word
// into a candidate {hit, length 16+8k+d, next hop} and registers it.
// cand[7*k + d-1] comes from RAM d of group k; out_valid and cand follow
// in_valid by two cycles. The maintenance port writes one word of one RAM.
// The 42 parallel RAMs and the index-based addressing follow the design
// description; the stage split is this design's choice.
module second_level_lookup
  import ipv6_lookup_pkg::*;
#(
  parameter int IDX_W = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [ADDR_W-1:0]  in_addr,
  input  logic [N_ER-1:0]    ep_go,
  input  logic [IDX_W-1:0]   ep_idx [N_ER],
  output logic               out_valid,
  output match_t             cand [N_ER*N_SUB],
  // maintenance port
  input  logic               up_we,
  input  logic [2:0]         up_grp,
  input  logic [2:0]         up_d,
  input  logic [IDX_W-1:0]   up_idx,
  input  logic [6:0]         up_tail,
  input  logic               up_h,
  input  logic [NH_W-1:0]    up_nh
);

  logic            v1;
  logic [N_ER-1:0] go1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
    go1 <= ep_go;
  end

  for (genvar k = 0; k < N_ER; k++) begin : g_er
    localparam int HL = MIN_HR_LEN + 8 * k;   // hash segment length

    logic [6:0]      h;
    logic [NH_W-1:0] nh [7];

    expanded_ram #(.NH_W(NH_W), .IDX_W(IDX_W)) u_er (
      .clk     (clk),
      .lk_en   (ep_go[k]),
      .lk_idx  (ep_idx[k]),
      .lk_tail (in_addr[ADDR_W-1-HL -: 7]),
      .lk_h    (h),
      .lk_nh   (nh),
      .up_we   (up_we && up_grp == 3'(k)),
      .up_d    (up_d),
      .up_idx  (up_idx),
      .up_tail (up_tail),
      .up_h    (up_h),
      .up_nh   (up_nh)
    );

    for (genvar d = 1; d <= 7; d++) begin : g_d
      always_ff @(posedge clk) begin
        cand[7*k + d-1].hit <= go1[k] && h[d-1];
        cand[7*k + d-1].len <= LEN_W'(HL + d);
        cand[7*k + d-1].nh  <= nh[d-1];
      end
    end
  end

endmodule
