// cam_lookup: the CAM lookup machine (hash-collision processor). It holds the
// prefixes the hash RAMs cannot take and searches all of them in parallel.
//
// Each of the DEPTH entries is { valid, prefix[63:0] (left-aligned), length,
// next hop } and matches an address when the address's first `length` bits
// equal the prefix's; the lookup reports the longest matching entry. Lengths
// 0..64 are accepted, so the CAM also serves as the home of prefixes shorter
// than 16 bits, which have no hash RAM.
//
// Lookup: lk_valid/lk_addr are registered, compared in the next cycle and the
// best match is registered again, so lk_res/lk_res_valid appear two cycles
// after the address (in step with the hash RAM read).
// Maintenance: a one-cycle cmd_valid with cmd_op INSERT writes the prefix into
// the entry already holding the same prefix and length, or else the first free
// entry (ST_FULL if none); DELETE clears the entry holding it (ST_NOTFOUND if
// none). rsp_valid/rsp_status follow one cycle later; a command may be given
// every cycle. `used` counts entries.
// That colliding prefixes go to a CAM searched in parallel with the hash RAMs
// follows the design description; the entry format, the depth and the
// maintenance protocol are this design's choices.
module cam_lookup
  import ipv6_lookup_pkg::*;
#(
  parameter int DEPTH = 2944
) (
  input  logic                      clk,
  input  logic                      rst,
  // lookup
  input  logic                      lk_valid,
  input  logic [ADDR_W-1:0]         lk_addr,
  output logic                      lk_res_valid,
  output match_t                    lk_res,
  // maintenance
  input  logic                      cmd_valid,
  input  upd_op_e                   cmd_op,
  input  logic [PFX_W-1:0]          cmd_prefix,
  input  logic [LEN_W-1:0]          cmd_len,
  input  logic [NH_W-1:0]           cmd_nh,
  output logic                      rsp_valid,
  output upd_status_e               rsp_status,
  output logic [$clog2(DEPTH+1)-1:0] used
);

  localparam int IW = $clog2(DEPTH);

  logic [DEPTH-1:0] vld;
  logic [PFX_W-1:0] pfx [DEPTH];
  logic [LEN_W-1:0] len [DEPTH];
  logic [NH_W-1:0]  nh  [DEPTH];

  logic             lk_v1;
  logic [PFX_W-1:0] lk_a1;

  // ---------------- lookup: longest match over all entries ----------------
  logic [DEPTH-1:0] hit;   // entry e matches the registered address
  logic [DEPTH-1:0] same;  // entry e holds the maintenance command's prefix
  logic [PFX_W-1:0] cmd_m;

  assign cmd_m = cmd_prefix & len_mask(cmd_len);

  for (genvar e = 0; e < DEPTH; e++) begin : g_ent
    assign hit[e]  = vld[e] && ((pfx[e] ^ lk_a1) & len_mask(len[e])) == '0;
    assign same[e] = vld[e] && len[e] == cmd_len && pfx[e] == cmd_m;
  end

  match_t best;
  always_comb begin
    best = '0;
    for (int e = 0; e < DEPTH; e++) begin
      if (hit[e] && (!best.hit || len[e] > best.len)) begin
        best.hit = 1'b1;
        best.len = len[e];
        best.nh  = nh[e];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lk_v1        <= 1'b0;
      lk_res_valid <= 1'b0;
    end else begin
      lk_v1        <= lk_valid;
      lk_res_valid <= lk_v1;
    end
    lk_a1  <= lk_addr[ADDR_W-1 -: PFX_W];
    lk_res <= best;
  end

  // ---------------- maintenance ----------------
  logic          same_found, free_found;
  logic [IW-1:0] same_at, free_at;

  always_comb begin
    same_found = 1'b0;
    free_found = 1'b0;
    same_at    = '0;
    free_at    = '0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (same[e]) begin
        same_found = 1'b1;
        same_at    = IW'(e);
      end
      if (!vld[e]) begin
        free_found = 1'b1;
        free_at    = IW'(e);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vld       <= '0;
      used      <= '0;
      rsp_valid <= 1'b0;
    end else begin
      rsp_valid <= cmd_valid;
      if (cmd_valid) begin
        if (cmd_op == OP_INSERT) begin
          if (same_found) begin
            nh[same_at] <= cmd_nh;
            rsp_status  <= ST_CAM;
          end else if (free_found) begin
            vld[free_at] <= 1'b1;
            pfx[free_at] <= cmd_m;
            len[free_at] <= cmd_len;
            nh[free_at]  <= cmd_nh;
            used         <= used + 1'b1;
            rsp_status   <= ST_CAM;
          end else begin
            rsp_status   <= ST_FULL;
          end
        end else begin
          if (same_found) begin
            vld[same_at] <= 1'b0;
            used         <= used - 1'b1;
            rsp_status   <= ST_CAM;
          end else begin
            rsp_status   <= ST_NOTFOUND;
          end
        end
      end
    end
  end

  // every response answers the command of the cycle before
  a_rsp_follows_cmd: assert property (@(posedge clk) disable iff (rst)
    rsp_valid |-> $past(cmd_valid));

endmodule
