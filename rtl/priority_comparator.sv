// priority_comparator: picks the longest of N candidate matches.
//
// Every hash RAM, every expanded RAM and the CAM offers one candidate
// {hit, length, next hop}; the comparator returns the hit with the greatest
// length, i.e. the longest matching prefix, and its next hop. Among equal
// lengths the lowest-numbered candidate wins (the engine numbers the hash and
// expanded RAMs before the CAM). out/out_valid are registered one cycle after
// cand/in_valid. Longest-match selection follows the design description; the
// tie rule and the single-stage linear scan are this design's choices.
module priority_comparator
  import ipv6_lookup_pkg::*;
#(
  parameter int N = N_CAND
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  match_t cand [N],
  output logic   out_valid,
  output match_t out
);

  match_t best;

  always_comb begin
    best = '0;
    for (int c = 0; c < N; c++) begin
      if (cand[c].hit && (!best.hit || cand[c].len > best.len)) best = cand[c];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    out <= best;
  end

endmodule
