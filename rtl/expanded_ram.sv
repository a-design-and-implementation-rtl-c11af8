// expanded_ram: one second-level group ER(j, j+6), seven RAMs that hold the
// next hops of the expanded prefixes hanging off one hash RAM HR(j-1).
//
// RAM number d (d = 1..7) serves prefixes of length j-1+d, whose tail
// (expanded segment) is d bits long. An expanded prefix whose hash segment got
// index x in the hash RAM and whose tail is y is stored at address x*2**d + y
// of RAM d, that is {x, y}: all seven RAMs share the base x, and RAM d has
// 2**(IDX_W+d) words. Each word is { H, next_hop } with H marking it full.
//
// The lookup port takes the index and the seven address bits that follow the
// hash segment and, when lk_en is high, reads all seven RAMs at once; RAM d
// uses the first d of those bits. Data appear one cycle later. lk_en lets the
// engine touch the second level only for addresses that need it. The maintenance port writes one
// word of one RAM. Layout and addressing follow the design description; the
// index width is this design's choice. The arrays start all-zero (empty).
module expanded_ram #(
  parameter int NH_W  = 8,
  parameter int IDX_W = 8
) (
  input  logic             clk,
  // lookup port
  input  logic             lk_en,
  input  logic [IDX_W-1:0] lk_idx,
  input  logic [6:0]       lk_tail,     // address bits after the hash segment, MSB first
  output logic [6:0]       lk_h,        // bit d-1: RAM d holds a prefix here
  output logic [NH_W-1:0]  lk_nh [7],   // element d-1: next hop from RAM d
  // maintenance port
  input  logic             up_we,
  input  logic [2:0]       up_d,        // 1..7: which RAM
  input  logic [IDX_W-1:0] up_idx,
  input  logic [6:0]       up_tail,     // tail, left-aligned: only the top up_d bits count
  input  logic             up_h,
  input  logic [NH_W-1:0]  up_nh
);

  for (genvar d = 1; d <= 7; d++) begin : g_sub
    localparam int AW = IDX_W + d;
    logic [NH_W:0] mem [1 << AW];
    logic [NH_W:0] q;

    initial begin
      for (int a = 0; a < (1 << AW); a++) mem[a] = '0;
    end

    always_ff @(posedge clk) begin
      if (lk_en) q <= mem[{lk_idx, lk_tail[6 -: d]}];
      if (up_we && up_d == 3'(d)) mem[{up_idx, up_tail[6 -: d]}] <= {up_h, up_nh};
    end

    assign lk_h[d-1]  = q[NH_W];
    assign lk_nh[d-1] = q[NH_W-1:0];
  end

endmodule
