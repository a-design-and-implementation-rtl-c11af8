// tb_first_level_lookup: writes hash-prefix and hash-segment words into the
// seven hash RAMs through the maintenance port, reads them back, and checks
// that lookups of matching and non-matching addresses raise hp_hit / ep_go
// with the right next hop and index exactly three cycles later.
module tb_first_level_lookup;
  import ipv6_lookup_pkg::*;
  import ipv6_ref_pkg::*;
  localparam int IW = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst = 1, in_valid = 0, out_valid;
  logic [ADDR_W-1:0] in_addr = '0, out_addr;
  match_t            hp_hit [N_HR];
  logic [N_ER-1:0]   ep_go;
  logic [IW-1:0]     ep_idx [N_ER];
  logic [2:0]        up_sel = '0;
  logic [PFX_W-1:0]  up_prefix = '0, up_rprefix;
  logic              up_rd = 0, up_we = 0, up_wf = 0, up_we_flag = 0, up_rf, up_re;
  logic [NH_W-1:0]   up_wnh = '0, up_rnh;
  logic [IW-1:0]     up_widx = '0, up_ridx;

  first_level_lookup #(.HASH_W(16), .IDX_W(IW)) dut (.*);

  int checks = 0, failures = 0;

  // stored words: per RAM k, prefix -> {F, E, nh, idx}
  typedef struct { logic [63:0] p; int k; bit f; bit e; logic [7:0] nh; logic [7:0] idx; } word_t;
  word_t words [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // one word per RAM and slot; prefixes chosen in distinct hash slots
    for (int n = 0; n < 70; n++) begin
      word_t w;
      w.k = n % N_HR;
      w.p = {$urandom, $urandom} & mask64(hr_len(w.k));
      w.p[63 -: 8] = 8'(n);        // distinct first byte: distinct hash slots per RAM
      w.f = ($urandom_range(0, 1) == 1);
      w.e = !w.f || ($urandom_range(0, 1) == 1);
      if (w.k == N_HR - 1) begin w.f = 1; w.e = 0; end
      w.nh = 8'($urandom); w.idx = 8'($urandom);
      @(negedge clk);
      up_sel = 3'(w.k); up_prefix = w.p | ({$urandom, $urandom} & ~mask64(hr_len(w.k)));
      up_we = 1; up_wf = w.f; up_we_flag = w.e; up_wnh = w.nh; up_widx = w.idx;
      @(negedge clk);
      up_we = 0;
      // read back
      up_rd = 1;
      @(negedge clk);
      up_rd = 0;
      checks++;
      if (up_rf != w.f || up_re != w.e || up_rprefix != w.p || up_rnh != w.nh || up_ridx != w.idx) begin
        failures++; $display("FAIL read back RAM %0d prefix %h", w.k, w.p);
      end
      words.push_back(w);
    end
    // lookups
    for (int n = 0; n < 400; n++) begin
      word_t w;
      logic [127:0] a;
      w = words[$urandom_range(0, words.size() - 1)];
      a = {$urandom, $urandom, $urandom, $urandom};
      if (n % 4 != 0) a[127:64] = w.p | (a[127:64] & ~mask64(hr_len(w.k)));
      if (n % 4 == 1 && w.k > 0) begin
        // same hash, different prefix: flip prefix bits PL-1 and (PL-1) mod 16
        a[127] ^= 1'b1;
        a[127 - (hr_len(w.k) - 1) + (hr_len(w.k) - 1) % 16] ^= 1'b1;
      end
      @(negedge clk);
      in_valid = 1; in_addr = a;
      @(negedge clk);
      in_valid = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (!out_valid || out_addr != a) begin failures++; $display("FAIL: valid/addr not after 3 cycles"); end
      for (int k = 0; k < N_HR; k++) begin
        bit f, e;
        logic [7:0] nh, idx;
        f = 0; e = 0; nh = '0; idx = '0;
        foreach (words[i])
          if (words[i].k == k && ((words[i].p ^ a[127:64]) & mask64(hr_len(k))) == '0) begin
            f = words[i].f; e = words[i].e; nh = words[i].nh; idx = words[i].idx;
          end
        checks++;
        if (hp_hit[k].hit != f || (f && (hp_hit[k].nh != nh || int'(hp_hit[k].len) != hr_len(k)))) begin
          failures++; $display("FAIL hp_hit[%0d] for %h: %b expected %b", k, a, hp_hit[k].hit, f);
        end
        if (k < N_ER) begin
          checks++;
          if (ep_go[k] != e || (e && ep_idx[k] != idx)) begin
            failures++; $display("FAIL ep_go[%0d] for %h: %b expected %b", k, a, ep_go[k], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
