// tb_priority_comparator: random sets of 50 candidates (hits, lengths, next
// hops) are offered; the registered output must carry the longest hit, the
// lowest-numbered one among equal lengths, or no hit at all.
module tb_priority_comparator;
  import ipv6_lookup_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic   rst = 1, in_valid = 0, out_valid;
  match_t cand [N_CAND];
  match_t out;

  priority_comparator #(.N(N_CAND)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cand[c]) cand[c] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int best, density;
      best = -1;
      density = $urandom_range(0, 20);
      foreach (cand[c]) begin
        cand[c].hit = ($urandom_range(0, 99) < density);
        cand[c].len = 7'($urandom_range(0, 64));
        cand[c].nh  = 8'($urandom);
      end
      // a shared length now and then, to test the tie rule
      if (n % 5 == 0) cand[$urandom_range(0, N_CAND-1)].len = cand[$urandom_range(0, N_CAND-1)].len;
      foreach (cand[c])
        if (cand[c].hit && (best < 0 || cand[c].len > cand[best].len)) best = c;
      in_valid = 1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out.hit != (best >= 0) ||
          (best >= 0 && (out.len != cand[best].len || out.nh != cand[best].nh))) begin
        failures++;
        $display("FAIL set %0d: got hit=%b len=%0d nh=%h, expected candidate %0d", n,
                 out.hit, out.len, out.nh, best);
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid without in_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
