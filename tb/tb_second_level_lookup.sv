// tb_second_level_lookup: fills expanded-RAM words of all six groups through
// the maintenance port, then offers addresses with ep_go/ep_idx set for random
// groups and checks that each of the 42 candidates reports a hit, length
// 16+8k+d and next hop exactly when group k was enabled and RAM d holds the
// address's tail, two cycles later.
module tb_second_level_lookup;
  import ipv6_lookup_pkg::*;
  localparam int IW = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst = 1, in_valid = 0, out_valid;
  logic [ADDR_W-1:0] in_addr = '0;
  logic [N_ER-1:0]   ep_go = '0;
  logic [IW-1:0]     ep_idx [N_ER];
  match_t            cand [N_ER*N_SUB];
  logic              up_we = 0, up_h = 0;
  logic [2:0]        up_grp = '0, up_d = 3'd1;
  logic [IW-1:0]     up_idx = '0;
  logic [6:0]        up_tail = '0;
  logic [NH_W-1:0]   up_nh = '0;

  second_level_lookup #(.IDX_W(IW)) dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] model [logic [17:0]];   // {grp, d, idx, tail bits} -> {h, nh}

  function automatic logic [17:0] key(input int g, input int d, input logic [IW-1:0] x,
                                      input logic [6:0] t);
    return {3'(g), 3'(d), 5'(x), 7'(t >> (7 - d))};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ep_idx[k]) ep_idx[k] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      up_grp = 3'($urandom_range(0, N_ER - 1));
      up_d = 3'($urandom_range(1, 7));
      up_idx = 4'($urandom_range(0, 3));
      up_tail = 7'($urandom);
      up_h = 1; up_nh = 8'($urandom);
      up_we = 1;
      model[key(up_grp, up_d, up_idx, up_tail)] = {up_h, up_nh};
      @(negedge clk);
    end
    up_we = 0;
    for (int n = 0; n < 500; n++) begin
      logic [127:0] a;
      logic [N_ER-1:0] go;
      logic [IW-1:0] ix [N_ER];
      a = {$urandom, $urandom, $urandom, $urandom};
      go = 6'($urandom);
      foreach (ix[k]) ix[k] = 4'($urandom_range(0, 3));
      in_valid = 1; in_addr = a; ep_go = go; ep_idx = ix;
      @(negedge clk);
      in_valid = 0; ep_go = '0;
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid not after 2 cycles"); end
      for (int k = 0; k < N_ER; k++)
        for (int d = 1; d <= 7; d++) begin
          logic [6:0] t;
          logic [8:0] e;
          t = a[127 - hr_len(k) -: 7];
          e = model.exists(key(k, d, ix[k], t)) ? model[key(k, d, ix[k], t)] : '0;
          checks++;
          if (cand[7*k + d-1].hit != (go[k] && e[8]) ||
              (go[k] && e[8] && (cand[7*k + d-1].nh != e[7:0] ||
                                 int'(cand[7*k + d-1].len) != hr_len(k) + d))) begin
            failures++;
            $display("FAIL group %0d RAM %0d: hit %b nh %h", k, d, cand[7*k + d-1].hit, cand[7*k + d-1].nh);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
