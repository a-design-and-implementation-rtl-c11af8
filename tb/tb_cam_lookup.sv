// tb_cam_lookup: a 16-entry CAM is filled with random prefixes of random
// lengths (0..64), including overwrites, deletes and an overflow; random
// addresses, many built to share a stored prefix, are then looked up and the
// result compared with a longest-match search over a software list. Checks the
// two-cycle lookup latency, the one-cycle command response and the fill count.
module tb_cam_lookup;
  import ipv6_lookup_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                lk_valid = 0, lk_res_valid;
  logic [ADDR_W-1:0]   lk_addr = '0;
  match_t              lk_res;
  logic                cmd_valid = 0, rsp_valid;
  upd_op_e             cmd_op = OP_INSERT;
  logic [PFX_W-1:0]    cmd_prefix = '0;
  logic [LEN_W-1:0]    cmd_len = '0;
  logic [NH_W-1:0]     cmd_nh = '0;
  upd_status_e         rsp_status;
  logic [4:0]          used;
  logic                rst = 1;

  cam_lookup #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;

  // software list
  logic [PFX_W-1:0] m_pfx [$];
  int               m_len [$];
  logic [NH_W-1:0]  m_nh  [$];

  function automatic logic [PFX_W-1:0] mask(input int l);
    logic [PFX_W-1:0] m = '0;
    for (int b = 0; b < l; b++) m[63-b] = 1'b1;
    return m;
  endfunction

  task automatic command(input upd_op_e op, input logic [63:0] p, input int l,
                         input logic [7:0] n);
    int at = -1;
    upd_status_e exp;
    p = p & mask(l);
    foreach (m_pfx[i]) if (m_pfx[i] == p && m_len[i] == l) at = i;
    if (op == OP_INSERT) begin
      if (at >= 0) begin m_nh[at] = n; exp = ST_CAM; end
      else if (m_pfx.size() < DEPTH) begin
        m_pfx.push_back(p); m_len.push_back(l); m_nh.push_back(n); exp = ST_CAM;
      end else exp = ST_FULL;
    end else begin
      if (at >= 0) begin
        m_pfx.delete(at); m_len.delete(at); m_nh.delete(at); exp = ST_CAM;
      end else exp = ST_NOTFOUND;
    end
    cmd_valid = 1; cmd_op = op; cmd_prefix = p | 64'($urandom) & ~mask(l);
    cmd_len = 7'(l); cmd_nh = n;
    @(negedge clk);
    cmd_valid = 0;
    checks++;
    if (!rsp_valid || rsp_status != exp) begin
      failures++;
      $display("FAIL command %s %h/%0d: rsp_valid=%b status=%s expected %s",
               op.name(), p, l, rsp_valid, rsp_status.name(), exp.name());
    end
    checks++;
    if (int'(used) != m_pfx.size()) begin
      failures++; $display("FAIL used=%0d expected %0d", used, m_pfx.size());
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fulls = 0, notfounds = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int round = 0; round < 40; round++) begin
      // a burst of commands
      for (int n = 0; n < 12; n++) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 6 || m_pfx.size() == 0) begin
          logic [63:0] base;
          base = (m_pfx.size() > 0 && r < 3) ? m_pfx[$urandom_range(0, m_pfx.size()-1)]
                                              : {$urandom, $urandom};
          command(OP_INSERT, base, $urandom_range(0, 64), 8'($urandom));
        end else if (r < 9) begin
          int i;
          i = $urandom_range(0, m_pfx.size()-1);
          command(OP_DELETE, m_pfx[i], m_len[i], 8'h0);
        end else begin
          command(OP_DELETE, {$urandom, $urandom}, 64, 8'h0);
        end
      end
      if (m_pfx.size() == DEPTH) begin
        command(OP_INSERT, {$urandom, $urandom}, 64, 8'h1);  // must overflow
        fulls++;
      end
      // lookups
      for (int n = 0; n < 30; n++) begin
        logic [127:0] a;
        int best_len;
        logic [7:0] best_nh;
        best_len = -1;
        best_nh = '0;
        a = {$urandom, $urandom, $urandom, $urandom};
        if (m_pfx.size() > 0 && n % 2 == 0) begin
          int i;
          i = $urandom_range(0, m_pfx.size()-1);
          a[127:64] = m_pfx[i] | (a[127:64] & ~mask(m_len[i]));
        end
        foreach (m_pfx[i])
          if (((a[127:64] ^ m_pfx[i]) & mask(m_len[i])) == '0 && m_len[i] > best_len) begin
            best_len = m_len[i]; best_nh = m_nh[i];
          end
        lk_valid = 1; lk_addr = a;
        @(negedge clk);
        lk_valid = 0;
        checks++;
        if (lk_res_valid) begin failures++; $display("FAIL: result one cycle early"); end
        @(negedge clk);
        checks++;
        if (!lk_res_valid || lk_res.hit != (best_len >= 0) ||
            (best_len >= 0 && (int'(lk_res.len) != best_len || lk_res.nh != best_nh))) begin
          failures++;
          $display("FAIL lookup %h: hit=%b len=%0d nh=%h expected len %0d nh %h",
                   a, lk_res.hit, lk_res.len, lk_res.nh, best_len, best_nh);
        end
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: CAM never filled up"); end
    $display("CAM overflows exercised: %0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
