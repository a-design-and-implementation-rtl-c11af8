// tb_ipv6_lookup_full: the engine at its default size (16-bit hash, 8-bit
// index, 2944-entry CAM) loaded with a table shaped like a 1797-route IPv6
// table: 1 /8, 1 /16, 1 /24, 1176 /32, 24 /40, 434 /48, 6 /56, 34 /64 and 120
// routes of other lengths (17..63), random values, a third of the longer
// routes nested under shorter ones. Every insert must succeed; then 3000
// back-to-back lookups are checked against a software longest-prefix match,
// with the 8-cycle latency and a throughput of one lookup per cycle.
module tb_ipv6_lookup_full;
  import ipv6_lookup_pkg::*;
  import ipv6_ref_pkg::*;

  localparam int LATENCY = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst = 1;
  logic              lk_valid = 0;
  logic [ADDR_W-1:0] lk_addr = '0;
  logic              res_valid, res_hit;
  logic [LEN_W-1:0]  res_len;
  logic [NH_W-1:0]   res_nh;
  logic              upd_valid = 0, upd_ready, upd_rsp_valid;
  upd_op_e           upd_op = OP_INSERT;
  logic [PFX_W-1:0]  upd_prefix = '0;
  logic [LEN_W-1:0]  upd_len = '0;
  logic [NH_W-1:0]   upd_nh = '0;
  upd_status_e       upd_rsp_status;
  logic [11:0]       cam_used;

  ipv6_lookup dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  route_table ref_t = new();
  int n_st [8];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic insert(input logic [63:0] p, input int l, input logic [7:0] n);
    @(negedge clk);
    while (!upd_ready) @(negedge clk);
    upd_valid = 1; upd_op = OP_INSERT; upd_prefix = p; upd_len = 7'(l); upd_nh = n;
    @(negedge clk);
    upd_valid = 0;
    while (!upd_rsp_valid) @(negedge clk);
    n_st[upd_rsp_status]++;
    checks++;
    if (upd_rsp_status inside {ST_HR, ST_ER, ST_CAM}) ref_t.add(p, l, n);
    else begin
      failures++;
      $display("FAIL insert %h/%0d: %s", p, l, upd_rsp_status.name());
    end
  endtask

  typedef struct { longint t; logic [127:0] a; int len; logic [7:0] nh; } exp_t;
  exp_t pend [$];
  int n_hit = 0;

  always @(posedge clk) if (!rst && res_valid) begin
    exp_t e;
    checks++;
    if (pend.size() == 0) begin
      failures++; $display("FAIL: result without lookup");
    end else begin
      e = pend.pop_front();
      if (cycle - e.t != LATENCY) begin
        failures++; $display("FAIL: latency %0d", cycle - e.t);
      end
      if (res_hit != (e.len >= 0) || (e.len >= 0 && (int'(res_len) != e.len || res_nh != e.nh))) begin
        failures++;
        $display("FAIL lookup %h: hit=%b len=%0d nh=%h expected len %0d nh %h",
                 e.a, res_hit, res_len, res_nh, e.len, e.nh);
      end
      if (e.len >= 0) n_hit++;
    end
  end

  // a random prefix of length l, nested under an existing route now and then
  function automatic logic [63:0] make_prefix(input int l);
    logic [63:0] p;
    p = {3'b001, 29'($urandom), $urandom};
    if (ref_t.pfx.size() > 0 && $urandom_range(0, 2) == 0) begin
      int i;
      i = $urandom_range(0, ref_t.pfx.size() - 1);
      if (ref_t.len[i] < l) p = ref_t.pfx[i] | (p & ~mask64(ref_t.len[i]));
    end
    return p;
  endfunction

  initial begin
    int lens [9]   = '{8, 16, 24, 32, 40, 48, 56, 64, 0};
    int counts [9] = '{1, 1, 1, 1176, 24, 434, 6, 34, 120};
    longint t0, t1;
    foreach (n_st[i]) n_st[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (lens[g]) begin
      for (int n = 0; n < counts[g]; n++) begin
        int l;
        l = lens[g];
        if (l == 0) begin
          l = 8 * $urandom_range(2, 7) + $urandom_range(1, 7);
        end
        insert(make_prefix(l), l, 8'($urandom));
      end
    end
    $display("routes %0d: hash RAM %0d, expanded RAM %0d, CAM %0d",
             ref_t.pfx.size(), n_st[ST_HR], n_st[ST_ER], n_st[ST_CAM]);
    t0 = cycle;
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      logic [7:0] nh;
      e.a = ($urandom_range(0, 7) != 0) ? ref_t.addr_in($urandom_range(0, ref_t.pfx.size() - 1))
                                        : {$urandom, $urandom, $urandom, $urandom};
      e.len = ref_t.lookup(e.a, nh);
      e.nh = nh;
      @(negedge clk);
      lk_valid = 1; lk_addr = e.a;
      e.t = cycle + 1;
      if (i == 0) t0 = e.t;
      t1 = e.t;
      pend.push_back(e);
    end
    @(negedge clk);
    lk_valid = 0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (pend.size() != 0 || t1 - t0 + 1 != 3000) begin
      failures++; $display("FAIL: %0d lookups unanswered, %0d cycles for 3000", pend.size(), t1 - t0 + 1);
    end
    $display("3000 lookups issued in %0d cycles, %0d hits", t1 - t0 + 1, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
