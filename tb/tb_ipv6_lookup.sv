// tb_ipv6_lookup: end-to-end test of the lookup engine with a small CAM (24
// entries) and a 2-bit index, so that every mechanism can be provoked: hash
// RAM placement, new and reused expanded-RAM indices, hash collisions sent to
// the CAM, short prefixes in the CAM, a spent index counter, a full CAM,
// deletes of every kind and a bad length. After each phase a burst of
// back-to-back lookups (one per cycle) is checked against a software
// longest-prefix-match reference, including the 8-cycle latency.
module tb_ipv6_lookup;
  import ipv6_lookup_pkg::*;
  import ipv6_ref_pkg::*;

  localparam int CAMD    = 24;
  localparam int IW      = 2;
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
  logic [$clog2(CAMD+1)-1:0] cam_used;

  ipv6_lookup #(.HASH_W(16), .IDX_W(IW), .CAM_DEPTH(CAMD)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  route_table ref_t = new();

  // ---------------- mechanism counters ----------------
  int n_st [8];                  // responses by status
  int n_ep_new = 0, n_ep_old = 0, n_cnt_spent = 0, n_collide = 0, n_short_cam = 0;
  int n_del_hp_keep_e = 0, n_del_hp_all = 0, n_del_ep = 0;
  int n_hit_hr = 0, n_hit_er = 0, n_hit_cam = 0, n_miss = 0, n_b2b = 0;

  // where each route lives, as reported by the engine, and which hash
  // segments have an expanded-RAM index (E set), per group
  upd_status_e where [logic [70:0]];
  bit          has_e [logic [66:0]];
  int          e_per_group [N_ER];

  function automatic logic [70:0] rkey(input logic [63:0] p, input int l);
    return {p & mask64(l), 7'(l)};
  endfunction
  function automatic logic [66:0] ekey(input logic [63:0] p, input int l);
    return {p & mask64(l), 3'((l / 8) - 2)};
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- table maintenance ----------------
  task automatic update(input upd_op_e op, input logic [63:0] p, input int l,
                        input logic [7:0] n, output upd_status_e st);
    @(negedge clk);
    while (!upd_ready) @(negedge clk);
    upd_valid = 1; upd_op = op; upd_prefix = p; upd_len = 7'(l); upd_nh = n;
    @(negedge clk);
    upd_valid = 0;
    while (!upd_rsp_valid) @(negedge clk);
    st = upd_rsp_status;
    n_st[st]++;
    if (op == OP_INSERT && (st == ST_HR || st == ST_ER || st == ST_CAM)) begin
      ref_t.add(p, l, n);
      where[rkey(p, l)] = st;
      if (st == ST_CAM && l < 16) n_short_cam++;
      if (st == ST_ER) begin
        if (has_e.exists(ekey(p, 8 * (l / 8)))) n_ep_old++;
        else begin
          n_ep_new++;
          has_e[ekey(p, 8 * (l / 8))] = 1;
          e_per_group[l / 8 - 2]++;
        end
      end
      if (st == ST_CAM && l >= 16) begin
        if (l % 8 != 0 && e_per_group[l / 8 - 2] == (1 << IW)) n_cnt_spent++;
        else n_collide++;
      end
    end
    if (op == OP_DELETE && st != ST_NOTFOUND) begin
      ref_t.remove(p, l);
      if (st == ST_ER) n_del_ep++;
      if (st == ST_HR) begin
        if (l < 64 && has_e.exists(ekey(p, l))) n_del_hp_keep_e++;
        else n_del_hp_all++;
      end
    end
  endtask

  task automatic expect_status(input upd_op_e op, input logic [63:0] p, input int l,
                               input logic [7:0] n, input upd_status_e exp);
    upd_status_e st;
    update(op, p, l, n, st);
    checks++;
    if (st != exp) begin
      failures++;
      $display("FAIL %s %h/%0d: status %s expected %s", op.name(), p, l, st.name(), exp.name());
    end
  endtask

  // ---------------- lookups ----------------
  typedef struct { longint t; logic [127:0] a; int len; logic [7:0] nh; } exp_t;
  exp_t pend [$];

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
      end else if (e.len < 0) n_miss++;
      else begin
        upd_status_e w;
        w = where[rkey(e.a[127:64], e.len)];
        if (w == ST_HR) n_hit_hr++;
        else if (w == ST_ER) n_hit_er++;
        else n_hit_cam++;
      end
    end
  end

  task automatic lookup_burst(input int n);
    for (int i = 0; i < n; i++) begin
      exp_t e;
      logic [7:0] nh;
      if (ref_t.pfx.size() > 0 && $urandom_range(0, 3) != 0)
        e.a = ref_t.addr_in($urandom_range(0, ref_t.pfx.size() - 1));
      else
        e.a = {$urandom, $urandom, $urandom, $urandom};
      e.len = ref_t.lookup(e.a, nh);
      e.nh = nh;
      @(negedge clk);
      lk_valid = 1; lk_addr = e.a;
      e.t = cycle + 1;           // sampled at the coming edge
      pend.push_back(e);
      if (i > 0) n_b2b++;
    end
    @(negedge clk);
    lk_valid = 0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (pend.size() != 0) begin failures++; $display("FAIL: %0d lookups unanswered", pend.size()); end
    pend.delete();
  endtask

  // a prefix of length pl (multiple of 8, >= 24) with the same XOR-fold hash as p
  function automatic logic [63:0] collide(input logic [63:0] p, input int pl);
    logic [63:0] q;
    int b1, b2;
    b1 = pl - 1;                 // prefix bit pl-1-(pl-1)... top bit of the prefix
    b2 = (pl - 1) % 16;          // folds onto the same hash bit as prefix bit pl-1
    // prefix bit k sits at word bit 63-(pl-1-k); flip prefix bits b1 and b2
    q = p;
    q[63 - (pl - 1 - b1)] ^= 1'b1;
    q[63 - (pl - 1 - b2)] ^= 1'b1;
    return q;
  endfunction

  initial begin
    upd_status_e st;
    logic [63:0] p32, q32;
    foreach (n_st[i]) n_st[i] = 0;
    foreach (e_per_group[i]) e_per_group[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- phase 1: directed placements ----
    expect_status(OP_INSERT, 64'h2a01_0000_0000_0000, 16, 8'h01, ST_HR);
    expect_status(OP_INSERT, 64'h2a01_c000_0000_0000, 20, 8'h02, ST_ER);   // new index
    expect_status(OP_INSERT, 64'h2a01_c000_0000_0000, 18, 8'h03, ST_ER);   // same index
    expect_status(OP_INSERT, 64'h2a01_c800_0000_0000, 23, 8'h04, ST_ER);
    expect_status(OP_INSERT, 64'h2a01_c8a0_0000_0000, 24, 8'h05, ST_HR);
    expect_status(OP_INSERT, 64'h2a00_0000_0000_0000, 12, 8'h06, ST_CAM);  // short
    expect_status(OP_INSERT, 64'h2000_0000_0000_0000,  3, 8'h07, ST_CAM);
    expect_status(OP_INSERT, 64'h0000_0000_0000_0000,  0, 8'h08, ST_CAM);  // default route
    p32 = {$urandom, 32'h0};
    q32 = collide(p32, 32);
    expect_status(OP_INSERT, p32, 32, 8'h09, ST_HR);
    expect_status(OP_INSERT, q32, 32, 8'h0a, ST_CAM);                       // collision
    expect_status(OP_INSERT, q32 | 64'h0000_0000_a000_0000, 35, 8'h0b, ST_CAM); // EP collision
    expect_status(OP_INSERT, p32 | 64'h0000_0000_6000_0000, 35, 8'h0c, ST_ER);  // shares p32's word
    expect_status(OP_INSERT, 64'h2a02_0000_0000_0000, 65, 8'h0d, ST_BADLEN);
    expect_status(OP_INSERT, 64'h2a01_0db8_0000_0000, 40, 8'h0e, ST_HR);
    expect_status(OP_INSERT, 64'h2a01_0db8_0012_3456, 64, 8'h0f, ST_HR);
    expect_status(OP_INSERT, 64'h2a01_0db8_0012_3400, 62, 8'h10, ST_ER);
    expect_status(OP_INSERT, 64'h2a01_c000_0000_0000, 20, 8'h11, ST_ER);   // new next hop
    lookup_burst(200);

    // ---- phase 2: deletes ----
    expect_status(OP_DELETE, 64'h2a01_0000_0000_0000, 16, 8'h00, ST_HR);   // E stays
    expect_status(OP_DELETE, 64'h2a01_c8a0_0000_0000, 24, 8'h00, ST_HR);   // whole word
    expect_status(OP_DELETE, 64'h2a01_c000_0000_0000, 20, 8'h00, ST_ER);
    expect_status(OP_DELETE, q32, 32, 8'h00, ST_CAM);
    expect_status(OP_DELETE, 64'h3fff_0000_0000_0000, 48, 8'h00, ST_NOTFOUND);
    expect_status(OP_INSERT, 64'h2a01_d000_0000_0000, 20, 8'h12, ST_ER);   // reuses index
    expect_status(OP_INSERT, q32, 32, 8'h13, ST_CAM);
    lookup_burst(200);

    // ---- phase 3: spend the group-0 index counter (4 indices) ----
    expect_status(OP_INSERT, 64'h3001_8000_0000_0000, 17, 8'h20, ST_ER);
    expect_status(OP_INSERT, 64'h3002_8000_0000_0000, 17, 8'h21, ST_ER);
    expect_status(OP_INSERT, 64'h3003_8000_0000_0000, 17, 8'h22, ST_ER);
    expect_status(OP_INSERT, 64'h3004_8000_0000_0000, 17, 8'h23, ST_CAM);  // counter spent
    expect_status(OP_INSERT, 64'h3001_0000_0000_0000, 19, 8'h24, ST_ER);   // old index still fine
    lookup_burst(200);

    // ---- phase 4: random routes, until the CAM overflows ----
    for (int n = 0; n < 120; n++) begin
      int l;
      logic [63:0] p;
      l = (n % 4 == 0) ? $urandom_range(1, 15) : 8 * $urandom_range(2, 8) - 8 * (n % 3 == 0) + (n % 3 == 0 ? $urandom_range(1, 7) : 0);
      p = {$urandom, $urandom};
      update(OP_INSERT, p, l, 8'($urandom), st);
    end
    lookup_burst(400);

    // ---- phase 5: random deletes and re-inserts ----
    for (int n = 0; n < 60; n++) begin
      int i;
      i = $urandom_range(0, ref_t.pfx.size() - 1);
      if (n % 2 == 0) update(OP_DELETE, ref_t.pfx[i], ref_t.len[i], 8'h0, st);
      else update(OP_INSERT, ref_t.pfx[i], ref_t.len[i], 8'($urandom), st);
    end
    lookup_burst(400);

    // ---- every mechanism must have happened ----
    begin
      string names [15] = '{"HR insert", "ER insert", "CAM insert", "CAM full", "not found",
                            "bad length", "new index", "reused index", "index counter spent",
                            "hash collision", "short prefix in CAM", "delete keeps E",
                            "delete whole word", "delete expanded", "back-to-back lookups"};
      int counts [15];
      counts = '{n_st[ST_HR], n_st[ST_ER], n_st[ST_CAM], n_st[ST_FULL], n_st[ST_NOTFOUND],
                 n_st[ST_BADLEN], n_ep_new, n_ep_old, n_cnt_spent, n_collide, n_short_cam,
                 n_del_hp_keep_e, n_del_hp_all, n_del_ep, n_b2b};
      foreach (names[i]) begin
        $display("  %-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL: %s never happened", names[i]); end
      end
      $display("  hits HR %0d, ER %0d, CAM %0d, misses %0d", n_hit_hr, n_hit_er, n_hit_cam, n_miss);
      checks++;
      if (n_hit_hr == 0 || n_hit_er == 0 || n_hit_cam == 0 || n_miss == 0) begin
        failures++; $display("FAIL: a lookup outcome never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
