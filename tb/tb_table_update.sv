// tb_table_update: drives the table-update controller, connected to real hash
// RAMs, expanded RAMs and a 4-entry CAM, with a directed command sequence and
// checks each response status and the words it leaves in the memories: F/E
// flags, prefix, next hop and index of hash RAM words, the expanded RAM words
// and the index counter (2 indices per group here), plus the response timing.
module tb_table_update;
  import ipv6_lookup_pkg::*;
  localparam int IW = 1;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1;

  logic             cmd_valid = 0, cmd_ready, rsp_valid;
  upd_op_e          cmd_op = OP_INSERT;
  logic [PFX_W-1:0] cmd_prefix = '0;
  logic [LEN_W-1:0] cmd_len = '0;
  logic [NH_W-1:0]  cmd_nh = '0;
  upd_status_e      rsp_status;
  logic [2:0]       hr_sel;
  logic [PFX_W-1:0] hr_prefix, hr_rprefix;
  logic             hr_rd, hr_we, hr_wf, hr_we_flag, hr_rf, hr_re;
  logic [NH_W-1:0]  hr_wnh, hr_rnh;
  logic [IW-1:0]    hr_widx, hr_ridx;
  logic             er_we, er_h;
  logic [2:0]       er_grp, er_d;
  logic [IW-1:0]    er_idx;
  logic [6:0]       er_tail;
  logic [NH_W-1:0]  er_nh;
  logic             cam_valid, cam_rsp_valid;
  upd_op_e          cam_op;
  logic [PFX_W-1:0] cam_prefix;
  logic [LEN_W-1:0] cam_len;
  logic [NH_W-1:0]  cam_nh;
  upd_status_e      cam_rsp_status;

  table_update #(.IDX_W(IW)) dut (.*);

  // memories the controller maintains (lookup ports idle)
  logic              l1_ov, l2_ov, cam_lv;
  logic [ADDR_W-1:0] l1_oa;
  match_t            l1_hp [N_HR];
  logic [N_ER-1:0]   l1_go;
  logic [IW-1:0]     l1_idx [N_ER];
  match_t            l2_c [N_ER*N_SUB];
  match_t            cam_lr;
  logic [2:0]        cam_n;

  first_level_lookup #(.HASH_W(16), .IDX_W(IW)) u_l1 (
    .clk, .rst, .in_valid(1'b0), .in_addr('0), .out_valid(l1_ov), .out_addr(l1_oa),
    .hp_hit(l1_hp), .ep_go(l1_go), .ep_idx(l1_idx),
    .up_sel(hr_sel), .up_prefix(hr_prefix), .up_rd(hr_rd), .up_we(hr_we), .up_wf(hr_wf),
    .up_we_flag(hr_we_flag), .up_wnh(hr_wnh), .up_widx(hr_widx), .up_rf(hr_rf),
    .up_re(hr_re), .up_rprefix(hr_rprefix), .up_rnh(hr_rnh), .up_ridx(hr_ridx));
  second_level_lookup #(.IDX_W(IW)) u_l2 (
    .clk, .rst, .in_valid(1'b0), .in_addr('0), .ep_go('0), .ep_idx(l1_idx),
    .out_valid(l2_ov), .cand(l2_c), .up_we(er_we), .up_grp(er_grp), .up_d(er_d),
    .up_idx(er_idx), .up_tail(er_tail), .up_h(er_h), .up_nh(er_nh));
  cam_lookup #(.DEPTH(4)) u_cam (
    .clk, .rst, .lk_valid(1'b0), .lk_addr('0), .lk_res_valid(cam_lv), .lk_res(cam_lr),
    .cmd_valid(cam_valid), .cmd_op(cam_op), .cmd_prefix(cam_prefix), .cmd_len(cam_len),
    .cmd_nh(cam_nh), .rsp_valid(cam_rsp_valid), .rsp_status(cam_rsp_status), .used(cam_n));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cmd(input upd_op_e op, input logic [63:0] p, input int l, input logic [7:0] n,
                     input upd_status_e exp, input int exp_cycles);
    longint t;
    @(negedge clk);
    ck(cmd_ready, "cmd_ready while idle");
    cmd_valid = 1; cmd_op = op; cmd_prefix = p; cmd_len = 7'(l); cmd_nh = n;
    t = cycle;
    @(negedge clk);
    cmd_valid = 0;
    if (exp != ST_BADLEN) ck(!cmd_ready, "busy after accepting");
    while (!rsp_valid) @(negedge clk);
    ck(rsp_status == exp, $sformatf("%s %h/%0d status %s expected %s", op.name(), p, l,
                                    rsp_status.name(), exp.name()));
    ck(cycle - t == exp_cycles, $sformatf("%h/%0d answered after %0d cycles, expected %0d",
                                          p, l, cycle - t, exp_cycles));
  endtask

  // hash RAM words of HR(16) (identity hash) and HR(24)
  function automatic logic [2+16+8+IW-1:0] hr16(input logic [15:0] a);
    return u_l1.g_hr[0].u_hr.mem[a];
  endfunction
  function automatic logic [2+24+8+IW-1:0] hr24(input logic [15:0] a);
    return u_l1.g_hr[1].u_hr.mem[a];
  endfunction
  function automatic logic [8:0] er0(input int d, input logic [IW-1:0] x, input logic [6:0] t);
    case (d)
      4:       return u_l2.g_er[0].u_er.g_sub[4].mem[{x, t[6:3]}];
      1:       return u_l2.g_er[0].u_er.g_sub[1].mem[{x, t[6]}];
      default: return '0;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // hash prefix into an empty word
    cmd(OP_INSERT, 64'h2a01_0000_0000_0000, 16, 8'h11, ST_HR, 4);
    ck(hr16(16'h2a01) == {1'b1, 1'b0, 16'h2a01, 8'h11, 1'b0}, "HR16 word after /16");
    // expanded prefix sharing the word: E set, index 0 from the counter
    cmd(OP_INSERT, 64'h2a01_c000_0000_0000, 20, 8'h22, ST_ER, 4);
    ck(hr16(16'h2a01) == {1'b1, 1'b1, 16'h2a01, 8'h11, 1'b0}, "HR16 word after /20");
    ck(er0(4, 0, 7'b1100000) == {1'b1, 8'h22}, "ER(17,23) RAM 4 word");
    // second expanded prefix of another hash segment: index 1
    cmd(OP_INSERT, 64'h3000_8000_0000_0000, 17, 8'h33, ST_ER, 4);
    ck(hr16(16'h3000) == {1'b0, 1'b1, 16'h3000, 8'h00, 1'b1}, "HR16 word of 3000::/17");
    ck(er0(1, 1, 7'b1000000) == {1'b1, 8'h33}, "ER(17,23) RAM 1 word");
    // counter spent (2 indices): third hash segment goes to the CAM
    cmd(OP_INSERT, 64'h3001_8000_0000_0000, 17, 8'h44, ST_CAM, 6);
    ck(hr16(16'h3001) == '0, "spent counter leaves the word empty");
    // hash collision in HR(24): 0x010000 and 0x000001 both fold to 0x0001
    cmd(OP_INSERT, 64'h0100_0000_0000_0000, 24, 8'h55, ST_HR, 4);
    cmd(OP_INSERT, 64'h0000_0100_0000_0000, 24, 8'h66, ST_CAM, 6);
    ck(hr24(16'h0001) == {1'b1, 1'b0, 24'h010000, 8'h55, 1'b0}, "HR24 word kept by first prefix");
    // short prefix goes straight to the CAM; too long is refused
    cmd(OP_INSERT, 64'h2000_0000_0000_0000, 3, 8'h77, ST_CAM, 3);
    cmd(OP_INSERT, 64'h2000_0000_0000_0000, 65, 8'h77, ST_BADLEN, 1);
    // CAM holds 4: fill it and overflow
    cmd(OP_INSERT, 64'h4000_0000_0000_0000, 4, 8'h01, ST_CAM, 3);
    cmd(OP_INSERT, 64'h5000_0000_0000_0000, 4, 8'h02, ST_FULL, 3);
    // deletes: hash prefix with E keeps E and index
    cmd(OP_DELETE, 64'h2a01_0000_0000_0000, 16, 8'h00, ST_HR, 6);
    ck(hr16(16'h2a01) == {1'b0, 1'b1, 16'h2a01, 8'h00, 1'b0}, "HR16 word after deleting /16");
    // expanded prefix: only the expanded word is cleared
    cmd(OP_DELETE, 64'h2a01_c000_0000_0000, 20, 8'h00, ST_ER, 6);
    ck(er0(4, 0, 7'b1100000) == '0, "ER word cleared");
    ck(hr16(16'h2a01)[2+16+8+IW-2] == 1'b1, "E stays after deleting the expanded prefix");
    // re-insert under the kept index
    cmd(OP_INSERT, 64'h2a01_d000_0000_0000, 20, 8'h88, ST_ER, 4);
    ck(er0(4, 0, 7'b1101000) == {1'b1, 8'h88}, "ER word reuses index 0");
    // hash prefix without E: whole word cleared
    cmd(OP_DELETE, 64'h0100_0000_0000_0000, 24, 8'h00, ST_HR, 6);
    ck(hr24(16'h0001)[2+24+8+IW-1 -: 2] == 2'b00, "HR24 word emptied");
    // CAM delete and a delete of nothing
    cmd(OP_DELETE, 64'h0000_0100_0000_0000, 24, 8'h00, ST_CAM, 6);
    cmd(OP_DELETE, 64'h6000_0000_0000_0000, 24, 8'h00, ST_NOTFOUND, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
