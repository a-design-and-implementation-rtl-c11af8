// table_update: builds and maintains the forwarding table, one insert or
// delete at a time, while lookups keep running.
//
// A prefix of length L (0..64) with next hop N is placed as follows:
//  * L = 16, 24, ..., 64 (hash prefix): read the word of HR(L) at the hash of
//    the prefix. If the word is empty, or its prefix is this prefix, set F and
//    write prefix and next hop (E and the index stay). Otherwise the prefix
//    collides and goes to the CAM.
//  * L = 17..63, not a multiple of 8 (expanded prefix): its first i = 8*floor(L/8)
//    bits (hash segment) are looked up in HR(i) the same way. If the word
//    already has E set, the next hop is written into expanded RAM group i at
//    the word's index. If the word is empty or holds the same prefix without E,
//    E is set and the word receives the group's next free index from a counter,
//    which then advances. A word holding another prefix, or a spent counter,
//    sends the prefix to the CAM.
//  * L < 16 has no hash RAM and always goes to the CAM.
// Delete undoes this: a hash prefix in a word with E set loses only F and its
// next hop, otherwise the whole word is cleared; an expanded prefix only has
// its expanded RAM word cleared, and the counter does not step back, so the
// index stays with its hash segment and is reused when a prefix with the same
// hash segment is inserted again. A delete is also sent to the CAM, so a copy
// held there (from a time when the hash word was taken) is removed too.
//
// Handshake: a command is taken when cmd_valid and cmd_ready are both high;
// cmd_ready is low until rsp_valid has pulsed with the outcome. Counted in
// cycles from the accepting edge, rsp_valid rises after 4 cycles for an insert
// done in a hash or expanded RAM, 6 for any delete or an insert that falls
// through to the CAM, 3 for a prefix shorter than 16 bits and 1 for a length
// above 64. The placement rules, the flag meanings and the
// never-decreasing counter follow the design description; the CAM copy
// removal, the handling of lengths below 16 and the handshake are this
// design's choices.
module table_update
  import ipv6_lookup_pkg::*;
#(
  parameter int IDX_W = 8
) (
  input  logic               clk,
  input  logic               rst,
  // commands
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  upd_op_e            cmd_op,
  input  logic [PFX_W-1:0]   cmd_prefix,
  input  logic [LEN_W-1:0]   cmd_len,
  input  logic [NH_W-1:0]    cmd_nh,
  output logic               rsp_valid,
  output upd_status_e        rsp_status,
  // hash RAM maintenance port (first level)
  output logic [2:0]         hr_sel,
  output logic [PFX_W-1:0]   hr_prefix,
  output logic               hr_rd,
  output logic               hr_we,
  output logic               hr_wf,
  output logic               hr_we_flag,
  output logic [NH_W-1:0]    hr_wnh,
  output logic [IDX_W-1:0]   hr_widx,
  input  logic               hr_rf,
  input  logic               hr_re,
  input  logic [PFX_W-1:0]   hr_rprefix,
  input  logic [NH_W-1:0]    hr_rnh,
  input  logic [IDX_W-1:0]   hr_ridx,
  // expanded RAM maintenance port (second level)
  output logic               er_we,
  output logic [2:0]         er_grp,
  output logic [2:0]         er_d,
  output logic [IDX_W-1:0]   er_idx,
  output logic [6:0]         er_tail,
  output logic               er_h,
  output logic [NH_W-1:0]    er_nh,
  // CAM maintenance port
  output logic               cam_valid,
  output upd_op_e            cam_op,
  output logic [PFX_W-1:0]   cam_prefix,
  output logic [LEN_W-1:0]   cam_len,
  output logic [NH_W-1:0]    cam_nh,
  input  logic               cam_rsp_valid,
  input  upd_status_e        cam_rsp_status
);

  upd_state_e       state;
  upd_op_e          op;
  logic [PFX_W-1:0] pfx;
  logic [LEN_W-1:0] len;
  logic [NH_W-1:0]  nh;
  logic [2:0]       k;             // hash RAM / expanded group number
  logic [2:0]       d;             // tail length, 0 for a hash prefix
  logic             found;         // delete already done in a hash/expanded RAM
  upd_status_e      found_st;
  logic [IDX_W:0]   cnt [N_ER];    // next free index per expanded group

  // ---------------- decision on the hash RAM word (state S_DEC) ----------------
  logic [LEN_W-1:0] hl;
  logic             w_match, w_empty, cnt_left;
  logic [IDX_W:0]   cnt_k;

  assign hl       = LEN_W'(MIN_HR_LEN) + LEN_W'({k, 3'b000});
  assign w_match  = (hr_rf || hr_re) && ((hr_rprefix ^ pfx) & len_mask(hl)) == '0;
  assign w_empty  = !hr_rf && !hr_re;
  assign cnt_k    = cnt[k];
  assign cnt_left = !cnt_k[IDX_W];

  upd_act_e act;

  always_comb begin
    act = A_NONE;
    if (op == OP_INSERT) begin
      if (d == 3'd0) begin
        if (w_empty || w_match) act = A_HP_SET;
      end else if (w_empty || w_match) begin
        if (hr_re)         act = A_EP_OLD;
        else if (cnt_left) act = A_EP_NEW;
      end
    end else begin
      if (d == 3'd0) begin
        if (w_match && hr_rf) act = A_DEL_HP;
      end else if (w_match && hr_re) begin
        act = A_DEL_EP;
      end
    end
  end

  // ---------------- memory port drive ----------------
  always_comb begin
    hr_sel     = k;
    hr_prefix  = pfx;
    hr_rd      = (state == S_READ);
    hr_we      = 1'b0;
    hr_wf      = hr_rf;
    hr_we_flag = hr_re;
    hr_wnh     = hr_rnh;
    hr_widx    = hr_ridx;

    er_we   = 1'b0;
    er_grp  = k;
    er_d    = d;
    er_idx  = hr_ridx;
    er_tail = 7'(({pfx, 7'b0} << hl) >> PFX_W);
    er_h    = 1'b1;
    er_nh   = nh;

    if (state == S_DEC) begin
      unique case (act)
        A_HP_SET: begin
          hr_we  = 1'b1;
          hr_wf  = 1'b1;
          hr_wnh = nh;
        end
        A_EP_OLD: er_we = 1'b1;
        A_EP_NEW: begin
          hr_we      = 1'b1;
          hr_we_flag = 1'b1;
          hr_widx    = cnt_k[IDX_W-1:0];
          er_we      = 1'b1;
          er_idx     = cnt_k[IDX_W-1:0];
        end
        A_DEL_HP: begin
          hr_we  = 1'b1;
          hr_wf  = 1'b0;
          hr_wnh = '0;
          if (!hr_re) hr_widx = '0;
        end
        A_DEL_EP: begin
          er_we = 1'b1;
          er_h  = 1'b0;
          er_nh = '0;
        end
        default: ;
      endcase
    end

    cam_valid  = (state == S_CAM);
    cam_op     = op;
    cam_prefix = pfx;
    cam_len    = len;
    cam_nh     = nh;
  end

  assign cmd_ready = (state == S_IDLE);

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      rsp_valid <= 1'b0;
      found     <= 1'b0;
      for (int g = 0; g < N_ER; g++) cnt[g] <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op    <= cmd_op;
          pfx   <= cmd_prefix & len_mask(cmd_len);
          len   <= cmd_len;
          nh    <= cmd_nh;
          k     <= 3'((cmd_len >> 3) - 7'd2);
          d     <= cmd_len[2:0];
          found <= 1'b0;
          if (cmd_len > LEN_W'(PFX_W)) begin
            rsp_valid  <= 1'b1;
            rsp_status <= ST_BADLEN;
          end else if (cmd_len < LEN_W'(MIN_HR_LEN)) begin
            state <= S_CAM;
          end else begin
            state <= S_READ;
          end
        end
        S_READ: state <= S_WAIT;
        S_WAIT: state <= S_DEC;
        S_DEC: begin
          unique case (act)
            A_HP_SET: begin
              rsp_valid  <= 1'b1;
              rsp_status <= ST_HR;
              state      <= S_IDLE;
            end
            A_EP_OLD, A_EP_NEW: begin
              rsp_valid  <= 1'b1;
              rsp_status <= ST_ER;
              state      <= S_IDLE;
              if (act == A_EP_NEW) cnt[k] <= cnt_k + 1'b1;
            end
            A_DEL_HP: begin
              found    <= 1'b1;
              found_st <= ST_HR;
              state    <= S_CAM;
            end
            A_DEL_EP: begin
              found    <= 1'b1;
              found_st <= ST_ER;
              state    <= S_CAM;
            end
            default: state <= S_CAM;
          endcase
        end
        S_CAM: state <= S_CAMW;
        S_CAMW: if (cam_rsp_valid) begin
          rsp_valid  <= 1'b1;
          rsp_status <= found ? found_st : cam_rsp_status;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rsp_only_when_busy: assert property (@(posedge clk) disable iff (rst)
    rsp_valid |-> $past(!cmd_ready || cmd_valid));

endmodule
