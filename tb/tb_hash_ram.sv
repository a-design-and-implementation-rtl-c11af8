// tb_hash_ram: writes random words into a 24-bit hash RAM through the
// maintenance port and reads them back through both ports, checking field
// placement, the one-cycle read latency, the empty initial state and that an
// unselected write changes nothing.
module tb_hash_ram;
  localparam int PLEN = 24, HW = 16, NW = 8, IW = 8;
  localparam int DW = 2 + PLEN + NW + IW;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [HW-1:0]   lk_addr = '0, up_addr = '0;
  logic            lk_f, lk_e, up_rf, up_re;
  logic [PLEN-1:0] lk_prefix, up_rprefix;
  logic [NW-1:0]   lk_nh, up_rnh;
  logic [IW-1:0]   lk_idx, up_ridx;
  logic            up_rd = 0, up_we = 0, up_wf = 0, up_we_flag = 0;
  logic [PLEN-1:0] up_wprefix = '0;
  logic [NW-1:0]   up_wnh = '0;
  logic [IW-1:0]   up_widx = '0;

  hash_ram #(.PLEN(PLEN), .HASH_W(HW), .NH_W(NW), .IDX_W(IW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [logic [HW-1:0]];

  function automatic logic [DW-1:0] expect_at(input logic [HW-1:0] a);
    return model.exists(a) ? model[a] : '0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [HW-1:0] a;
    logic [DW-1:0] w;
    // empty at start
    @(negedge clk);
    lk_addr = 16'h1234; up_addr = 16'hffff; up_rd = 1;
    @(negedge clk);
    up_rd = 0;
    checks++;
    if ({lk_f, lk_e} != 2'b00 || {up_rf, up_re} != 2'b00) begin
      failures++; $display("FAIL: RAM not empty at start");
    end
    // random writes
    for (int n = 0; n < 400; n++) begin
      a = 16'($urandom_range(0, 63)) * 16'd1021;
      w = {$urandom, $urandom, 2'($urandom)};
      up_addr = a; up_we = 1;
      {up_wf, up_we_flag, up_wprefix, up_wnh, up_widx} = w;
      model[a] = w;
      @(negedge clk);
      up_we = 0;
    end
    // write with up_we low must not land
    up_addr = 16'd5; up_wf = 1; up_we_flag = 1; @(negedge clk);
    // read back through both ports
    for (int n = 0; n < 600; n++) begin
      a = (n % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 63)) * 16'd1021;
      lk_addr = a; up_addr = a; up_rd = 1;
      @(posedge clk); #1;
      up_rd = 0;
      checks++;
      if ({lk_f, lk_e, lk_prefix, lk_nh, lk_idx} !== expect_at(a)) begin
        failures++;
        $display("FAIL lookup port @%h: %h vs %h", a, {lk_f, lk_e, lk_prefix, lk_nh, lk_idx}, expect_at(a));
      end
      checks++;
      if ({up_rf, up_re, up_rprefix, up_rnh, up_ridx} !== expect_at(a)) begin
        failures++;
        $display("FAIL maintenance port @%h", a);
      end
      @(negedge clk);
    end
    // maintenance read data hold while up_rd is low
    lk_addr = 16'd5; @(negedge clk); @(negedge clk);
    checks++;
    if ({lk_f, lk_e} !== expect_at(16'd5) >> (DW - 2)) begin
      failures++; $display("FAIL: word 5 changed without up_we");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
