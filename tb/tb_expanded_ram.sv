// tb_expanded_ram: fills random words of the seven RAMs of one expanded group
// and checks that a lookup with index x and tail bits t returns, for RAM d, the
// word written at index x with the same first d tail bits, one cycle later.
module tb_expanded_ram;
  localparam int NW = 8, IW = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          lk_en = 1;
  logic [IW-1:0] lk_idx = '0, up_idx = '0;
  logic [6:0]    lk_tail = '0, up_tail = '0;
  logic [6:0]    lk_h;
  logic [NW-1:0] lk_nh [7];
  logic          up_we = 0, up_h = 0;
  logic [2:0]    up_d = 3'd1;
  logic [NW-1:0] up_nh = '0;

  expanded_ram #(.NH_W(NW), .IDX_W(IW)) dut (.*);

  int checks = 0, failures = 0;
  // model keyed by {d, index, tail truncated to d bits}
  logic [NW:0] model [logic [17:0]];

  function automatic logic [17:0] key(input int d, input logic [IW-1:0] x, input logic [6:0] t);
    return {3'(d), x, 7'(t >> (7 - d))};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      up_d    = 3'($urandom_range(1, 7));
      up_idx  = 8'($urandom_range(0, 15));
      up_tail = 7'($urandom);
      up_h    = ($urandom_range(0, 3) != 0);
      up_nh   = 8'($urandom);
      up_we   = 1;
      model[key(up_d, up_idx, up_tail)] = {up_h, up_nh};
      @(negedge clk);
    end
    up_we = 0;
    for (int n = 0; n < 1500; n++) begin
      lk_idx  = 8'($urandom_range(0, 15));
      lk_tail = 7'($urandom);
      @(posedge clk); #1;
      for (int d = 1; d <= 7; d++) begin
        logic [NW:0] e;
        e = model.exists(key(d, lk_idx, lk_tail)) ? model[key(d, lk_idx, lk_tail)] : '0;
        checks++;
        if (lk_h[d-1] !== e[NW] || (e[NW] && lk_nh[d-1] !== e[NW-1:0])) begin
          failures++;
          $display("FAIL d=%0d idx=%0d tail=%b: h=%b nh=%h expected %b %h",
                   d, lk_idx, lk_tail, lk_h[d-1], lk_nh[d-1], e[NW], e[NW-1:0]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
