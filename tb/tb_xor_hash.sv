// tb_xor_hash: checks the XOR-folding hash for prefix lengths 16, 24, 40 and 64
// against a reference that XORs the 16-bit chunks of the prefix word by word.
module tb_xor_hash;
  logic [15:0] p16;
  logic [23:0] p24;
  logic [39:0] p40;
  logic [63:0] p64;
  logic [15:0] h16, h24, h40, h64;
  int checks = 0, failures = 0;

  xor_hash #(.PLEN(16), .HASH_W(16)) u16 (.prefix(p16), .index(h16));
  xor_hash #(.PLEN(24), .HASH_W(16)) u24 (.prefix(p24), .index(h24));
  xor_hash #(.PLEN(40), .HASH_W(16)) u40 (.prefix(p40), .index(h40));
  xor_hash #(.PLEN(64), .HASH_W(16)) u64 (.prefix(p64), .index(h64));

  function automatic logic [15:0] fold(input logic [63:0] p);
    return p[15:0] ^ p[31:16] ^ p[47:32] ^ p[63:48];
  endfunction

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked cases
    p16 = 16'h2a01; p24 = 24'h2a01c0; p40 = 40'h0; p64 = 64'h0;
    #1;
    check(h16, 16'h2a01, "HR16 identity");
    check(h24, 16'h01c0 ^ 16'h002a, "HR24 hand");   // 2a01c0: chunks 01c0 and 002a
    for (int n = 0; n < 2000; n++) begin
      p16 = 16'($urandom);
      p24 = 24'($urandom);
      p40 = {8'($urandom), $urandom};
      p64 = {$urandom, $urandom};
      #1;
      check(h16, p16, "HR16");
      check(h24, fold({40'b0, p24}), "HR24");
      check(h40, fold({24'b0, p40}), "HR40");
      check(h64, fold(p64), "HR64");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
