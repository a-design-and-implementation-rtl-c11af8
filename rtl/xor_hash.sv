// xor_hash: XOR-folding hash of a PLEN-bit prefix down to a HASH_W-bit hash RAM
// address.
//
// The prefix is cut into HASH_W-bit chunks starting from its least significant
// bit, the last chunk padded with zeros, and the chunks are XORed together:
// prefix bit b lands on address bit (b mod HASH_W). For PLEN == HASH_W the hash
// is the identity, so HR(16) never collides. XOR folding is the hash the design
// description selects; the chunk order is this design's choice.
// Purely combinational.
module xor_hash #(
  parameter int PLEN   = 24,
  parameter int HASH_W = 16
) (
  input  logic [PLEN-1:0]   prefix,
  output logic [HASH_W-1:0] index
);

  always_comb begin
    index = '0;
    for (int b = 0; b < PLEN; b++) index[b % HASH_W] ^= prefix[b];
  end

endmodule
