// key_hash: maps a grouping key to a hash-table bucket index.
//
// The source design hashes each key before it searches the Lock CAM and the hash table
// but does not say which hash function it uses. This design uses multiplicative
// (Fibonacci) hashing: the key is multiplied by the 32-bit constant 0x9E3779B1 and the top
// BUCKET_W bits of the 32-bit product are the bucket index, spreading nearby keys over the
// whole table. Purely combinational; the result is valid in the same cycle as the key.
module key_hash #(
  parameter int unsigned KEY_W    = 32,
  parameter int unsigned BUCKET_W = 20   // 2**BUCKET_W buckets, 1 <= BUCKET_W <= 32
) (
  input  logic [KEY_W-1:0]    key,
  output logic [BUCKET_W-1:0] bucket
);
  localparam logic [31:0] GOLDEN = 32'h9E37_79B1;

  logic [31:0] key32;
  logic [31:0] product;

  always_comb begin
    key32   = 32'(key);
    product = key32 * GOLDEN;        // modulo 2**32
    bucket  = product[31 -: BUCKET_W];
  end

endmodule
