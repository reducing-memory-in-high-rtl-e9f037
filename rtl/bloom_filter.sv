// bloom_filter: set-membership query for the LPM vectors of one subset.
//
// The filter answers "is this LPM vector one of the subset's rules or
// pseudorules?". A positive answer may be false (with a small probability);
// a negative answer is always right. Only a positive answer lets the packet
// use the perfect hash function and the rule table.
//
// Structure: a partitioned Bloom filter. K independent H3 hash functions each
// address their own on-chip bit array of 2**PART_AW bits; the query is
// positive when all K addressed bits are 1. The rule compiler fills the
// arrays through the write port (one bit per write). With K = 8 and
// 2048-bit partitions the filter holds about 1400 keys at a false-positive
// probability of 0.005 (the rate used in the document's evaluation); the
// choice of K, the partition size and the H3 family is this design's own.
//
// Timing: cycle 1 registers the K addresses, cycle 2 reads the arrays and
// registers the AND: 2-cycle latency, one query per cycle.
module bloom_filter
  import mspcca_pkg::*;
#(
  parameter int unsigned K       = BF_K,
  parameter int unsigned PART_AW = BF_PART_AW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // bit write port
  input  logic                   wr_en,
  input  logic [$clog2(K)-1:0]   wr_part,
  input  logic [PART_AW-1:0]     wr_addr,
  input  logic                   wr_bit,
  // query
  input  logic                   in_valid,
  input  logic                   in_key_valid,
  input  key_t                   in_key,
  output logic                   out_valid,
  output logic                   hit,
  output key_t                   out_key
);

  logic mem [K][2**PART_AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_part][wr_addr] <= wr_bit;
  end

  // stage 1: hash addresses
  logic [K-1:0][PART_AW-1:0] s1_addr;
  logic                      s1_valid, s1_kv;
  key_t                      s1_key;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_kv    <= 1'b0;
      s1_key   <= '0;
      s1_addr  <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_kv    <= in_valid & in_key_valid;
      s1_key   <= in_key;
      for (int k = 0; k < K; k++)
        s1_addr[k] <= PART_AW'(h3_hash(in_key, bf_seed(k)));
    end
  end

  // stage 2: read all partitions and AND
  logic all_set;
  always_comb begin
    all_set = 1'b1;
    for (int k = 0; k < K; k++) all_set = all_set & mem[k][s1_addr[k]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hit       <= 1'b0;
      out_key   <= '0;
    end else begin
      out_valid <= s1_valid;
      hit       <= s1_kv & all_set;
      out_key   <= s1_key;
    end
  end

endmodule
