// perfect_hash: the one shared perfect-hash unit of the classifier.
//
// The Bloom filters of all subsets are queried in parallel. The rule compiler
// splits the rules so that a packet matches rules of at most one subset, so
// one perfect-hash unit is enough: it takes the LPM vector of the first subset
// whose Bloom filter answered positively (lowest subset number wins if more
// than one did, which only happens after a false positive).
//
// Perfect hash: two ordinary hash functions (H3, different seeds) of the LPM
// vector give two vertex numbers. The two 16-bit integers stored at those
// vertices in the subset's vertex table (external memory) are added; the sum
// modulo the rule-table size is the rule-table pointer. The rule compiler
// chooses the vertex values so that every rule and pseudorule of the subset
// lands on the index of its target rule (an acyclic random graph whose edges
// are the keys). The two-hash / two-reads / sum structure and the 16-bit
// words follow the document. This design's own choices: the vertex table of
// each subset is split in two halves, the first hash addresses the first half
// and the second hash the second, which rules out self-loops in the graph;
// the external address is {subset, half, vertex}.
//
// External memory interface: both reads are issued in the same cycle
// (mem_rd_en with mem_addr_a/mem_addr_b) and the data must come back exactly
// MEM_LAT cycles later with mem_rd_valid. At the packet clock of 266 MHz this
// is one access per cycle of a 533 MHz memory.
//
// Timing: 1 cycle (select + hash) + MEM_LAT + 1 cycle (sum): latency
// MEM_LAT + 2, one packet per cycle.
//
// rst_n also disables the alignment assertion at the end; lint reports that
// as a synchronous use of the asynchronous reset, but it drives no logic.
// The half bit of mem_addr_a is always 0 (and of mem_addr_b always 1) by
// construction.
module perfect_hash
  import mspcca_pkg::*;
#(
  parameter int unsigned MEM_LAT = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [N_SUBSETS-1:0]          in_hit,
  input  key_t [N_SUBSETS-1:0]          in_key,
  // external vertex-table memory
  output logic                          mem_rd_en,
  output logic [VT_ADDR_W-1:0]          mem_addr_a,
  output logic [VT_ADDR_W-1:0]          mem_addr_b,
  input  logic                          mem_rd_valid,
  input  logic [VT_DATA_W-1:0]          mem_data_a,
  input  logic [VT_DATA_W-1:0]          mem_data_b,
  // result
  output logic                          out_valid,
  output logic                          ptr_valid,
  output logic [SUBSET_W-1:0]           out_subset,
  output logic [RT_AW-1:0]              ptr
);

  // stage 1: subset select and the two hashes
  logic                found;
  logic [SUBSET_W-1:0] sel;
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int s = N_SUBSETS - 1; s >= 0; s--) begin
      if (in_hit[s]) begin
        found = 1'b1;
        sel   = SUBSET_W'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_rd_en  <= 1'b0;
      mem_addr_a <= '0;
      mem_addr_b <= '0;
    end else begin
      mem_rd_en  <= in_valid & found;
      mem_addr_a <= {sel, 1'b0, VT_AW'(h3_hash(in_key[sel], PHF_SEED_A))};
      mem_addr_b <= {sel, 1'b1, VT_AW'(h3_hash(in_key[sel], PHF_SEED_B))};
    end
  end

  // context travelling beside the memory access: MEM_LAT + 1 stages
  typedef struct packed {
    logic                valid;
    logic                found;
    logic [SUBSET_W-1:0] subset;
  } ctx_t;

  ctx_t ctx_q [MEM_LAT + 1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= MEM_LAT; i++) ctx_q[i] <= '0;
    end else begin
      ctx_q[0] <= '{valid: in_valid, found: in_valid & found, subset: sel};
      for (int i = 1; i <= MEM_LAT; i++) ctx_q[i] <= ctx_q[i-1];
    end
  end

  ctx_t ctx_mem;
  assign ctx_mem = ctx_q[MEM_LAT];

  // stage 3: sum of the two vertex values
  logic [VT_DATA_W-1:0] sum;
  assign sum = mem_data_a + mem_data_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      ptr_valid  <= 1'b0;
      out_subset <= '0;
      ptr        <= '0;
    end else begin
      out_valid  <= ctx_mem.valid;
      ptr_valid  <= ctx_mem.found & mem_rd_valid;
      out_subset <= ctx_mem.subset;
      ptr        <= RT_AW'(sum);
    end
  end

  // the memory must answer every read exactly MEM_LAT cycles later
  a_mem_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                  ctx_mem.found == mem_rd_valid)
    else $error("vertex memory response not aligned with request");

endmodule
