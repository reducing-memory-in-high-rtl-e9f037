// rule_table: on-chip table of the original rules and the final rule check.
//
// Only real rules are stored; pseudorules are mapped by the perfect hash
// function straight onto the index of their target rule. The table is read
// at the pointer, and the packet header is then checked against the stored
// rule in all five dimensions (prefixes for the addresses, a value or a
// wildcard for the protocol, ranges for the ports). If the rule matches, its
// number is the result; if not (the Bloom filter gave a false positive, or no
// subset answered at all) the branch reports no match and the default rule
// is applied later. Storing full rules and checking them follows the
// document; the rule format and the RT_DEPTH of 2048 (above the 1107 rules
// of the largest rule set evaluated) are this design's choices.
//
// Timing: cycle 1 reads the table (synchronous read), cycle 2 registers the
// match result: 2-cycle latency, one packet per cycle. The header must be
// presented together with the pointer.
module rule_table
  import mspcca_pkg::*;
#(
  parameter int unsigned DEPTH = RT_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table write port
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  rule_t                    wr_rule,
  // lookup
  input  logic                     in_valid,
  input  logic                     in_ptr_valid,
  input  logic [$clog2(DEPTH)-1:0] in_ptr,
  input  header_t                  in_hdr,
  output logic                     out_valid,
  output logic                     match,
  output logic [RULE_NO_W-1:0]     rule_no
);

  rule_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_rule;
  end

  // stage 1: read
  rule_t   s1_rule;
  logic    s1_valid, s1_pv;
  header_t s1_hdr;
  always_ff @(posedge clk) begin
    s1_rule <= mem[in_ptr];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_pv    <= 1'b0;
      s1_hdr   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_pv    <= in_valid & in_ptr_valid;
      s1_hdr   <= in_hdr;
    end
  end

  // stage 2: match
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      match     <= 1'b0;
      rule_no   <= '0;
    end else begin
      out_valid <= s1_valid;
      match     <= s1_pv & rule_match(s1_rule, s1_hdr);
      rule_no   <= s1_rule.rule_no;
    end
  end

endmodule
