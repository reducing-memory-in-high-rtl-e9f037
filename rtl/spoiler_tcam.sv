// spoiler_tcam: the separate branch for spoiler rules.
//
// Spoilers are the few rules that would create most of the pseudorules if
// they stayed in the subsets; the rule compiler takes them out and they are
// classified here, in parallel with the main branch. The document proposes a
// small on-chip TCAM for this; here each of the N_SPOILERS entries holds a
// complete rule (prefixes, protocol, port ranges) and all entries are
// compared with the header at once, which is what a TCAM with range support
// does. Among matching entries the one with the lowest rule number (the
// highest priority) is reported. Eight entries follow the document's
// evaluation (eight spoilers removed); the entry format is this design's.
//
// Timing: header registered on entry, result registered on exit: 2-cycle
// latency, one packet per cycle.
module spoiler_tcam
  import mspcca_pkg::*;
#(
  parameter int unsigned N = N_SPOILERS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [$clog2(N)-1:0]  wr_idx,
  input  rule_t                 wr_rule,
  input  logic                  in_valid,
  input  header_t               in_hdr,
  output logic                  out_valid,
  output logic                  match,
  output logic [RULE_NO_W-1:0]  rule_no
);

  rule_t entry_q [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) entry_q[i] <= '0;
    end else if (wr_en) begin
      entry_q[wr_idx] <= wr_rule;
    end
  end

  logic    s1_valid;
  header_t s1_hdr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_hdr   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_hdr   <= in_hdr;
    end
  end

  logic                 any_d;
  logic [RULE_NO_W-1:0] best_d;
  always_comb begin
    any_d  = 1'b0;
    best_d = '0;
    for (int i = 0; i < N; i++) begin
      if (rule_match(entry_q[i], s1_hdr) && (!any_d || entry_q[i].rule_no < best_d)) begin
        any_d  = 1'b1;
        best_d = entry_q[i].rule_no;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      match     <= 1'b0;
      rule_no   <= '0;
    end else begin
      out_valid <= s1_valid;
      match     <= s1_valid & any_d;
      rule_no   <= best_d;
    end
  end

endmodule
