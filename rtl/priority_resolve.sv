// priority_resolve: final choice between the two classification branches.
//
// The main branch (subsets, Bloom filters, perfect hash, rule table) and the
// spoiler branch each report at most one matching rule. Rule numbers are
// priorities: the lower number wins. When neither branch matched, the
// default (universal) rule is the result; that rule is never stored, which
// keeps the pseudorules from covering the whole cross product. The document
// gives the two branches, the final priority resolution and the default
// rule; numbering rules by priority is this design's convention.
//
// Timing: one register stage, one packet per cycle. Both inputs must belong
// to the same packet (in_valid common to both).
module priority_resolve
  import mspcca_pkg::*;
#(
  parameter logic [RULE_NO_W-1:0] DEFAULT = DEFAULT_RULE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  main_match,
  input  logic [RULE_NO_W-1:0]  main_rule,
  input  logic                  sp_match,
  input  logic [RULE_NO_W-1:0]  sp_rule,
  output logic                  out_valid,
  output logic                  out_default,  // no rule matched
  output logic                  out_spoiler,  // the spoiler branch won
  output logic [RULE_NO_W-1:0]  out_rule
);

  logic                 use_sp;
  logic [RULE_NO_W-1:0] rule_d;
  always_comb begin
    use_sp = sp_match && (!main_match || sp_rule < main_rule);
    if (use_sp)          rule_d = sp_rule;
    else if (main_match) rule_d = main_rule;
    else                 rule_d = DEFAULT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_default <= 1'b0;
      out_spoiler <= 1'b0;
      out_rule    <= '0;
    end else begin
      out_valid   <= in_valid;
      out_default <= in_valid & ~main_match & ~sp_match;
      out_spoiler <= in_valid & use_sp;
      out_rule    <= rule_d;
    end
  end

endmodule
