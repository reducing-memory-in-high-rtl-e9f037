// lpm_engine: prefix matching for one header dimension.
//
// The stage returns every stored prefix that matches the field, not only the
// longest one, and keeps the results of the subsets apart. Each prefix entry
// belongs to one subset and carries a color; within one subset and one
// dimension, prefixes that nest (one is a prefix of the other) must be given
// different colors by the rule compiler, so at most one matching prefix
// exists per (subset, color). The output is therefore indexed by subset and
// color and holds the entry's index (the prefix id), its length and its color
// bitmaps for the color-processing stage.
//
// Implementation: a table of N_PREFIX registered entries compared in parallel
// with the field (a CAM-style search). This is the simplest structure with the
// required function; a trie or tree-bitmap engine would give the same result.
// The document asks the stage for all matching prefixes, split by subset,
// with a color and bitmaps per prefix; the parallel table, the entry format
// and the use of the entry index as prefix id are this design's choices.
//
// Interface: field is left-aligned in 32 bits. Entries are written through
// wr_* (one per cycle). Timing: in_valid/field registered on entry, result
// registered on exit: 2-cycle latency, one lookup per cycle.
module lpm_engine
  import mspcca_pkg::*;
#(
  parameter int unsigned NP = N_PREFIX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table write port
  input  logic                     wr_en,
  input  logic [$clog2(NP)-1:0]    wr_idx,
  input  lpm_entry_t               wr_entry,
  // lookup
  input  logic                     in_valid,
  input  logic [31:0]              field,
  output logic                     out_valid,
  output hit_colors_t [N_SUBSETS-1:0] hits
);

  lpm_entry_t table_q [NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) table_q[i] <= '0;
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_entry;
    end
  end

  // stage 1: register the request
  logic        s1_valid;
  logic [31:0] s1_field;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_field <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_field <= field;
    end
  end

  // parallel compare: one-hot slot (subset, color) of every matching entry
  localparam int unsigned SLOTS = N_SUBSETS * N_COLORS;
  logic [NP-1:0][SLOTS-1:0] slot_sel;
  for (genvar e = 0; e < NP; e++) begin : g_cmp
    logic m;
    assign m = table_q[e].valid
            && prefix_match(s1_field, table_q[e].value, table_q[e].len);
    for (genvar k = 0; k < SLOTS; k++) begin : g_slot
      assign slot_sel[e][k] = m
          && (int'(table_q[e].subset) == k / N_COLORS)
          && (int'(table_q[e].color)  == k % N_COLORS);
    end
  end

  // gather: AND-OR of the (at most one) selected entry per slot
  hit_colors_t [N_SUBSETS-1:0] hits_d;
  for (genvar k = 0; k < SLOTS; k++) begin : g_gather
    lpm_hit_t h;
    always_comb begin
      h = '0;
      for (int e = 0; e < NP; e++) begin
        if (slot_sel[e][k]) begin
          h.valid  = 1'b1;
          h.id     = h.id     | ID_W'(e);
          h.len    = h.len    | table_q[e].len;
          h.bitmap = h.bitmap | table_q[e].bitmap;
        end
      end
    end
    assign hits_d[k / N_COLORS][k % N_COLORS] = h;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hits      <= '0;
    end else begin
      out_valid <= s1_valid;
      hits      <= hits_d;
    end
  end

endmodule
