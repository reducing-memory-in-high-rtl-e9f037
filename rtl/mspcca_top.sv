// mspcca_top: multi-subset prefix-coloring packet classifier.
//
// One packet header enters per cycle and, MEM_LAT + 13 cycles later, the number of
// the highest-priority matching rule leaves. The pipeline:
//   1. lpm_engine x5      all matching prefixes of each field, split by
//                         subset and color                       (2 cycles)
//   2. color_processing x3 per subset: drop prefixes that no rule combines
//                         with the other fields; LPM vector      (4 cycles)
//   3. bloom_filter x3    per subset: is the vector a stored rule or
//                         pseudorule?                            (2 cycles)
//   4. perfect_hash x1    for the positive subset: two vertex-table reads in
//                         external memory, sum = rule pointer    (MEM_LAT+2)
//   5. rule_table         read the rule, check it against the header (2)
//   6. priority_resolve   against the spoiler branch, default rule (1)
// In parallel, spoiler_tcam matches the header against the spoiler rules and
// its result is delayed to meet the main branch. The header is delayed to
// reach the rule table with the pointer.
//
// The block structure (LPM per field, color processing, Bloom filter per
// subset, a single shared perfect hash with per-subset vertex tables in
// external memory, one rule table, a spoiler branch and final priority
// resolution) follows the document. The latencies of all stages except
// color processing, the memory interface and the table-loading ports are
// this design's own.
//
// Configuration: the rule compiler (software) loads the prefix tables, the
// Bloom-filter bits, the rule table and the spoiler entries through the
// four *_wr ports, one write per cycle each, before traffic starts; the
// vertex tables live in external memory and are loaded there directly. Bloom
// arrays and the rule table have no reset and must be written in full.
//
// External memory: mem_rd_en/mem_addr_a/mem_addr_b issue the two reads of a
// packet; mem_data_a/b must return with mem_rd_valid exactly MEM_LAT cycles
// later.
module mspcca_top
  import mspcca_pkg::*;
#(
  parameter int unsigned MEM_LAT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  lpm_wr_t              lpm_wr,
  input  bf_wr_t               bf_wr,
  input  rt_wr_t               rt_wr,
  input  sp_wr_t               sp_wr,
  // packets in
  input  logic                 in_valid,
  input  header_t              in_hdr,
  // external vertex-table memory
  output logic                 mem_rd_en,
  output logic [VT_ADDR_W-1:0] mem_addr_a,
  output logic [VT_ADDR_W-1:0] mem_addr_b,
  input  logic                 mem_rd_valid,
  input  logic [VT_DATA_W-1:0] mem_data_a,
  input  logic [VT_DATA_W-1:0] mem_data_b,
  // results out
  output logic                 out_valid,
  output logic [RULE_NO_W-1:0] out_rule,
  output logic                 out_default,
  output logic                 out_spoiler
);

  localparam int unsigned LAT_LPM = 2;
  localparam int unsigned LAT_CP  = 4;
  localparam int unsigned LAT_BF  = 2;
  localparam int unsigned LAT_PHF = MEM_LAT + 2;
  localparam int unsigned LAT_RT  = 2;
  localparam int unsigned LAT_SP  = 2;
  localparam int unsigned HDR_DLY = LAT_LPM + LAT_CP + LAT_BF + LAT_PHF;
  localparam int unsigned SP_DLY  = HDR_DLY + LAT_RT - LAT_SP;
  // total latency from in_valid to out_valid: HDR_DLY + LAT_RT + 1

  // ---- 1. LPM, one engine per dimension ----------------------------------
  logic [N_DIMS-1:0][31:0] fields;
  assign fields[0] = in_hdr.src_ip;
  assign fields[1] = in_hdr.dst_ip;
  assign fields[2] = {in_hdr.proto, 24'b0};
  assign fields[3] = {in_hdr.src_port, 16'b0};
  assign fields[4] = {in_hdr.dst_port, 16'b0};

  logic [N_DIMS-1:0]                          lpm_valid;
  hit_colors_t [N_DIMS-1:0][N_SUBSETS-1:0]    lpm_hits;

  for (genvar d = 0; d < N_DIMS; d++) begin : g_lpm
    lpm_engine u_lpm (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_en    (lpm_wr.we && (int'(lpm_wr.dim) == d)),
      .wr_idx   (lpm_wr.idx),
      .wr_entry (lpm_wr.entry),
      .in_valid (in_valid),
      .field    (fields[d]),
      .out_valid(lpm_valid[d]),
      .hits     (lpm_hits[d])
    );
  end

  // ---- 2.+3. per subset: color processing and Bloom filter ---------------
  logic [N_SUBSETS-1:0] cp_valid, cp_key_valid, bf_valid, bf_hit;
  key_t [N_SUBSETS-1:0] cp_key, bf_key;

  for (genvar s = 0; s < N_SUBSETS; s++) begin : g_subset
    hit_dims_t sub_hits;
    for (genvar d = 0; d < N_DIMS; d++) begin : g_d
      assign sub_hits[d] = lpm_hits[d][s];
    end

    color_processing u_cp (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (lpm_valid[0]),
      .in_hits  (sub_hits),
      .out_valid(cp_valid[s]),
      .key_valid(cp_key_valid[s]),
      .key      (cp_key[s])
    );

    bloom_filter u_bf (
      .clk         (clk),
      .rst_n       (rst_n),
      .wr_en       (bf_wr.we && (int'(bf_wr.subset) == s)),
      .wr_part     (bf_wr.part),
      .wr_addr     (bf_wr.addr),
      .wr_bit      (bf_wr.bit_val),
      .in_valid    (cp_valid[s]),
      .in_key_valid(cp_key_valid[s]),
      .in_key      (cp_key[s]),
      .out_valid   (bf_valid[s]),
      .hit         (bf_hit[s]),
      .out_key     (bf_key[s])
    );
  end

  // ---- 4. shared perfect hash --------------------------------------------
  logic                phf_valid, phf_ptr_valid;
  logic [SUBSET_W-1:0] phf_subset;
  logic [RT_AW-1:0]    phf_ptr;

  perfect_hash #(.MEM_LAT(MEM_LAT)) u_phf (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (bf_valid[0]),
    .in_hit      (bf_hit),
    .in_key      (bf_key),
    .mem_rd_en   (mem_rd_en),
    .mem_addr_a  (mem_addr_a),
    .mem_addr_b  (mem_addr_b),
    .mem_rd_valid(mem_rd_valid),
    .mem_data_a  (mem_data_a),
    .mem_data_b  (mem_data_b),
    .out_valid   (phf_valid),
    .ptr_valid   (phf_ptr_valid),
    .out_subset  (phf_subset),
    .ptr         (phf_ptr)
  );

  // ---- 5. rule table with the delayed header ------------------------------
  header_t hdr_dly;
  delay_line #(.W($bits(header_t)), .DEPTH(HDR_DLY)) u_hdr_dly (
    .clk(clk), .rst_n(rst_n), .d(in_hdr), .q(hdr_dly)
  );

  logic                 rt_valid, rt_match;
  logic [RULE_NO_W-1:0] rt_rule;
  rule_table u_rt (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en       (rt_wr.we),
    .wr_addr     (rt_wr.addr),
    .wr_rule     (rt_wr.rule),
    .in_valid    (phf_valid),
    .in_ptr_valid(phf_ptr_valid),
    .in_ptr      (phf_ptr),
    .in_hdr      (hdr_dly),
    .out_valid   (rt_valid),
    .match       (rt_match),
    .rule_no     (rt_rule)
  );

  // ---- spoiler branch ----------------------------------------------------
  logic                 sp_valid, sp_match;
  logic [RULE_NO_W-1:0] sp_rule;
  spoiler_tcam u_sp (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (sp_wr.we),
    .wr_idx   (sp_wr.idx),
    .wr_rule  (sp_wr.rule),
    .in_valid (in_valid),
    .in_hdr   (in_hdr),
    .out_valid(sp_valid),
    .match    (sp_match),
    .rule_no  (sp_rule)
  );

  logic                 sp_match_dly;
  logic [RULE_NO_W-1:0] sp_rule_dly;
  delay_line #(.W(1 + RULE_NO_W), .DEPTH(SP_DLY)) u_sp_dly (
    .clk(clk), .rst_n(rst_n), .d({sp_match, sp_rule}), .q({sp_match_dly, sp_rule_dly})
  );

  // ---- 6. priority resolution --------------------------------------------
  priority_resolve u_pr (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (rt_valid),
    .main_match (rt_match),
    .main_rule  (rt_rule),
    .sp_match   (sp_match_dly),
    .sp_rule    (sp_rule_dly),
    .out_valid  (out_valid),
    .out_default(out_default),
    .out_spoiler(out_spoiler),
    .out_rule   (out_rule)
  );

endmodule
