// color_processing: prefix-color filtering for one subset.
//
// Input: for every dimension d and color c, the matching prefix of that color
// (if any) with its bitmaps. A prefix P of dimension e carries, for every
// other dimension d, a bitmap whose bit c says that P appears in some rule
// together with a prefix of color c in dimension d.
//
// The filter computes, for each dimension d,
//   allowed[d] = AND over e != d of ( OR over matching P in e of P.bitmap[d] )
// and drops every matching prefix of d whose color is not allowed: no rule
// can combine it with the prefixes found in the other dimensions. Of the
// surviving prefixes the longest one is chosen; the chosen ids form the LPM
// vector. If some dimension has no surviving prefix, no rule of this subset
// can match and key_valid stays low.
//
// Timing: four register stages (input, per-dimension OR, AND and mask,
// longest selection), so the result appears four cycles after the input,
// one vector per cycle. The four-cycle latency and the AND/OR filtering
// follow the document; the exact split into stages is this design's choice.
module color_processing
  import mspcca_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  hit_dims_t in_hits,
  output logic      out_valid,   // packet slot
  output logic      key_valid,   // an LPM vector exists for this subset
  output key_t      key
);

  // stage 1: input register
  logic      s1_valid;
  hit_dims_t s1_hits;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_hits  <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_hits  <= in_hits;
    end
  end

  // stage 2: avail[d][e] = colors of dimension d that dimension e allows
  logic [N_DIMS-1:0][N_DIMS-1:0][N_COLORS-1:0] avail_d, s2_avail;
  logic      s2_valid;
  hit_dims_t s2_hits;
  always_comb begin
    avail_d = '0;
    for (int d = 0; d < N_DIMS; d++)
      for (int e = 0; e < N_DIMS; e++)
        for (int c = 0; c < N_COLORS; c++)
          if (s1_hits[e][c].valid)
            avail_d[d][e] = avail_d[d][e] | s1_hits[e][c].bitmap[d];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_avail <= '0;
      s2_hits  <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_avail <= avail_d;
      s2_hits  <= s1_hits;
    end
  end

  // stage 3: candidates = matching prefixes whose color every other
  // dimension allows
  logic [N_DIMS-1:0][N_COLORS-1:0] cand_d, s3_cand;
  logic      s3_valid;
  hit_dims_t s3_hits;
  always_comb begin
    for (int d = 0; d < N_DIMS; d++) begin
      logic [N_COLORS-1:0] allowed;
      allowed = '1;
      for (int e = 0; e < N_DIMS; e++)
        if (e != d) allowed = allowed & s2_avail[d][e];
      for (int c = 0; c < N_COLORS; c++)
        cand_d[d][c] = s2_hits[d][c].valid & allowed[c];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0;
      s3_cand  <= '0;
      s3_hits  <= '0;
    end else begin
      s3_valid <= s2_valid;
      s3_cand  <= cand_d;
      s3_hits  <= s2_hits;
    end
  end

  // stage 4: longest surviving prefix per dimension
  key_t              key_d;
  logic [N_DIMS-1:0] dim_ok;
  always_comb begin
    for (int d = 0; d < N_DIMS; d++) begin
      logic [LEN_W-1:0] best_len;
      best_len  = '0;
      dim_ok[d] = 1'b0;
      key_d[d]  = '0;
      for (int c = 0; c < N_COLORS; c++) begin
        if (s3_cand[d][c] && (!dim_ok[d] || s3_hits[d][c].len > best_len)) begin
          dim_ok[d] = 1'b1;
          best_len  = s3_hits[d][c].len;
          key_d[d]  = s3_hits[d][c].id;
        end
      end
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      key_valid <= 1'b0;
      key       <= '0;
    end else begin
      out_valid <= s3_valid;
      key_valid <= s3_valid & (&dim_ok);
      key       <= key_d;
    end
  end

endmodule
