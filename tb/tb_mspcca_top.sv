// tb_mspcca_top: end-to-end test of the classifier at its default sizes.
//
// The testbench plays the rule compiler for a small firewall rule set:
// three subsets with disjoint destination ranges, plus spoiler rules handled
// by the spoiler branch. From the rules it builds
//   - the prefix entries of every dimension, colored by nesting depth
//     (nested prefixes of one subset and dimension get different colors),
//   - the color bitmaps (which colors of dimension d each prefix meets in a
//     rule),
//   - the set of LPM vectors the color filter can output, each with its
//     target rule (the highest-priority rule of the subset whose prefixes
//     all contain the vector's prefixes): the rules and the reduced set of
//     pseudorules,
//   - the Bloom-filter bits of those vectors,
//   - the perfect-hash vertex values, by solving the two-hash graph so that
//     gA[h1(key)] + gB[h2(key)] is the rule-table address of the target,
//   - the rule table (rule n at address n) and the spoiler entries.
// One extra vector with no target is put into one Bloom filter only, to act
// as a Bloom false positive that the rule check must reject.
//
// Packets built around the rules (with random bit flips and fully random
// headers) are sent back to back with a few idle gaps. Each result is
// compared with a brute-force search over all rules, and must arrive exactly
// MEM_LAT + 13 cycles after its packet. The test also counts how often each
// mechanism acted: spoiler wins, main-branch wins, default rule, a vector
// changed by the color filter, a Bloom negative, a Bloom false positive
// rejected by the rule check, and priority resolution with both branches
// matching; each must happen at least once.
module tb_mspcca_top;
  import mspcca_pkg::*;

  localparam int unsigned MEM_LAT = 4;          // top's default
  localparam int unsigned LAT     = MEM_LAT + 13;
  localparam int N_PKTS           = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  lpm_wr_t lpm_wr = '0;
  bf_wr_t  bf_wr  = '0;
  rt_wr_t  rt_wr  = '0;
  sp_wr_t  sp_wr  = '0;
  logic    in_valid = 0;
  header_t in_hdr = '0;
  logic                 mem_rd_en, mem_rd_valid;
  logic [VT_ADDR_W-1:0] mem_addr_a, mem_addr_b;
  logic [VT_DATA_W-1:0] mem_data_a, mem_data_b;
  logic                 out_valid, out_default, out_spoiler;
  logic [RULE_NO_W-1:0] out_rule;

  mspcca_top dut (.*);

  vertex_mem_model #(.MEM_LAT(MEM_LAT)) u_mem (
    .clk(clk), .rd_en(mem_rd_en), .addr_a(mem_addr_a), .addr_b(mem_addr_b),
    .rd_valid(mem_rd_valid), .data_a(mem_data_a), .data_b(mem_data_b)
  );

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // rule set
  // ------------------------------------------------------------------
  typedef struct {
    int          subset;          // -1: spoiler
    logic [31:0] v   [N_DIMS];    // left-aligned prefix per dimension
    int          len [N_DIMS];
  } trule_t;

  trule_t rules [$];

  function automatic void add_rule(int subset,
      logic [31:0] src, int slen, logic [31:0] dst, int dlen,
      int proto, int sp, int splen, int dp, int dplen);
    trule_t r;
    r.subset = subset;
    r.v[0] = src;               r.len[0] = slen;
    r.v[1] = dst;               r.len[1] = dlen;
    r.v[2] = (proto < 0) ? 32'h0 : {8'(proto), 24'h0};
    r.len[2] = (proto < 0) ? 0 : 8;
    r.v[3] = {16'(sp), 16'h0};  r.len[3] = splen;
    r.v[4] = {16'(dp), 16'h0};  r.len[4] = dplen;
    for (int d = 0; d < N_DIMS; d++) r.v[d] = r.v[d] & msk(r.len[d]);
    rules.push_back(r);
  endfunction

  function automatic logic [31:0] msk(int len);
    logic [31:0] m;
    m = '0;
    for (int i = 0; i < len; i++) m[31 - i] = 1'b1;
    return m;
  endfunction

  function automatic logic covers(logic [31:0] pv, int pl, logic [31:0] qv, int ql);
    return (pl <= ql) && (((pv ^ qv) & msk(pl)) == 0);
  endfunction

  function automatic logic [31:0] field_of(header_t h, int d);
    case (d)
      0: return h.src_ip;
      1: return h.dst_ip;
      2: return {h.proto, 24'h0};
      3: return {h.src_port, 16'h0};
      default: return {h.dst_port, 16'h0};
    endcase
  endfunction

  // brute-force reference: lowest-numbered matching rule
  function automatic int ref_classify(header_t h);
    foreach (rules[r]) begin
      bit ok;
      ok = 1;
      for (int d = 0; d < N_DIMS; d++)
        if (((field_of(h, d) ^ rules[r].v[d]) & msk(rules[r].len[d])) != 0) ok = 0;
      if (ok) return r;
    end
    return -1;
  endfunction

  // ------------------------------------------------------------------
  // compiled structures
  // ------------------------------------------------------------------
  logic [31:0] pv  [N_SUBSETS][N_DIMS][$];
  int          pl  [N_SUBSETS][N_DIMS][$];
  int          pcol[N_SUBSETS][N_DIMS][$];
  int          pid [N_SUBSETS][N_DIMS][$];
  bitmap_t     pbm [N_SUBSETS][N_DIMS][$];
  int          rp  [$][N_DIMS];            // rule -> prefix index
  int          next_id [N_DIMS];

  int          key_target [logic [SUBSET_W+KEY_W-1:0]];
  logic        bf_bits [N_SUBSETS][BF_K][2**BF_PART_AW];
  logic [15:0] g [2**VT_ADDR_W];
  logic        g_set [2**VT_ADDR_W];

  // H3 hash, written out from its definition (xorshift-generated rows)
  function automatic logic [15:0] tb_h3(key_t key, logic [31:0] seed);
    logic [31:0] s;
    logic [15:0] h;
    s = seed | 32'h1;
    h = 0;
    for (int d = 0; d < N_DIMS; d++)
      for (int b = 0; b < ID_W; b++) begin
        s = s ^ (s << 13);
        s = s ^ (s >> 17);
        s = s ^ (s << 5);
        if (key[d][b]) h = h ^ s[15:0];
      end
    return h;
  endfunction

  // color filter model on the chains below the longest matches `lm`
  // (indices into the subset's prefix lists). Returns 0 if some dimension
  // has no survivor.
  function automatic bit filter_model(int s, int lm [N_DIMS], output int out [N_DIMS]);
    for (int d = 0; d < N_DIMS; d++) begin
      logic [N_COLORS-1:0] allowed;
      int best;
      best = -1;
      allowed = '1;
      for (int e = 0; e < N_DIMS; e++) begin
        logic [N_COLORS-1:0] av;
        if (e == d) continue;
        av = '0;
        foreach (pv[s][e][i])
          if (covers(pv[s][e][i], pl[s][e][i], pv[s][e][lm[e]], pl[s][e][lm[e]]))
            av |= pbm[s][e][i][d];
        allowed &= av;
      end
      foreach (pv[s][d][i])
        if (covers(pv[s][d][i], pl[s][d][i], pv[s][d][lm[d]], pl[s][d][lm[d]])
            && allowed[pcol[s][d][i]]
            && (best < 0 || pl[s][d][i] > pl[s][d][best]))
          best = i;
      if (best < 0) return 0;
      out[d] = best;
    end
    return 1;
  endfunction

  function automatic int target_of(int s, int out [N_DIMS]);
    foreach (rules[r]) begin
      bit ok;
      if (rules[r].subset != s) continue;
      ok = 1;
      for (int d = 0; d < N_DIMS; d++)
        if (!covers(pv[s][d][rp[r][d]], pl[s][d][rp[r][d]],
                    pv[s][d][out[d]], pl[s][d][out[d]])) ok = 0;
      if (ok) return r;
    end
    return -1;
  endfunction

  function automatic key_t key_of(int s, int out [N_DIMS]);
    key_t k;
    for (int d = 0; d < N_DIMS; d++) k[d] = ID_W'(pid[s][d][out[d]]);
    return k;
  endfunction

  int          decoy_s = -1;
  key_t        decoy_key;
  int          decoy_lm [N_DIMS];
  int          n_keys = 0;

  task automatic compile_rules();
    // prefixes per subset and dimension
    foreach (rules[r]) begin
      int idx [N_DIMS];
      int s;
      s = rules[r].subset;
      if (s < 0) begin
        for (int d = 0; d < N_DIMS; d++) idx[d] = -1;
      end else begin
        for (int d = 0; d < N_DIMS; d++) begin
          idx[d] = -1;
          foreach (pv[s][d][i])
            if (pv[s][d][i] == rules[r].v[d] && pl[s][d][i] == rules[r].len[d]) idx[d] = i;
          if (idx[d] < 0) begin
            pv[s][d].push_back(rules[r].v[d]);
            pl[s][d].push_back(rules[r].len[d]);
            pbm[s][d].push_back('0);
            pid[s][d].push_back(next_id[d]);
            next_id[d] = next_id[d] + 1;
            idx[d] = pv[s][d].size() - 1;
          end
        end
      end
      rp.push_back(idx);
    end
    // colors: nesting depth
    for (int s = 0; s < N_SUBSETS; s++)
      for (int d = 0; d < N_DIMS; d++)
        foreach (pv[s][d][i]) begin
          int depth;
          depth = 0;
          foreach (pv[s][d][j])
            if (j != i && covers(pv[s][d][j], pl[s][d][j], pv[s][d][i], pl[s][d][i])) depth++;
          pcol[s][d].push_back(depth);
          if (depth >= N_COLORS) $fatal(1, "too many nested prefixes");
        end
    // bitmaps
    foreach (rules[r]) begin
      int s;
      s = rules[r].subset;
      if (s < 0) continue;
      for (int e = 0; e < N_DIMS; e++)
        for (int d = 0; d < N_DIMS; d++)
          if (d != e) begin
            bitmap_t bm = pbm[s][e][rp[r][e]];
            bm[d][pcol[s][d][rp[r][d]]] = 1'b1;
            pbm[s][e][rp[r][e]] = bm;
          end
    end
    // reachable vectors and their targets
    for (int s = 0; s < N_SUBSETS; s++) begin
      int total;
      total = 1;
      for (int d = 0; d < N_DIMS; d++) total *= pv[s][d].size();
      for (int n = 0; n < total; n++) begin
        int lm [N_DIMS];
        int out [N_DIMS];
        int rem;
        rem = n;
        for (int d = 0; d < N_DIMS; d++) begin
          lm[d] = rem % pv[s][d].size();
          rem   = rem / pv[s][d].size();
        end
        if (filter_model(s, lm, out)) begin
          int t;
          key_t k;
          t = target_of(s, out);
          k = key_of(s, out);
          if (t >= 0) begin
            if (!key_target.exists({SUBSET_W'(s), k})) n_keys++;
            key_target[{SUBSET_W'(s), k}] = t;
          end else if (decoy_s < 0) begin
            decoy_s = s; decoy_key = k; decoy_lm = lm;
          end
        end
      end
    end
  endtask

  task automatic build_tables();
    // Bloom bits
    foreach (bf_bits[s, k, a]) bf_bits[s][k][a] = 1'b0;
    foreach (key_target[kk]) begin
      int s;
      key_t k;
      s = int'(kk[SUBSET_W+KEY_W-1:KEY_W]);
      k = kk[KEY_W-1:0];
      for (int p = 0; p < BF_K; p++)
        bf_bits[s][p][tb_h3(k, 32'h9E37_79B9 + 32'h0101_2345 * p) % (2**BF_PART_AW)] = 1'b1;
    end
    if (decoy_s >= 0)
      for (int p = 0; p < BF_K; p++)
        bf_bits[decoy_s][p][tb_h3(decoy_key, 32'h9E37_79B9 + 32'h0101_2345 * p) % (2**BF_PART_AW)] = 1'b1;
    // perfect hash: solve the acyclic graph, one component at a time
    foreach (g[i]) begin g[i] = 0; g_set[i] = 0; end
    begin
      int ea [$], eb [$], et [$];
      bit done [$];
      int left;
      foreach (key_target[kk]) begin
        int s;
        key_t k;
        s = int'(kk[SUBSET_W+KEY_W-1:KEY_W]);
        k = kk[KEY_W-1:0];
        ea.push_back((s << (VT_AW + 1)) | (0 << VT_AW) | (tb_h3(k, 32'h2545_F491) % (2**VT_AW)));
        eb.push_back((s << (VT_AW + 1)) | (1 << VT_AW) | (tb_h3(k, 32'h6C07_8965) % (2**VT_AW)));
        et.push_back(key_target[kk]);
        done.push_back(0);
      end
      left = ea.size();
      while (left > 0) begin
        bit progress;
        progress = 0;
        foreach (ea[i]) begin
          if (done[i]) continue;
          if (g_set[ea[i]] && g_set[eb[i]]) begin
            checks++;
            if (16'(g[ea[i]] + g[eb[i]]) != 16'(et[i])) begin
              failures++;
              $display("perfect hash graph has a cycle; change the seeds");
            end
            done[i] = 1; left--; progress = 1;
          end else if (g_set[ea[i]]) begin
            g[eb[i]] = 16'(et[i]) - g[ea[i]]; g_set[eb[i]] = 1;
            done[i] = 1; left--; progress = 1;
          end else if (g_set[eb[i]]) begin
            g[ea[i]] = 16'(et[i]) - g[eb[i]]; g_set[ea[i]] = 1;
            done[i] = 1; left--; progress = 1;
          end
        end
        if (!progress) begin
          // start a new component at the first open edge
          foreach (ea[i]) if (!done[i]) begin
            g[ea[i]] = 0; g_set[ea[i]] = 1;
            break;
          end
        end
      end
    end
    foreach (g[i]) u_mem.mem[i] = g[i];
  endtask

  // ------------------------------------------------------------------
  // loading through the configuration ports
  // ------------------------------------------------------------------
  task automatic load_lpm();
    for (int s = 0; s < N_SUBSETS; s++)
      for (int d = 0; d < N_DIMS; d++)
        foreach (pv[s][d][i]) begin
          @(negedge clk);
          lpm_wr.we  = 1;
          lpm_wr.dim = 3'(d);
          lpm_wr.idx = ID_W'(pid[s][d][i]);
          lpm_wr.entry = '{valid: 1'b1, value: pv[s][d][i], len: LEN_W'(pl[s][d][i]),
                           subset: SUBSET_W'(s), color: COLOR_W'(pcol[s][d][i]),
                           bitmap: pbm[s][d][i]};
        end
    @(negedge clk);
    lpm_wr = '0;
  endtask

  task automatic load_bloom();
    for (int s = 0; s < N_SUBSETS; s++)
      for (int p = 0; p < BF_K; p++)
        for (int a = 0; a < 2**BF_PART_AW; a++) begin
          @(negedge clk);
          bf_wr = '{we: 1'b1, subset: SUBSET_W'(s), part: 3'(p),
                    addr: BF_PART_AW'(a), bit_val: bf_bits[s][p][a]};
        end
    @(negedge clk);
    bf_wr = '0;
  endtask

  function automatic rule_t to_rule(int r);
    rule_t x;
    x.valid     = 1'b1;
    x.src_ip    = rules[r].v[0];  x.src_len = LEN_W'(rules[r].len[0]);
    x.dst_ip    = rules[r].v[1];  x.dst_len = LEN_W'(rules[r].len[1]);
    x.proto     = rules[r].v[2][31:24];
    x.proto_any = (rules[r].len[2] == 0);
    x.sport_lo  = rules[r].v[3][31:16];
    x.sport_hi  = rules[r].v[3][31:16] | ~msk(rules[r].len[3])[31:16];
    x.dport_lo  = rules[r].v[4][31:16];
    x.dport_hi  = rules[r].v[4][31:16] | ~msk(rules[r].len[4])[31:16];
    x.rule_no   = RULE_NO_W'(r);
    return x;
  endfunction

  task automatic load_rules();
    int n_sp = 0;
    for (int a = 0; a < RT_DEPTH; a++) begin
      @(negedge clk);
      rt_wr.we   = 1;
      rt_wr.addr = RT_AW'(a);
      rt_wr.rule = (a < rules.size() && rules[a].subset >= 0) ? to_rule(a) : '0;
    end
    @(negedge clk);
    rt_wr = '0;
    foreach (rules[r]) if (rules[r].subset < 0) begin
      @(negedge clk);
      sp_wr = '{we: 1'b1, idx: 3'(n_sp), rule: to_rule(r)};
      n_sp++;
    end
    @(negedge clk);
    sp_wr = '0;
  endtask

  // ------------------------------------------------------------------
  // traffic and checking
  // ------------------------------------------------------------------
  typedef struct { int r; int cyc; } exp_t;
  exp_t exp_q [$];
  int sent = 0, got = 0;
  int n_spoiler = 0, n_main = 0, n_default = 0, n_filtered = 0, n_both = 0;
  int n_bf_neg = 0, n_fp_rejected = 0;

  function automatic header_t pkt_from_prefixes(logic [31:0] v [N_DIMS], int len [N_DIMS]);
    logic [31:0] f [N_DIMS];
    header_t h;
    for (int d = 0; d < N_DIMS; d++)
      f[d] = (v[d] & msk(len[d])) | ($urandom & ~msk(len[d]));
    h.src_ip = f[0]; h.dst_ip = f[1]; h.proto = f[2][31:24];
    h.src_port = f[3][31:16]; h.dst_port = f[4][31:16];
    return h;
  endfunction

  function automatic header_t make_packet();
    header_t h;
    int pick;
    pick = $urandom_range(0, 99);
    if (pick < 10) begin
      h = {$urandom, $urandom, $urandom, $urandom};
    end else if (pick < 20) begin
      // a packet inside one main-branch rule and one spoiler at once
      logic [31:0] v [N_DIMS];
      int len [N_DIMS];
      int r1, r2;
      do r1 = $urandom_range(0, rules.size() - 1); while (rules[r1].subset < 0);
      do r2 = $urandom_range(0, rules.size() - 1); while (rules[r2].subset >= 0);
      for (int d = 0; d < N_DIMS; d++)
        if (rules[r2].len[d] > rules[r1].len[d]
            && covers(rules[r1].v[d], rules[r1].len[d], rules[r2].v[d], rules[r2].len[d])) begin
          v[d] = rules[r2].v[d]; len[d] = rules[r2].len[d];
        end else begin
          v[d] = rules[r1].v[d]; len[d] = rules[r1].len[d];
        end
      h = pkt_from_prefixes(v, len);
    end else if (pick < 28 && decoy_s >= 0) begin
      logic [31:0] v [N_DIMS];
      int len [N_DIMS];
      for (int d = 0; d < N_DIMS; d++) begin
        v[d] = pv[decoy_s][d][decoy_lm[d]]; len[d] = pl[decoy_s][d][decoy_lm[d]];
      end
      h = pkt_from_prefixes(v, len);
    end else begin
      int r;
      r = $urandom_range(0, rules.size() - 1);
      h = pkt_from_prefixes(rules[r].v, rules[r].len);
      if ($urandom_range(0, 3) == 0) begin
        logic [103:0] b;
        b = h;
        b[$urandom_range(0, 103)] ^= 1'b1;
        h = b;
      end
    end
    return h;
  endfunction

  // does the color filter change the plain LPM vector of this packet?
  function automatic bit filter_changes(header_t h);
    for (int s = 0; s < N_SUBSETS; s++) begin
      int lm [N_DIMS];
      int out [N_DIMS];
      bit all;
      all = 1;
      for (int d = 0; d < N_DIMS; d++) begin
        lm[d] = -1;
        foreach (pv[s][d][i])
          if (((field_of(h, d) ^ pv[s][d][i]) & msk(pl[s][d][i])) == 0
              && (lm[d] < 0 || pl[s][d][i] > pl[s][d][lm[d]])) lm[d] = i;
        if (lm[d] < 0) all = 0;
      end
      if (all && filter_model(s, lm, out))
        for (int d = 0; d < N_DIMS; d++) if (out[d] != lm[d]) return 1;
    end
    return 0;
  endfunction

  // internal observation of the Bloom filters and the rule check
  logic prev_ptr_valid = 0;
  always @(posedge clk) prev_ptr_valid <= dut.u_rt.s1_pv;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < N_SUBSETS; s++)
        if (dut.cp_valid[s] && dut.cp_key_valid[s] && !key_target.exists({SUBSET_W'(s), dut.cp_key[s]})
            && !(s == decoy_s && dut.cp_key[s] == decoy_key))
          n_bf_neg++;   // a vector that is not stored: Bloom must say no
      if (dut.rt_valid && dut.u_rt.out_valid && !dut.rt_match && prev_ptr_valid) n_fp_rejected++;
      if (dut.u_pr.in_valid && dut.u_pr.main_match && dut.u_pr.sp_match) n_both++;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      logic [RULE_NO_W-1:0] want;
      e = exp_q.pop_front();
      want = (e.r < 0) ? DEFAULT_RULE : RULE_NO_W'(e.r);
      checks++;
      if (out_rule !== want) begin
        failures++;
        $display("packet %0d: rule %0d, expected %0d", got, out_rule, want);
      end
      checks++;
      if (out_default !== (e.r < 0) || out_spoiler !== (e.r >= 0 && rules[e.r].subset < 0)) begin
        failures++;
        $display("packet %0d: flags default=%0b spoiler=%0b wrong", got, out_default, out_spoiler);
      end
      checks++;
      if (cyc - e.cyc != LAT) begin
        failures++;
        $display("packet %0d: latency %0d, expected %0d", got, cyc - e.cyc, LAT);
      end
      if (e.r < 0) n_default++;
      else if (rules[e.r].subset < 0) n_spoiler++;
      else n_main++;
      got++;
    end
  end

  initial begin
    int t0, busy;
    // rule set: rule number = priority (0 highest)
    add_rule(-1, 32'h4200_0000,  8, 32'h0,          0,  6, 0, 0,   22, 16); // 0 spoiler
    add_rule( 0, 32'h0102_0000, 16, 32'h0A01_0000, 16,  6, 0, 0,   80, 16); // 1
    add_rule( 0, 32'h0,          0, 32'h0A01_0200, 24, 17, 0, 0,   53, 16); // 2
    add_rule( 0, 32'h0100_0000,  8, 32'h0A00_0000,  8, -1, 0, 0,    0,  0); // 3
    add_rule( 1, 32'h0505_0500, 24, 32'hC0A8_0100, 24,  6, 1024, 6, 443, 16); // 4
    add_rule( 1, 32'h0,          0, 32'hC0A8_0000, 16,  1, 0, 0,    0,  0); // 5
    add_rule( 1, 32'h0505_0000, 16, 32'hC0A8_0000, 16,  6, 0, 0,    0,  0); // 6
    add_rule(-1, 32'h0,          0, 32'h0,          0, 17, 0, 0,  123, 16); // 7 spoiler
    add_rule( 2, 32'h0909_0909, 32, 32'hAC10_0000, 12,  6, 0, 0, 8080, 16); // 8
    add_rule( 2, 32'h0900_0000,  8, 32'hAC10_0500, 24, -1, 0, 0,    0,  0); // 9
    add_rule( 0, 32'h0,          0, 32'h0A00_0000,  8,  6, 0, 0,    0,  6); // 10
    add_rule(-1, 32'h0102_0304, 32, 32'h0,          0, -1, 0, 0,    0,  0); // 11 spoiler
    add_rule( 2, 32'h0909_0000, 16, 32'hAC10_0000, 12, 17, 0, 0,    0,  0); // 12
    add_rule( 1, 32'h0505_0500, 24, 32'hC0A8_0000, 16, -1, 0, 0,    0,  0); // 13
    add_rule( 0, 32'h4200_0000,  8, 32'h0A00_0000,  8,  6, 0, 0,   22, 16); // 14
    add_rule(-1, 32'h0900_0000,  8, 32'h0,          0, -1, 0, 0,    0,  0); // 15 spoiler

    compile_rules();
    build_tables();
    $display("keys (rules + pseudorules) = %0d, decoy subset = %0d", n_keys, decoy_s);

    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      load_lpm();
      load_bloom();
      load_rules();
    join
    repeat (5) @(negedge clk);

    t0 = cyc;
    busy = 0;
    for (int p = 0; p < N_PKTS; p++) begin
      header_t h;
      h = make_packet();
      if (filter_changes(h)) n_filtered++;
      @(negedge clk);
      if ($urandom_range(0, 49) == 0) begin   // an idle cycle now and then
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_hdr   = h;
      exp_q.push_back('{r: ref_classify(h), cyc: cyc});
      sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 5) @(posedge clk);

    checks++;
    if (got != sent) begin
      failures++;
      $display("sent %0d packets, got %0d results", sent, got);
    end
    $display("mechanisms: spoiler=%0d main=%0d default=%0d color_filter=%0d bloom_negative=%0d fp_rejected=%0d both_branches=%0d",
             n_spoiler, n_main, n_default, n_filtered, n_bf_neg, n_fp_rejected, n_both);
    checks++; if (n_spoiler == 0)     begin failures++; $display("spoiler branch never won"); end
    checks++; if (n_main == 0)        begin failures++; $display("main branch never won"); end
    checks++; if (n_default == 0)     begin failures++; $display("default rule never used"); end
    checks++; if (n_filtered == 0)    begin failures++; $display("color filter never acted"); end
    checks++; if (n_bf_neg == 0)      begin failures++; $display("no Bloom negative"); end
    checks++; if (n_fp_rejected == 0) begin failures++; $display("no false positive rejected"); end
    checks++; if (n_both == 0)        begin failures++; $display("never both branches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
