// tb_bloom_filter: self-checking test of bloom_filter.
// The testbench clears the filter, inserts 150 random LPM vectors (setting
// the K hashed bits of each, computed here from the H3 definition), then
// queries the inserted vectors (all must be positive), 400 random vectors
// (the answer must equal the testbench's own bit-array model, and the
// false-positive count must stay small), and vectors marked invalid (must be
// negative). The 2-cycle latency is checked for every query.
module tb_bloom_filter;
  import mspcca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    wr_en = 0;
  logic [2:0]              wr_part = '0;
  logic [BF_PART_AW-1:0]   wr_addr = '0;
  logic                    wr_bit = 0;
  logic                    in_valid = 0, in_key_valid = 0;
  key_t                    in_key = '0;
  logic                    out_valid, hit;
  key_t                    out_key;

  bloom_filter dut (.*);

  logic model [BF_K][2**BF_PART_AW];
  key_t inserted [$];

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

  function automatic int addr_of(key_t k, int p);
    return int'(tb_h3(k, 32'h9E37_79B9 + 32'h0101_2345 * p) % (2**BF_PART_AW));
  endfunction

  function automatic logic model_query(key_t k);
    for (int p = 0; p < BF_K; p++) if (!model[p][addr_of(k, p)]) return 1'b0;
    return 1'b1;
  endfunction

  typedef struct { logic h; key_t k; int cyc; bit member; } exp_t;
  exp_t exp_q [$];
  int cyc = 0, fp = 0, n_rand = 0, n_neg = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (hit !== e.h || out_key !== e.k) begin
        failures++;
        $display("query %h: hit=%0b expected %0b", e.k, hit, e.h);
      end
      checks++;
      if (cyc - e.cyc != 2) begin
        failures++;
        $display("latency %0d", cyc - e.cyc);
      end
      if (!e.member && hit) fp++;
      if (!hit) n_neg++;
    end
  end

  task automatic query(key_t k, logic kv, bit member);
    exp_t e;
    @(negedge clk);
    in_valid = 1; in_key_valid = kv; in_key = k;
    e.h = kv && model_query(k);
    e.k = k; e.cyc = cyc; e.member = member;
    exp_q.push_back(e);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear
    for (int p = 0; p < BF_K; p++)
      for (int a = 0; a < 2**BF_PART_AW; a++) begin
        @(negedge clk);
        wr_en = 1; wr_part = 3'(p); wr_addr = BF_PART_AW'(a); wr_bit = 0;
        model[p][a] = 0;
      end
    // insert
    for (int i = 0; i < 150; i++) begin
      key_t k;
      k = key_t'({$urandom, $urandom});
      inserted.push_back(k);
      for (int p = 0; p < BF_K; p++) begin
        @(negedge clk);
        wr_en = 1; wr_part = 3'(p); wr_addr = BF_PART_AW'(addr_of(k, p)); wr_bit = 1;
        model[p][addr_of(k, p)] = 1;
      end
    end
    @(negedge clk);
    wr_en = 0;
    // members: must all hit
    foreach (inserted[i]) begin
      query(inserted[i], 1'b1, 1'b1);
      checks++;
      if (!model_query(inserted[i])) failures++;
    end
    // random non-members
    for (int i = 0; i < 400; i++) begin
      key_t k;
      k = key_t'({$urandom, $urandom});
      query(k, 1'b1, 1'b0);
      n_rand++;
    end
    // invalid vectors never hit
    foreach (inserted[i]) if (i < 20) query(inserted[i], 1'b0, 1'b0);
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    checks++;
    if (fp > 10 || n_neg < 400) begin
      failures++;
      $display("false positives %0d of %0d, negatives %0d", fp, n_rand, n_neg);
    end
    $display("false positives %0d of %0d random queries", fp, n_rand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
