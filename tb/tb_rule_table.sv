// tb_rule_table: self-checking test of rule_table and, through the same
// checks, of spoiler_tcam's rule format. All 2048 entries are written with
// random rules; lookups use random pointers with headers built inside the
// addressed rule (possibly with one bit flipped) or random. The expected
// match is computed here from the rule fields with shift and compare
// arithmetic. Also checks that no pointer gives no match and the 2-cycle
// latency.
module tb_rule_table;
  import mspcca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             wr_en = 0;
  logic [RT_AW-1:0] wr_addr = '0;
  rule_t            wr_rule = '0;
  logic             in_valid = 0, in_ptr_valid = 0;
  logic [RT_AW-1:0] in_ptr = '0;
  header_t          in_hdr = '0;
  logic             out_valid, match;
  logic [RULE_NO_W-1:0] rule_no;

  rule_table dut (.*);

  rule_t tab [RT_DEPTH];

  function automatic rule_t rand_rule(int n);
    rule_t r;
    r.valid    = ($urandom_range(0, 15) != 0);
    r.src_len  = LEN_W'($urandom_range(0, 32));
    r.dst_len  = LEN_W'($urandom_range(0, 32));
    r.src_ip   = $urandom;
    r.dst_ip   = $urandom;
    r.proto    = 8'($urandom);
    r.proto_any = $urandom_range(0, 1);
    r.sport_lo = 16'($urandom_range(0, 30000));
    r.sport_hi = r.sport_lo + 16'($urandom_range(0, 30000));
    r.dport_lo = 16'($urandom_range(0, 30000));
    r.dport_hi = r.dport_lo + 16'($urandom_range(0, 30000));
    r.rule_no  = RULE_NO_W'(n);
    return r;
  endfunction

  function automatic bit pfx_ok(logic [31:0] v, logic [31:0] p, int len);
    if (len == 0) return 1;
    return (v >> (32 - len)) == (p >> (32 - len));
  endfunction

  function automatic bit ref_match(rule_t r, header_t h);
    return r.valid && pfx_ok(h.src_ip, r.src_ip, int'(r.src_len))
        && pfx_ok(h.dst_ip, r.dst_ip, int'(r.dst_len))
        && (r.proto_any || r.proto == h.proto)
        && h.src_port inside {[r.sport_lo:r.sport_hi]}
        && h.dst_port inside {[r.dport_lo:r.dport_hi]};
  endfunction

  function automatic header_t inside_rule(rule_t r);
    header_t h;
    h.src_ip   = pfx_keep(r.src_ip, int'(r.src_len));
    h.dst_ip   = pfx_keep(r.dst_ip, int'(r.dst_len));
    h.proto    = r.proto_any ? 8'($urandom) : r.proto;
    h.src_port = 16'($urandom_range(int'(r.sport_lo), int'(r.sport_hi)));
    h.dst_port = 16'($urandom_range(int'(r.dport_lo), int'(r.dport_hi)));
    return h;
  endfunction

  function automatic logic [31:0] pfx_keep(logic [31:0] p, int len);
    logic [31:0] r;
    r = $urandom;
    for (int i = 0; i < len; i++) r[31 - i] = p[31 - i];
    return r;
  endfunction

  typedef struct { bit m; int n; int cyc; } exp_t;
  exp_t exp_q [$];
  int cyc = 0, got = 0, sent = 0, n_match = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (match !== e.m || (e.m && int'(rule_no) != e.n)) begin
        failures++;
        $display("lookup %0d: match=%0b rule=%0d, expected %0b %0d", got, match, rule_no, e.m, e.n);
      end
      checks++;
      if (cyc - e.cyc != 2) failures++;
      if (match) n_match++;
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < RT_DEPTH; a++) begin
      tab[a] = rand_rule(a + 100);
      @(negedge clk);
      wr_en = 1; wr_addr = RT_AW'(a); wr_rule = tab[a];
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 600; t++) begin
      exp_t e;
      header_t h;
      int p;
      bit pv;
      p  = $urandom_range(0, RT_DEPTH - 1);
      pv = ($urandom_range(0, 9) != 0);
      h  = inside_rule(tab[p]);
      if ($urandom_range(0, 3) == 0) begin
        logic [103:0] b;
        b = h;
        b[$urandom_range(0, 103)] ^= 1'b1;
        h = b;
      end
      if ($urandom_range(0, 9) == 0) h = {$urandom, $urandom, $urandom, $urandom};
      e.m = pv && ref_match(tab[p], h);
      e.n = tab[p].rule_no;
      @(negedge clk);
      in_valid = 1; in_ptr_valid = pv; in_ptr = RT_AW'(p); in_hdr = h;
      e.cyc = cyc;
      exp_q.push_back(e);
      sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent || n_match < 100 || n_match > sent - 50) begin
      failures++;
      $display("sent %0d got %0d matched %0d", sent, got, n_match);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
