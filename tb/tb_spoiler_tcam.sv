// tb_spoiler_tcam: self-checking test of spoiler_tcam. Eight broad rules with
// scrambled rule numbers are loaded; headers are built inside one of them
// (so that several entries often match at once), flipped by one bit or fully
// random. The expected answer, the lowest matching rule number, comes from a
// search written here with shift/compare arithmetic. Checks the 2-cycle
// latency and that multi-entry matches occurred.
module tb_spoiler_tcam;
  import mspcca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       wr_en = 0;
  logic [2:0] wr_idx = '0;
  rule_t      wr_rule = '0;
  logic       in_valid = 0;
  header_t    in_hdr = '0;
  logic       out_valid, match;
  logic [RULE_NO_W-1:0] rule_no;

  spoiler_tcam dut (.*);

  rule_t sp [N_SPOILERS];

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

  typedef struct { bit m; int n; int cyc; } exp_t;
  exp_t exp_q [$];
  int cyc = 0, got = 0, sent = 0, n_multi = 0, n_match = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
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
    int nos [N_SPOILERS];
    nos = '{40, 7, 300, 12, 5, 90, 61, 2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_SPOILERS; i++) begin
      sp[i].valid = 1;
      sp[i].src_ip = {8'(i % 3 + 1), 24'($urandom)};   sp[i].src_len = LEN_W'((i % 2) * 8);
      sp[i].dst_ip = {8'(10), 24'($urandom)};          sp[i].dst_len = LEN_W'((i % 4 == 0) ? 0 : 8);
      sp[i].proto = (i % 3 == 0) ? 8'd17 : 8'd6;       sp[i].proto_any = (i % 4 == 3);
      sp[i].sport_lo = 0;                              sp[i].sport_hi = 16'hFFFF;
      sp[i].dport_lo = 16'(i * 10);                    sp[i].dport_hi = 16'(i * 10 + 40);
      sp[i].rule_no = RULE_NO_W'(nos[i]);
      @(negedge clk);
      wr_en = 1; wr_idx = 3'(i); wr_rule = sp[i];
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      exp_t e;
      header_t h;
      int k, cnt;
      k = $urandom_range(0, N_SPOILERS - 1);
      h = {$urandom, $urandom, $urandom, $urandom};
      if (sp[k].src_len != 0) h.src_ip[31:24] = sp[k].src_ip[31:24];
      if (sp[k].dst_len != 0) h.dst_ip[31:24] = sp[k].dst_ip[31:24];
      if (!sp[k].proto_any) h.proto = sp[k].proto;
      h.dst_port = 16'($urandom_range(int'(sp[k].dport_lo), int'(sp[k].dport_hi)));
      if ($urandom_range(0, 4) == 0) h.dst_port[$urandom_range(0, 15)] ^= 1'b1;
      if ($urandom_range(0, 9) == 0) h = {$urandom, $urandom, $urandom, $urandom};
      e.m = 0; e.n = 0; cnt = 0;
      for (int i = 0; i < N_SPOILERS; i++)
        if (ref_match(sp[i], h)) begin
          cnt++;
          if (!e.m || int'(sp[i].rule_no) < e.n) e.n = int'(sp[i].rule_no);
          e.m = 1;
        end
      if (cnt > 1) n_multi++;
      @(negedge clk);
      in_valid = 1; in_hdr = h;
      e.cyc = cyc;
      exp_q.push_back(e);
      sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent || n_multi == 0 || n_match == sent) begin
      failures++;
      $display("sent %0d got %0d multi %0d matched %0d", sent, got, n_multi, n_match);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
