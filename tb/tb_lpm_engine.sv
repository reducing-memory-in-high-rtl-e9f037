// tb_lpm_engine: self-checking test of lpm_engine.
// Each subset gets a chain of eight nested prefixes (one per color) around a
// random base value. Query fields are the base with one random bit flipped
// (or no flip), so a known subset of the chain matches. The expected hits are
// computed here with shift arithmetic, independently of the engine's mask
// logic. Lookups are issued back to back; the 2-cycle latency is checked.
module tb_lpm_engine;
  import mspcca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                        wr_en = 0;
  logic [ID_W-1:0]             wr_idx = '0;
  lpm_entry_t                  wr_entry = '0;
  logic                        in_valid = 0;
  logic [31:0]                 field = '0;
  logic                        out_valid;
  hit_colors_t [N_SUBSETS-1:0] hits;

  lpm_engine dut (.*);

  lpm_entry_t  ref_tab [N_SUBSETS][N_COLORS];
  int          ref_idx [N_SUBSETS][N_COLORS];
  logic [31:0] base [N_SUBSETS];

  function automatic logic ref_match(logic [31:0] f, logic [31:0] v, int len);
    if (len == 0) return 1'b1;
    return (f >> (32 - len)) == (v >> (32 - len));
  endfunction

  hit_colors_t [N_SUBSETS-1:0] exp_q [$];
  logic [31:0] f;
  int cyc = 0, sent = 0, got = 0, issue_cyc [$];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      hit_colors_t [N_SUBSETS-1:0] e;
      int ic;
      e  = exp_q.pop_front();
      ic = issue_cyc.pop_front();
      checks++;
      if (hits !== e) begin
        failures++;
        $display("mismatch on lookup %0d", got);
      end
      checks++;
      if (cyc - ic != 2) begin
        failures++;
        $display("latency %0d, expected 2", cyc - ic);
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // program the chains
    for (int s = 0; s < N_SUBSETS; s++) begin
      base[s] = $urandom;
      for (int c = 0; c < N_COLORS; c++) begin
        lpm_entry_t en;
        int len;
        len = (c == 0) ? 0 : 4 * c + s;    // nested, strictly growing
        en.valid  = 1'b1;
        en.len    = LEN_W'(len);
        en.value  = (len == 0) ? 32'h0 : ((base[s] >> (32 - len)) << (32 - len));
        en.subset = SUBSET_W'(s);
        en.color  = COLOR_W'(c);
        en.bitmap = bitmap_t'({$urandom, $urandom});
        ref_tab[s][c] = en;
        ref_idx[s][c] = 17 + 29 * s + 3 * c;   // scattered table slots
        @(negedge clk);
        wr_en = 1; wr_idx = ID_W'(ref_idx[s][c]); wr_entry = en;
        @(negedge clk);
        wr_en = 0;
      end
    end
    // an entry of an unused subset number must never show up
    @(negedge clk);
    wr_en = 1; wr_idx = 8'd250;
    wr_entry = '{valid: 1'b1, value: 32'h0, len: '0, subset: 2'd3, color: '0, bitmap: '1};
    @(negedge clk);
    wr_en = 0;

    // back-to-back lookups
    for (int t = 0; t < 200; t++) begin
      hit_colors_t [N_SUBSETS-1:0] e;
      int s_pick;
      s_pick = $urandom_range(0, N_SUBSETS - 1);
      f = base[s_pick];
      if ($urandom_range(0, 5) != 0) f[$urandom_range(0, 31)] ^= 1'b1;
      if ($urandom_range(0, 7) == 0) f = $urandom;
      e = '0;
      for (int s = 0; s < N_SUBSETS; s++)
        for (int c = 0; c < N_COLORS; c++)
          if (ref_match(f, ref_tab[s][c].value, int'(ref_tab[s][c].len))) begin
            e[s][c].valid  = 1'b1;
            e[s][c].id     = ID_W'(ref_idx[s][c]);
            e[s][c].len    = ref_tab[s][c].len;
            e[s][c].bitmap = ref_tab[s][c].bitmap;
          end
      @(negedge clk);
      in_valid = 1; field = f;
      exp_q.push_back(e);
      issue_cyc.push_back(cyc);
      sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent) begin
      failures++;
      $display("sent %0d got %0d", sent, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
