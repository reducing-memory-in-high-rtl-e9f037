// tb_color_processing: self-checking test of color_processing.
// Random hit patterns (random valid colors, lengths, ids and sparse bitmaps)
// are pushed in back to back. The expected LPM vector is computed here by a
// direct reading of the filtering rule: a matching prefix of color c in
// dimension d survives if every other dimension has at least one matching
// prefix whose bitmap for d contains c; the longest survivor is chosen.
// Also checks the four-cycle latency.
module tb_color_processing;
  import mspcca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      in_valid = 0;
  hit_dims_t in_hits = '0;
  logic      out_valid, key_valid;
  key_t      key;

  color_processing dut (.*);

  typedef struct { logic kv; key_t k; int cyc; } exp_t;
  exp_t exp_q [$];
  int cyc = 0, got = 0, sent = 0, n_keyvalid = 0, n_filtered = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (key_valid !== e.kv || (e.kv && key !== e.k)) begin
        failures++;
        $display("vector %0d: got kv=%0b key=%h, expected kv=%0b key=%h",
                 got, key_valid, key, e.kv, e.k);
      end
      checks++;
      if (cyc - e.cyc != 4) begin
        failures++;
        $display("latency %0d, expected 4", cyc - e.cyc);
      end
      got++;
    end
  end

  function automatic exp_t model(hit_dims_t h);
    exp_t r;
    r.kv = 1'b1;
    r.k  = '0;
    for (int d = 0; d < N_DIMS; d++) begin
      int best = -1, best_len = -1, longest_any = -1;
      for (int c = 0; c < N_COLORS; c++) begin
        bit ok;
        if (!h[d][c].valid) continue;
        if (int'(h[d][c].len) > longest_any) longest_any = int'(h[d][c].len);
        ok = 1;
        for (int e = 0; e < N_DIMS; e++) begin
          bit found;
          if (e == d) continue;
          found = 0;
          for (int c2 = 0; c2 < N_COLORS; c2++)
            if (h[e][c2].valid && h[e][c2].bitmap[d][c]) found = 1;
          if (!found) ok = 0;
        end
        if (ok && int'(h[d][c].len) > best_len) begin
          best_len = int'(h[d][c].len);
          best = c;
        end
      end
      if (best < 0) r.kv = 1'b0;
      else begin
        r.k[d] = h[d][best].id;
        if (best_len < longest_any) n_filtered++;
      end
    end
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      hit_dims_t h;
      exp_t e;
      int density;
      density = $urandom_range(1, 3);
      h = '0;
      for (int d = 0; d < N_DIMS; d++)
        for (int c = 0; c < N_COLORS; c++) begin
          // color c stands for prefix length class c (nested chain)
          h[d][c].valid = ($urandom_range(0, 2) != 0);
          h[d][c].len   = LEN_W'(4 * c + $urandom_range(0, 3));
          h[d][c].id    = ID_W'($urandom);
          for (int d2 = 0; d2 < N_DIMS; d2++)
            for (int c2 = 0; c2 < N_COLORS; c2++)
              h[d][c].bitmap[d2][c2] = ($urandom_range(0, 9) < density * 2);
        end
      e = model(h);
      if (e.kv) n_keyvalid++;
      @(negedge clk);
      in_valid = 1; in_hits = h;
      e.cyc = cyc;
      exp_q.push_back(e);
      sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (got != sent) failures++;
    // both outcomes and the filtering itself must have been exercised
    checks++;
    if (n_keyvalid == 0 || n_keyvalid == sent || n_filtered == 0) begin
      failures++;
      $display("coverage: keyvalid=%0d filtered=%0d", n_keyvalid, n_filtered);
    end
    $display("vectors=%0d with key=%0d dims filtered=%0d", sent, n_keyvalid, n_filtered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
