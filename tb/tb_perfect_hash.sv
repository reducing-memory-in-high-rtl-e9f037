// tb_perfect_hash: self-checking test of perfect_hash with the behavioural
// vertex-table memory. The memory is filled with random 16-bit values; random
// Bloom-hit patterns and LPM vectors are presented back to back. For every
// packet the testbench computes the selected subset (lowest positive), the
// two vertex addresses from the H3 definition, the sum of the two stored
// words and thus the expected pointer; it also checks that packets with no
// positive subset give no pointer, and the MEM_LAT + 2 latency.
module tb_perfect_hash;
  import mspcca_pkg::*;

  localparam int unsigned MEM_LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                   in_valid = 0;
  logic [N_SUBSETS-1:0]   in_hit = '0;
  key_t [N_SUBSETS-1:0]   in_key = '0;
  logic                   mem_rd_en, mem_rd_valid;
  logic [VT_ADDR_W-1:0]   mem_addr_a, mem_addr_b;
  logic [VT_DATA_W-1:0]   mem_data_a, mem_data_b;
  logic                   out_valid, ptr_valid;
  logic [SUBSET_W-1:0]    out_subset;
  logic [RT_AW-1:0]       ptr;

  perfect_hash #(.MEM_LAT(MEM_LAT)) dut (.*);
  vertex_mem_model #(.MEM_LAT(MEM_LAT)) u_mem (
    .clk(clk), .rd_en(mem_rd_en), .addr_a(mem_addr_a), .addr_b(mem_addr_b),
    .rd_valid(mem_rd_valid), .data_a(mem_data_a), .data_b(mem_data_b)
  );

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

  typedef struct { logic pv; int sub; int p; int cyc; } exp_t;
  exp_t exp_q [$];
  int cyc = 0, got = 0, n_multi = 0;
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
      if (ptr_valid !== e.pv || (e.pv && (int'(ptr) != e.p || int'(out_subset) != e.sub))) begin
        failures++;
        $display("packet %0d: pv=%0b ptr=%0d sub=%0d, expected pv=%0b ptr=%0d sub=%0d",
                 got, ptr_valid, ptr, out_subset, e.pv, e.p, e.sub);
      end
      checks++;
      if (cyc - e.cyc != MEM_LAT + 2) begin
        failures++;
        $display("latency %0d", cyc - e.cyc);
      end
      got++;
    end
  end

  initial begin
    int sent;
    sent = 0;
    foreach (u_mem.mem[i]) u_mem.mem[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      exp_t e;
      logic [N_SUBSETS-1:0] h;
      key_t [N_SUBSETS-1:0] k;
      h = N_SUBSETS'($urandom);
      for (int s = 0; s < N_SUBSETS; s++) k[s] = key_t'({$urandom, $urandom});
      e.pv = |h;
      e.sub = 0;
      for (int s = N_SUBSETS - 1; s >= 0; s--) if (h[s]) e.sub = s;
      if ($countones(h) > 1) n_multi++;
      begin
        int a, b;
        a = (e.sub << (VT_AW + 1)) | int'(tb_h3(k[e.sub], 32'h2545_F491) % (2**VT_AW));
        b = (e.sub << (VT_AW + 1)) | (1 << VT_AW) | int'(tb_h3(k[e.sub], 32'h6C07_8965) % (2**VT_AW));
        e.p = int'((u_mem.mem[a] + u_mem.mem[b]) % RT_DEPTH);
      end
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      in_hit = h; in_key = k;
      e.cyc = cyc;
      if (in_valid) begin
        exp_q.push_back(e);
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (MEM_LAT + 6) @(posedge clk);
    checks++;
    if (got != sent) begin
      failures++;
      $display("sent %0d got %0d", sent, got);
    end
    $display("packets=%0d with several positive subsets=%0d", sent, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
