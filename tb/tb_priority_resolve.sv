// tb_priority_resolve: self-checking test of priority_resolve. Every
// combination of branch matches is driven with random rule numbers (equal
// numbers included); the expected winner, default flag and spoiler flag are
// worked out here case by case. Checks the 1-cycle latency and that idle
// cycles produce no result.
module tb_priority_resolve;
  import mspcca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, main_match = 0, sp_match = 0;
  logic [RULE_NO_W-1:0] main_rule = '0, sp_rule = '0;
  logic out_valid, out_default, out_spoiler;
  logic [RULE_NO_W-1:0] out_rule;

  priority_resolve dut (.*);

  typedef struct { logic v; logic d; logic s; logic [RULE_NO_W-1:0] r; } exp_t;
  exp_t exp_q [$];
  int n_case [4];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results are registered on the edge after the inputs: compare them on
  // the following falling edge
  always @(negedge clk) begin
    if (rst_n && exp_q.size() > 0) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_valid !== e.v || (e.v && (out_default !== e.d || out_spoiler !== e.s || out_rule !== e.r))) begin
        failures++;
        $display("got v=%0b d=%0b s=%0b r=%0d, expected v=%0b d=%0b s=%0b r=%0d",
                 out_valid, out_default, out_spoiler, out_rule, e.v, e.d, e.s, e.r);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      exp_t e;
      logic v, mm, sm;
      logic [RULE_NO_W-1:0] mr, sr;
      v  = ($urandom_range(0, 7) != 0);
      mm = $urandom_range(0, 1);
      sm = $urandom_range(0, 1);
      mr = RULE_NO_W'($urandom_range(0, 50));
      sr = ($urandom_range(0, 5) == 0) ? mr : RULE_NO_W'($urandom_range(0, 50));
      e.v = v;
      if (mm && sm) begin
        n_case[3]++;
        if (sr < mr) begin e.r = sr; e.s = 1; end else begin e.r = mr; e.s = 0; end
        e.d = 0;
      end else if (sm) begin
        n_case[2]++; e.r = sr; e.s = 1; e.d = 0;
      end else if (mm) begin
        n_case[1]++; e.r = mr; e.s = 0; e.d = 0;
      end else begin
        n_case[0]++; e.r = DEFAULT_RULE; e.s = 0; e.d = 1;
      end
      @(negedge clk);
      in_valid = v; main_match = mm; sp_match = sm; main_rule = mr; sp_rule = sr;
      @(posedge clk);
      exp_q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_case[0] == 0 || n_case[1] == 0 || n_case[2] == 0 || n_case[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
