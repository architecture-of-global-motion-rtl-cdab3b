// tb_gmc_interp: checks the bilinear interpolation filter.
//
// Random pixels and 1/16-pel fractions, plus corner cases (zero fraction,
// all 255). The reference evaluates the weighted sum in real numbers and
// rounds half up; the filter's integer result must match, two cycles after
// the input. Inputs arrive back to back with random gaps.
module tb_gmc_interp;
  import gmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [7:0] p00, p01, p10, p11, out_pix;
  logic [3:0] fx, fy;

  // Behavioural stand-in for the shared multipliers.
  mul_a_t mul_a [NMUL];
  mul_b_t mul_b [NMUL];
  mul_p_t mul_p [NMUL];
  for (genvar i = 0; i < NMUL; i++) begin : g_mul
    assign mul_p[i] = mul_p_t'(mul_a[i]) * mul_p_t'(mul_b[i]);
  end

  gmc_interp dut (.*);

  int checks = 0, failures = 0;

  // Expected results, oldest first, with the cycle each is due.
  int exp_q [$], due_q [$];
  int cyc = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (due_q.size() != 0 && due_q[0] == cyc) begin
      if (!out_valid) failures++;
      if (out_pix != 8'(exp_q[0])) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", out_pix, exp_q[0]);
      end
      void'(exp_q.pop_front());
      void'(due_q.pop_front());
    end else if (out_valid) begin
      failures++;
      $display("unexpected output at cycle %0d", cyc);
    end
  end

  initial begin
    real ax, ay, v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      p00 = $urandom; p01 = $urandom; p10 = $urandom; p11 = $urandom;
      fx = $urandom; fy = $urandom;
      if (t < 16) begin fx = 0; fy = 0; end
      if (t >= 16 && t < 32) begin p00 = 255; p01 = 255; p10 = 255; p11 = 255; end
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        ax = fx / 16.0; ay = fy / 16.0;
        v = (1.0 - ay) * ((1.0 - ax) * p00 + ax * p01) + ay * ((1.0 - ax) * p10 + ax * p11);
        exp_q.push_back(int'($floor(v + 0.5)));
        due_q.push_back(cyc + 2);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
