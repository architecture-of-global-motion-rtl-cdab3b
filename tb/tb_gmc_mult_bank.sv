// tb_gmc_mult_bank: checks the shared multiplier bank.
//
// For each owner, random operands (including the extreme values of both
// widths) on all sources; the products must be those of the selected
// source, and multipliers the owner does not use must give zero.
module tb_gmc_mult_bank;
  import gmc_pkg::*;

  mul_owner_e owner;
  mul_a_t pg_a, ms_a, wp_a [NMUL];
  mul_b_t pg_b, ms_b, wp_b [NMUL];
  mul_p_t p [NMUL];

  gmc_mult_bank dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, mul_p_t got, mul_p_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic mul_a_t rand_a(int k);
    unique case (k % 4)
      0: return {1'b1, {(MUL_AW-1){1'b0}}};
      1: return {1'b0, {(MUL_AW-1){1'b1}}};
      default: return MUL_AW'({$urandom, $urandom});
    endcase
  endfunction

  function automatic mul_b_t rand_b(int k);
    unique case (k % 3)
      0: return {1'b1, {(MUL_BW-1){1'b0}}};
      1: return {1'b0, {(MUL_BW-1){1'b1}}};
      default: return MUL_BW'($urandom);
    endcase
  endfunction

  function automatic mul_p_t ref_mul(mul_a_t a, mul_b_t b);
    longint signed la, lb;
    la = longint'(a);
    lb = longint'(b);
    return mul_p_t'(la * lb);
  endfunction

  initial begin
    for (int k = 0; k < 600; k++) begin
      owner = mul_owner_e'(k % 3);
      pg_a = rand_a(k);     pg_b = rand_b(k);
      ms_a = rand_a(k + 1); ms_b = rand_b(k + 2);
      for (int i = 0; i < NMUL; i++) begin
        wp_a[i] = rand_a(k + 3 * i + 2);
        wp_b[i] = rand_b(k + i + 1);
      end
      #1;
      unique case (owner)
        MUL_PG: begin
          check("pg p0", p[0], ref_mul(pg_a, pg_b));
          check("pg p1 idle", p[1], '0);
          check("pg p2 idle", p[2], '0);
        end
        MUL_MS: begin
          check("ms p0", p[0], ref_mul(ms_a, ms_b));
          check("ms p1 idle", p[1], '0);
          check("ms p2 idle", p[2], '0);
        end
        default:
          for (int i = 0; i < NMUL; i++) check("warp product", p[i], ref_mul(wp_a[i], wp_b[i]));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
