// tb_exp_unit: checks exp(-K*D) against the real exponential.
// Random and corner (D, K) pairs are fed one per clock; each result, two
// clocks later, must be within 0.25% of exp(-K*D) when that is above 2^-28,
// and zero or tiny when it is below 2^-32.
module tb_exp_unit;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [12:0] d;
  logic [3:0] k_man, k_exp;
  logic out_valid;
  fp16_t y;
  int checks = 0, failures = 0;
  real exp_q [$];
  always #5 clk = ~clk;

  exp_unit dut (.*);

  function automatic real fp_val(fp16_t f);
    return (f.e == 0) ? 0.0 : (1.0 + real'(f.m) / 1024.0) * (2.0 ** (real'(f.e) - 32.0));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    real r, g;
    r = exp_q.pop_front();
    g = fp_val(y);
    checks++;
    if (r > 2.0 ** -28) begin
      if (g < r * 0.9975 || g > r * 1.0025) begin
        failures++; $display("exp mismatch: got %g want %g", g, r);
      end
    end else if (r < 2.0 ** -32) begin
      if (g > 2.0 ** -30) begin failures++; $display("underflow: got %g want %g", g, r); end
    end
  end

  task automatic feed(input int dd, input int km, input int ke);
    real k;
    @(negedge clk);
    in_valid = 1; d = 13'(dd); k_man = 4'(km); k_exp = 4'(ke);
    k = real'(km) * (2.0 ** (-5.0 - real'(ke)));
    exp_q.push_back($exp(-k * real'(dd)));
  endtask

  initial begin
    in_valid = 0; d = 0; k_man = 0; k_exp = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    feed(0, 15, 0);      // exp(0) = 1
    feed(5, 0, 0);       // K = 0
    feed(1, 1, 15);      // K = 2^-20
    feed(7936, 1, 15);
    feed(30, 15, 0);
    feed(7936, 15, 0);   // underflow
    for (int i = 0; i < 3000; i++)
      feed(int'($urandom_range(0, 7936)) >> $urandom_range(0, 12), int'($urandom_range(0, 15)),
           int'($urandom_range(0, 15)));
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
