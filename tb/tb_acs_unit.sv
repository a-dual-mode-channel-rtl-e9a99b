// tb_acs_unit -- checks acs_unit in both modes against integer arithmetic,
// including sums that wrap around the W-bit range (modulo normalisation).
module tb_acs_unit;
  localparam int W = 11;
  logic mode_min;
  logic [W-1:0] pm0, bm0, pm1, bm1, pm_out;
  logic dec;
  acs_unit #(.W(W)) dut (.*);

  int checks = 0, failures = 0, wraps = 0;
  logic clk = 0;
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int base, a0, a1, b0, b1, s0, s1, exp_dec, exp_pm;
      // true metrics: a common offset anywhere, spread below 2^(W-2)
      base = int'($urandom_range(0, (1 << W) - 1));
      a0 = base + int'($urandom_range(0, 255));
      a1 = base + int'($urandom_range(0, 255));
      b0 = int'($urandom_range(0, 90));
      b1 = int'($urandom_range(0, 90));
      mode_min = 1'($urandom);
      pm0 = W'(a0); pm1 = W'(a1); bm0 = W'(b0); bm1 = W'(b1);
      s0 = a0 + b0; s1 = a1 + b1;
      if ((s0 >> W) != (s1 >> W) || s0 >= (1 << W)) wraps++;
      exp_dec = mode_min ? (s1 < s0) : (s1 > s0);
      exp_pm  = exp_dec ? s1 : s0;
      #1;
      checks++;
      if (dec !== 1'(exp_dec) || pm_out !== W'(exp_pm)) begin
        failures++;
        if (failures < 5) $display("FAIL mode=%0d s0=%0d s1=%0d dec=%0d pm=%0d", mode_min, s0, s1, dec, pm_out);
      end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
