// tb_turbo_tmu -- checks the eight turbo branch metrics and the x+La term
// against a direct evaluation of gamma = (x/2 + La)*u + y0/2*x0 + y1/2*x1
// (all in units of 1/4, the channel LLRs losing their last fraction bit).
module tb_turbo_tmu;
  import dmcd_pkg::*;
  llr_t x, y0, y1;
  ext_t la;
  gam_t gamma [8];
  gam_t sla;
  turbo_tmu dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int xi, y0i, y1i, lai, e;
      xi  = int'($urandom_range(0, 63)) - 32;
      y0i = int'($urandom_range(0, 63)) - 32;
      y1i = int'($urandom_range(0, 63)) - 32;
      lai = int'($urandom_range(0, 63)) - 32;
      x = llr_t'(xi); y0 = llr_t'(y0i); y1 = llr_t'(y1i); la = ext_t'(lai);
      #1;
      for (int g = 0; g < 8; g++) begin
        e = ((g >> 2) & 1) * ((xi >>> 1) + lai) + ((g >> 1) & 1) * (y0i >>> 1) + (g & 1) * (y1i >>> 1);
        checks++;
        if (int'(gamma[g]) != e) begin
          failures++;
          if (failures < 5) $display("FAIL g=%0d got %0d exp %0d", g, gamma[g], e);
        end
      end
      checks++;
      if (int'(sla) != (xi >>> 1) + lai) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
