// tb_lns_rom: checks the correction ROM against log2(1 +/- 2^-D) computed
// with real arithmetic. The tolerance of each point is the function's change
// over one ROM step (the resolution of that segment) plus rounding.
module tb_lns_rom;
  import lns_pkg::*;

  logic [EXP_W:0]     d;
  logic               sub;
  logic signed [19:0] corr;

  lns_rom dut (.d(d), .sub(sub), .corr(corr));

  int checks = 0, failures = 0;

  function automatic real step_of(input int unsigned dv);
    if (dv < 2048)  return 1.0;
    if (dv < 8192)  return 2.0;
    if (dv < 12288) return 4.0;
    if (dv < 16384) return 8.0;
    if (dv < 20480) return 16.0;
    if (dv < 24576) return 32.0;
    if (dv < 28672) return 64.0;
    if (dv < 32768) return 128.0;
    return 256.0;
  endfunction

  task automatic probe(input int unsigned dv, input bit s);
    real x, f, slope, tol, err;
    d = (EXP_W+1)'(dv); sub = s;
    #1;
    x = real'(dv) / 4096.0;
    if (dv >= 36864) begin
      checks++;
      if (corr != 0) begin failures++; $display("FAIL: D=%0d beyond table gives %0d", dv, corr); end
      return;
    end
    if (s) begin
      f     = $ln(1.0 - $pow(2.0, -x)) / $ln(2.0);
      slope = $pow(2.0, -x) / (1.0 - $pow(2.0, -x));
    end else begin
      f     = $ln(1.0 + $pow(2.0, -x)) / $ln(2.0);
      slope = $pow(2.0, -x) / (1.0 + $pow(2.0, -x));
    end
    tol = slope * step_of(dv) + 1.0;
    err = real'(corr) - f * 4096.0;
    if (err < 0.0) err = -err;
    checks++;
    if (err > tol) begin
      failures++;
      $display("FAIL: D=%0d sub=%0b corr=%0d expected %f (tol %f)", dv, s, corr, f * 4096.0, tol);
    end
  endtask

  initial begin
    #1;
    for (int unsigned dv = 1; dv < 40000; dv += 23) begin
      probe(dv, 1'b0);
      if (dv >= 8) probe(dv, 1'b1);
    end
    probe(0, 1'b0);
    probe(2047, 1'b0); probe(2048, 1'b0); probe(4095, 1'b1); probe(4096, 1'b1);
    probe(36863, 1'b0); probe(36864, 1'b0); probe(36864, 1'b1); probe(500000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
