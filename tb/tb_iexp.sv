// tb_iexp: exhaustive-range check of the integer exponential against the
// 64-bit reference and against the real exp, plus the z >= 32 saturation.
module tb_iexp;
  import oa_pkg::*;
  import oa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic signed [31:0] x;
  iexp_cfg_t cfg;
  logic [31:0] y;
  logic sat;

  iexp dut (.x, .cfg, .y, .sat);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int xv);
    longint ex;
    real rel, approx;
    x = xv;
    #1;
    ex = ref_iexp(xv);
    checks++;
    if (longint'(y) != ex) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %0d", xv, y, ex);
    end
    checks++;
    if (sat != (((-longint'(xv > 0 ? 0 : xv)) * QLN2_INV) / 65536 >= 32)) begin
      failures++;
      $display("FAIL sat x=%0d", xv);
    end
    // plausibility: y / iexp(0) approximates exp(x*S) within 3% of exp(0)
    if (xv <= 0) begin
      approx = real'(y) / real'(QB*QB + QC);
      rel = approx - $exp(xv * SCALE);
      checks++;
      if (rel > 0.03 || rel < -0.03) begin
        failures++;
        $display("FAIL accuracy x=%0d approx=%f exp=%f", xv, approx, $exp(xv * SCALE));
      end
    end
  endtask

  initial begin
    cfg.qln2 = QLN2; cfg.qln2_inv = QLN2_INV; cfg.qb = QB; cfg.qc = QC;
    for (int v = 0; v >= -500; v--) check(v);
    check(5);                       // positive input is treated as 0
    check(-2147483647 - 1);         // most negative input saturates
    for (int k = 0; k < 200; k++) check(-int'($urandom % 100000));
    // saturation boundary: z = 32 starts where -x*QLN2_INV/2^16 reaches 32
    x = -417; #1; checks++;
    if (!(sat && y == 0)) begin failures++; $display("FAIL no saturation at -417"); end
    x = 0; #1; checks++;
    if (y != QB*QB + QC) begin failures++; $display("FAIL iexp(0)=%0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
