// tb_systolic_array: preloads random int8 weights by rows and by columns
// (transposed), streams A rows with random bubbles and checks every C row
// against a direct matrix product and its arrival exactly 2*DIM-1 clocks
// after the A row entered.
module tb_systolic_array;
  import oa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic w_valid = 0, w_transpose = 0, in_valid = 0, out_valid;
  logic [$clog2(DIM)-1:0] w_idx = '0;
  sp_row_t w_data = '0, in_a = '0;
  acc_row_t out_c;

  systolic_array dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int B [DIM][DIM];
  int expq [$][DIM];
  int tq [$];

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      int t;
      t = tq.pop_front();
      checks++;
      if (cycle - t != 2*DIM - 1) begin failures++; $display("FAIL latency %0d", cycle - t); end
      for (int j = 0; j < DIM; j++) begin
        int got;
        got = int'(out_c[j]);
        checks++;
        if (got != expq[0][j]) begin failures++; $display("FAIL C lane %0d: %0d vs %0d", j, got, expq[0][j]); end
      end
      void'(expq.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      // preload
      for (int r = 0; r < DIM; r++) begin
        @(negedge clk);
        w_valid = 1; w_transpose = pass % 2; w_idx = r;
        for (int l = 0; l < DIM; l++) begin
          w_data[l] = elem_t'(int'($urandom % 256) - 128);
          if (pass % 2) B[l][r] = int'(w_data[l]); else B[r][l] = int'(w_data[l]);
        end
      end
      @(negedge clk); w_valid = 0;
      // stream 24 rows with bubbles
      for (int i = 0; i < 24; i++) begin
        int c [DIM];
        while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int k = 0; k < DIM; k++) in_a[k] = elem_t'(int'($urandom % 256) - 128);
        for (int j = 0; j < DIM; j++) begin
          c[j] = 0;
          for (int k = 0; k < DIM; k++) c[j] += int'(in_a[k]) * B[k][j];
        end
        expq.push_back(c);
        tq.push_back(cycle);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (2*DIM + 2) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d rows never came out", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
