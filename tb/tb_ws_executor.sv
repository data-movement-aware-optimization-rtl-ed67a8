// tb_ws_executor: tile matmuls from a behavioural scratchpad into a
// captured accumulator: plain, transposed-B and accumulating commands,
// a command held while the accumulator port is not granted, and the
// 4*DIM+1 clocks from the accepting edge to the edge that clears busy.
module tb_ws_executor;
  import oa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid = 0, cmd_ready, busy;
  exe_cmd_t cmd = '0;
  logic sp_rd_valid, sp_rd_resp_valid = 0, acc_valid, acc_ready = 1;
  logic [SP_ADDR_W-1:0] sp_rd_addr;
  sp_row_t sp_rd_data = '0;
  acc_req_t acc_req;

  ws_executor dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sp [1024][DIM];
  int acc [256][DIM];
  always @(posedge clk) begin
    sp_rd_resp_valid <= sp_rd_valid;
    if (sp_rd_valid) for (int l = 0; l < DIM; l++) sp_rd_data[l] <= elem_t'(sp[sp_rd_addr][l]);
    if (acc_valid && acc_req.wen)
      for (int l = 0; l < DIM; l++)
        acc[acc_req.addr][l] <= acc_req.acc ? acc[acc_req.addr][l] + int'(acc_req.wdata[l]) : int'(acc_req.wdata[l]);
  end

  task automatic run(int a, int b, int c, bit accumulate, bit tr, output int clocks);
    int t0;
    @(negedge clk);
    cmd_valid = 1; cmd.a_addr = SP_ADDR_W'(a); cmd.b_addr = SP_ADDR_W'(b);
    cmd.c_addr = ACC_ADDR_W'(c); cmd.accumulate = accumulate; cmd.transpose_b = tr;
    while (!cmd_ready) @(negedge clk);
    t0 = cycle;
    @(negedge clk);
    cmd_valid = 0;
    while (busy) @(negedge clk);
    clocks = cycle - t0;
  endtask

  task automatic check_tile(int a, int b, int c, bit tr, int base_acc [DIM][DIM]);
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        int e = base_acc[i][j];
        for (int k = 0; k < DIM; k++) e += sp[a+i][k] * (tr ? sp[b+j][k] : sp[b+k][j]);
        checks++;
        if (acc[c+i][j] != e) begin failures++; $display("FAIL C%0d[%0d][%0d] = %0d vs %0d", c, i, j, acc[c+i][j], e); end
      end
  endtask

  initial begin
    int clocks, t_wait;
    int zero [DIM][DIM], prev [DIM][DIM];
    for (int r = 0; r < 1024; r++) for (int l = 0; l < DIM; l++) sp[r][l] = int'($urandom % 256) - 128;
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) zero[i][j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int a = int'($urandom % 60) * 16;
      automatic int b = int'($urandom % 60) * 16;
      automatic int c = (t % 4) * 32;
      automatic bit tr = t % 2;
      run(a, b, c, 1'b0, tr, clocks);
      checks++;
      if (clocks != 4*DIM + 1) begin failures++; $display("FAIL tile took %0d clocks", clocks); end
      check_tile(a, b, c, tr, zero);
      // accumulate a second product on top
      for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) prev[i][j] = acc[c+i][j];
      run(b, a, c, 1'b1, !tr, clocks);
      check_tile(b, a, c, !tr, prev);
    end
    // command held while the accumulator port belongs to someone else
    acc_ready = 0;
    fork
      run(0, 16, 200 - 8, 1'b0, 1'b0, clocks);
      begin repeat (20) @(negedge clk); checks++; if (busy) begin failures++; $display("FAIL started without port"); end
            t_wait = cycle; acc_ready = 1; end
    join
    check_tile(0, 16, 192, 1'b0, zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
