// tb_accumulator: overwrite and accumulate writes, raw reads with one-clock
// latency, and the scale / round / ReLU / int8 saturation read path.
module tb_accumulator;
  import oa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic      req_valid = 0, resp_valid;
  acc_req_t  req = '0;
  acc_resp_t resp;

  accumulator dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [ACC_ROWS][DIM];
  bit known [ACC_ROWS];

  task automatic wr(int addr, bit acc, acc_row_t d);
    @(negedge clk);
    req_valid = 1; req = '0; req.wen = 1; req.addr = ACC_ADDR_W'(addr); req.acc = acc; req.wdata = d;
    @(negedge clk);
    req_valid = 0;
    for (int l = 0; l < DIM; l++) model[addr][l] = acc ? model[addr][l] + int'(d[l]) : int'(d[l]);
    known[addr] = 1;
  endtask

  task automatic rd(int addr, bit raw, bit relu, logic [31:0] scale);
    @(negedge clk);
    req_valid = 1; req = '0; req.addr = ACC_ADDR_W'(addr); req.raw = raw; req.relu = relu; req.scale = scale;
    @(negedge clk);
    req_valid = 0;
    checks++;
    if (!resp_valid) begin failures++; $display("FAIL no response one clock after read"); end
    for (int l = 0; l < DIM; l++) begin
      longint v;
      automatic int got_raw = int'(resp.raw[l]);
      automatic int got_n = int'(resp.narrow[l]);
      checks++;
      if (got_raw != model[addr][l]) begin
        failures++; $display("FAIL raw row %0d lane %0d: %0d vs %0d", addr, l, got_raw, model[addr][l]);
      end
      if (!raw) begin
        v = longint'(model[addr][l]) * longint'(scale);
        v = (v + 32768) >>> 16;
        if (relu && v < 0) v = 0;
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        checks++;
        if (got_n != int'(v)) begin
          failures++; $display("FAIL narrow row %0d lane %0d: %0d vs %0d", addr, l, got_n, v);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (resp_valid) begin failures++; $display("FAIL response without read"); end
  endtask

  initial begin
    acc_row_t d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      automatic int a = (k < 100) ? k * 20 : (k - 100) * 20;
      automatic bit acc = known[a] && ($urandom % 2);
      for (int l = 0; l < DIM; l++) d[l] = acc_t'(int'($urandom % 20001) - 10000);
      wr(a, acc, d);
    end
    // extremes for saturation
    for (int l = 0; l < DIM; l++) d[l] = (l % 2) ? 32'sd100000 : -32'sd100000;
    wr(ACC_ROWS - 1, 0, d);
    for (int k = 0; k < 150; k++) begin
      automatic int a;
      do a = int'($urandom % ACC_ROWS); while (!known[a]);
      rd(a, $urandom % 2, $urandom % 2, $urandom % 32'h0002_0000);
    end
    rd(ACC_ROWS - 1, 0, 0, 32'h0001_0000);
    rd(ACC_ROWS - 1, 0, 1, 32'h0000_8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
