// tb_scratchpad: masked writes in every bank, one-clock reads, and a read
// of the row being written in the same clock returning the old contents.
module tb_scratchpad;
  import oa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic                 rd_valid = 0, rd_resp_valid, wen = 0;
  logic [SP_ADDR_W-1:0] rd_addr = '0;
  sp_row_t              rd_data;
  sp_wreq_t             wreq = '0;

  scratchpad dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte model [int][DIM];

  task automatic wr(int a, logic [DIM-1:0] mask, sp_row_t d);
    @(negedge clk);
    wen = 1; wreq.addr = SP_ADDR_W'(a); wreq.mask = mask; wreq.data = d;
    @(negedge clk);
    wen = 0;
    for (int l = 0; l < DIM; l++) if (mask[l]) model[a][l] = d[l];
  endtask

  task automatic rd_check(int a);
    @(negedge clk);
    rd_valid = 1; rd_addr = SP_ADDR_W'(a);
    @(negedge clk);
    rd_valid = 0;
    checks++;
    if (!rd_resp_valid) begin failures++; $display("FAIL no read response"); end
    for (int l = 0; l < DIM; l++) begin
      int got = int'(rd_data[l]);
      checks++;
      if (got != int'(model[a][l])) begin
        failures++; $display("FAIL row %0d lane %0d: %0d vs %0d", a, l, got, model[a][l]);
      end
    end
  endtask

  initial begin
    sp_row_t d;
    int addrs[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full writes, several per bank, including first and last rows of each bank
    for (int b = 0; b < SP_BANKS; b++) begin
      addrs.push_back(b*SP_ROWS); addrs.push_back(b*SP_ROWS + SP_ROWS - 1);
      for (int k = 0; k < 20; k++) addrs.push_back(b*SP_ROWS + int'($urandom % SP_ROWS));
    end
    foreach (addrs[i]) begin
      for (int l = 0; l < DIM; l++) d[l] = elem_t'($urandom);
      wr(addrs[i], '1, d);
    end
    // masked overwrites
    foreach (addrs[i]) if (i % 3 == 0) begin
      for (int l = 0; l < DIM; l++) d[l] = elem_t'($urandom);
      wr(addrs[i], DIM'($urandom), d);
    end
    addrs.shuffle();
    foreach (addrs[i]) rd_check(addrs[i]);
    // read and write of the same row in one clock: old data returned
    @(negedge clk);
    for (int l = 0; l < DIM; l++) d[l] = 8'sd55;
    rd_valid = 1; rd_addr = SP_ADDR_W'(addrs[0]);
    wen = 1; wreq.addr = SP_ADDR_W'(addrs[0]); wreq.mask = '1; wreq.data = d;
    @(negedge clk);
    rd_valid = 0; wen = 0;
    for (int l = 0; l < DIM; l++) begin
      checks++;
      if (int'(rd_data[l]) != int'(model[addrs[0]][l])) begin failures++; $display("FAIL read-during-write"); end
    end
    for (int l = 0; l < DIM; l++) model[addrs[0]][l] = 55;
    rd_check(addrs[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
