// tb_acc_port_arbiter: ownership of the accumulator port follows the
// OnlineAttention busy flag, the other client is stalled, OnlineAttention
// requests become raw reads, and responses return to the client that
// issued the read even when ownership changes in between.
module tb_acc_port_arbiter;
  import oa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic oa_busy = 0, exe_valid = 0, exe_ready, exe_resp_valid;
  logic oa_valid = 0, oa_ready, oa_resp_valid, acc_valid, acc_resp_valid = 0;
  acc_req_t exe_req = '0, acc_req;
  logic [ACC_ADDR_W-1:0] oa_addr = '0;

  acc_port_arbiter dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0b vs %0b", what, got, exp); end
  endtask

  // the accumulator answers a read one clock later
  always @(posedge clk) acc_resp_valid <= acc_valid && !acc_req.wen;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      bit busy_now, exe_now, oa_now, prev_busy;
      @(negedge clk);
      prev_busy = oa_busy;
      // remember who owned the port in the previous clock's read
      busy_now = ($urandom % 4) != 0 ? oa_busy : !oa_busy;
      exe_now  = $urandom % 2;
      oa_now   = $urandom % 2;
      oa_busy  = busy_now;
      exe_valid = exe_now;
      exe_req   = '0;
      exe_req.wen   = $urandom % 2;
      exe_req.addr  = ACC_ADDR_W'($urandom);
      exe_req.scale = $urandom;
      exe_req.relu  = $urandom % 2;
      oa_valid = oa_now;
      oa_addr  = ACC_ADDR_W'($urandom);
      #1;
      expect_bit("exe_ready", exe_ready, !busy_now);
      expect_bit("oa_ready", oa_ready, busy_now);
      expect_bit("acc_valid", acc_valid, busy_now ? oa_now : exe_now);
      checks++;
      if (busy_now) begin
        if (acc_req.addr != oa_addr || !acc_req.raw || acc_req.wen) begin
          failures++; $display("FAIL OnlineAttention request not a raw read of its address");
        end
      end else if (acc_req != exe_req) begin
        failures++; $display("FAIL executor request altered");
      end
      // response routing for the read accepted in the previous clock
      expect_bit("oa_resp_valid", oa_resp_valid, acc_resp_valid && prev_busy);
      expect_bit("exe_resp_valid", exe_resp_valid, acc_resp_valid && !prev_busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
