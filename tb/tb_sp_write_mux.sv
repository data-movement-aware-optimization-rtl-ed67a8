// tb_sp_write_mux: OnlineAttention writes always pass; a DMA write passes
// only in a clock without an OnlineAttention write and is otherwise held.
module tb_sp_write_mux;
  import oa_pkg::*;

  logic oa_wen = 0, dma_valid = 0, dma_ready, wen;
  sp_wreq_t oa_wreq = '0, dma_wreq = '0, wreq;

  sp_write_mux dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held = 0;
    for (int k = 0; k < 300; k++) begin
      oa_wen = $urandom % 2; dma_valid = $urandom % 2;
      oa_wreq.addr = SP_ADDR_W'($urandom); oa_wreq.mask = DIM'($urandom);
      for (int l = 0; l < DIM; l++) oa_wreq.data[l] = elem_t'($urandom);
      dma_wreq.addr = SP_ADDR_W'($urandom); dma_wreq.mask = DIM'($urandom);
      for (int l = 0; l < DIM; l++) dma_wreq.data[l] = elem_t'($urandom);
      #1;
      checks += 3;
      if (wen !== (oa_wen || dma_valid)) begin failures++; $display("FAIL wen"); end
      if (dma_ready !== !oa_wen) begin failures++; $display("FAIL dma_ready"); end
      if (oa_wen && wreq !== oa_wreq) begin failures++; $display("FAIL OnlineAttention write lost"); end
      else if (!oa_wen && dma_valid && wreq !== dma_wreq) begin failures++; $display("FAIL DMA write lost"); end
      if (oa_wen && dma_valid) held++;
      #9;
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL no collision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
