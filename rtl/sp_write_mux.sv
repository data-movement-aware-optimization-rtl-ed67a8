// sp_write_mux: scratchpad write port shared by DMA and OnlineAttention.
//
// OnlineAttention's single-cycle weight writes have priority: in a clock
// where it writes, the DMA write is held off (dma_ready low) and retried.
// This is the dedicated priority write port of the accelerator description;
// the valid/ready form of the DMA side is this design's choice.
//
// Timing: purely combinational.
module sp_write_mux
  import oa_pkg::*;
(
  input  logic     oa_wen,
  input  sp_wreq_t oa_wreq,
  input  logic     dma_valid,
  output logic     dma_ready,
  input  sp_wreq_t dma_wreq,
  output logic     wen,
  output sp_wreq_t wreq
);

  assign dma_ready = !oa_wen;
  assign wen       = oa_wen || dma_valid;
  assign wreq      = oa_wen ? oa_wreq : dma_wreq;

endmodule
