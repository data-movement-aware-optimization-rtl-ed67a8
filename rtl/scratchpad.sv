// scratchpad: the banked int8 operand memory of the array.
//
// BANKS banks of ROWS rows; each row holds DIM int8 elements (16 bytes).
// A scratchpad row address is {bank, row}: the upper bits pick the bank.
// Operands reach the systolic array only from here, and OnlineAttention
// leaves its int8 weight tiles here for the PV matmul.
//
// Interface: one read port (rd_valid/rd_addr, rd_data valid one clock
// later with rd_resp_valid) and one write port with per-byte mask (the
// write mux in front of it decides between DMA and OnlineAttention). A read
// and a write of the same row in one clock return the old row. Bank count,
// rows per bank and row width follow the accelerator description; the port
// arrangement and one-clock latency are this design's choices.
module scratchpad
  import oa_pkg::*;
#(
  parameter int unsigned BANKS = SP_BANKS,
  parameter int unsigned ROWS  = SP_ROWS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_valid,
  input  logic [SP_ADDR_W-1:0] rd_addr,
  output logic                 rd_resp_valid,
  output sp_row_t              rd_data,
  input  logic                 wen,
  input  sp_wreq_t             wreq
);

  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1;

  logic [BW-1:0] wbank, rbank, rbank_q;
  logic [RW-1:0] wrow, rrow;
  assign wbank = (BANKS > 1) ? BW'(wreq.addr >> RW) : '0;
  assign rbank = (BANKS > 1) ? BW'(rd_addr >> RW)   : '0;
  assign wrow  = wreq.addr[RW-1:0];
  assign rrow  = rd_addr[RW-1:0];

  sp_row_t bank_q [BANKS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sp_row_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (wen && wbank == BW'(b))
        for (int l = 0; l < DIM; l++)
          if (wreq.mask[l]) mem[wrow][l] <= wreq.data[l];
      if (rd_valid && rbank == BW'(b))
        bank_q[b] <= mem[rrow];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_resp_valid <= 1'b0;
      rbank_q       <= '0;
    end else begin
      rd_resp_valid <= rd_valid;
      if (rd_valid) rbank_q <= rbank;
    end
  end

  assign rd_data = bank_q[rbank_q];

endmodule
