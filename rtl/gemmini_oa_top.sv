// gemmini_oa_top: the attention datapath of a Gemmini-style accelerator with
// the OnlineAttention engine between accumulator and scratchpad.
//
// Data path for one head and one Q-block: DMA fills the scratchpad with Q,
// K and V tiles; the executor runs the QK^T tile matmuls on the 16x16
// weight-stationary array and leaves int32 scores in the accumulator; one
// RoCC command (funct 23) makes OnlineAttention turn the scores into int8
// softmax weights directly in the scratchpad; the executor then runs PV with
// those weights as the A operand, and the output O is read from the
// accumulator through the scaling/ReLU path. The attention matrix never
// leaves the chip.
//
// Sharing rules (explicit mutual exclusion, as the description requires):
//   * accumulator port: OnlineAttention owns it while busy; the executor and
//     the DMA accumulator port share the other side (executor while busy);
//   * an OnlineAttention command is held while the executor is busy or has a
//     command pending, and an executor command is held while OnlineAttention
//     is busy (each side waits for the other, as gemmini_fence() would);
//   * scratchpad writes: OnlineAttention has priority, DMA writes wait;
//   * scratchpad reads: executor while busy, otherwise DMA.
//
// Ports: rocc_* is the RoCC command stream; funct 23 goes to OnlineAttention,
// every other funct is passed on unchanged on ctrl_* to the controller
// (dependency tracking, DMA engine, TLB, and the loop that issues exe_*
// tile commands), which is outside this module. dma_* are the DMA engine's
// scratchpad and accumulator ports. All handshakes are valid/ready; memory
// reads answer one clock after they are accepted.
module gemmini_oa_top
  import oa_pkg::*;
#(
  parameter int unsigned MAX_ROWS = 256,   // onlineAttentionMaxRows
  parameter int unsigned ACC_N    = ACC_ROWS,
  parameter int unsigned SP_N     = SP_ROWS
) (
  input  logic            clk,
  input  logic            rst_n,
  // RoCC command from the core
  input  logic            rocc_cmd_valid,
  output logic            rocc_cmd_ready,
  input  rocc_cmd_t       rocc_cmd,
  output logic            oa_busy,
  // commands for the controller (all functs other than 23)
  output logic            ctrl_cmd_valid,
  input  logic            ctrl_cmd_ready,
  output rocc_cmd_t       ctrl_cmd,
  // tile matmul commands from the controller
  input  logic            exe_cmd_valid,
  output logic            exe_cmd_ready,
  input  exe_cmd_t        exe_cmd,
  output logic            exe_busy,
  // DMA: scratchpad write (mvin)
  input  logic            dma_sp_wr_valid,
  output logic            dma_sp_wr_ready,
  input  sp_wreq_t        dma_sp_wreq,
  // DMA: scratchpad read
  input  logic            dma_sp_rd_valid,
  output logic            dma_sp_rd_ready,
  input  logic [SP_ADDR_W-1:0] dma_sp_rd_addr,
  output logic            dma_sp_rd_resp_valid,
  output sp_row_t         dma_sp_rd_data,
  // DMA: accumulator access (mvin to / mvout from the accumulator)
  input  logic            dma_acc_valid,
  output logic            dma_acc_ready,
  input  acc_req_t        dma_acc_req,
  output logic            dma_acc_resp_valid,
  output acc_resp_t       dma_acc_resp
);

  // ------------------------------------------------------------ RoCC decode
  logic is_oa, oa_cmd_valid, oa_cmd_ready;
  assign is_oa          = (rocc_cmd.funct == FUNCT_ONLINE_ATTN);
  assign oa_cmd_valid   = rocc_cmd_valid && is_oa && !exe_busy && !exe_cmd_valid;
  assign ctrl_cmd_valid = rocc_cmd_valid && !is_oa;
  assign ctrl_cmd       = rocc_cmd;
  assign rocc_cmd_ready = is_oa ? (oa_cmd_ready && !exe_busy && !exe_cmd_valid)
                                : ctrl_cmd_ready;

  // ------------------------------------------------------------ OnlineAttention
  logic                  oa_acc_valid, oa_acc_ready, oa_resp_valid;
  logic [ACC_ADDR_W-1:0] oa_acc_addr;
  logic                  oa_sp_wen;
  sp_wreq_t              oa_sp_wreq;
  acc_resp_t             acc_resp;
  logic                  acc_resp_valid;

  online_attention #(.MAX_ROWS(MAX_ROWS)) u_oa (
    .clk, .rst_n,
    .cmd_valid      (oa_cmd_valid),
    .cmd_ready      (oa_cmd_ready),
    .cmd_rs1        (rocc_cmd.rs1),
    .cmd_rs2        (rocc_cmd.rs2),
    .busy           (oa_busy),
    .acc_req_valid  (oa_acc_valid),
    .acc_req_ready  (oa_acc_ready),
    .acc_req_addr   (oa_acc_addr),
    .acc_resp_valid (oa_resp_valid),
    .acc_resp_data  (acc_resp.raw),
    .sp_wen         (oa_sp_wen),
    .sp_wreq        (oa_sp_wreq)
  );

  // ------------------------------------------------------------ executor
  logic                 exe_sp_rd_valid, exe_acc_valid;
  logic [SP_ADDR_W-1:0] exe_sp_rd_addr;
  acc_req_t             exe_acc_req;
  logic                 sp_resp_valid, sp_owner_exe_q;
  sp_row_t              sp_rd_data;
  logic                 side_ready, side_valid, side_resp_valid;
  acc_req_t             side_req;

  ws_executor u_exe (
    .clk, .rst_n,
    .cmd_valid        (exe_cmd_valid),
    .cmd_ready        (exe_cmd_ready),
    .cmd              (exe_cmd),
    .busy             (exe_busy),
    .sp_rd_valid      (exe_sp_rd_valid),
    .sp_rd_addr       (exe_sp_rd_addr),
    .sp_rd_resp_valid (sp_resp_valid && sp_owner_exe_q),
    .sp_rd_data       (sp_rd_data),
    .acc_valid        (exe_acc_valid),
    .acc_ready        (side_ready),
    .acc_req          (exe_acc_req)
  );

  // executor / DMA side of the accumulator port
  assign side_valid    = exe_busy ? exe_acc_valid : dma_acc_valid;
  assign side_req      = exe_busy ? exe_acc_req   : dma_acc_req;
  assign dma_acc_ready = side_ready && !exe_busy;

  // ------------------------------------------------------------ accumulator
  logic     acc_valid;
  acc_req_t acc_req;

  acc_port_arbiter u_arb (
    .clk, .rst_n,
    .oa_busy        (oa_busy),
    .exe_valid      (side_valid),
    .exe_ready      (side_ready),
    .exe_req        (side_req),
    .exe_resp_valid (side_resp_valid),
    .oa_valid       (oa_acc_valid),
    .oa_ready       (oa_acc_ready),
    .oa_addr        (oa_acc_addr),
    .oa_resp_valid  (oa_resp_valid),
    .acc_valid      (acc_valid),
    .acc_req        (acc_req),
    .acc_resp_valid (acc_resp_valid)
  );

  accumulator #(.ROWS(ACC_N)) u_acc (
    .clk, .rst_n,
    .req_valid  (acc_valid),
    .req        (acc_req),
    .resp_valid (acc_resp_valid),
    .resp       (acc_resp)
  );

  assign dma_acc_resp_valid = side_resp_valid;   // the executor only writes
  assign dma_acc_resp       = acc_resp;

  // ------------------------------------------------------------ scratchpad
  logic     sp_wen;
  sp_wreq_t sp_wreq;

  sp_write_mux u_spmux (
    .oa_wen    (oa_sp_wen),
    .oa_wreq   (oa_sp_wreq),
    .dma_valid (dma_sp_wr_valid),
    .dma_ready (dma_sp_wr_ready),
    .dma_wreq  (dma_sp_wreq),
    .wen       (sp_wen),
    .wreq      (sp_wreq)
  );

  logic                 sp_rd_valid;
  logic [SP_ADDR_W-1:0] sp_rd_addr;
  assign sp_rd_valid     = exe_busy ? exe_sp_rd_valid : dma_sp_rd_valid;
  assign sp_rd_addr      = exe_busy ? exe_sp_rd_addr  : dma_sp_rd_addr;
  assign dma_sp_rd_ready = !exe_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sp_owner_exe_q <= 1'b0;
    else        sp_owner_exe_q <= exe_busy;
  end

  scratchpad #(.BANKS(SP_BANKS), .ROWS(SP_N)) u_sp (
    .clk, .rst_n,
    .rd_valid      (sp_rd_valid),
    .rd_addr       (sp_rd_addr),
    .rd_resp_valid (sp_resp_valid),
    .rd_data       (sp_rd_data),
    .wen           (sp_wen),
    .wreq          (sp_wreq)
  );

  assign dma_sp_rd_resp_valid = sp_resp_valid && !sp_owner_exe_q;
  assign dma_sp_rd_data       = sp_rd_data;

  // the two engines never run at the same time
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(oa_busy && exe_busy));

endmodule
