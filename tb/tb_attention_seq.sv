// tb_attention_seq: whole attention heads of BERT-base (d = 64) at the
// longer sequence lengths, on the full design at its default sizes.
//
// A 128-row Q-block fits the accumulator only for N = 128 (scores of a
// Q x N block take Q*N/16 accumulator rows of the 2048). Longer sequences
// are run the way a controller would run them: the head is cut into
// Q-blocks small enough for the scores and the block's output to share
// the accumulator, and each Q-block goes through QK^T, one OP_FUSED_BATCH
// command and PV, after which the block's output is read out.
//   N = 256: Q-block 64  (1024 score rows + 256 output rows)
//   N = 512: Q-block 32  (1024 score rows + 128 output rows)
// The testbench plays host, controller and DMA. For every Q-block it
// checks the int8 weights bit-exactly against the online-softmax model
// and the int32 output against P*V computed here, and that each Q-block
// took exactly one softmax command. Clock counts per head are printed.
module tb_attention_seq;
  import oa_pkg::*;
  import oa_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      rocc_cmd_valid = 0, rocc_cmd_ready, oa_busy;
  rocc_cmd_t rocc_cmd = '0;
  logic      ctrl_cmd_valid, ctrl_cmd_ready = 1;
  rocc_cmd_t ctrl_cmd;
  logic      exe_cmd_valid = 0, exe_cmd_ready, exe_busy;
  exe_cmd_t  exe_cmd = '0;
  logic      dma_sp_wr_valid = 0, dma_sp_wr_ready;
  sp_wreq_t  dma_sp_wreq = '0;
  logic      dma_sp_rd_valid = 0, dma_sp_rd_ready, dma_sp_rd_resp_valid;
  logic [SP_ADDR_W-1:0] dma_sp_rd_addr = '0;
  sp_row_t   dma_sp_rd_data;
  logic      dma_acc_valid = 0, dma_acc_ready, dma_acc_resp_valid;
  acc_req_t  dma_acc_req = '0;
  acc_resp_t dma_acc_resp;

  gemmini_oa_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_oa_batch = 0;
  always @(posedge clk)
    if (rst_n && rocc_cmd_valid && rocc_cmd_ready && rocc_cmd.funct == FUNCT_ONLINE_ATTN &&
        rocc_cmd.rs1[2:0] != 3'(OP_CONFIG)) n_oa_batch++;

  task automatic sp_write(int addr, sp_row_t data);
    @(negedge clk);
    dma_sp_wr_valid = 1; dma_sp_wreq.addr = SP_ADDR_W'(addr); dma_sp_wreq.mask = '1; dma_sp_wreq.data = data;
    while (!dma_sp_wr_ready) @(negedge clk);
    @(negedge clk);
    dma_sp_wr_valid = 0;
  endtask

  task automatic sp_read(int addr, output sp_row_t data);
    @(negedge clk);
    dma_sp_rd_valid = 1; dma_sp_rd_addr = SP_ADDR_W'(addr);
    while (!dma_sp_rd_ready) @(negedge clk);
    @(negedge clk);
    dma_sp_rd_valid = 0;
    data = dma_sp_rd_data;
  endtask

  task automatic acc_read(int addr, output acc_resp_t r);
    @(negedge clk);
    dma_acc_valid = 1; dma_acc_req = '0; dma_acc_req.addr = ACC_ADDR_W'(addr); dma_acc_req.raw = 1'b1;
    while (!dma_acc_ready) @(negedge clk);
    @(negedge clk);
    dma_acc_valid = 0;
    r = dma_acc_resp;
  endtask

  task automatic exe(int a, int b, int c, bit accumulate, bit tr);
    @(negedge clk);
    exe_cmd_valid = 1;
    exe_cmd.a_addr = SP_ADDR_W'(a); exe_cmd.b_addr = SP_ADDR_W'(b); exe_cmd.c_addr = ACC_ADDR_W'(c);
    exe_cmd.accumulate = accumulate; exe_cmd.transpose_b = tr;
    while (!exe_cmd_ready) @(negedge clk);
    @(negedge clk);
    exe_cmd_valid = 0;
  endtask

  task automatic rocc(logic [6:0] funct, logic [63:0] rs1, logic [63:0] rs2);
    @(negedge clk);
    rocc_cmd_valid = 1; rocc_cmd.funct = funct; rocc_cmd.rs1 = rs1; rocc_cmd.rs2 = rs2;
    while (!rocc_cmd_ready) @(negedge clk);
    @(negedge clk);
    rocc_cmd_valid = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (oa_busy || exe_busy) @(negedge clk);
  endtask

  function automatic logic [63:0] oa_rs1(oa_op_e op, int acc_base, int sp_base);
    return {32'(acc_base), 16'(sp_base), 13'd0, op};
  endfunction

  // scratchpad: Q, K, V of the whole head, then the weights of one Q-block
  localparam int D = 64, DK = D / DIM;
  localparam int Q_SP = 0, K_SP = 2048, V_SP = 4096, P_SP = 8192;
  localparam int S_ACC = 0, O_ACC = 1536;

  int Q[][], K[][], V[][];

  task automatic run_head(int N, int QBLK);
    int nJ = N / DIM, nI = QBLK / DIM;
    int bad = 0;
    int t0, c0;
    sp_row_t row;
    acc_resp_t ar;
    Q = new[N]; K = new[N]; V = new[N];
    for (int r = 0; r < N; r++) begin
      Q[r] = new[D]; K[r] = new[D]; V[r] = new[D];
      for (int c = 0; c < D; c++) begin
        Q[r][c] = (r % 7 == 0) ? int'($urandom % 17) - 8 : int'($urandom % 7) - 3;
        K[r][c] = int'($urandom % 7) - 3;
        V[r][c] = int'($urandom % 17) - 8;
      end
    end
    for (int t = 0; t < nJ; t++)
      for (int kk = 0; kk < DK; kk++)
        for (int r = 0; r < DIM; r++) begin
          for (int l = 0; l < DIM; l++) row[l] = elem_t'(Q[t*DIM+r][kk*DIM+l]);
          sp_write(Q_SP + (t*DK + kk)*DIM + r, row);
          for (int l = 0; l < DIM; l++) row[l] = elem_t'(K[t*DIM+r][kk*DIM+l]);
          sp_write(K_SP + (t*DK + kk)*DIM + r, row);
          for (int l = 0; l < DIM; l++) row[l] = elem_t'(V[t*DIM+r][kk*DIM+l]);
          sp_write(V_SP + (t*DK + kk)*DIM + r, row);
        end

    t0 = cycle;
    c0 = n_oa_batch;
    for (int qb = 0; qb < N / QBLK; qb++) begin
      int S[][], P[][];
      int w[]; real wf[];
      // QK^T for this Q-block: score tile (i, j) at S_ACC + (i*nJ + j)*DIM
      for (int i = 0; i < nI; i++)
        for (int j = 0; j < nJ; j++)
          for (int kk = 0; kk < DK; kk++)
            exe(Q_SP + ((qb*nI + i)*DK + kk)*DIM, K_SP + (j*DK + kk)*DIM, S_ACC + (i*nJ + j)*DIM, kk > 0, 1'b1);
      rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_FUSED_BATCH, S_ACC, P_SP), {32'(N), 32'(QBLK)});
      for (int i = 0; i < nI; i++)
        for (int c = 0; c < DK; c++)
          for (int k = 0; k < nJ; k++)
            exe(P_SP + (i*nJ + k)*DIM, V_SP + (k*DK + c)*DIM, O_ACC + (i*DK + c)*DIM, k > 0, 1'b0);
      wait_idle();

      // reference for the block and read-back
      S = new[QBLK]; P = new[QBLK];
      for (int r = 0; r < QBLK; r++) begin
        S[r] = new[N];
        for (int j = 0; j < N; j++) begin
          S[r][j] = 0;
          for (int c = 0; c < D; c++) S[r][j] += Q[qb*QBLK + r][c] * K[j][c];
        end
        void'(ref_softmax_row(S[r], N, w, wf));
        P[r] = w;
        for (int k = 0; k < nJ; k++) begin
          sp_read(tile_addr(P_SP, r, k, nJ), row);
          for (int l = 0; l < DIM; l++) begin
            checks++;
            if (int'(row[l]) != P[r][k*DIM + l]) begin
              failures++; bad++;
              if (bad < 10) $display("FAIL N=%0d P[%0d][%0d] = %0d, expected %0d",
                                     N, qb*QBLK + r, k*DIM + l, int'(row[l]), P[r][k*DIM + l]);
            end
          end
        end
        for (int c = 0; c < DK; c++) begin
          acc_read(O_ACC + ((r/DIM)*DK + c)*DIM + r%DIM, ar);
          for (int l = 0; l < DIM; l++) begin
            int o = 0;
            for (int j = 0; j < N; j++) o += P[r][j] * V[j][c*DIM + l];
            checks++;
            if (int'(ar.raw[l]) != o) begin
              failures++; bad++;
              if (bad < 10) $display("FAIL N=%0d O[%0d][%0d] = %0d, expected %0d",
                                     N, qb*QBLK + r, c*DIM + l, int'(ar.raw[l]), o);
            end
          end
        end
      end
    end
    checks++;
    if (n_oa_batch - c0 != N / QBLK) begin
      failures++; $display("FAIL N=%0d used %0d softmax commands for %0d Q-blocks", N, n_oa_batch - c0, N / QBLK);
    end
    $display("N=%0d d=%0d Q-block=%0d: %0d clocks for the head (with read-back)", N, D, QBLK, cycle - t0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QLN2) << 8),     64'(QLN2));
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QLN2_INV) << 8), 64'(QLN2_INV));
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QB) << 8),       64'(QB));
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QC) << 8),       64'(QC));
    run_head(256, 64);
    run_head(512, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
