// tb_gemmini_oa_top: end-to-end attention for one head on the whole design,
// at the design's default sizes.
//
// The testbench plays the host core, the controller and the DMA engine:
// it loads Q, K, V into the scratchpad, issues the QK^T tile matmuls,
// configures iexp and issues the OnlineAttention command(s), issues the PV
// tile matmuls reading the softmax weights from the scratchpad, then reads
// P and O back. P is compared bit-exactly with the online-softmax model, O
// with P*V computed here, and a scaled/ReLU mvout read of O with the
// narrowing formula.
//
// Two configurations run back to back:
//   N = 40,  d = 32: BATCH_UPDATE + BATCH_WEIGHTS, last column chunk partial;
//   N = 128, d = 64: OP_FUSED_BATCH, a BERT-base head (d = 64) with the whole
//                    128-row Q-block in one command.
// Mechanisms counted (each must occur): rescale of the running sum, iexp
// saturation, partial chunk, executor waiting on OnlineAttention,
// OnlineAttention waiting on the executor, DMA scratchpad write held off by
// an OnlineAttention write, accumulating and transposed tile matmuls,
// non-attention functs passed to the controller, one RoCC command per
// Q-block in fused mode.
module tb_gemmini_oa_top;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- mechanism counters
  int n_rescale = 0, n_exe_wait = 0, n_oa_wait = 0, n_dma_stall = 0;
  int n_acc_write = 0, n_transpose = 0, n_ctrl = 0, n_oa_batch = 0, n_sat = 0, n_partial = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_oa.state_q == 3'd3 && !dut.u_oa.phase_weights_q && dut.u_oa.grows) n_rescale++;
    if (exe_cmd_valid && !exe_cmd_ready && oa_busy) n_exe_wait++;
    if (rocc_cmd_valid && rocc_cmd.funct == FUNCT_ONLINE_ATTN && !rocc_cmd_ready && (exe_busy || exe_cmd_valid)) n_oa_wait++;
    if (dma_sp_wr_valid && !dma_sp_wr_ready) n_dma_stall++;
    if (exe_cmd_valid && exe_cmd_ready && exe_cmd.accumulate) n_acc_write++;
    if (exe_cmd_valid && exe_cmd_ready && exe_cmd.transpose_b) n_transpose++;
    if (ctrl_cmd_valid && ctrl_cmd_ready) n_ctrl++;
    if (rocc_cmd_valid && rocc_cmd_ready && rocc_cmd.funct == FUNCT_ONLINE_ATTN && rocc_cmd.rs1[2:0] != 3'(OP_CONFIG)) n_oa_batch++;
    if (dut.u_oa.sp_wen && dut.u_oa.lane_ok != '1) n_partial++;
  end

  // ---------------------------------------------------------- bus tasks
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
    if (!dma_sp_rd_resp_valid) begin failures++; $display("FAIL no scratchpad response"); end
    data = dma_sp_rd_data;
  endtask

  task automatic acc_read(int addr, bit raw, bit relu, logic [31:0] scale, output acc_resp_t r);
    @(negedge clk);
    dma_acc_valid = 1; dma_acc_req = '0; dma_acc_req.addr = ACC_ADDR_W'(addr);
    dma_acc_req.raw = raw; dma_acc_req.relu = relu; dma_acc_req.scale = scale;
    while (!dma_acc_ready) @(negedge clk);
    @(negedge clk);
    dma_acc_valid = 0;
    if (!dma_acc_resp_valid) begin failures++; $display("FAIL no accumulator response"); end
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

  // ---------------------------------------------------------- one head
  localparam int Q_SP = 0, K_SP = 1024, V_SP = 2048, P_SP = 4096, X_SP = 12288;
  localparam int S_ACC = 0, O_ACC = 1024;

  int Q[][], K[][], V[][], S[][], P[][], O[][];
  int dma_rows [64];
  bit dma_done;

  task automatic run_head(int N, int d, bit fused, int seed);
    int nI = (N + DIM - 1) / DIM, dk = d / DIM;
    int bad = 0;
    sp_row_t row;
    acc_resp_t ar;
    real wf[];
    int w[];
    int t0, t_oa;
    Q = new[nI*DIM]; K = new[nI*DIM]; V = new[nI*DIM];
    S = new[N]; P = new[N]; O = new[N];
    // operands; every fifth Q row is wide-ranged (saturating exponentials)
    for (int r = 0; r < nI*DIM; r++) begin
      Q[r] = new[d]; K[r] = new[d]; V[r] = new[d];
      for (int c = 0; c < d; c++) begin
        if (r >= N) begin Q[r][c] = 0; K[r][c] = 0; V[r][c] = 0; end
        else begin
          Q[r][c] = (r % 5 == 0) ? int'($urandom % 17) - 8 : int'($urandom % 7) - 3;
          K[r][c] = int'($urandom % 7) - 3;
          V[r][c] = int'($urandom % 17) - 8;
        end
      end
    end
    // mvin Q, K (row tiles x d/16 column tiles) and V (same layout)
    for (int i = 0; i < nI; i++)
      for (int kk = 0; kk < dk; kk++)
        for (int r = 0; r < DIM; r++) begin
          for (int l = 0; l < DIM; l++) row[l] = elem_t'(Q[i*DIM+r][kk*DIM+l]);
          sp_write(Q_SP + (i*dk + kk)*DIM + r, row);
          for (int l = 0; l < DIM; l++) row[l] = elem_t'(K[i*DIM+r][kk*DIM+l]);
          sp_write(K_SP + (i*dk + kk)*DIM + r, row);
          for (int l = 0; l < DIM; l++) row[l] = elem_t'(V[i*DIM+r][kk*DIM+l]);
          sp_write(V_SP + (i*dk + kk)*DIM + r, row);
        end
    // reference: S = Q K^T, P = online softmax, O = P V
    for (int r = 0; r < N; r++) begin
      S[r] = new[N];
      for (int j = 0; j < N; j++) begin
        S[r][j] = 0;
        for (int c = 0; c < d; c++) S[r][j] += Q[r][c] * K[j][c];
      end
      void'(ref_softmax_row(S[r], N, w, wf));
      P[r] = w;
      O[r] = new[d];
      for (int c = 0; c < d; c++) begin
        O[r][c] = 0;
        for (int j = 0; j < N; j++) O[r][c] += P[r][j] * V[j][c];
      end
      for (int j = 0; j < N; j++) begin
        longint m = S[r][0];
        foreach (S[r][q]) if (S[r][q] > m) m = S[r][q];
        if (ref_iexp(S[r][j] - m) == 0) n_sat++;
      end
    end

    t0 = cycle;
    // QK^T: score tile (i, j) at S_ACC + (i*nI + j)*DIM, summed over d/16 slices
    for (int i = 0; i < nI; i++)
      for (int j = 0; j < nI; j++)
        for (int kk = 0; kk < dk; kk++)
          exe(Q_SP + (i*dk + kk)*DIM, K_SP + (j*dk + kk)*DIM, S_ACC + (i*nI + j)*DIM, kk > 0, 1'b1);

    // check the scores left in the accumulator (waits for the executor)
    for (int r = 0; r < N; r++)
      for (int k = 0; k < nI; k++) begin
        acc_read(tile_addr(S_ACC, r, k, nI), 1'b1, 1'b0, 32'h0, ar);
        for (int l = 0; l < DIM && k*DIM + l < N; l++) begin
          int got = int'(ar.raw[l]);
          checks++;
          if (got != S[r][k*DIM+l]) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL S[%0d][%0d] = %0d, expected %0d", r, k*DIM+l, got, S[r][k*DIM+l]);
          end
        end
      end
    // the last QK^T tile again, so that the softmax command below is
    // issued while the executor is still busy and has to wait for it
    for (int kk = 0; kk < dk; kk++)
      exe(Q_SP + ((nI-1)*dk + kk)*DIM, K_SP + ((nI-1)*dk + kk)*DIM, S_ACC + ((nI-1)*nI + nI-1)*DIM, kk > 0, 1'b1);

    // online softmax, issued without a fence: it waits for the executor
    t_oa = cycle;
    dma_done = 0;
    fork
      begin
        if (fused) begin
          rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_FUSED_BATCH, S_ACC, P_SP), {32'(N), 32'(N)});
        end else begin
          rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_BATCH_UPDATE, S_ACC, P_SP), {32'(N), 32'(N)});
          rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_BATCH_WEIGHTS, S_ACC, P_SP), {32'(N), 32'(N)});
        end
      end
      begin
        // DMA traffic into another scratchpad region while weights are written
        sp_row_t xrow;
        @(posedge oa_busy);
        for (int k = 0; k < 64; k++) begin
          for (int l = 0; l < DIM; l++) xrow[l] = elem_t'(k + l + seed);
          repeat ($urandom % (fused ? 200 : 40)) @(negedge clk);
          sp_write(X_SP + k, xrow);
        end
        dma_done = 1;
      end
    join
    // PV: issued at once, it waits while OnlineAttention owns the accumulator
    for (int i = 0; i < nI; i++)
      for (int c = 0; c < dk; c++)
        for (int k = 0; k < nI; k++)
          exe(P_SP + (i*nI + k)*DIM, V_SP + (k*dk + c)*DIM, O_ACC + (i*dk + c)*DIM, k > 0, 1'b0);
    wait_idle();
    while (!dma_done) @(negedge clk);
    $display("N=%0d d=%0d %s: QK^T+softmax+PV %0d clocks (softmax issued at +%0d)",
             N, d, fused ? "fused" : "split", cycle - t0, t_oa - t0);

    // check P in the scratchpad
    for (int r = 0; r < N; r++)
      for (int k = 0; k < nI; k++) begin
        sp_read(tile_addr(P_SP, r, k, nI), row);
        for (int l = 0; l < DIM; l++) begin
          int j = k*DIM + l;
          int e = (j < N) ? P[r][j] : 0;
          int got = int'(row[l]);
          checks++;
          if (got != e) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL P[%0d][%0d] = %0d, expected %0d", r, j, got, e);
          end
        end
      end
    // check O in the accumulator, raw and through scale + ReLU
    for (int r = 0; r < N; r++)
      for (int c = 0; c < dk; c++) begin
        acc_read(O_ACC + ((r/DIM)*dk + c)*DIM + r%DIM, 1'b1, 1'b0, 32'h0, ar);
        for (int l = 0; l < DIM; l++) begin
          checks++;
          if (int'(ar.raw[l]) != O[r][c*DIM+l]) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL O[%0d][%0d] = %0d, expected %0d", r, c*DIM+l, ar.raw[l], O[r][c*DIM+l]);
          end
        end
        acc_read(O_ACC + ((r/DIM)*dk + c)*DIM + r%DIM, 1'b0, 1'b1, 32'h0000_0100, ar);
        for (int l = 0; l < DIM; l++) begin
          longint v = (longint'(O[r][c*DIM+l]) * 256 + 32768) >>> 16;
          if (v < 0) v = 0;
          if (v > 127) v = 127;
          checks++;
          if (int'(ar.narrow[l]) != int'(v)) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL narrowed O[%0d][%0d] = %0d, expected %0d", r, c*DIM+l, ar.narrow[l], v);
          end
        end
      end
    // the DMA rows held off during weight writes all arrived
    for (int k = 0; k < 64; k++) begin
      sp_read(X_SP + k, row);
      for (int l = 0; l < DIM; l++) begin
        checks++;
        if (int'(row[l]) != int'(elem_t'(k + l + seed))) begin
          failures++; bad++;
          if (bad < 10) $display("FAIL DMA row %0d lane %0d", k, l);
        end
      end
    end
  endtask

  initial begin
    int b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a non-attention command goes to the controller
    rocc(7'd4, 64'h1234, 64'h5678);
    checks++;
    if (n_ctrl != 1 || ctrl_cmd.rs1 != 64'h1234) begin failures++; $display("FAIL controller passthrough"); end
    // iexp configuration: four OP_CONFIG writes
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QLN2) << 8),     64'(QLN2));
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QLN2_INV) << 8), 64'(QLN2_INV));
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QB) << 8),       64'(QB));
    rocc(FUNCT_ONLINE_ATTN, oa_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QC) << 8),       64'(QC));

    run_head(40, 32, 1'b0, 3);
    b0 = n_oa_batch;
    run_head(128, 64, 1'b1, 7);
    checks++;
    if (n_oa_batch - b0 != 1) begin failures++; $display("FAIL fused Q-block used %0d commands", n_oa_batch - b0); end

    $display("rescale=%0d saturated=%0d partial_chunk_writes=%0d exe_wait_on_oa=%0d oa_wait_on_exe=%0d dma_write_stall=%0d accumulate_tiles=%0d transposed_tiles=%0d ctrl_cmds=%0d",
             n_rescale, n_sat, n_partial, n_exe_wait, n_oa_wait, n_dma_stall, n_acc_write, n_transpose, n_ctrl);
    checks += 9;
    if (n_rescale == 0)   begin failures++; $display("FAIL no rescale"); end
    if (n_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    if (n_partial == 0)   begin failures++; $display("FAIL no partial chunk"); end
    if (n_exe_wait == 0)  begin failures++; $display("FAIL executor never waited"); end
    if (n_oa_wait == 0)   begin failures++; $display("FAIL OnlineAttention never waited"); end
    if (n_dma_stall == 0) begin failures++; $display("FAIL DMA write never held off"); end
    if (n_acc_write == 0) begin failures++; $display("FAIL no accumulating tile"); end
    if (n_transpose == 0) begin failures++; $display("FAIL no transposed tile"); end
    if (n_ctrl == 0)      begin failures++; $display("FAIL no controller command"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
