// tb_online_attention: drives the OnlineAttention engine with RoCC-style
// commands against a behavioural accumulator (one-clock reads, random
// grant stalls) and a captured scratchpad write port.
//
// Checks: the int8 weights of every row against the bit-exact online
// softmax model and against floating-point softmax (within 6/127), that
// every weight row is written exactly once at its tile address and nothing
// else is written, the three batch commands (fused, and update followed by
// weights), a partial last chunk, rescaling, z >= 32 saturation, and the
// clock count of a fused command without stalls or divisions, and a
// three-chunk row whose maximum grows once (one rescale division).
module tb_online_attention;
  import oa_pkg::*;
  import oa_ref_pkg::*;

  localparam int MAXR = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid = 0, cmd_ready, busy;
  logic [63:0] cmd_rs1 = 0, cmd_rs2 = 0;
  logic        acc_req_valid, acc_req_ready, acc_resp_valid, sp_wen;
  logic [ACC_ADDR_W-1:0] acc_req_addr;
  acc_row_t    acc_resp_data;
  sp_wreq_t    sp_wreq;

  online_attention #(.MAX_ROWS(MAXR)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural accumulator
  acc_row_t acc_mem [ACC_ROWS];
  bit stall_en = 0;
  assign acc_req_ready = rnd_ready;
  logic rnd_ready;
  always @(posedge clk) rnd_ready <= stall_en ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) begin
    acc_resp_valid <= acc_req_valid && acc_req_ready;
    if (acc_req_valid && acc_req_ready) acc_resp_data <= acc_mem[acc_req_addr];
  end

  // captured scratchpad
  sp_row_t sp_mem [SP_BANKS*SP_ROWS];
  int      sp_cnt [SP_BANKS*SP_ROWS];
  always @(posedge clk) if (sp_wen) begin
    sp_mem[sp_wreq.addr] <= sp_wreq.data;
    sp_cnt[sp_wreq.addr] <= sp_cnt[sp_wreq.addr] + 1;
  end

  task automatic issue(logic [63:0] rs1, logic [63:0] rs2);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_rs1 = rs1; cmd_rs2 = rs2;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  function automatic logic [63:0] mk_rs1(oa_op_e op, int acc_base, int sp_base);
    return {32'(acc_base), 16'(sp_base), 13'd0, op};
  endfunction

  // scores of a block: row r, column j
  int sc [MAXR][];

  task automatic fill_block(int acc_base, int rows, int cols, int mode);
    int nch = (cols + DIM - 1) / DIM;
    for (int r = 0; r < rows; r++) begin
      sc[r] = new[cols];
      for (int j = 0; j < cols; j++) begin
        case ((mode + r) % 4)
          0: sc[r][j] = int'($urandom % 400) - 200;          // moderate spread
          1: sc[r][j] = j * 7 - 100;                          // rising: rescale every chunk
          2: sc[r][j] = (j == cols-1) ? 600 : int'($urandom % 50); // outlier: others saturate
          default: sc[r][j] = int'($urandom % 2000) - 1000;  // wide spread
        endcase
      end
      for (int c = 0; c < nch; c++)
        for (int l = 0; l < DIM; l++)
          acc_mem[tile_addr(acc_base, r, c, nch)][l] =
            (c*DIM + l < cols) ? sc[r][c*DIM + l] : 32'sh7fff_0000; // junk past the end
    end
  endtask

  int total_grows = 0, total_sat = 0;

  task automatic check_block(int sp_base, int rows, int cols, string tag);
    int nch = (cols + DIM - 1) / DIM;
    int w[]; real wf[];
    int bad = 0;
    for (int r = 0; r < rows; r++) begin
      total_grows += ref_softmax_row(sc[r], cols, w, wf);
      for (int c = 0; c < nch; c++) begin
        int a = tile_addr(sp_base, r, c, nch);
        checks++;
        if (sp_cnt[a] != 1) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s row %0d chunk %0d written %0d times", tag, r, c, sp_cnt[a]);
        end
        for (int l = 0; l < DIM; l++) begin
          int j = c*DIM + l;
          int got = int'(sp_mem[a][l]);
          int exp_w = (j < cols) ? w[j] : 0;
          checks++;
          if (got != exp_w) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL %s row %0d col %0d got %0d expected %0d", tag, r, j, got, exp_w);
          end
          if (j < cols) begin
            checks++;
            if (real'(got) - wf[j] > 6.0 || wf[j] - real'(got) > 6.0) begin
              failures++; bad++;
              if (bad < 10) $display("FAIL %s row %0d col %0d got %0d float %f", tag, r, j, got, wf[j]);
            end
            if (ref_iexp(sc[r][j] - 600) == 0 && (r % 4) == 2) total_sat++;
          end
        end
      end
    end
  endtask

  function automatic int written_rows();
    int n = 0;
    for (int a = 0; a < SP_BANKS*SP_ROWS; a++) n += sp_cnt[a];
    return n;
  endfunction

  initial begin
    int t0, t1, n_before;
    for (int a = 0; a < SP_BANKS*SP_ROWS; a++) begin sp_cnt[a] = 0; sp_mem[a] = '0; end
    for (int a = 0; a < ACC_ROWS; a++) acc_mem[a] = '0;
    acc_resp_valid = 0; acc_resp_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // four OP_CONFIG writes
    issue(mk_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QLN2) << 8),     64'(QLN2));
    issue(mk_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QLN2_INV) << 8), 64'(QLN2_INV));
    issue(mk_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QB) << 8),       64'(QB));
    issue(mk_rs1(OP_CONFIG, 0, 0) | (64'(CFG_QC) << 8),       64'(QC));

    // 1) fused batch, 20 rows x 40 columns (last chunk partial)
    fill_block(0, 20, 40, 0);
    issue({mk_rs1(OP_FUSED_BATCH, 0, 16'h0100)}, {32'd40, 32'd20});
    wait_idle();
    check_block(16'h0100, 20, 40, "fused");
    checks++;
    if (written_rows() != 20*3) begin failures++; $display("FAIL extra writes %0d", written_rows()); end

    // 2) BATCH_UPDATE then BATCH_WEIGHTS, 33 rows x 64 columns, random grant stalls
    stall_en = 1;
    fill_block(512, 33, 64, 1);
    issue(mk_rs1(OP_BATCH_UPDATE, 512, 16'h1000), {32'd64, 32'd33});
    wait_idle();
    checks++;
    if (written_rows() != 60) begin failures++; $display("FAIL update phase wrote the scratchpad"); end
    issue(mk_rs1(OP_BATCH_WEIGHTS, 512, 16'h1000), {32'd64, 32'd33});
    wait_idle();
    check_block(16'h1000, 33, 64, "split");
    stall_en = 0;

    // 3) cycle count: one row of one chunk of equal scores (no rescale):
    //    accept + UPDATE(4) + WEIGHTS(4 + 1 + 65 division) + done
    for (int l = 0; l < DIM; l++) acc_mem[1500][l] = 32'sd5;
    sc[0] = new[16]; foreach (sc[0][j]) sc[0][j] = 5;
    n_before = written_rows();
    @(negedge clk);
    cmd_valid = 1; cmd_rs1 = mk_rs1(OP_FUSED_BATCH, 1500, 16'h2000); cmd_rs2 = {32'd16, 32'd1};
    t0 = cycle;
    @(negedge clk); cmd_valid = 0;
    while (busy) @(negedge clk);
    t1 = cycle;
    checks++;
    if (t1 - t0 != 1 + 4 + 4 + 66 + 1) begin
      failures++; $display("FAIL fused 1x16 took %0d clocks", t1 - t0);
    end
    check_block(16'h2000, 1, 16, "timing");
    checks++;
    if (written_rows() != n_before + 1) begin failures++; $display("FAIL timing writes"); end

    // 3b) the worked example of one query row over three chunks (N = 48):
    //     chunk maxima 4, 7, 5 (x20 = one unit at score scale 0.05), so the
    //     second chunk rescales the running sum and the third does not.
    //     Only the first four scores of each chunk are given; the other
    //     lanes repeat them.
    begin
      int ex [3][4] = '{'{3, 1, 4, 1}, '{7, 2, 1, 3}, '{2, 5, 1, 2}};
      int w[]; real wf[];
      sc[0] = new[48];
      for (int c = 0; c < 3; c++)
        for (int l = 0; l < DIM; l++) begin
          sc[0][c*DIM + l] = 20 * ex[c][l % 4];
          acc_mem[tile_addr(1600, 0, c, 3)][l] = 20 * ex[c][l % 4];
        end
      checks++;
      if (ref_softmax_row(sc[0], 48, w, wf) != 1) begin
        failures++; $display("FAIL worked example: model rescaled other than once");
      end
      @(negedge clk);
      cmd_valid = 1; cmd_rs1 = mk_rs1(OP_FUSED_BATCH, 1600, 16'h2200); cmd_rs2 = {32'd48, 32'd1};
      t0 = cycle;
      @(negedge clk); cmd_valid = 0;
      while (busy) @(negedge clk);
      t1 = cycle;
      // as the 1x16 case, plus two more chunks in each phase and one rescale
      checks++;
      if (t1 - t0 != 1 + 4 + 4 + 66 + 1 + 2*4 + 2*4 + 65) begin
        failures++; $display("FAIL worked example took %0d clocks", t1 - t0);
      end
      check_block(16'h2200, 1, 48, "worked");
    end

    // 4) full 256-row Q-block (onlineAttentionMaxRows), 128 columns
    fill_block(0, 256, 128, 2);
    issue(mk_rs1(OP_FUSED_BATCH, 0, 16'h2400), {32'd128, 32'd256});
    wait_idle();
    check_block(16'h2400, 256, 128, "maxrows");

    checks++;
    if (total_grows == 0 || total_sat == 0) begin
      failures++; $display("FAIL mechanisms not exercised: grows=%0d sat=%0d", total_grows, total_sat);
    end
    $display("rescales=%0d saturated lanes=%0d", total_grows, total_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
