// online_attention: streaming (online) softmax engine between the accumulator
// and the scratchpad, driven by RoCC function 23.
//
// After a QK^T matmul has left a block of int32 scores in the accumulator,
// one command makes this engine walk every row of the block and every
// DIM-wide column chunk of that row. For each chunk it
//   UPDATE : reads the chunk (raw accumulator read), finds its maximum with a
//            16-input max tree, merges it into the row's running maximum m and
//            keeps the running sum l = sum iexp(x - m), rescaling the old sum
//            by iexp(m_old - m_new) whenever the maximum grows;
//   WEIGHTS: re-reads the chunk, computes iexp(x - m) * 127 / l on all lanes,
//            clamps to [0,127] and writes the 16 int8 weights to the
//            scratchpad in one cycle.
// BATCH_UPDATE and BATCH_WEIGHTS run one of the two phases over all rows;
// OP_FUSED_BATCH runs UPDATE then WEIGHTS for each row without a second
// command. OP_CONFIG writes one of the four iexp coefficients.
//
// State per row (arrays of MAX_ROWS): max_state, sum_state, state_valid and
// rescale_mul, as in the accelerator description. The FSM has the seven
// states idle, read_req, read_wait, compute, update, write, done.
//
// Command encoding (this design's choice; the description fixes only the
// operation names, the funct number and the argument names):
//   rs1[2:0]   operation (oa_op_e)         rs1[9:8]  OP_CONFIG coefficient slot
//   rs1[31:16] sp_addr   (scratchpad row)  rs1[63:32] scores_addr (accumulator row)
//   rs2[31:0]  num_rows  (or OP_CONFIG value)   rs2[63:32] total_cols
// num_rows above MAX_ROWS is clamped to MAX_ROWS. Rows and chunks are laid
// out as DIMxDIM tiles (oa_pkg::tile_row_addr) both in the accumulator and in
// the scratchpad. Lanes past total_cols in the last chunk are ignored by
// UPDATE and written as 0 by WEIGHTS.
//
// Timing: a command is accepted only in idle (cmd_ready). Each chunk takes
// read_req (until the accumulator port grants), read_wait (until data
// returns), compute and update or write: 4 clocks with a 1-clock accumulator.
// A chunk that raises the maximum of an already-started row adds the
// sequential rescale division (65 clocks); the first WEIGHTS chunk of a row
// adds the reciprocal division (65 clocks). busy is high from acceptance
// until the cycle after done.
//
// Arithmetic choices of this design, not given by the description: the sum
// rescale is l * iexp(m_old - m_new) / iexp(0); weights use the reciprocal
// floor(127 * 2^24 / l) and a 24-bit right shift; sums saturate at 2^32-1.
module online_attention
  import oa_pkg::*;
#(
  parameter int unsigned MAX_ROWS = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  // RoCC command (funct already decoded as 23)
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [63:0]     cmd_rs1,
  input  logic [63:0]     cmd_rs2,
  output logic            busy,
  // raw accumulator read port
  output logic            acc_req_valid,
  input  logic            acc_req_ready,
  output logic [ACC_ADDR_W-1:0] acc_req_addr,
  input  logic            acc_resp_valid,
  input  acc_row_t        acc_resp_data,
  // scratchpad write port (has priority, never stalled)
  output logic            sp_wen,
  output sp_wreq_t        sp_wreq
);

  localparam int unsigned ROW_W = $clog2(MAX_ROWS + 1);
  localparam int unsigned DIV_W = 64;
  localparam logic [DIV_W-1:0] WEIGHT_NUM = DIV_W'(127) << 24;

  typedef enum logic [2:0] {
    S_IDLE, S_READ_REQ, S_READ_WAIT, S_COMPUTE, S_UPDATE, S_WRITE, S_DONE
  } state_e;

  state_e state_q;

  // ---------------------------------------------------------------- config
  iexp_cfg_t cfg_q;
  logic [31:0] exp_one;           // iexp(0) = qb^2 + qc, the value of exp(0)
  always_comb exp_one = 32'(64'(cfg_q.qb) * 64'(cfg_q.qb) + 64'(cfg_q.qc));

  // ---------------------------------------------------------- command regs
  oa_op_e             op_q;
  logic               phase_weights_q;   // fused_phase: 0 UPDATE, 1 WEIGHTS
  logic [31:0]        scores_base_q, sp_base_q, total_cols_q, n_chunks_q;
  logic [ROW_W-1:0]   num_rows_q, row_q;
  logic [31:0]        chunk_q;

  // ---------------------------------------------------------- per-row state
  acc_t        max_state   [MAX_ROWS];
  logic [31:0] sum_state   [MAX_ROWS];
  logic        state_valid [MAX_ROWS];
  logic [31:0] rescale_mul [MAX_ROWS];

  // ---------------------------------------------------------- working regs
  acc_row_t     scores_q;
  acc_t         m_new_q;
  logic         inc_q;           // maximum grew on a started row
  logic [31:0]  inv_sum_q;       // 127*2^24 / l for the current row
  logic         inv_valid_q;
  logic         div_wait_q;      // a division for this step is in flight
  sp_row_t      wdata_q;

  logic [$clog2(MAX_ROWS)-1:0] ridx;
  assign ridx = row_q[$clog2(MAX_ROWS)-1:0];

  // lane mask for a partial last chunk
  logic [DIM-1:0] lane_ok;
  always_comb begin
    for (int l = 0; l < DIM; l++)
      lane_ok[l] = (chunk_q * DIM + l) < total_cols_q;
  end

  // 16-input max tree; signed order via MSB-flipped unsigned compare
  function automatic logic gt_signed(acc_t a, acc_t b);
    return {~a[ACC_W-1], a[ACC_W-2:0]} > {~b[ACC_W-1], b[ACC_W-2:0]};
  endfunction

  acc_t lvl [2*DIM-1];   // heap-ordered tree: leaves at DIM-1 .. 2*DIM-2
  acc_t chunk_max;
  always_comb begin
    for (int l = 0; l < DIM; l++)
      lvl[DIM-1+l] = lane_ok[l] ? scores_q[l] : acc_t'({1'b1, {(ACC_W-1){1'b0}}});
    for (int n = DIM-2; n >= 0; n--)
      lvl[n] = gt_signed(lvl[2*n+2], lvl[2*n+1]) ? lvl[2*n+2] : lvl[2*n+1];
    chunk_max = lvl[0];
  end

  // merge with the running maximum
  acc_t m_old, m_merged;
  logic row_started, grows;
  always_comb begin
    m_old       = max_state[ridx];
    row_started = state_valid[ridx];
    grows       = row_started && gt_signed(chunk_max, m_old);
    m_merged    = (!row_started || grows) ? chunk_max : m_old;
  end

  // saturating a - b into int32
  function automatic acc_t sub_sat(acc_t a, acc_t b);
    logic signed [ACC_W:0] d;
    d = (ACC_W+1)'(a) - (ACC_W+1)'(b);
    if (d < -(ACC_W+1)'(signed'({1'b0, 1'b1, {(ACC_W-1){1'b0}}})))
      return acc_t'({1'b1, {(ACC_W-1){1'b0}}});
    else if (d > (ACC_W+1)'(signed'({2'b00, {(ACC_W-1){1'b1}}})))
      return acc_t'({1'b0, {(ACC_W-1){1'b1}}});
    else
      return d[ACC_W-1:0];
  endfunction

  // 16 parallel iexp lanes; lane 0 doubles as the rescale exponent in compute
  acc_t        ex_in  [DIM];
  logic [31:0] ex_out [DIM];
  logic        ex_sat [DIM];
  always_comb begin
    for (int l = 0; l < DIM; l++) begin
      if (phase_weights_q)
        ex_in[l] = sub_sat(scores_q[l], max_state[ridx]);
      else
        ex_in[l] = sub_sat(scores_q[l], m_new_q);
    end
    if (state_q == S_COMPUTE && !phase_weights_q)
      ex_in[0] = sub_sat(m_old, m_merged);
  end

  for (genvar g = 0; g < DIM; g++) begin : g_lane
    iexp u_iexp (.x(ex_in[g]), .cfg(cfg_q), .y(ex_out[g]), .sat(ex_sat[g]));
  end

  // sum of exponentials of the valid lanes (saturating)
  logic [31:0] sum_exp;
  always_comb begin
    logic [36:0] s;
    s = '0;
    for (int l = 0; l < DIM; l++)
      if (lane_ok[l]) s += 37'(ex_out[l]);
    sum_exp = (s > 37'(32'hFFFF_FFFF)) ? 32'hFFFF_FFFF : s[31:0];
  end

  function automatic logic [31:0] add_sat(logic [31:0] a, logic [31:0] b);
    logic [32:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[32] ? 32'hFFFF_FFFF : s[31:0];
  endfunction

  // normalised int8 weights
  sp_row_t weights;
  always_comb begin
    for (int l = 0; l < DIM; l++) begin
      logic [63:0] prod;
      prod = (64'(ex_out[l]) * 64'(inv_sum_q)) >> 24;
      if (!lane_ok[l])           weights[l] = '0;
      else if (prod > 64'd127)   weights[l] = 8'sd127;
      else                       weights[l] = elem_t'(prod[7:0]);
    end
  end

  // shared sequential divider
  logic              div_start, div_busy, div_done;
  logic [DIV_W-1:0]  div_dividend, div_divisor, div_quot;
  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_dividend),
    .divisor(div_divisor), .busy(div_busy), .done(div_done), .quotient(div_quot)
  );

  always_comb begin
    div_start    = 1'b0;
    div_dividend = '0;
    div_divisor  = '0;
    if (state_q == S_COMPUTE && phase_weights_q && !inv_valid_q && !div_wait_q) begin
      div_start    = 1'b1;
      div_dividend = WEIGHT_NUM;
      div_divisor  = DIV_W'(sum_state[ridx]);
    end else if (state_q == S_UPDATE && inc_q && !div_wait_q) begin
      div_start    = 1'b1;
      div_dividend = DIV_W'(sum_state[ridx]) * DIV_W'(rescale_mul[ridx]);
      div_divisor  = DIV_W'(exp_one);
    end
  end

  // ---------------------------------------------------------- interface
  assign cmd_ready     = (state_q == S_IDLE);
  assign busy          = (state_q != S_IDLE);
  assign acc_req_valid = (state_q == S_READ_REQ);
  assign acc_req_addr  = ACC_ADDR_W'(tile_row_addr(scores_base_q, 32'(row_q), chunk_q, n_chunks_q));
  assign sp_wen        = (state_q == S_WRITE);
  always_comb begin
    sp_wreq.addr = SP_ADDR_W'(tile_row_addr(sp_base_q, 32'(row_q), chunk_q, n_chunks_q));
    sp_wreq.mask = '1;
    sp_wreq.data = wdata_q;
  end

  // previous contribution to the running sum: none, unchanged, or rescaled
  logic [31:0] upd_base;
  always_comb
    upd_base = !state_valid[ridx]          ? 32'd0 :
               !inc_q                      ? sum_state[ridx] :
               (div_quot > 64'hFFFF_FFFF)  ? 32'hFFFF_FFFF : div_quot[31:0];

  // ---------------------------------------------------------- FSM
  logic last_chunk, last_row;
  assign last_chunk = (chunk_q + 1 >= n_chunks_q);
  assign last_row   = (32'(row_q) + 1 >= 32'(num_rows_q));

  oa_op_e cmd_op;
  assign cmd_op = oa_op_e'(cmd_rs1[2:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q         <= S_IDLE;
      cfg_q           <= '0;
      op_q            <= OP_CONFIG;
      phase_weights_q <= 1'b0;
      scores_base_q   <= '0;
      sp_base_q       <= '0;
      total_cols_q    <= '0;
      n_chunks_q      <= '0;
      num_rows_q      <= '0;
      row_q           <= '0;
      chunk_q         <= '0;
      scores_q        <= '0;
      m_new_q         <= '0;
      inc_q           <= 1'b0;
      inv_sum_q       <= '0;
      inv_valid_q     <= 1'b0;
      div_wait_q      <= 1'b0;
      wdata_q         <= '0;
      for (int r = 0; r < MAX_ROWS; r++) begin
        max_state[r]   <= '0;
        sum_state[r]   <= '0;
        state_valid[r] <= 1'b0;
        rescale_mul[r] <= '0;
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          if (cmd_op == OP_CONFIG) begin
            unique case (oa_cfg_e'(cmd_rs1[9:8]))
              CFG_QLN2:     cfg_q.qln2     <= cmd_rs2[31:0];
              CFG_QLN2_INV: cfg_q.qln2_inv <= cmd_rs2[31:0];
              CFG_QB:       cfg_q.qb       <= cmd_rs2[31:0];
              CFG_QC:       cfg_q.qc       <= cmd_rs2[31:0];
            endcase
          end else begin
            op_q            <= cmd_op;
            phase_weights_q <= (cmd_op == OP_BATCH_WEIGHTS);
            scores_base_q   <= cmd_rs1[63:32];
            sp_base_q       <= {16'd0, cmd_rs1[31:16]};
            total_cols_q    <= cmd_rs2[63:32];
            n_chunks_q      <= (cmd_rs2[63:32] + DIM - 1) / DIM;
            num_rows_q      <= (cmd_rs2[31:0] > MAX_ROWS) ? ROW_W'(MAX_ROWS) : ROW_W'(cmd_rs2[31:0]);
            row_q           <= '0;
            chunk_q         <= '0;
            inv_valid_q     <= 1'b0;
            div_wait_q      <= 1'b0;
            if (cmd_op != OP_BATCH_WEIGHTS)
              for (int r = 0; r < MAX_ROWS; r++) state_valid[r] <= 1'b0;
            if (cmd_rs2[31:0] == 0 || cmd_rs2[63:32] == 0)
              state_q <= S_DONE;
            else
              state_q <= S_READ_REQ;
          end
        end

        S_READ_REQ: if (acc_req_ready) state_q <= S_READ_WAIT;

        S_READ_WAIT: if (acc_resp_valid) begin
          scores_q <= acc_resp_data;
          state_q  <= S_COMPUTE;
        end

        S_COMPUTE: begin
          if (!phase_weights_q) begin
            m_new_q <= m_merged;
            inc_q   <= grows;
            if (grows) rescale_mul[ridx] <= ex_out[0];
            state_q <= S_UPDATE;
          end else if (!inv_valid_q) begin
            // first WEIGHTS chunk of the row: wait for 127*2^24 / l
            if (div_start) div_wait_q <= 1'b1;
            if (div_done) begin
              inv_sum_q   <= (div_quot > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : div_quot[31:0];
              inv_valid_q <= 1'b1;
              div_wait_q  <= 1'b0;
            end
          end else begin
            wdata_q <= weights;
            state_q <= S_WRITE;
          end
        end

        S_UPDATE: begin
          if (!inc_q || div_done) begin
            sum_state[ridx]   <= add_sat(upd_base, sum_exp);
            max_state[ridx]   <= m_new_q;
            state_valid[ridx] <= 1'b1;
            div_wait_q        <= 1'b0;
            state_q           <= S_READ_REQ;
            if (last_chunk) begin
              chunk_q <= '0;
              if (op_q == OP_FUSED_BATCH) begin
                phase_weights_q <= 1'b1;   // same row, WEIGHTS phase
                inv_valid_q     <= 1'b0;
              end else if (last_row) begin
                state_q <= S_DONE;
              end else begin
                row_q <= row_q + 1'b1;
              end
            end else begin
              chunk_q <= chunk_q + 1;
            end
          end else if (div_start) begin
            div_wait_q <= 1'b1;
          end
        end

        S_WRITE: begin
          state_q <= S_READ_REQ;
          if (last_chunk) begin
            chunk_q     <= '0;
            inv_valid_q <= 1'b0;
            if (op_q == OP_FUSED_BATCH) phase_weights_q <= 1'b0;
            if (last_row) state_q <= S_DONE;
            else          row_q   <= row_q + 1'b1;
          end else begin
            chunk_q <= chunk_q + 1;
          end
        end

        S_DONE: state_q <= S_IDLE;

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- protocol checks
  // a raw read request is held until the accumulator port grants it
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    acc_req_valid && !acc_req_ready |=> acc_req_valid && $stable(acc_req_addr));
  // a command is only taken while idle
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> state_q == S_IDLE);

endmodule
