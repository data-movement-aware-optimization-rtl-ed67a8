// ws_executor: runs one DIMxDIM tile matmul on the weight-stationary array,
// scratchpad in, accumulator out.
//
// For a command it reads the DIM rows of B from the scratchpad and preloads
// them into the array (as columns when transpose_b is set, which is how
// QK^T uses the rows of K), then reads the DIM rows of A and streams them
// through the array, and writes each C row to the accumulator at
// c_addr + i, overwriting or, with accumulate, adding to the stored row (the
// K-dimension partial sums of a larger matmul). Larger matmuls are loops of
// tile commands issued by the controller. Operands reaching the array only
// from the scratchpad and results landing in the accumulator follow the
// accelerator description; the command format and the sequencing are this
// design's own.
//
// Interface and timing: cmd_valid/cmd_ready handshake; a command is taken
// only when the accumulator port is granted to the executor (acc_ready),
// which is how it waits while OnlineAttention owns the port. Scratchpad
// reads have one clock latency; a response is used only if this block issued
// a read in the clock before. A tile takes 2*DIM clocks of reads, then the
// array latency 2*DIM-1: busy is high for 4*DIM clocks, and the edge that
// clears it is the (4*DIM+1)-th after the accepting edge.
module ws_executor
  import oa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  exe_cmd_t        cmd,
  output logic            busy,
  // scratchpad read port
  output logic            sp_rd_valid,
  output logic [SP_ADDR_W-1:0] sp_rd_addr,
  input  logic            sp_rd_resp_valid,
  input  sp_row_t         sp_rd_data,
  // accumulator write port
  output logic            acc_valid,
  input  logic            acc_ready,
  output acc_req_t        acc_req
);

  localparam int unsigned IW = $clog2(DIM);

  typedef enum logic [1:0] {E_IDLE, E_ISSUE, E_DRAIN} estate_e;
  estate_e state_q;
  exe_cmd_t cmd_q;
  logic [IW:0]   rd_cnt_q;     // 0..2*DIM-1: B rows then A rows
  logic [IW:0]   out_cnt_q;    // C rows written
  logic          tag_v_q;      // a read was issued last clock
  logic          tag_w_q;      // pending read is a weight row
  logic [IW-1:0] tag_idx_q;

  logic     arr_out_valid;
  acc_row_t arr_out_c;

  assign cmd_ready   = (state_q == E_IDLE) && acc_ready;
  assign busy        = (state_q != E_IDLE);
  assign sp_rd_valid = (state_q == E_ISSUE);
  assign sp_rd_addr  = rd_cnt_q[IW] ? cmd_q.a_addr + SP_ADDR_W'(rd_cnt_q[IW-1:0])
                                    : cmd_q.b_addr + SP_ADDR_W'(rd_cnt_q[IW-1:0]);

  systolic_array u_array (
    .clk, .rst_n,
    .w_valid     (sp_rd_resp_valid && tag_v_q && tag_w_q),
    .w_transpose (cmd_q.transpose_b),
    .w_idx       (tag_idx_q),
    .w_data      (sp_rd_data),
    .in_valid    (sp_rd_resp_valid && tag_v_q && !tag_w_q),
    .in_a        (sp_rd_data),
    .out_valid   (arr_out_valid),
    .out_c       (arr_out_c)
  );

  always_comb begin
    acc_valid     = arr_out_valid;
    acc_req       = '0;
    acc_req.wen   = 1'b1;
    acc_req.addr  = cmd_q.c_addr + ACC_ADDR_W'(out_cnt_q[IW-1:0]);
    acc_req.acc   = cmd_q.accumulate;
    acc_req.wdata = arr_out_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= E_IDLE;
      cmd_q     <= '0;
      rd_cnt_q  <= '0;
      out_cnt_q <= '0;
      tag_v_q   <= 1'b0;
      tag_w_q   <= 1'b0;
      tag_idx_q <= '0;
    end else begin
      tag_v_q <= sp_rd_valid;
      if (sp_rd_valid) begin
        tag_w_q   <= !rd_cnt_q[IW];
        tag_idx_q <= rd_cnt_q[IW-1:0];
      end
      if (arr_out_valid) out_cnt_q <= out_cnt_q + 1'b1;
      unique case (state_q)
        E_IDLE: if (cmd_valid && acc_ready) begin
          cmd_q     <= cmd;
          rd_cnt_q  <= '0;
          out_cnt_q <= '0;
          state_q   <= E_ISSUE;
        end
        E_ISSUE: begin
          rd_cnt_q <= rd_cnt_q + 1'b1;
          if (rd_cnt_q == (IW+1)'(2*DIM-1)) state_q <= E_DRAIN;
        end
        E_DRAIN: if (arr_out_valid && out_cnt_q == (IW+1)'(DIM-1)) state_q <= E_IDLE;
        default: state_q <= E_IDLE;
      endcase
    end
  end

  // results cannot be held back: the port must stay granted for the whole tile
  a_acc_granted: assert property (@(posedge clk) disable iff (!rst_n)
    acc_valid |-> acc_ready);

endmodule
