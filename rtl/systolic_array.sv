// systolic_array: DIMxDIM weight-stationary int8 mesh with int32 partial sums.
//
// Each processing element (k, j) holds one weight B[k][j]. A row of A
// (A[i][0..DIM-1]) enters from the left, lane k delayed by k clocks, moves
// one PE to the right per clock, and every PE adds a[k]*B[k][j] to the
// partial sum coming from the PE above, so the bottom of column j produces
// C[i][j] = sum_k A[i][k]*B[k][j]. Output lanes are re-aligned so that a
// whole C row leaves together. The mesh size and the weight-stationary
// dataflow follow the accelerator description; the PE and skew structure is
// this design's own.
//
// Interface:
//   preload: w_valid writes sp_row w_data as weight row w_idx, or, with
//            w_transpose, as weight column w_idx (B = K^T is loaded straight
//            from the rows of K; this stands for the transposer). Weights
//            must not change while rows are in flight.
//   stream : one A row per clock on in_valid/in_a, bubbles allowed.
//   result : out_valid/out_c carry C row i exactly LATENCY = 2*DIM-1 clocks
//            after A row i was presented.
module systolic_array
  import oa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_valid,
  input  logic             w_transpose,
  input  logic [$clog2(DIM)-1:0] w_idx,
  input  sp_row_t          w_data,
  input  logic             in_valid,
  input  sp_row_t          in_a,
  output logic             out_valid,
  output acc_row_t         out_c
);

  localparam int unsigned LATENCY = 2*DIM - 1;

  elem_t weight [DIM][DIM];     // [k][j]
  elem_t a_reg  [DIM][DIM];
  acc_t  p_reg  [DIM][DIM];
  elem_t a_skew [DIM];
  logic [LATENCY-1:0] vpipe;

  // weight preload
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DIM; k++)
        for (int j = 0; j < DIM; j++) weight[k][j] <= '0;
    end else if (w_valid) begin
      for (int l = 0; l < DIM; l++) begin
        if (w_transpose) weight[l][w_idx] <= w_data[l];
        else             weight[w_idx][l] <= w_data[l];
      end
    end
  end

  // input skew: lane k delayed by k clocks
  assign a_skew[0] = in_a[0];
  for (genvar k = 1; k < DIM; k++) begin : g_skew
    elem_t dl [k];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int d = 0; d < k; d++) dl[d] <= '0;
      end else begin
        dl[0] <= in_a[k];
        for (int d = 1; d < k; d++) dl[d] <= dl[d-1];
      end
    end
    assign a_skew[k] = dl[k-1];
  end

  // processing elements
  for (genvar k = 0; k < DIM; k++) begin : g_row
    for (genvar j = 0; j < DIM; j++) begin : g_col
      elem_t a_in;
      acc_t  p_in;
      assign a_in = (j == 0) ? a_skew[k] : a_reg[k][(j == 0) ? 0 : j-1];
      assign p_in = (k == 0) ? '0 : p_reg[(k == 0) ? 0 : k-1][j];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          a_reg[k][j] <= '0;
          p_reg[k][j] <= '0;
        end else begin
          a_reg[k][j] <= a_in;
          p_reg[k][j] <= p_in + acc_t'(a_in) * acc_t'(weight[k][j]);
        end
      end
    end
  end

  // output de-skew: column j delayed by DIM-1-j clocks
  assign out_c[DIM-1] = p_reg[DIM-1][DIM-1];
  for (genvar j = 0; j < DIM-1; j++) begin : g_deskew
    localparam int unsigned D = DIM - 1 - j;
    acc_t dl [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int d = 0; d < D; d++) dl[d] <= '0;
      end else begin
        dl[0] <= p_reg[DIM-1][j];
        for (int d = 1; d < D; d++) dl[d] <= dl[d-1];
      end
    end
    assign out_c[j] = dl[D-1];
  end

  // valid pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];

endmodule
