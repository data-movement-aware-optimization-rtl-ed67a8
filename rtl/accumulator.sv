// accumulator: int32 accumulator SRAM of the array, ACC_ROWS rows of DIM
// int32 lanes, with the scaling/ReLU narrowing path and a raw read.
//
// Matmul results land here (overwrite, or add to the stored row when acc is
// set, as partial sums over K are accumulated). A read returns, one clock
// later, both the raw int32 row (the bypass that OnlineAttention uses) and
// the narrowed int8 row of the mvout path: each lane is multiplied by an
// unsigned Q16.16 scale, rounded half up, optionally passed through ReLU and
// saturated to int8.
//
// Interface: one request per clock (req_valid with acc_req_t); always ready.
// Reads: resp_valid one clock after the request, data held until the next
// read. Writes take effect at the clock edge; an accumulating write reads
// the old row in the same cycle. The row count and int32 width follow the
// accelerator description; the single request port, the fixed-point scale
// (the real mvout scale is a floating-point factor) and the rounding are
// this design's choices.
module accumulator
  import oa_pkg::*;
#(
  parameter int unsigned ROWS = ACC_ROWS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  input  acc_req_t  req,
  output logic      resp_valid,
  output acc_resp_t resp
);

  acc_row_t mem [ROWS];

  acc_row_t    rd_q;
  logic        relu_q;
  logic [31:0] scale_q;

  logic [$clog2(ROWS)-1:0] row;
  assign row = req.addr[$clog2(ROWS)-1:0];

  // accumulate-on-write adder, one per lane (wraps like the int32 datapath)
  acc_row_t wsum;
  always_comb begin
    for (int l = 0; l < DIM; l++)
      wsum[l] = req.acc ? mem[row][l] + req.wdata[l] : req.wdata[l];
  end

  always_ff @(posedge clk) begin
    if (req_valid && req.wen) mem[row] <= wsum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      rd_q       <= '0;
      relu_q     <= 1'b0;
      scale_q    <= '0;
    end else begin
      resp_valid <= req_valid && !req.wen;
      if (req_valid && !req.wen) begin
        rd_q    <= mem[row];
        relu_q  <= req.relu && !req.raw;
        scale_q <= req.raw ? 32'h0001_0000 : req.scale;
      end
    end
  end

  // scaling / ReLU / narrowing on the read data
  always_comb begin
    resp.raw = rd_q;
    for (int l = 0; l < DIM; l++) begin
      logic signed [64:0] prod;
      logic signed [48:0] v;
      prod = 65'(rd_q[l]) * 65'(signed'({1'b0, scale_q})) + 65'sd32768;
      v    = 49'(prod >>> 16);
      if (relu_q && v < 0) v = '0;
      if (v > 49'sd127)       resp.narrow[l] = 8'sd127;
      else if (v < -49'sd128) resp.narrow[l] = -8'sd128;
      else                    resp.narrow[l] = elem_t'(v[7:0]);
    end
  end

endmodule
