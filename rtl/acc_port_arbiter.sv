// acc_port_arbiter: shares the accumulator request port between the matmul
// executor and OnlineAttention.
//
// Mutual exclusion by ownership: while OnlineAttention is busy it owns the
// port and every executor request is stalled (exe_ready low); otherwise the
// executor owns it and OnlineAttention requests are not granted. The owner
// of each read is remembered for one clock so the response goes back to the
// client that asked, even if ownership changed meanwhile. OnlineAttention
// only issues raw reads. The arbiter-plus-busy-mux arrangement follows the
// accelerator description; the ownership rule is this design's choice.
//
// Timing: combinational request path; response routing uses one register
// matching the one-clock accumulator read latency.
module acc_port_arbiter
  import oa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            oa_busy,
  // executor client
  input  logic            exe_valid,
  output logic            exe_ready,
  input  acc_req_t        exe_req,
  output logic            exe_resp_valid,
  // OnlineAttention client (raw reads)
  input  logic            oa_valid,
  output logic            oa_ready,
  input  logic [ACC_ADDR_W-1:0] oa_addr,
  output logic            oa_resp_valid,
  // accumulator side
  output logic            acc_valid,
  output acc_req_t        acc_req,
  input  logic            acc_resp_valid
);

  logic owner_oa_q;   // owner of the read issued last clock

  assign exe_ready = !oa_busy;
  assign oa_ready  = oa_busy;

  always_comb begin
    if (oa_busy) begin
      acc_valid     = oa_valid;
      acc_req       = '0;
      acc_req.addr  = oa_addr;
      acc_req.raw   = 1'b1;
      acc_req.scale = 32'h0001_0000;
    end else begin
      acc_valid = exe_valid;
      acc_req   = exe_req;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner_oa_q <= 1'b0;
    else        owner_oa_q <= oa_busy;
  end

  assign oa_resp_valid  = acc_resp_valid &&  owner_oa_q;
  assign exe_resp_valid = acc_resp_valid && !owner_oa_q;

  // OnlineAttention never writes through this port
  a_oa_read_only: assert property (@(posedge clk) disable iff (!rst_n)
    oa_busy && acc_valid |-> !acc_req.wen);

endmodule
