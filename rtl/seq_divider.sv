// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Used by OnlineAttention for the two divisions of online softmax that are
// not per-lane: rescaling the running sum when the row maximum grows, and the
// per-row reciprocal 127*2^24/sum used to normalise the int8 weights.
//
// Interface: pulse start with dividend/divisor held for that cycle; busy is
// high for W cycles, then done pulses for one cycle with quotient valid
// (quotient stays valid until the next start). Division by zero returns all
// ones. Latency: W+1 clocks from start to done.
module seq_divider #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);

  logic [W-1:0]         rem_q, div_q, quo_q;
  logic [$clog2(W+1)-1:0] cnt_q;
  logic [W:0]           trial;

  always_comb trial = {rem_q, quo_q[W-1]} - {1'b0, div_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      div_q <= '0;
      quo_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem_q <= '0;
        div_q <= divisor;
        quo_q <= dividend;
        cnt_q <= ($clog2(W+1))'(W);
        busy  <= 1'b1;
      end else if (busy) begin
        // shift the next dividend bit into the remainder and try to subtract
        if (!trial[W]) begin
          rem_q <= trial[W-1:0];
          quo_q <= {quo_q[W-2:0], 1'b1};
        end else begin
          rem_q <= {rem_q[W-2:0], quo_q[W-1]};
          quo_q <= {quo_q[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = quo_q;

endmodule
