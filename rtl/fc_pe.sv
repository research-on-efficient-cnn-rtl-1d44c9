// fc_pe: processing element of the fully connected layer (PE 4).
//
// NOUT multiply-accumulate units (8-bit weight x 8-bit feature, one DSP each
// on the target) work in parallel: every valid cycle one input feature x_i is
// broadcast to all of them together with the NOUT weights of column i, and
// each adds w[k][i] * x_i to its accumulator. After NIN inputs the
// accumulators hold the NOUT logits, and done pulses for one cycle.
// start clears the accumulators and the input counter. Own choice: the
// logits are left as full-precision accumulator values.
module fc_pe #(
  parameter int unsigned NIN   = 64,
  parameter int unsigned NOUT  = 10,
  parameter int unsigned WB    = 8,   // weight bits
  parameter int unsigned XB    = 8,   // feature bits
  parameter int unsigned ACC_W = 24
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              in_valid,
  input  logic signed [XB-1:0]              x,
  input  logic signed [NOUT-1:0][WB-1:0]    w,
  output logic signed [NOUT-1:0][ACC_W-1:0] acc,
  output logic                              done
);
  logic [$clog2(NIN+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc <= '0;
        cnt <= '0;
      end else if (in_valid && cnt < NIN) begin
        for (int k = 0; k < NOUT; k++)
          acc[k] <= acc[k] + ACC_W'($signed(w[k]) * x);
        cnt <= cnt + 1'b1;
        if (32'(cnt) == NIN - 1) done <= 1'b1;
      end
    end
  end
endmodule
