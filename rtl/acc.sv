// acc: the specific accumulator (ACC) of one block matching candidate.
//
// It counts how many of 8 binary edge pairs differ (a Hamming distance,
// 0..8) and holds the count as an 8-bit thermometer code a = {A8..A1} with
// all ones packed against the MSB, e.g. 4 mismatches -> 8'b1111_0000.  With
// that code the minimum of several candidates is simply their bitwise AND.
//
// Operation, per search position (all controls are one-cycle enables):
//   dset0          clear the sample queue and the code (D-set0)
//   xor_ck[i]      store c[i] ^ p[i] in queue slot i (even phase, horizontal
//                  edges, phase_v = 0) or slot 4+i (odd phase, vertical edges)
//   acc_ck         load a with the thermometer code of the number of ones in
//                  the queue (ACC-ck)
// The equation ACC = sum of 4 horizontal XORs + sum of 4 vertical XORs, the
// 8-sample queue and the MSB-packed code are the original design's; converting the
// queue in a single clock is this design's choice.  rst_n is active low and
// synchronous.
module acc
  import mv_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dset0,
  input  logic                phase_v,
  input  logic [3:0]          xor_ck,
  input  logic                acc_ck,
  input  logic [3:0]          c,
  input  logic [3:0]          p,
  output logic [ACC_BITS-1:0] a
);
  logic [ACC_BITS-1:0] queue;
  logic [3:0]          ones;

  always_comb begin
    ones = '0;
    for (int unsigned b = 0; b < ACC_BITS; b++) ones += 4'(queue[b]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || dset0) begin
      queue <= '0;
      a     <= '0;
    end else begin
      for (int unsigned i = 0; i < 4; i++)
        if (xor_ck[i]) queue[(phase_v ? 4 : 0) + i] <= c[i] ^ p[i];
      if (acc_ck) a <= therm(int'(ones));
    end
  end
endmodule
