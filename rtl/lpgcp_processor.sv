// lpgcp_processor: one block matching and motion vector processor.
//
// A 2x2 block of binary edges from the current frame is compared with the
// nine 2x2 positions inside a 4x4 area of the previous frame (search range
// +/-1 pixel), horizontal and vertical edges together.  Candidate Yk,
// k = 3*dy + dx, uses previous-frame rows dy..dy+1 and columns dx..dx+1, so
// Y4 is "no motion".  Nine accumulators (acc) count the mismatches of each
// candidate, min_search finds the smallest count and priority_arbiter breaks
// ties towards the centre.  On Syn-Yi-reg (ctrl.syn) the result is latched
// into y (nine one-hot lines) and index (vector order 0..8).
//
// Timing per search position: dset0; xor_ck[0..3] with phase_v = 0 while the
// horizontal edges are on cur/pre; xor_ck[0..3] with phase_v = 1 while the
// vertical edges are on them; acc_ck; syn.  y/index change on the clock edge
// that samples syn.  The structure (9 ACCs, AND/XNOR minimum, priority
// order, 9 output lines) is the original design's; bit ordering of cur/pre is
// described in shifting_window.  rst_n is active low and synchronous.
module lpgcp_processor
  import mv_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  acc_ctrl_t                     ctrl,
  input  logic [3:0]                    cur,
  input  logic [15:0]                   pre,
  output logic [NCAND-1:0]              y,
  output logic [3:0]                    index,
  output logic [NCAND-1:0][ACC_BITS-1:0] acc_out
);
  logic [NCAND-1:0] hit;
  logic [NCAND-1:0] y_dec;
  logic [3:0]       index_dec;
  logic [ACC_BITS-1:0] min_code;

  for (genvar k = 0; k < NCAND; k++) begin : g_acc
    localparam int unsigned DY = k / 3;
    localparam int unsigned DX = k % 3;
    logic [3:0] p_k;
    // (c1,p1) .. (c4,p4): row 1st/2nd, column h1/h2 of the shifted block
    assign p_k = {pre[4*(DY+1)+DX+1], pre[4*(DY+1)+DX],
                  pre[4*DY+DX+1],     pre[4*DY+DX]};
    acc u_acc (
      .clk    (clk),
      .rst_n  (rst_n),
      .dset0  (ctrl.dset0),
      .phase_v(ctrl.phase_v),
      .xor_ck (ctrl.xor_ck),
      .acc_ck (ctrl.acc_ck),
      .c      (cur),
      .p      (p_k),
      .a      (acc_out[k])
    );
  end

  min_search u_min (
    .a       (acc_out),
    .min_code(min_code),
    .hit     (hit)
  );

  priority_arbiter u_arb (
    .hit  (hit),
    .y    (y_dec),
    .index(index_dec)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y     <= '0;
      index <= '0;
    end else if (ctrl.syn) begin
      y     <= y_dec;
      index <= index_dec;
    end
  end

  // The latched result is always exactly one vector.
  a_one_vector : assert property (@(posedge clk) disable iff (!rst_n)
                                  ctrl.syn |=> $onehot(y));
endmodule
