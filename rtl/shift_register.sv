// shift_register: scanning shift register with even/odd phase outputs.
//
// A single '1' token is inserted at stage 0 by 'load' and moves one stage on
// every clock with 'shift' high; it drops off after the last stage.  The
// stage outputs are also given split into the even-phase group (stages
// 0, 2, 4, ...) and the odd-phase group (stages 1, 3, 5, ...).  On the chip
// a 32-stage copy is the vertical register: even stage 2r selects row r for
// horizontal-edge read-out and imaging, odd stage 2r+1 selects row r for
// vertical-edge read-out.  A 16-stage copy is the horizontal register that
// selects the column during imaging.  The stage counts and the even/odd
// split are the original design's; the original design clocks the register with two
// non-overlapping phases, which this design replaces by one clock and a
// shift enable.  'load' wins over 'shift'.  rst_n (active low, synchronous)
// empties the register.
module shift_register #(
  parameter int unsigned STAGES = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  shift,
  output logic [STAGES-1:0]     q,
  output logic [STAGES/2-1:0]   even,
  output logic [STAGES/2-1:0]   odd,
  output logic                  last
);
  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= STAGES'(1);
    else if (shift)  q <= q << 1;
  end

  always_comb begin
    for (int unsigned k = 0; k < STAGES / 2; k++) begin
      even[k] = q[2 * k];
      odd[k]  = q[2 * k + 1];
    end
    last = q[STAGES-1];
  end

  initial assert (STAGES >= 2 && STAGES % 2 == 0)
    else $error("shift_register: STAGES must be even");
endmodule
