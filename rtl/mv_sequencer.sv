// mv_sequencer: timing sequence generator of the vision chip.
//
// Motion operation (start_mv), one frame:
//   SWAP     memories: current edges -> previous edges
//   EDGE_H   slot t1: all pixels store their horizontal edge
//   EDGE_V   slot t2: all pixels store their vertical edge
//   then, for every window position w (0..N_WIN-1) enabled in win_en:
//     WIN    load the token into the vertical register (row 0, even phase)
//     N-3 row steps of STEP_CYCLES = 12 clocks each, t = 0..11:
//       t0 D-set0, t1-t4 DIF-XOR-ck1..4 (even phase, horizontal edges),
//       t5 vertical register shift to the odd phase,
//       t6-t9 DIF-XOR-ck1..4 (odd phase, vertical edges),
//       t10 ACC-ck, t11 Syn-Yi-reg plus shift to the next row's even phase.
// A frame with all three windows takes 3 + 3*(1 + 13*12) = 474 clocks.
//
// Image operation (start_img): the vertical register's even stages select
// the rows and the 16-stage horizontal register the columns; one pixel per
// clock (img_en), plus two clocks per row to move to the next even stage.
//
// The names and the order of the controls follow the original design's timing
// description; one clock per control, and generating them on chip rather
// than from an external signal generator, are this design's choices.  A
// start while busy is ignored.  rst_n is active low and synchronous.
module mv_sequencer
  import mv_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned N_WIN = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start_mv,
  input  logic                   start_img,
  input  logic [N_WIN-1:0]       win_en,
  output logic                   swap,
  output logic                   wr_h,
  output logic                   wr_v,
  output acc_ctrl_t              ctrl,
  output logic                   vsr_load,
  output logic                   vsr_shift,
  output logic                   hsr_load,
  output logic                   hsr_shift,
  output logic [1:0]             win,
  output logic [$clog2(N)-1:0]   row,
  output logic [$clog2(N)-1:0]   col,
  output logic                   img_en,
  output logic                   busy
);
  localparam int unsigned STEP_CYCLES = 12;
  localparam int unsigned ROW_STEPS   = N - 3;

  typedef enum logic [3:0] {
    S_IDLE, S_SWAP, S_EDGE_H, S_EDGE_V, S_WIN, S_STEP,
    S_IMG_LOAD, S_IMG_PIX, S_IMG_ROW1, S_IMG_ROW2
  } state_t;

  state_t      state;
  logic [3:0]  t;

  // next enabled window at or after w, or N_WIN if none
  function automatic logic [1:0] next_win(input logic [N_WIN-1:0] en, input int unsigned from);
    for (int unsigned w = 0; w < N_WIN; w++)
      if (w >= from && en[w]) return 2'(w);
    return 2'(N_WIN);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t     <= '0;
      win   <= '0;
      row   <= '0;
      col   <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          t <= '0;
          if (start_mv)       state <= S_SWAP;
          else if (start_img) state <= S_IMG_LOAD;
        end
        S_SWAP:   state <= S_EDGE_H;
        S_EDGE_H: state <= S_EDGE_V;
        S_EDGE_V: begin
          win   <= next_win(win_en, 0);
          state <= (next_win(win_en, 0) == 2'(N_WIN)) ? S_IDLE : S_WIN;
        end
        S_WIN: begin
          row   <= '0;
          t     <= '0;
          state <= S_STEP;
        end
        S_STEP: begin
          if (t == 4'(STEP_CYCLES - 1)) begin
            t <= '0;
            if (row == ($clog2(N))'(ROW_STEPS - 1)) begin
              win   <= next_win(win_en, int'(win) + 1);
              state <= (next_win(win_en, int'(win) + 1) == 2'(N_WIN)) ? S_IDLE : S_WIN;
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            t <= t + 1'b1;
          end
        end
        S_IMG_LOAD: begin
          row   <= '0;
          col   <= '0;
          state <= S_IMG_PIX;
        end
        S_IMG_PIX: begin
          col <= col + 1'b1;
          if (col == ($clog2(N))'(N - 1)) state <= S_IMG_ROW1;
        end
        S_IMG_ROW1: begin
          col   <= '0;
          state <= (row == ($clog2(N))'(N - 1)) ? S_IDLE : S_IMG_ROW2;
        end
        S_IMG_ROW2: begin
          row   <= row + 1'b1;
          state <= S_IMG_PIX;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    swap      = (state == S_SWAP);
    wr_h      = (state == S_EDGE_H);
    wr_v      = (state == S_EDGE_V);
    ctrl      = '0;
    vsr_load  = (state == S_WIN) || (state == S_IMG_LOAD);
    vsr_shift = 1'b0;
    hsr_load  = (state == S_IMG_LOAD) || (state == S_IMG_ROW1);
    hsr_shift = (state == S_IMG_PIX);
    img_en    = (state == S_IMG_PIX);
    busy      = (state != S_IDLE);
    if (state == S_IMG_ROW1 || state == S_IMG_ROW2) vsr_shift = 1'b1;
    if (state == S_STEP) begin
      ctrl.dset0   = (t == 4'd0);
      ctrl.phase_v = (t >= 4'd6);
      if (t >= 4'd1 && t <= 4'd4) ctrl.xor_ck[2'(t - 4'd1)] = 1'b1;
      if (t >= 4'd6 && t <= 4'd9) ctrl.xor_ck[2'(t - 4'd6)] = 1'b1;
      ctrl.acc_ck  = (t == 4'd10);
      ctrl.syn     = (t == 4'd11);
      vsr_shift    = (t == 4'd5) || (t == 4'd11);
    end
  end
endmodule
