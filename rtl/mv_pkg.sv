// mv_pkg: types and constants shared by the motion vector vision chip.
//
// The chip matches a 2x2 block of binary edges in the current frame against
// the nine 2x2 positions of a 4x4 area of the previous frame (search range
// +/-1 pixel).  Candidates are named Y0..Y8 in raster order over the 3x3
// shift grid (Y4 = no motion).  Ties are resolved by the "vector order"
// index, which ranks candidates by distance from the centre: index 0 is Y4,
// indices 1..4 are the four edge neighbours Y1, Y3, Y5, Y7 and 5..8 the four
// corners Y0, Y2, Y6, Y8.  This map is the original design's; the control bundle
// struct and the memory-cell struct are this design's packaging.
package mv_pkg;

  localparam int unsigned NCAND    = 9;  // 3x3 search candidates
  localparam int unsigned ACC_BITS = 8;  // 4 horizontal + 4 vertical samples

  // Per-pixel 4-bit memory, bit 3 down to bit 0.
  typedef struct packed {
    logic h_cur;   // bit 3: horizontal edge, current frame
    logic v_cur;   // bit 2: vertical edge, current frame
    logic h_prev;  // bit 1: horizontal edge, previous frame
    logic v_prev;  // bit 0: vertical edge, previous frame
  } edge_mem_t;

  // Controls of the block matching accumulators (one-cycle enables).
  typedef struct packed {
    logic       dset0;    // D-set0: clear accumulators
    logic       phase_v;  // 0: even phase (horizontal), 1: odd phase (vertical)
    logic [3:0] xor_ck;   // DIF-XOR-ck1..4: sample pair i
    logic       acc_ck;   // ACC-ck: convert queue to thermometer code
    logic       syn;      // Syn-Yi-reg: latch the decided vector
  } acc_ctrl_t;

  // Vector order index of candidate Yk (k = 0..8).
  function automatic logic [3:0] y_to_index(input int unsigned k);
    case (k)
      0: return 4'd5;
      1: return 4'd1;
      2: return 4'd6;
      3: return 4'd2;
      4: return 4'd0;
      5: return 4'd3;
      6: return 4'd7;
      7: return 4'd4;
      default: return 4'd8;
    endcase
  endfunction

  // Candidate Yk holding vector order index n (n = 0..8).
  function automatic int unsigned index_to_y(input int unsigned n);
    case (n)
      0: return 4;
      1: return 1;
      2: return 3;
      3: return 5;
      4: return 7;
      5: return 0;
      6: return 2;
      7: return 6;
      default: return 8;
    endcase
  endfunction

  // Thermometer code of a count: 'count' ones packed against the MSB.
  function automatic logic [ACC_BITS-1:0] therm(input int unsigned count);
    logic [ACC_BITS-1:0] t;
    for (int unsigned b = 0; b < ACC_BITS; b++)
      t[ACC_BITS-1-b] = (b < count);
    return t;
  endfunction

endpackage
