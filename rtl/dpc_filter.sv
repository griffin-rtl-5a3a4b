// dpc_filter: moving-average access-count filter of Dynamic Page Classification.
//
// For one page and one GPU it computes the filtered count of the new period
//     C' = (1 - alpha) * C + alpha * N
// from the previous filtered count C and the raw count N the GPU reported for
// the period. A small alpha forgets history slowly and so migrates pages
// conservatively; a large one reacts to recent bursts.
//
// C and C' are unsigned fixed point with FILT_FRAC fraction bits; N is an
// integer; alpha is ALPHA_Q16 / 65536. The product is truncated (rounded
// towards zero), so a page nobody touches decays to exactly zero. The block is
// purely combinational.
//
// The recurrence and alpha = 0.03 follow the scheme; the fixed-point format
// and truncation are this design's choice.
module dpc_filter
  import griffin_pkg::*;
#(
  parameter int unsigned ALPHA = ALPHA_Q16   // alpha in Q0.16
) (
  input  filt_cnt_t c_old,
  input  raw_cnt_t  n_new,
  output filt_cnt_t c_new
);
  localparam int unsigned PW = FILT_W + 17;

  logic [PW-1:0] keep_part, new_part, sum;

  always_comb begin
    keep_part = PW'(c_old) * PW'(32'd65536 - ALPHA);
    new_part  = (PW'(n_new) << FILT_FRAC) * PW'(ALPHA);
    sum       = keep_part + new_part;
    c_new     = FILT_W'(sum >> 16);
  end

endmodule
