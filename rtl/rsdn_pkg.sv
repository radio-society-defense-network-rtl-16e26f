// rsdn_pkg: types shared by the capture-classification datapath.
//
// The filter manager broadcasts the recorded capture to every matched filter
// three times per classification. Each pass is tagged with a phase so that a
// filter knows what to do with the samples it receives:
//   PH_MEAN  - the whole capture once, to compute its average (DC level)
//   PH_CORR  - one window of M samples per lag, for the sliding dot product
//   PH_ALIGN - the whole capture once more, for the squared-difference score
// The phase encoding and the pass structure are this design's own choice.
package rsdn_pkg;

  typedef enum logic [1:0] {
    PH_MEAN  = 2'd0,
    PH_CORR  = 2'd1,
    PH_ALIGN = 2'd2
  } phase_t;

  // Width of a similarity / dot-product score leaving a matched filter.
  localparam int unsigned SCORE_W = 48;

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
