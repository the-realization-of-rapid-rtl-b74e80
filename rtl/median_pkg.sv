// Shared types and constants of the 3x3 rapid median filter.
//
// The pixel width defaults to 8 bits (one Y, U or V sample). A 3x3 window is
// carried as nine pixels numbered as in the window picture below, row by row:
//
//     P1 P2 P3      index 0 1 2
//     P4 P5 P6            3 4 5
//     P7 P8 P9            6 7 8
//
// engine_e selects how a channel computes the median: the eight-level pipeline
// (one window per clock) or the Ready/Step1/Step2/Step3/Wait state machine
// (one window per Start handshake).
package median_pkg;

  localparam int unsigned PIX_W = 8;

  typedef logic [PIX_W-1:0] pix_t;

  // Nine pixels of a window, index 0 = P1 ... index 8 = P9.
  typedef pix_t [8:0] win_t;

  typedef enum logic {
    ENG_PIPE = 1'b0,
    ENG_FSM  = 1'b1
  } engine_e;

  // States of the sequenced filter. WAIT is drawn as "Step4" in the state
  // picture and named Wait in the prose.
  typedef enum logic [2:0] {
    ST_READY = 3'd0,
    ST_STEP1 = 3'd1,
    ST_STEP2 = 3'd2,
    ST_STEP3 = 3'd3,
    ST_WAIT  = 3'd4
  } fsm_state_e;

  // Reference median of nine values by counting: the value that has at
  // least five elements <= it and at least five elements >= it. Used by the
  // testbenches as an independent model; synthesizable but not used in rtl.
  function automatic pix_t median9_ref(input win_t w);
    pix_t r;
    r = '0;
    for (int i = 0; i < 9; i++) begin
      int le, ge;
      le = 0;
      ge = 0;
      for (int j = 0; j < 9; j++) begin
        if (w[j] <= w[i]) le++;
        if (w[j] >= w[i]) ge++;
      end
      if (le >= 5 && ge >= 5) r = w[i];
    end
    return r;
  endfunction

endpackage
