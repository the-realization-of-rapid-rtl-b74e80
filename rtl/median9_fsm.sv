// median9_fsm - rapid median of one 3x3 window, sequenced by a state machine.
//
// The same three steps as median9_pipe (row sorts; Max_min / Med_med /
// Min_max; median of those three) are run one after the other under a
// five-state controller with asynchronous reset:
//
//   READY  all result registers and step flags are cleared. When start is
//          high, go to STEP1 on the next clock; otherwise stay.
//   STEP1  the three rows are sorted (three sort3 units) and the results
//          registered; flag done1 is set. On the next clock done1 is seen
//          and the machine moves to STEP2.
//   STEP2  three sort3 units give Max_min, Med_med, Min_max; done2 is set,
//          seen one clock later, and the machine moves to STEP3.
//   STEP3  one sort3 gives the median, which is written to the result
//          register median_o; done3 is set, then the machine moves to WAIT.
//   WAIT   keeps one start from filtering the same window twice: it stays
//          while start is high and returns to READY when start is low.
//
// Interface: the window win and tag_in must stay stable from the clock that
// sees start high in READY until the machine leaves STEP1 (they are read in
// STEP1). out_valid pulses on the first WAIT cycle, when median_o and tag_out
// first hold the new result; they keep it until the next window's STEP3.
// in_wait is high in every WAIT cycle, so a producer can drop start there.
// Timing: from the clock in READY that sees start, the result is out after
// 7 clocks; with start dropped in WAIT one window takes 8 clocks.
// The states, flags and transitions follow the filter's state diagram; the
// one-clock set-then-detect use of each done flag follows its prose. The tag
// and out_valid outputs are this design's additions.
module median9_fsm
  import median_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  win_t             win,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output logic             in_wait,
  output pix_t             median_o,
  output logic [TAG_W-1:0] tag_out,
  output fsm_state_e       state_o
);

  fsm_state_e state, state_n;
  logic done1, done2, done3;

  // Sort units: three for the rows, three for the sets, one final.
  pix_t [2:0] rmin, rmed, rmax;
  for (genvar r = 0; r < 3; r++) begin : g_row
    sort3 #(.PIPE(1'b0)) u_row (
      .clk, .rst_n, .en(1'b1),
      .a(win[3*r]), .b(win[3*r+1]), .c(win[3*r+2]),
      .min_o(rmin[r]), .med_o(rmed[r]), .max_o(rmax[r])
    );
  end

  // Step-1 result registers.
  pix_t [2:0] max_set, med_set, min_set;
  // Step-2 result registers.
  pix_t max_min, med_med, min_max;
  logic [TAG_W-1:0] tag_q;

  pix_t s_max_min, s_max_med, s_max_max;
  pix_t s_med_min, s_med_med, s_med_max;
  pix_t s_min_min, s_min_med, s_min_max;
  sort3 #(.PIPE(1'b0)) u_maxset (
    .clk, .rst_n, .en(1'b1),
    .a(max_set[0]), .b(max_set[1]), .c(max_set[2]),
    .min_o(s_max_min), .med_o(s_max_med), .max_o(s_max_max)
  );
  sort3 #(.PIPE(1'b0)) u_medset (
    .clk, .rst_n, .en(1'b1),
    .a(med_set[0]), .b(med_set[1]), .c(med_set[2]),
    .min_o(s_med_min), .med_o(s_med_med), .max_o(s_med_max)
  );
  sort3 #(.PIPE(1'b0)) u_minset (
    .clk, .rst_n, .en(1'b1),
    .a(min_set[0]), .b(min_set[1]), .c(min_set[2]),
    .min_o(s_min_min), .med_o(s_min_med), .max_o(s_min_max)
  );

  pix_t f_min, f_med, f_max;
  sort3 #(.PIPE(1'b0)) u_final (
    .clk, .rst_n, .en(1'b1),
    .a(max_min), .b(med_med), .c(min_max),
    .min_o(f_min), .med_o(f_med), .max_o(f_max)
  );

  logic unused;
  assign unused = ^{s_max_med, s_max_max, s_med_min, s_med_max,
                    s_min_min, s_min_med, f_min, f_max};

  // Next state.
  always_comb begin
    state_n = state;
    unique case (state)
      ST_READY: if (start) state_n = ST_STEP1;
      ST_STEP1: if (done1) state_n = ST_STEP2;
      ST_STEP2: if (done2) state_n = ST_STEP3;
      ST_STEP3: if (done3) state_n = ST_WAIT;
      ST_WAIT:  if (!start) state_n = ST_READY;
      default:  state_n = ST_READY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_READY;
      done1     <= 1'b0;
      done2     <= 1'b0;
      done3     <= 1'b0;
      max_set   <= '0;
      med_set   <= '0;
      min_set   <= '0;
      max_min   <= '0;
      med_med   <= '0;
      min_max   <= '0;
      median_o  <= '0;
      tag_q     <= '0;
      tag_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      state     <= state_n;
      out_valid <= 1'b0;
      unique case (state)
        ST_READY: begin
          // Clear the intermediate results and the step flags.
          done1   <= 1'b0;
          done2   <= 1'b0;
          done3   <= 1'b0;
          max_set <= '0;
          med_set <= '0;
          min_set <= '0;
          max_min <= '0;
          med_med <= '0;
          min_max <= '0;
        end
        ST_STEP1: if (!done1) begin
          max_set <= rmax;
          med_set <= rmed;
          min_set <= rmin;
          tag_q   <= tag_in;
          done1   <= 1'b1;
        end
        ST_STEP2: if (!done2) begin
          max_min <= s_max_min;
          med_med <= s_med_med;
          min_max <= s_min_max;
          done2   <= 1'b1;
        end
        ST_STEP3: begin
          if (!done3) begin
            median_o <= f_med;
            tag_out  <= tag_q;
            done3    <= 1'b1;
          end else begin
            out_valid <= 1'b1;   // first WAIT cycle
          end
        end
        ST_WAIT: ;
        default: ;
      endcase
    end
  end

  assign in_wait = (state == ST_WAIT);
  assign state_o = state;

endmodule
