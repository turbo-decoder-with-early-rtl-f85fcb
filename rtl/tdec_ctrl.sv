// Sequencer of the turbo decoder.
//
// One controller drives all MAP decoders in lockstep through the
// schedule: for each half iteration (even ones in natural order with
// parity 1, odd ones interleaved with parity 2) it loads the address
// generators (1 cycle), then for every window of the sub-block runs a
// forward phase and a backward phase of lw+1 cycles each (lw = window
// length, the last window of a sub-block may be shorter), and finally
// checks the early stopping flag (1 cycle). Decoding ends when the flag is
// set or when 2*iters half iterations are done; done pulses one cycle.
//
// Forward phase cycle c: c < lw issues the memory read of step ws+c (and
// steps the forward address generator); c >= 1 is the forward step of the
// data read in the previous cycle. The cycle of the last read also starts
// the backward generator. Backward phase cycle c: c < lw reads the window
// buffers at position lw-1-c; c >= 1 is the backward step of position
// lw-c. Cycles per half iteration: 2 + sum over windows of 2*(lw+1).
//
// The document gives the schedule (windows processed forward then
// backward one after the other, stop check at the end of each half
// iteration, last half iteration without write-back); the cycle-level
// timing is this design's own.
module tdec_ctrl
  import tdec_pkg::*;
#(
  parameter int WIN = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] k,
  input  logic [2:0]    map_log2,  // log2 of the active MAP decoders
  input  logic [3:0]    iters,     // maximum full iterations, >= 1
  input  logic          stop,      // early stopping unit output
  output ctrl_t         ctrl,
  output logic [1:0]    es_sel,
  output logic [AW-1:0] ks,        // sub-block length
  output logic          busy,
  output logic          done,
  output logic          stopped,   // last decoding ended by the criterion
  output logic [4:0]    halves     // half iterations performed
);
  localparam int WL = $clog2(WIN);

  typedef enum logic [2:0] {S_IDLE, S_HINIT, S_FWD, S_BWD, S_CHECK} state_t;

  state_t        st;
  logic [AW-1:0] ws, lw, c;
  logic [NWW-1:0] win, nwin_m1;
  logic [4:0]    half, max_half;

  always_comb lw = ((ks - ws) > AW'(WIN)) ? AW'(WIN) : (ks - ws);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ws <= '0; c <= '0; win <= '0; nwin_m1 <= '0;
      half <= '0; max_half <= '0; ks <= '0; done <= 1'b0; stopped <= 1'b0;
      halves <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          ks       <= k >> map_log2;
          nwin_m1  <= NWW'(((k >> map_log2) - 1'b1) >> WL);
          max_half <= {iters, 1'b0};
          half     <= '0;
          stopped  <= 1'b0;
          st       <= S_HINIT;
        end
        S_HINIT: begin
          ws <= '0; win <= '0; c <= '0;
          st <= S_FWD;
        end
        S_FWD: begin
          if (c == lw) begin
            c  <= '0;
            st <= S_BWD;
          end else c <= c + 1'b1;
        end
        S_BWD: begin
          if (c == lw) begin
            c <= '0;
            if (win == nwin_m1) st <= S_CHECK;
            else begin
              win <= win + 1'b1;
              ws  <= ws + AW'(WIN);
              st  <= S_FWD;
            end
          end else c <= c + 1'b1;
        end
        S_CHECK: begin
          if (stop || (half + 1'b1 == max_half)) begin
            halves  <= half + 1'b1;
            stopped <= stop;
            done    <= 1'b1;
            st      <= S_IDLE;
          end else begin
            half <= half + 1'b1;
            st   <= S_HINIT;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ctrl = '0;
    ctrl.half_type  = half[0];
    ctrl.last_half  = (half + 1'b1 == max_half);
    ctrl.use_stake  = (half >= 5'd2);
    ctrl.win        = win;
    ctrl.nwin_m1    = nwin_m1;
    ctrl.gen_init   = (st == S_HINIT);
    es_sel          = (st == S_HINIT) ? 2'd1 : 2'd0;
    if (st == S_FWD) begin
      ctrl.fwd_issue    = (c < lw);
      ctrl.j_issue      = ws + c;
      ctrl.fwd_en       = (c != '0);
      ctrl.fwd_first    = (win == '0) && (c == AW'(1));
      ctrl.fwd_last     = (c == lw);
      ctrl.fwd_loc      = LW'(c - 1'b1);
      ctrl.bwd_gen_init = (c == lw - 1'b1);
    end
    if (st == S_BWD) begin
      ctrl.bwd_rd     = (c < lw);
      ctrl.bwd_rd_loc = LW'(lw - 1'b1 - c);
      ctrl.bwd_en     = (c != '0);
      ctrl.bwd_first  = (c == AW'(1));
      ctrl.bwd_last   = (c == lw);
      ctrl.j_bwd      = ws + lw - c;
      if (c != '0) es_sel = 2'd2;
    end
  end

  assign busy = (st != S_IDLE);
endmodule
