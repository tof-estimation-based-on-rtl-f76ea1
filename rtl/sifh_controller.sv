// sifh_controller: sequences one time-of-flight estimate.
//
// After START it runs two acquisitions of M pixel readings each, the coarse
// histogram (HS low) and then the fine one (HS high), and reads each out:
//   [CLEAR]  CLR_SEQ only: CLR_MEM high until the sweep reports CLR_DONE
//   DEAD0    WAIT0 high for DEAD_CYC clocks; HIST_RST pulses on its first
//            clock (new histogram: hit flags and running peak cleared)
//   ACQ      ACQ high; readings are counted until M have arrived
//   DRAIN    waits for the last bin update to finish; on leaving it after the
//            coarse histogram, ALG_LOAD latches the thresholds
//   WAIT1    WAIT1 high for DEAD_CYC clocks
//   READ     RD_HIST high for 2**NS clocks: the bins can be read out
// then the same again with HS high, and finally
//   WAIT2    WAIT2 high for DEAD_CYC clocks
//   DONE     TOF_VALID high until the next START.
// WAIT0/1/2 tell the pattern source to pause; it resumes sending when WAIT0
// falls. The phase order and the 80 ns (4-clock at 50 MHz) dead times follow
// the measurement sequence of the document; the state encoding, the drain
// state and holding ToF valid until the next START are this design's choices.
module sifh_controller
  import sifh_pkg::*;
#(
  parameter int unsigned M        = 32240, // readings per histogram
  parameter int unsigned DEAD_CYC = 4,     // 80 ns at 50 MHz
  parameter int unsigned RD_CYC   = 256,   // readout window, one bin per clock
  parameter clr_mode_e   CLR_MODE = CLR_SIG
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic pix_valid,
  input  logic busy,
  input  logic clr_done,
  output logic hs,
  output logic hist_rst,
  output logic clr_mem,
  output logic acq,
  output logic alg_load,
  output logic wait0,
  output logic wait1,
  output logic wait2,
  output logic rd_hist,
  output logic tof_valid
);

  typedef enum logic [3:0] {
    C_IDLE, C_CLEAR, C_DEAD0, C_ACQ, C_DRAIN, C_WAIT1, C_READ, C_WAIT2, C_DONE
  } cstate_e;

  localparam int unsigned PW = $clog2(M + 1);
  localparam int unsigned TW = $clog2(RD_CYC + DEAD_CYC + 1);

  cstate_e       state;
  logic [PW-1:0] npix;
  logic [TW-1:0] tcnt;

  // first state of a histogram: sweep first when clearing sequentially
  cstate_e first_st;
  assign first_st = (CLR_MODE == CLR_SEQ) ? C_CLEAR : C_DEAD0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= C_IDLE;
      hs       <= 1'b0;
      hist_rst <= 1'b0;
      npix     <= '0;
      tcnt     <= '0;
    end else begin
      hist_rst <= 1'b0;
      tcnt     <= tcnt + 1'b1;
      unique case (state)
        C_IDLE, C_DONE: if (start) begin
          hs       <= 1'b0;
          state    <= first_st;
          hist_rst <= (first_st == C_DEAD0);
          tcnt     <= '0;
        end
        C_CLEAR: if (clr_done) begin
          state    <= C_DEAD0;
          hist_rst <= 1'b1;
          tcnt     <= '0;
        end
        C_DEAD0: if (tcnt == TW'(DEAD_CYC - 1)) begin
          state <= C_ACQ;
          npix  <= '0;
        end
        C_ACQ: if (pix_valid) begin
          npix <= npix + 1'b1;
          if (npix == PW'(M - 1)) state <= C_DRAIN;
        end
        C_DRAIN: if (!busy) begin
          state <= C_WAIT1;
          tcnt  <= '0;
        end
        C_WAIT1: if (tcnt == TW'(DEAD_CYC - 1)) begin
          state <= C_READ;
          tcnt  <= '0;
        end
        C_READ: if (tcnt == TW'(RD_CYC - 1)) begin
          tcnt <= '0;
          if (!hs) begin
            hs       <= 1'b1;
            state    <= first_st;
            hist_rst <= (first_st == C_DEAD0);
          end else begin
            state <= C_WAIT2;
          end
        end
        C_WAIT2: if (tcnt == TW'(DEAD_CYC - 1)) state <= C_DONE;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign clr_mem   = (state == C_CLEAR);
  assign acq       = (state == C_ACQ);
  assign alg_load  = (state == C_DRAIN) && !busy && !hs;
  assign wait0     = (state == C_DEAD0);
  assign wait1     = (state == C_WAIT1);
  assign wait2     = (state == C_WAIT2);
  assign rd_hist   = (state == C_READ);
  assign tof_valid = (state == C_DONE);

endmodule
