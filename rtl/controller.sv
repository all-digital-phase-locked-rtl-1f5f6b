// controller: the ADPLL loop filter, a two-stage stepping controller.
//
// The controller turns the detector's UP/DOWN decisions into two 4-bit
// binary words, one for the coarse and one for the fine thermometer shift
// register. A word counts how many delay segments are switched in, so a
// larger word means a longer DCO period (lower frequency). UP/DOWN = 1 asks
// for a higher frequency and therefore a smaller word.
//
// Coarse stage: on every decision the coarse word moves one step in the
// direction UP/DOWN asks for. The DCO has come close to the reference when
// the requested direction reverses. The controller then stops the coarse
// stage and raises coarse_locked, which runs the fine stage. If the reversal
// says the DCO is now too slow, the coarse word first steps back once, so the
// coarse stage aims to end on a setting faster than the reference, since
// the fine block can only add delay. Reaching either end of the coarse
// range also ends the coarse stage.
//
// Fine stage: on every decision the fine word moves one step, down for
// UP/DOWN = 1 and up for 0, held between 0 and FINE_MAX. The PFD remembers
// phase as well as frequency, so the coarse sweep usually overshoots by a
// few settings before the direction reverses. When the fine word has sat at
// one end for SAT_LIMIT decisions in a row, still asked to go further, the
// controller therefore carries one coarse step in that direction and
// restarts the fine word from its other end. The fine stage keeps running
// until reset; the coarse sweep runs only once after reset.
//
// The two stepping stages, coarse first and fine after a signal that the
// coarse stage is done, follow the architecture. The reversal test that
// ends the coarse sweep, the step back, the carry with its SAT_LIMIT, and
// the reset values (both words 0, the fastest DCO setting) are this
// design's own choices.
//
// Assertions check that both words stay within their ranges.
//
// Timing: one decision per cycle of clk in which step is high. step and
// up_down must be synchronous to clk (see ref_sync). The words change on the
// clock edge after the decision.
module controller
  import adpll_pkg::*;
#(
  parameter int unsigned COARSE_MAX = COARSE_N - 1,  // largest coarse word
  parameter int unsigned FINE_MAX   = FINE_N,        // largest fine word
  parameter int unsigned SAT_LIMIT  = 32             // saturated decisions before a coarse carry
) (
  input  logic  clk,
  input  logic  rst_n,          // asynchronous reset, active low
  input  logic  step,           // a new UP/DOWN decision is available
  input  logic  up_down,        // 1: raise DCO frequency, 0: lower it
  output word_t coarse_word,    // number of coarse segments to switch in
  output word_t fine_word,      // number of fine segments to switch in
  output logic  coarse_locked   // coarse stage done, fine stage running
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic {COARSE, FINE} stage_e;

  stage_e stage;
  logic   moved;      // the coarse stage has made at least one decision
  logic   last_dir;   // direction of the previous coarse decision
  localparam int unsigned SAT_W = $clog2(SAT_LIMIT + 1);
  logic [SAT_W-1:0] sat_cnt;  // decisions in a row with the fine word saturated
  logic             fine_sat; // this decision asks beyond the fine range

  assign fine_sat = up_down ? (fine_word == '0) : (fine_word == word_t'(FINE_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage       <= COARSE;
      moved       <= 1'b0;
      last_dir    <= 1'b0;
      coarse_word <= '0;
      fine_word   <= '0;
      sat_cnt     <= '0;
    end else if (step) begin
      unique case (stage)
        COARSE: begin
          moved    <= 1'b1;
          last_dir <= up_down;
          if (moved && up_down != last_dir) begin
            // Reversal: the reference lies between this setting and the
            // previous one. Keep the faster of the two.
            if (up_down && coarse_word != '0) coarse_word <= coarse_word - 1'b1;
            stage <= FINE;
          end else if (up_down) begin
            if (coarse_word == '0) stage <= FINE;
            else                   coarse_word <= coarse_word - 1'b1;
          end else begin
            if (coarse_word == word_t'(COARSE_MAX)) stage <= FINE;
            else                                     coarse_word <= coarse_word + 1'b1;
          end
        end
        FINE: begin
          if (up_down) begin
            if (fine_word != '0) fine_word <= fine_word - 1'b1;
          end else begin
            if (fine_word != word_t'(FINE_MAX)) fine_word <= fine_word + 1'b1;
          end
          // Fine range exhausted in the wanted direction for SAT_LIMIT
          // decisions in a row: carry one coarse step and restart the fine
          // word from its other end.
          if (fine_sat) begin
            if (sat_cnt == SAT_W'(SAT_LIMIT - 1)) begin
              sat_cnt <= '0;
              if (up_down && coarse_word != '0) begin
                coarse_word <= coarse_word - 1'b1;
                fine_word   <= word_t'(FINE_MAX);
              end else if (!up_down && coarse_word != word_t'(COARSE_MAX)) begin
                coarse_word <= coarse_word + 1'b1;
                fine_word   <= '0;
              end
            end else begin
              sat_cnt <= sat_cnt + 1'b1;
            end
          end else begin
            sat_cnt <= '0;
          end
        end
        default: stage <= COARSE;
      endcase
    end
  end

  assign coarse_locked = (stage == FINE);

  // The words never leave the range of the shift registers they drive.
  a_coarse_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   coarse_word <= word_t'(COARSE_MAX));
  a_fine_range:   assert property (@(posedge clk) disable iff (!rst_n)
                                   fine_word <= word_t'(FINE_MAX));
endmodule
