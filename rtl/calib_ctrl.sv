// Calibration logic of the SAR-CD TDC.
//
// What it does: tunes, through the converter's normal interface only (the
// input level it feeds through the input multiplexer and the output word it
// reads back), the control word of each stage's reference-pulse generator
// and the one control word shared by all synchronization delays.
//
// Pulse generators: stages are tuned MSB first. For stage k the controller
// drives the input level x_k = 2^(N+1) - 2^(k+1) (an (N+1)-bit code of the
// input range). For it every more significant stage decides 1 and the
// residue reaching stage k is exactly the stage weight, 2^k LSB; for stage
// N-1 it is mid-scale, so that reference becomes half the full-scale time.
// The word vc[k] is found by successive approximation, one bit per trial from
// bit VC_W-1 down to bit 0, starting at mid-scale: the trial bit is set, a
// conversion runs, and Out[k] = 1 (the reference pulse is shorter than the
// residue, so Vc is too high) clears the bit again. That is VC_W trials per
// stage; the stage index and the bit index both count down to zero.
// Synchronization delay: the maximum input level is driven and vc_synch is
// placed in the middle of the window of codes that still give the maximum
// output word (all ones). Two VC_W-step successive approximations find the
// window's edges: one on vc_synch (keep the trial bit while the output stays
// at maximum), one on its complement. Both start inside the window at
// mid-scale. Outside the window the two inputs of a stage's XOR are skewed,
// and the converter output collapses.
// Because the references were tuned at the old synchronization setting, a
// second pulse-generator pass follows (REPEAT_PG = 1).
// Which input level tunes stages below the MSB, the window search and the
// order (pulse generators, synchronization, pulse generators again) are
// choices of this design. The method only states the MSB case, the
// bit-by-bit search and "maximum input, maximum output" for the
// synchronization delay.
//
// Interface: start (a one-cycle pulse) begins a calibration. busy is high
// during it, and so is cal_sel, the input multiplexer select (1 = the
// calibration level vsig). done rises at the end and stays high until the
// next start. tdc_out is the converter's output word as registered on clk.
// Timing: after each change of vsig, vc or vc_synch the controller waits
// CONV_CYCLES clock cycles before reading tdc_out: one sample period for the
// conversion, one for the output register. A full calibration takes
// (2N+2)*VC_W*CONV_CYCLES cycles from start to done (320 for N = 9, VC_W = 8),
// or (N+2)*VC_W*CONV_CYCLES with REPEAT_PG = 0.
module calib_ctrl
  import tdc_calib_pkg::*;
#(
  parameter int unsigned N           = ADC_BITS,
  parameter int unsigned VC_W        = VC_BITS,
  parameter int unsigned CONV_CYCLES = 2,
  parameter bit          REPEAT_PG   = 1'b1   // re-tune the pulse generators after vc_synch
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [N-1:0]              tdc_out,
  output logic [N-1:0][VC_W-1:0]    vc,        // vc[k]: pulse generator of stage k
  output logic [VC_W-1:0]           vc_synch,  // shared synchronization delays
  output logic [N:0]                vsig,      // calibration input level
  output logic                      cal_sel,
  output logic                      busy,
  output logic                      done
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned BW = (VC_W > 1) ? $clog2(VC_W) : 1;
  localparam int unsigned WW = (CONV_CYCLES > 1) ? $clog2(CONV_CYCLES) : 1;
  localparam logic [VC_W-1:0] VC_MID = VC_W'(1) << (VC_W - 1);

  cal_state_e    state;
  logic [AW-1:0] bit_adc;    // stage being calibrated
  logic [BW-1:0] bit_calib;  // control-word bit under trial
  logic [WW-1:0] wait_cnt;
  logic          second;     // the pass after the synchronization search
  logic          sync_lo;    // searching the lower edge of the full-scale window
  logic [VC_W-1:0] synch_hi; // upper edge found by the first search

  // Input level that brings residue 2^k LSB to stage k (N+1-bit code)
  function automatic logic [N:0] stage_level(int unsigned k);
    return (N+1)'((1 << (N + 1)) - (1 << (k + 1)));
  endfunction

  wire conv_ready = (wait_cnt == WW'(CONV_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CAL_IDLE;
      bit_adc   <= '0;
      bit_calib <= '0;
      wait_cnt  <= '0;
      second    <= 1'b0;
      sync_lo   <= 1'b0;
      synch_hi  <= '0;
      vc        <= {N{VC_MID}};
      vc_synch  <= VC_MID;
      vsig      <= '0;
    end else begin
      case (state)
        CAL_IDLE, CAL_DONE: begin
          if (start) begin
            state     <= CAL_PG;
            bit_adc   <= AW'(N - 1);
            bit_calib <= BW'(VC_W - 1);
            wait_cnt  <= '0;
            second    <= 1'b0;
            vc        <= {N{VC_MID}};     // first trial of every word: mid-scale
            vc_synch  <= VC_MID;
            vsig      <= stage_level(N - 1);
          end
        end

        CAL_PG: begin
          if (!conv_ready) begin
            wait_cnt <= wait_cnt + 1'b1;
          end else begin
            logic [VC_W-1:0] code;
            wait_cnt <= '0;
            code = vc[bit_adc];
            if (tdc_out[bit_adc]) code[bit_calib] = 1'b0;   // reference too short
            if (bit_calib != '0) begin
              code[bit_calib - 1'b1] = 1'b1;                 // next trial bit
              bit_calib <= bit_calib - 1'b1;
            end else if (bit_adc != '0) begin
              bit_adc   <= bit_adc - 1'b1;
              bit_calib <= BW'(VC_W - 1);
              vsig      <= stage_level(int'(bit_adc) - 1);
            end else if (!second) begin
              state     <= CAL_SYNC;
              sync_lo   <= 1'b0;
              bit_calib <= BW'(VC_W - 1);
              vsig      <= '1;                                // maximum input
            end else begin
              state     <= CAL_DONE;
              vsig      <= '0;
            end
            vc[bit_adc] <= code;
          end
        end

        CAL_SYNC: begin
          if (!conv_ready) begin
            wait_cnt <= wait_cnt + 1'b1;
          end else begin
            logic [VC_W-1:0] code;
            logic            full;
            wait_cnt <= '0;
            full = (tdc_out == '1);                            // maximum output reached
            // upper edge: search vc_synch itself; lower edge: search its complement
            code = sync_lo ? ~vc_synch : vc_synch;
            if (!full) code[bit_calib] = 1'b0;
            if (bit_calib != '0) begin
              code[bit_calib - 1'b1] = 1'b1;
              bit_calib <= bit_calib - 1'b1;
              vc_synch  <= sync_lo ? ~code : code;
            end else if (!sync_lo) begin
              sync_lo   <= 1'b1;                               // now the lower edge
              synch_hi  <= code;
              bit_calib <= BW'(VC_W - 1);
              vc_synch  <= ~VC_MID;
            end else begin
              // centre of the window of codes that give full-scale output
              vc_synch  <= VC_W'(({1'b0, synch_hi} + {1'b0, ~code} + 1'b1) >> 1);
              if (REPEAT_PG) begin
                state     <= CAL_PG;                           // second pass
                second    <= 1'b1;
                vc        <= {N{VC_MID}};
                bit_adc   <= AW'(N - 1);
                bit_calib <= BW'(VC_W - 1);
                vsig      <= stage_level(N - 1);
              end else begin
                state <= CAL_DONE;
                vsig  <= '0;
              end
            end
          end
        end

        default: state <= CAL_IDLE;
      endcase
    end
  end

  assign busy    = (state == CAL_PG) || (state == CAL_SYNC);
  assign cal_sel = busy;
  assign done    = (state == CAL_DONE);

  // The stage index stays in range while a stage is being tuned
  a_stage_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == CAL_PG) |-> (int'(bit_adc) < N));
  // The synchronization word is not touched while pulse generators are tuned
  a_synch_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state == CAL_PG) && $past(state == CAL_PG) |-> $stable(vc_synch));

endmodule
