// Behavioural (simulation-only, not synthesizable) model of the N-bit SAR-CD
// time-to-digital converter.
//
// N unit cells (sarcd_stage_model) are chained: the input pulse enters stage
// N-1 (weight FS/2) and each stage hands the absolute difference of its input
// and its reference pulse to the next, down to stage 0 (weight 1 LSB =
// FS/2^N). The stage decisions u[] are turned into the binary word out[] by
// the XNOR correction (sarcd_correct). Every stage has its own
// pulse-generator control voltage vc_uv[k]; all synchronization delays share
// vc_synch_uv. Each stage's reference is given a fixed relative mismatch
// MISMATCH * m_k, with m_k in {-1,-0.5,0,0.5,1} chosen from k, to model the
// per-stage spread that calibration must remove; GATE_CORNER and CS_CORNER
// scale the logic-gate and the current-starved delays. clr clears all stage
// decisions before a conversion; out is valid once the last stage has
// finished (about the input width plus N gate delays after the input edge).
// The mismatch pattern and corner factors are this model's own. Time unit 1 ps.
module sarcd_tdc_model
  import tdc_calib_pkg::*;
#(
  parameter int unsigned N           = ADC_BITS,
  parameter real         GATE_CORNER = 1.0,
  parameter real         CS_CORNER   = 1.0,
  parameter real         MISMATCH    = 0.0
) (
  input  logic                pin,
  input  logic                clr,
  input  logic [N-1:0][20:0]  vc_uv,
  input  logic [20:0]         vc_synch_uv,
  output logic [N-1:0]        u,
  output logic [N-1:0]        out,
  output logic                res_out       // residue left after stage 0
);
  timeunit 1ps; timeprecision 1ps;

  logic [N:0] chain;   // chain[N] is the TDC input, chain[k] feeds stage k-1
  assign chain[N] = pin;
  assign res_out  = chain[0];

  for (genvar k = 0; k < N; k++) begin : g_stage
    localparam real MK = real'(((k * 3) % 5) - 2) / 2.0;
    localparam real WK = FS_PS * real'(1 << k) / real'(1 << N) * (1.0 + MISMATCH * MK);
    sarcd_stage_model #(.W_PS(WK), .GATE_CORNER(GATE_CORNER), .CS_CORNER(CS_CORNER))
      u_stage (.pin(chain[k+1]), .clr(clr), .vc_uv(vc_uv[k]), .vc_synch_uv(vc_synch_uv),
               .pout(chain[k]), .u(u[k]));
  end

  sarcd_correct #(.N(N)) u_correct (.u(u), .b(out));

endmodule
