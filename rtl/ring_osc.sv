`timescale 1ns / 1ps
// ring_osc: behavioural model of one ring oscillator (RO) of the PUF. Not synthesizable.
//
// A real RO is a loop of an odd number of inverting gates (three in the evaluated
// design) placed and routed identically for every RO; only process variation makes
// their frequencies differ. Such a loop cannot be simulated as logic, so this model
// toggles its output after one half period, computed from the stage count, a nominal
// gate delay and the supply voltage.
//
// Gate delay follows a first-order alpha-power law (alpha = 1):
//   t_gate = STAGE_DELAY_PS * (1 + var_d) * (VNOM_MV - vth) / (vdd_mv - vth)
// where var_d (up to +-DELAY_VAR_PERMILLE) and the threshold offset of vth (up to
// +-VTH_VAR_MV) come from fia_pkg::ro_variation(SEED, INDEX). A lower supply slows
// every RO, by slightly different amounts; at or below vth the RO stops. The delay
// law, its constants and the enable behaviour are choices of this model.
//
// Ports:  en      enables oscillation; when low the output rests at 0
//         vdd_mv  supply voltage seen by the RO, in millivolts (model input, not logic)
//         osc     oscillator output
module ring_osc
  import fia_pkg::*;
#(
  parameter int unsigned STAGES             = 3,
  parameter int unsigned STAGE_DELAY_PS     = 400,
  parameter int unsigned DELAY_VAR_PERMILLE = 80,
  parameter int unsigned VNOM_MV            = 1000,
  parameter int unsigned VTH_MV             = 400,
  parameter int unsigned VTH_VAR_MV         = 30,
  parameter int unsigned SEED               = 32'h1234_5678,
  parameter int unsigned INDEX              = 0
) (
  input  logic        en,
  input  logic [11:0] vdd_mv,
  output logic        osc
);

  localparam int DVAR = ro_variation(SEED, INDEX, 1, DELAY_VAR_PERMILLE);
  localparam int VVAR = ro_variation(SEED, INDEX, 2, VTH_VAR_MV);
  localparam real VTH = real'(VTH_MV) + real'(VVAR);
  localparam real NOMINAL_HALF_NS =
      real'(STAGES) * real'(STAGE_DELAY_PS) * (1.0 + real'(DVAR) / 1000.0) / 1000.0;

  function automatic real half_period_ns(input logic [11:0] v);
    return NOMINAL_HALF_NS * (real'(VNOM_MV) - VTH) / (real'(v) - VTH);
  endfunction

  initial osc = 1'b0;

  always begin
    if (en && (real'(vdd_mv) > VTH + 1.0)) begin
      #(half_period_ns(vdd_mv)) osc = en ? ~osc : 1'b0;
    end else begin
      osc = 1'b0;
      @(en or vdd_mv);
    end
  end

endmodule
