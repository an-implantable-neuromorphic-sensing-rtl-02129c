// lc_adc_frontend: BEHAVIOURAL MODEL (not synthesizable logic) of the analog
// part of one level-crossing ADC: input subtractor, shared pre-amplifier,
// switched-capacitor charge adder, the two continuous-time comparators
// (CMP0 -> up_cmp, CMP1 -> dn_cmp) and the 6-bit capacitive DAC.
//
// Behaviour modelled: the DAC level is dac_code * VLSB with VLSB = VFS/2^6.
// In normal operation up_cmp is high while vin - V_DAC exceeds +1 LSB and
// dn_cmp while it is below -1 LSB. The comparator offsets are referred to
// the input divided by the pre-amplifier gain A (the first stage is shared
// by both comparators). The pre-amplifier offset e shifts both thresholds
// until the three-phase calibration has run once: phi1 (reference store)
// followed by phi2 (offset store) followed by phi3 (normal operation) cancels
// it. While phi1 or phi2 is high the input is disconnected and both
// comparators are held low.
//
// Not modelled: noise, bandwidth and settling, the power/bandwidth setting
// of the two operating modes (it changes biasing, not the logic behaviour).
// The 0-1 V range, 10 dB pre-amp gain and 6-bit DAC come from the design;
// the offsets default to zero and are there to be set by a testbench.
module lc_adc_frontend #(
  parameter int unsigned DAC_W     = 6,
  parameter real         VFS       = 1.0,
  parameter real         GAIN_DB   = 10.0,
  parameter real         OFFS_PRE  = 0.0,
  parameter real         OFFS_CMP0 = 0.0,
  parameter real         OFFS_CMP1 = 0.0
) (
  input  real              vin,
  input  logic [DAC_W-1:0] dac_code,
  input  logic             phi1,
  input  logic             phi2,
  input  logic             phi3,
  output logic             up_cmp,
  output logic             dn_cmp
);

  localparam real VLSB = VFS / real'(2 ** DAC_W);
  localparam real GAIN = 10.0 ** (GAIN_DB / 20.0);

  logic cal_ref_q, cal_off_q, cal_done_q;
  real  vdac, vdiff, e_res;

  initial begin
    cal_ref_q  = 1'b0;
    cal_off_q  = 1'b0;
    cal_done_q = 1'b0;
  end

  // Calibration progress: reference store, then offset store, then normal.
  always @(posedge phi1) cal_ref_q <= 1'b1;
  always @(posedge phi2) if (cal_ref_q) cal_off_q <= 1'b1;
  always @(posedge phi3) if (cal_off_q) cal_done_q <= 1'b1;

  always_comb begin
    vdac  = real'(dac_code) * VLSB;
    vdiff = vin - vdac;
    e_res = cal_done_q ? 0.0 : OFFS_PRE;
    if (phi1 || phi2) begin
      up_cmp = 1'b0;
      dn_cmp = 1'b0;
    end else begin
      up_cmp = vdiff > ( VLSB + e_res + OFFS_CMP0 / GAIN);
      dn_cmp = vdiff < (-VLSB + e_res + OFFS_CMP1 / GAIN);
    end
  end

endmodule
