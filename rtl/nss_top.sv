// nss_top: the complete two-channel neuromorphic sensing system: two
// analog-to-spike converters (level-crossing ADCs), the spiking neural
// network and the pulse-based body-channel transmitter with its PA.
//
// The analog parts (the two ADC front ends and the PA) are behavioural
// models with real-valued pins; everything else is the synthesizable
// nss_core. vin1/vin2 are the amplified nerve signals (0..1 V), op/on the
// two BCC electrode outputs. Configuration and observation pins are those
// of nss_core. Timing is as described in nss_core.
//
// The partition follows the block diagram of the design; the single clock
// input is this implementation's replacement for the self-timed logic.
module nss_top
  import nss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  nss_mode_e         mode,
  input  real               vin1,
  input  real               vin2,
  input  snn_wr_t           snn_wr,
  input  logic [4:0]        tbit_cyc,
  input  logic [7:0]        treset_cyc,
  output real               op,
  output real               on,
  output logic signed [1:0] op_minus_on,
  output logic [3:0]        asc_ev,
  output logic [5:0]        dac_code [2],
  output logic [7:0]        snn_out,
  output logic              pkt_start,
  output logic [2:0]        pkt_addr,
  output logic              tx_busy,
  output logic              tx_dropped,
  output logic              aer_bit,
  output logic [1:0]        asc_relock,
  output logic [2:0]        snn_merged,
  output logic              snn_active
);

  logic [1:0] up_cmp, dn_cmp, phi1, phi2, phi3;
  logic       oh, ol;

  lc_adc_frontend u_afe1 (
    .vin(vin1), .dac_code(dac_code[0]), .phi1(phi1[0]), .phi2(phi2[0]),
    .phi3(phi3[0]), .up_cmp(up_cmp[0]), .dn_cmp(dn_cmp[0])
  );
  lc_adc_frontend u_afe2 (
    .vin(vin2), .dac_code(dac_code[1]), .phi1(phi1[1]), .phi2(phi2[1]),
    .phi3(phi3[1]), .up_cmp(up_cmp[1]), .dn_cmp(dn_cmp[1])
  );

  nss_core u_core (
    .clk, .rst_n, .mode,
    .up_cmp, .dn_cmp, .dac_code, .phi1, .phi2, .phi3,
    .snn_wr, .tbit_cyc, .treset_cyc,
    .oh, .ol,
    .asc_ev, .asc_relock, .snn_out, .snn_merged, .snn_active,
    .aer_bit, .tx_busy, .pkt_start, .pkt_addr, .tx_dropped
  );

  bcc_pa u_pa (.oh, .ol, .op, .on, .op_minus_on);

endmodule
