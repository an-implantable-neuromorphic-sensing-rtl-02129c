// nss_core: synthesizable digital part of the neuromorphic sensing system.
//
// Two level-crossing ADC controls (one per recording channel) turn the
// comparator levels of their analog front ends into UP/DN events and drive
// the front ends' DACs and calibration phases. The four events UP1, DN1,
// UP2, DN2 feed the spiking neural network, which produces the temporal
// labels D, R, H on its output neurons 0..2. The transmitter sends, in
// feature-extraction mode, the labels, and in full-diagnosis mode the raw
// events, as Manchester-coded 3-bit AER packets on OH/OL.
//
// Interface: up_cmp/dn_cmp come asynchronously from the comparators;
// dac_code/phi* go back to the front ends. snn_wr loads the SNN weights.
// tbit_cyc/treset_cyc set the chip period and the reset time of the
// transmitter in clock cycles. The remaining outputs expose the events,
// labels and packets for observation.
//
// Timing: a comparator edge gives an event 2-3 cycles later; in full
// diagnosis mode a packet for it starts 2 cycles after that if the
// transmitter is free. In feature mode the SNN adds 2 cycles per layer.
//
// The block structure and the mode-dependent routing follow the design;
// the single clock (assumed 8 MHz) stands in for the self-timed logic of the
// original.
module nss_core
  import nss_pkg::*;
#(
  parameter int unsigned DAC_W     = 6,
  parameter int unsigned PHASE_CYC = 2,
  parameter int unsigned N_POOL    = 46,
  parameter int unsigned N_OUT     = 8,
  parameter int unsigned ACC_W     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nss_mode_e         mode,
  // analog front ends
  input  logic [1:0]        up_cmp,
  input  logic [1:0]        dn_cmp,
  output logic [DAC_W-1:0]  dac_code [2],
  output logic [1:0]        phi1,
  output logic [1:0]        phi2,
  output logic [1:0]        phi3,
  // configuration
  input  snn_wr_t           snn_wr,
  input  logic [4:0]        tbit_cyc,
  input  logic [7:0]        treset_cyc,
  // PA drive
  output logic              oh,
  output logic              ol,
  // observation
  output logic [3:0]        asc_ev,
  output logic [1:0]        asc_relock,
  output logic [N_OUT-1:0]  snn_out,
  output logic [2:0]        snn_merged,
  output logic              snn_active,
  output logic              aer_bit,
  output logic              tx_busy,
  output logic              pkt_start,
  output logic [AER_W-1:0]  pkt_addr,
  output logic              tx_dropped
);

  logic [1:0] ev_up, ev_dn, phi_r, osc_en;
  logic [DAC_W-1:0] track_code [2];

  for (genvar c = 0; c < 2; c++) begin : g_asc
    lcadc_ctrl #(.DAC_W(DAC_W), .PHASE_CYC(PHASE_CYC)) u_ctrl (
      .clk, .rst_n,
      .up_cmp    (up_cmp[c]),
      .dn_cmp    (dn_cmp[c]),
      .dac_code  (dac_code[c]),
      .track_code(track_code[c]),
      .phi1      (phi1[c]),
      .phi2      (phi2[c]),
      .phi3      (phi3[c]),
      .phi_r     (phi_r[c]),
      .ev_up     (ev_up[c]),
      .ev_dn     (ev_dn[c]),
      .osc_en    (osc_en[c]),
      .relock    (asc_relock[c])
    );
  end

  // Event order: UP1, DN1, UP2, DN2.
  assign asc_ev = {ev_dn[1], ev_up[1], ev_dn[0], ev_up[0]};

  snn_core #(.N_IN(4), .N_POOL(N_POOL), .N_OUT(N_OUT), .ACC_W(ACC_W)) u_snn (
    .clk, .rst_n,
    .wr       (snn_wr),
    .in_spk   (asc_ev),
    .pool1_spk(),
    .pool2_spk(),
    .out_spk  (snn_out),
    .merged   (snn_merged),
    .active   (snn_active)
  );

  bcc_tx u_tx (
    .clk, .rst_n,
    .mode      (mode),
    .asc_ev    (asc_ev),
    .label     (snn_out[2:0]),
    .tbit_cyc  (tbit_cyc),
    .treset_cyc(treset_cyc),
    .oh        (oh),
    .ol        (ol),
    .aer_bit   (aer_bit),
    .busy      (tx_busy),
    .pkt_start (pkt_start),
    .pkt_addr  (pkt_addr),
    .dropped   (tx_dropped)
  );

endmodule
