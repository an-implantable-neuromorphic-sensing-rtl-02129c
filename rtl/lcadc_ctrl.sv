// lcadc_ctrl: digital control of one level-crossing ADC (the analog-to-spike
// converter, ASC).
//
// The ASC compares the input with a DAC voltage through two comparators, one
// firing (UP) when the input has risen one LSB above the DAC level and one
// (DN) when it has fallen one LSB below. This block turns those comparator
// levels into events and keeps the DAC tracking the input:
//
//  * Pulse latches. The synchronised UP (DN) level sets the Pulse_UP
//    (Pulse_DN) latch when no conversion is in progress. Setting it emits a
//    one-cycle event on ev_up (ev_dn) and steps the DAC code by +1 (-1,
//    saturating at the ends of the range).
//  * Control-signal generator. While either latch is set, the oscillator is
//    enabled (osc_en) and a counter steps through the non-overlapping phases
//    phi1 (reference store), phi2 (offset store), phi3 (normal operation,
//    offset cancelled) and phi_r (reset), each PHASE_CYC cycles long (phi_r
//    one cycle) with one idle cycle between phases. phi_r clears the latch,
//    which stops the oscillator.
//  * Anti-self-locking. If the comparator is still high after phi_r (the DAC
//    has not caught up, or the loop locked up), the latch is set again at
//    once, so events and DAC steps repeat until the comparator returns to
//    zero.
//  * DAC drive. During phi1 the DAC is forced to 2 LSB and during phi2 to 0,
//    as the offset-calibration phases require; otherwise it shows the
//    tracking code.
//
// Timing: up_cmp/dn_cmp are asynchronous and pass a two-flop synchroniser,
// so an event appears two to three cycles after the comparator rises, and a
// conversion occupies 3*PHASE_CYC+4 cycles. At an assumed 8 MHz clock and
// PHASE_CYC=2 that is 1.25 us, well under the 10 us timing budget.
//
// From the design: the latches reset by phi_r, the oscillator/counter/pulse
// generator, the four phases, the 2-LSB/0 DAC levels during calibration, the
// 6-bit DAC, the self-lock recovery. This implementation's choices: a clock
// enable replaces the ring oscillator, the phase lengths, the mid-scale reset
// code, the saturation at the code limits, UP winning if both are high.
module lcadc_ctrl #(
  parameter int unsigned DAC_W     = 6,
  parameter int unsigned PHASE_CYC = 2,
  parameter int unsigned DAC_INIT  = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             up_cmp,
  input  logic             dn_cmp,
  output logic [DAC_W-1:0] dac_code,
  output logic [DAC_W-1:0] track_code,
  output logic             phi1,
  output logic             phi2,
  output logic             phi3,
  output logic             phi_r,
  output logic             ev_up,
  output logic             ev_dn,
  output logic             osc_en,
  output logic             relock
);

  localparam int unsigned SEQ_LEN = 3 * PHASE_CYC + 4;
  localparam int unsigned CNT_W   = $clog2(SEQ_LEN + 1);
  localparam int unsigned P2_START = PHASE_CYC + 1;
  localparam int unsigned P3_START = 2 * PHASE_CYC + 2;
  localparam int unsigned PR_AT    = 3 * PHASE_CYC + 3;

  logic [1:0]       up_sync, dn_sync;
  logic             up_s, dn_s;
  logic             pulse_up_q, pulse_dn_q;
  logic             busy;
  logic             set_up, set_dn;
  logic [CNT_W-1:0] cnt_q;
  logic             was_reset_q;

  // Two-flop synchronisers for the asynchronous comparator outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_sync <= '0;
      dn_sync <= '0;
    end else begin
      up_sync <= {up_sync[0], up_cmp};
      dn_sync <= {dn_sync[0], dn_cmp};
    end
  end
  assign up_s = up_sync[1];
  assign dn_s = dn_sync[1];

  assign busy   = pulse_up_q | pulse_dn_q;
  assign set_up = !busy && up_s;
  assign set_dn = !busy && dn_s && !up_s;

  // Phase decode from the edge counter.
  always_comb begin
    phi1  = busy && (int'(cnt_q) <  PHASE_CYC);
    phi2  = busy && (int'(cnt_q) >= P2_START) && (int'(cnt_q) < P2_START + PHASE_CYC);
    phi3  = busy && (int'(cnt_q) >= P3_START) && (int'(cnt_q) < P3_START + PHASE_CYC);
    phi_r = busy && (int'(cnt_q) == PR_AT);
  end
  assign osc_en = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse_up_q  <= 1'b0;
      pulse_dn_q  <= 1'b0;
      cnt_q       <= '0;
      track_code  <= DAC_W'(DAC_INIT);
      ev_up       <= 1'b0;
      ev_dn       <= 1'b0;
      was_reset_q <= 1'b0;
      relock      <= 1'b0;
    end else begin
      ev_up  <= set_up;
      ev_dn  <= set_dn;
      // A new pulse right after phi_r means the comparator never returned
      // to zero: the anti-self-locking path fired.
      relock <= (set_up || set_dn) && was_reset_q;
      was_reset_q <= phi_r;
      if (busy) begin
        if (phi_r) begin
          pulse_up_q <= 1'b0;
          pulse_dn_q <= 1'b0;
          cnt_q      <= '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end else if (set_up) begin
        pulse_up_q <= 1'b1;
        if (track_code != '1) track_code <= track_code + 1'b1;
      end else if (set_dn) begin
        pulse_dn_q <= 1'b1;
        if (track_code != '0) track_code <= track_code - 1'b1;
      end
    end
  end

  always_comb begin
    if (phi1)      dac_code = DAC_W'(2);
    else if (phi2) dac_code = '0;
    else           dac_code = track_code;
  end

  // The phases never overlap.
  a_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({phi1, phi2, phi3, phi_r}));
  a_one_latch: assert property (@(posedge clk) disable iff (!rst_n)
    !(pulse_up_q && pulse_dn_q));

endmodule
