// bcc_tx: event-driven transmitter logic for the pulse-based body channel
// link: mode select, serial address-event representation (AER) and
// Manchester coding, producing the OH/OL drive of the differential PA.
//
// How it works: the mode selects the event sources. In feature-extraction
// mode the three SNN labels D, R, H are sent; in full-diagnosis mode the four
// level-crossing events UP1, DN1, UP2, DN2. An event is held in a pending
// flag until the transmitter is free; a round-robin arbiter picks the next
// one when several wait. Each event becomes one packet: its 3-bit AER
// address, MSB first, with every bit Manchester coded as two chips, a '1' as
// "+-" and a '0' as "-+". A '+' chip drives OH high (tissue charged), a '-'
// chip drives OL high (tissue discharged); the six chips always hold three of
// each, so the packet carries no net charge. After the six chips both OH and
// OL stay low for the reset time, the PA shorts its outputs to VDD/2, and
// only then can the next packet start. A packet therefore lasts
// 6*tbit_cyc + treset_cyc clock cycles; choosing the next event takes two
// more, so back-to-back packets start every 6*tbit_cyc + treset_cyc + 2.
//
// Interface: events are one-cycle pulses. tbit_cyc (chip period, 0 read as
// 1) and treset_cyc are sampled at the start of each packet. aer_bit shows
// the AER bit being sent. 'dropped' pulses when an event arrives while the
// same event is still waiting (it is merged). A change of mode discards all
// waiting events. pkt_start pulses in the first cycle of a packet together
// with the chosen AER address on pkt_addr.
//
// From the design: the AER code tables, the MSB-first bit order, the
// Manchester mapping, the chip count of six and the reset interval after
// each packet. This implementation's choices: the clocked timing (with an
// 8 MHz clock, tbit_cyc = 4..16 spans the 0.5-2 us bit period and
// treset_cyc = 32 gives the ~4 us reset), the pending flags and their
// round-robin order, discarding events on a mode change.
module bcc_tx
  import nss_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  nss_mode_e       mode,
  input  logic [3:0]      asc_ev,
  input  logic [2:0]      label,
  input  logic [4:0]      tbit_cyc,
  input  logic [7:0]      treset_cyc,
  output logic            oh,
  output logic            ol,
  output logic            aer_bit,
  output logic            busy,
  output logic            pkt_start,
  output logic [AER_W-1:0] pkt_addr,
  output logic            dropped
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_RESET} tx_state_e;

  tx_state_e        state_q;
  nss_mode_e        mode_q;
  logic [3:0]       src;
  logic             ready;
  logic             grant;
  logic [1:0]       grant_idx;
  logic [3:0]       grant_onehot;
  logic [AER_W-1:0] code_q;
  logic [2:0]       chip_q;
  logic [4:0]       tbit_q;
  logic [7:0]       cnt_q;
  logic             cur_bit;
  logic             plus;

  assign src   = (mode == MODE_FEATURE) ? {1'b0, label} : asc_ev;
  assign ready = (state_q == S_IDLE) && !grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= MODE_FEATURE;
    else        mode_q <= mode;
  end

  spike_arbiter #(.N(4)) u_evq (
    .clk, .rst_n,
    .req       (src),
    .ready     (ready),
    .flush     (mode != mode_q),
    .spk_valid (grant),
    .spk_idx   (grant_idx),
    .spk_onehot(grant_onehot),
    .merged    (dropped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      code_q    <= '0;
      chip_q    <= '0;
      tbit_q    <= 5'd1;
      cnt_q     <= '0;
      pkt_start <= 1'b0;
      pkt_addr  <= '0;
    end else begin
      pkt_start <= 1'b0;
      case (state_q)
        S_IDLE: begin
          if (grant) begin
            state_q   <= S_SEND;
            code_q    <= aer_code(mode_q, grant_idx);
            pkt_addr  <= aer_code(mode_q, grant_idx);
            pkt_start <= 1'b1;
            chip_q    <= '0;
            cnt_q     <= '0;
            tbit_q    <= (tbit_cyc == '0) ? 5'd1 : tbit_cyc;
          end
        end
        S_SEND: begin
          if (cnt_q == 8'(tbit_q - 1'b1)) begin
            cnt_q <= '0;
            if (chip_q == 3'd5) begin
              state_q <= (treset_cyc == '0) ? S_IDLE : S_RESET;
            end else begin
              chip_q <= chip_q + 1'b1;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_RESET: begin
          if (cnt_q == treset_cyc - 1'b1) begin
            cnt_q   <= '0;
            state_q <= S_IDLE;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Manchester chip: '1' -> "+-", '0' -> "-+".
  always_comb begin
    cur_bit = code_q[AER_W - 1 - int'(chip_q[2:1])];
    plus    = cur_bit ^ chip_q[0];
  end

  assign oh      = (state_q == S_SEND) &&  plus;
  assign ol      = (state_q == S_SEND) && !plus;
  assign aer_bit = (state_q == S_SEND) && cur_bit;
  assign busy    = (state_q != S_IDLE) || grant;

  a_oh_ol: assert property (@(posedge clk) disable iff (!rst_n) !(oh && ol));

endmodule
