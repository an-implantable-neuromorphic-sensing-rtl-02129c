// tb_nss_top: end-to-end test of the whole sensing system at its default
// (full) size, with an 8 MHz clock.
//
// Stimulus: a synthetic triphasic compound action potential (rise, fall
// below baseline, slow recovery; about 16 LSB high, a few ms long) on channel 1,
// the same waveform 0.2 ms later on channel 2 (a propagation delay as in a
// conduction-velocity study), plus a steep 6-LSB step that forces the
// converters' self-lock recovery. The SNN is loaded with three feed-forward
// chains: UP1 -> D, DN1 -> R, UP2 -> H (weight 127 at every stage) and one
// recurrent synapse in pool 1.
//
// The link runs at a 0.5 us chip period and a 3 us reset (a 6 us packet).
// A receiver model decodes the PA output (+1/0/-1) into AER packets.
// Full-diagnosis mode: the decoded UP/DN events are accumulated per channel
// (the reconstruction is a plain running sum) and compared with each
// converter's DAC code, and with the input; events merged while the link was
// busy are accounted for. The data rate is compared with a 30 kS/s 10-bit
// Nyquist converter at 10 CAPs per second (must be at least 125x lower), and
// the delay from each converter event to the start of its packet (the timing
// uncertainty of the link's time stamps) must stay within 10 us. Feature-extraction mode: every decoded label must
// match, in order, a label spike of the SNN. Mechanisms counted (each must
// occur): UP/DN events, calibration phases, self-lock recovery, arbiter
// collisions, recurrent spikes, D/R/H labels, packets in both modes, merged
// events, mode switches.
//
// The 0.5 us chip period and the 125x compression target follow the
// original system; the CAP shape, its size and the reset time are chosen here.
module tb_nss_top
  import nss_pkg::*;
;
  localparam real VLSB = 1.0 / 64.0;
  logic clk = 1'b0, rst_n = 1'b0;
  nss_mode_e mode;
  real vin1, vin2, op, on;
  snn_wr_t snn_wr;
  logic [4:0] tbit_cyc;
  logic [7:0] treset_cyc;
  logic signed [1:0] op_minus_on;
  logic [3:0] asc_ev;
  logic [5:0] dac_code [2];
  logic [7:0] snn_out;
  logic pkt_start, tx_busy, tx_dropped, aer_bit, snn_active;
  logic [2:0] pkt_addr, snn_merged;
  logic [1:0] asc_relock;
  int checks = 0, failures = 0;

  nss_top dut (.*);
  always #62.5 clk = ~clk;   // 8 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int cyc = 0;
  int n_ev [4];
  int n_relock = 0, n_phase = 0, n_collide = 0, n_rec = 0, n_drop = 0, n_mode_sw = 0;
  int n_lbl [3];
  int lbl_q [$];
  // Event-to-packet delay in diagnosis mode (per-source queues of event times).
  int evq [4][$];
  bit track_delay = 0;
  int max_delay = 0, n_delay = 0;
  real sum_delay = 0.0;
  always @(negedge clk) begin
    cyc++;
    for (int i = 0; i < 4; i++) if (asc_ev[i]) n_ev[i]++;
    if (track_delay) begin
      for (int i = 0; i < 4; i++) if (asc_ev[i]) evq[i].push_back(cyc);
      if (pkt_start && mode == MODE_DIAG) begin
        int src, d;
        src = 3 - int'(pkt_addr);
        if (evq[src].size() > 0) begin
          d = cyc - evq[src].pop_front();
          if (d > max_delay) max_delay = d;
          sum_delay += real'(d);
          n_delay++;
        end
      end
    end
    n_relock += $countones(asc_relock);
    if (dut.u_core.g_asc[0].u_ctrl.phi1) n_phase++;
    if ($countones(dut.u_core.u_snn.u_pool1.u_arb.cand) > 1) n_collide++;
    if (dut.u_core.u_snn.pool1_spk[3]) n_rec++;
    if (tx_dropped) n_drop++;
    for (int i = 0; i < 3; i++) if (snn_out[i]) begin
      n_lbl[i]++;
      if (mode == MODE_FEATURE) lbl_q.push_back(i);
    end
  end

  // ---------------- receiver model ----------------
  int rx_codes [$];
  initial begin : rx
    forever begin
      int code;
      bit ch [6];
      @(negedge clk);
      if (op_minus_on != 0) begin
        for (int c = 0; c < 6; c++) begin
          int np;
          np = 0;
          for (int k = 0; k < tbit_cyc; k++) begin
            if (k > 0 || c > 0) @(negedge clk);
            if (op_minus_on == 1) np++;
          end
          ch[c] = (np == tbit_cyc);
        end
        code = 0;
        for (int b = 0; b < 3; b++) code = (code << 1) | int'(ch[2*b] && !ch[2*b+1]);
        rx_codes.push_back(code);
      end
    end
  end

  // ---------------- stimulus ----------------
  function automatic real cap(input real t_ms);
    real a, b, c;
    if (t_ms < 0.0 || t_ms > 6.0) return 0.0;
    a = (t_ms - 0.75) / 0.20;
    b = (t_ms - 1.40) / 0.25;
    c = (t_ms - 2.40) / 0.75;
    a = $exp(-a * a);
    b = $exp(-b * b);
    c = $exp(-c * c);
    return 0.25 * a - 0.18 * b - 0.06 * c;
  endfunction

  real t_cap;    // start of the current CAP in ms of simulated time
  real step1;    // extra step on channel 1
  always @(negedge clk) begin
    real tms;
    tms = $realtime / 1.0e6;
    vin1 = 0.5 + 0.25 * VLSB + cap(tms - t_cap) + step1;
    vin2 = 0.5 + 0.25 * VLSB + cap(tms - t_cap - 0.2);
  end

  task automatic run_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wr_w(input int layer, input int n, input int s, input int val);
    snn_wr.en = 1; snn_wr.layer = 2'(layer); snn_wr.neuron = 7'(n); snn_wr.syn = 7'(s);
    snn_wr.data = 8'(val);
    @(negedge clk);
  endtask

  int code_of [4] = '{3'b011, 3'b010, 3'b001, 3'b000};
  int lbl_code [3] = '{3'b110, 3'b101, 3'b100};

  initial begin
    #2000000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int recon [2];
    int n0, nerr;
    real se, sr;
    t_cap = 1.0e9; step1 = 0.0;
    for (int i = 0; i < 4; i++) n_ev[i] = 0;
    for (int i = 0; i < 3; i++) n_lbl[i] = 0;
    mode = MODE_DIAG; snn_wr = '0; tbit_cyc = 5'd4; treset_cyc = 8'd24;
    run_cycles(3); rst_n = 1;
    // Load all 6900 weights.
    for (int n = 0; n < 46; n++) for (int s = 0; s < 50; s++)
      wr_w(0, n, s, ((n < 3 && s == n) || ((n == 3 || n == 4) && s == 4)) ? 127 : 0);
    for (int n = 0; n < 46; n++) for (int s = 0; s < 92; s++)
      wr_w(1, n, s, (n < 3 && s == n) ? 127 : 0);
    for (int n = 0; n < 8; n++) for (int s = 0; s < 46; s++)
      wr_w(2, n, s, (n == 0 && s == 0) || (n == 1 && s == 1) || (n == 2 && s == 2) ? 127 : 0);
    snn_wr.en = 0;
    run_cycles(200);
    check(dac_code[0] == 32 && dac_code[1] == 32, "converters idle at mid-scale");

    // ---- full diagnosis mode: two CAPs, reconstruct from the link ----
    recon = '{32, 32};
    rx_codes.delete();
    se = 0.0; sr = 0.0; nerr = 0;
    track_delay = 1;
    for (int k = 0; k < 2; k++) begin
      t_cap = $realtime / 1.0e6 + 0.1;
      for (int i = 0; i < 6.5e-3 * 8.0e6; i++) begin
        @(negedge clk);
        while (rx_codes.size() > 0) begin
          int c;
          c = rx_codes.pop_front();
          case (c)
            3'b011: recon[0]++;
            3'b010: recon[0]--;
            3'b001: recon[1]++;
            3'b000: recon[1]--;
            default: nerr++;
          endcase
        end
        se += ((real'(recon[0]) * VLSB) - vin1) * ((real'(recon[0]) * VLSB) - vin1);
        sr += (vin1 - 0.5) * (vin1 - 0.5);
      end
    end
    run_cycles(200);
    track_delay = 0;
    // End-to-end timing: an event's time stamp is its packet's arrival, so the
    // wait from event to packet start is the system's timing uncertainty.
    $display("diag: event-to-packet delay mean %0.2f us, max %0.2f us over %0d events",
             sum_delay / n_delay / 8.0, real'(max_delay) / 8.0, n_delay);
    check(n_delay == n_ev[0] + n_ev[1] + n_ev[2] + n_ev[3], "every event matched to its packet");
    check(max_delay <= 80, $sformatf("event-to-packet delay %0d cycles within 10 us", max_delay));
    check(nerr == 0, "only diagnosis codes in diagnosis mode");
    check(n_drop == 0, $sformatf("no event merged at this slope (%0d)", n_drop));
    check(recon[0] == int'(dac_code[0]) && recon[1] == int'(dac_code[1]),
          $sformatf("link reconstruction %0d/%0d equals DAC codes %0d/%0d",
                    recon[0], recon[1], dac_code[0], dac_code[1]));
    check(n_ev[0] >= 10 && n_ev[1] >= 10 && n_ev[2] >= 10 && n_ev[3] >= 10, "UP/DN events on both channels");
    $display("diag: events UP1=%0d DN1=%0d UP2=%0d DN2=%0d, NRMSE=%0.3f",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], $sqrt(se / sr));
    check($sqrt(se / sr) < 0.15, $sformatf("reconstruction NRMSE %0.3f", $sqrt(se / sr)));
    // Data rate against a 30 kS/s, 10-bit Nyquist converter (300 kbit/s per
    // channel) at 10 CAPs per second, 3 AER bits per event.
    begin
      real ev_per_cap, ratio;
      ev_per_cap = real'(n_ev[0] + n_ev[1]) / 2.0;
      ratio = 300000.0 / (10.0 * ev_per_cap * 3.0);
      $display("diag: %0.1f events per CAP per channel, compression %0.0fx", ev_per_cap, ratio);
      check(ratio > 125.0, $sformatf("compression ratio %0.0f above 125", ratio));
    end

    // ---- steep step: self-lock recovery and merged events on the link ----
    step1 = 6.0 * VLSB;
    run_cycles(2000);
    step1 = 0.0;
    run_cycles(2000);
    check(n_relock > 0, $sformatf("self-lock recovery occurred %0d times", n_relock));
    check(n_drop > 0, $sformatf("events merged while the link was busy: %0d", n_drop));

    // ---- feature extraction mode: labels over the link ----
    @(negedge clk); mode = MODE_FEATURE; n_mode_sw++;
    run_cycles(10);
    lbl_q.delete();
    n0 = rx_codes.size();
    for (int k = 0; k < 6; k++) begin
      t_cap = $realtime / 1.0e6 + 0.1;
      run_cycles(int'(6.5e-3 * 8.0e6));
    end
    run_cycles(500);
    check(rx_codes.size() - n0 == lbl_q.size(), $sformatf("%0d label packets for %0d labels",
          rx_codes.size() - n0, lbl_q.size()));
    for (int i = 0; i < lbl_q.size() && n0 + i < rx_codes.size(); i++)
      check(rx_codes[n0 + i] == lbl_code[lbl_q[i]], "label packet code");
    for (int i = 0; i < 3; i++) check(n_lbl[i] > 0, $sformatf("label %0d produced %0d times", i, n_lbl[i]));
    @(negedge clk); mode = MODE_DIAG; n_mode_sw++;
    run_cycles(100);

    check(n_phase > 0, $sformatf("calibration phases: %0d", n_phase));
    check(n_collide > 0, $sformatf("arbiter collisions: %0d", n_collide));
    check(n_rec > 0, $sformatf("recurrent spikes: %0d", n_rec));
    check(n_mode_sw == 2, "mode switches");
    $display("mechanisms: phases=%0d relock=%0d collisions=%0d recurrent=%0d merged=%0d labels D=%0d R=%0d H=%0d",
             n_phase, n_relock, n_collide, n_rec, n_drop, n_lbl[0], n_lbl[1], n_lbl[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
