// tb_lcadc_ctrl: self-checking test of the level-crossing ADC control.
// A comparator model here (input level in 1/16 LSB, thresholds +/-1 LSB
// around the DAC level, both comparators held low during phi1/phi2) closes
// the loop. Checks: event latency (3 cycles from the comparator edge), the
// phase order and lengths, the DAC forced to 2 and 0 during phi1/phi2,
// one event per small step, repeated events with the fixed period
// 3*PHASE_CYC+5 while the comparator stays high (anti-self-locking), the
// number of events of a large step, saturation, and tracking of a slow
// sine within one LSB.
//
// The phase order and the anti-self-locking behaviour follow the original
// control logic; phase lengths in cycles and the latencies checked are this
// implementation's own.
module tb_lcadc_ctrl;
  localparam int PC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic up_cmp, dn_cmp;
  logic [5:0] dac_code, track_code;
  logic phi1, phi2, phi3, phi_r, ev_up, ev_dn, osc_en, relock;
  int checks = 0, failures = 0;
  int vin16;   // input in 1/16 LSB

  lcadc_ctrl #(.PHASE_CYC(PC)) dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    if (phi1 || phi2) begin
      up_cmp = 0; dn_cmp = 0;
    end else begin
      up_cmp = vin16 > (int'(dac_code) + 1) * 16;
      dn_cmp = vin16 < (int'(dac_code) - 1) * 16;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int cyc = 0, n_up = 0, n_dn = 0, n_relock = 0, last_ev = -1, bad_period = 0, n_period = 0;
  int ph_trace [$];
  always @(negedge clk) begin
    cyc++;
    if (ev_up || ev_dn) begin
      if (last_ev >= 0 && cyc - last_ev < 3 * PC + 5) bad_period++;
      if (last_ev >= 0 && cyc - last_ev == 3 * PC + 5) n_period++;
      last_ev = cyc;
    end
    if (ev_up) n_up++;
    if (ev_dn) n_dn++;
    if (relock) n_relock++;
    if (phi1) check(dac_code == 6'd2, "DAC at 2 LSB during phi1");
    if (phi2) check(dac_code == 6'd0, "DAC at 0 during phi2");
    if (!phi1 && !phi2) check(dac_code == track_code, "DAC shows tracking code");
  end

  task automatic settle();
    repeat (3 * PC + 8) @(negedge clk);
    while (osc_en) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, seq;
    vin16 = 32 * 16;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    check(track_code == 32 && !osc_en, "reset state mid-scale, oscillator off");
    // small step up: one event, latency 3 cycles from the comparator edge
    n_up = 0;
    vin16 = 33 * 16 + 8; t0 = cyc;
    while (!ev_up && cyc < t0 + 20) @(negedge clk);
    check(cyc - t0 == 3, $sformatf("event latency %0d cycles", cyc - t0));
    // phase sequence: record phase code every cycle
    seq = 0;
    while (osc_en) begin
      ph_trace.push_back({phi_r, phi3, phi2, phi1});
      @(negedge clk);
    end
    check(ph_trace.size() == 3 * PC + 4, $sformatf("conversion lasts %0d cycles", ph_trace.size()));
    begin
      int exp_ph [10] = '{1, 1, 0, 2, 2, 0, 4, 4, 0, 8};
      for (int i = 0; i < 10 && i < ph_trace.size(); i++)
        check(ph_trace[i] == exp_ph[i], $sformatf("phase at cycle %0d = %0d exp %0d", i, ph_trace[i], exp_ph[i]));
    end
    settle();
    check(n_up == 1 && track_code == 33, $sformatf("one UP event, code %0d", track_code));
    // big step up (comparator stays high): events repeat until caught up
    n_up = 0; n_relock = 0; bad_period = 0; n_period = 0; last_ev = -1;
    vin16 = 40 * 16 + 4;
    repeat (200) @(negedge clk);
    check(n_up == 7 && track_code == 40, $sformatf("big step: %0d UP events, code %0d", n_up, track_code));
    check(n_relock == 6, $sformatf("self-lock recovery fired %0d times", n_relock));
    check(bad_period == 0 && n_period == 6, "repeated events every 3*PHASE_CYC+5 cycles");
    // big step down
    n_dn = 0;
    vin16 = 20 * 16 + 3;
    repeat (400) @(negedge clk);
    check(n_dn == 19 && track_code == 21, $sformatf("step down: %0d DN events, code %0d", n_dn, track_code));
    // saturation at the top and bottom
    vin16 = 80 * 16;
    repeat (600) @(negedge clk);
    check(track_code == 63, "saturates at 63");
    vin16 = -10 * 16;
    repeat (900) @(negedge clk);
    check(track_code == 0, "saturates at 0");
    // slow sine tracking
    for (int i = 0; i < 20000; i++) begin
      vin16 = int'(16.0 * (32.0 + 20.0 * $sin(6.2831853 * i / 5000.0)));
      @(negedge clk);
      if (i > 500 && !osc_en)
        check((vin16 - int'(track_code) * 16) <= 24 && (vin16 - int'(track_code) * 16) >= -24,
              $sformatf("tracking error %0d/16 LSB", vin16 - int'(track_code) * 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
