// tb_lc_adc_frontend: checks the behavioural model of the level-crossing
// ADC analog front end. Two instances: an ideal one and one with a
// pre-amplifier offset of 10 mV and comparator offsets of +/-20 mV
// (VLSB = 1/64 V = 15.6 mV, pre-amp gain 10 dB = x3.162). Checks the
// +/-1 LSB thresholds around the DAC level, the comparators held low during
// phi1/phi2, the offset shift before calibration and its removal after a
// phi1 -> phi2 -> phi3 sequence.
//
// The thresholds, gain and calibration sequence follow the original
// converter; the offset values applied are chosen for the test.
module tb_lc_adc_frontend;
  localparam real VLSB = 1.0 / 64.0;
  real vin;
  logic [5:0] dac_code;
  logic phi1, phi2, phi3;
  logic up0, dn0, up1, dn1;
  int checks = 0, failures = 0;

  lc_adc_frontend u_ideal (.vin, .dac_code, .phi1, .phi2, .phi3, .up_cmp(up0), .dn_cmp(dn0));
  lc_adc_frontend #(.OFFS_PRE(0.010), .OFFS_CMP0(0.020), .OFFS_CMP1(-0.020)) u_offs (
    .vin, .dac_code, .phi1, .phi2, .phi3, .up_cmp(up1), .dn_cmp(dn1));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic apply(input real v, input int code);
    vin = v; dac_code = 6'(code); #10;
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real off_up, off_dn;
    phi1 = 0; phi2 = 0; phi3 = 0;
    // Ideal thresholds: code*VLSB +/- VLSB
    for (int code = 2; code < 62; code += 7) begin
      apply((code + 1.05) * VLSB, code); check(up0 && !dn0, $sformatf("UP above +1 LSB, code %0d", code));
      apply((code + 0.95) * VLSB, code); check(!up0 && !dn0, "quiet inside +1 LSB");
      apply((code - 0.95) * VLSB, code); check(!up0 && !dn0, "quiet inside -1 LSB");
      apply((code - 1.05) * VLSB, code); check(!up0 && dn0, "DN below -1 LSB");
    end
    // Held low during phi1 / phi2
    apply(0.9, 10);
    phi1 = 1; #10; check(!up0 && !dn0 && !up1 && !dn1, "held during phi1");
    phi1 = 0; #10; check(up0, "released after phi1");
    // Offset instance before calibration: thresholds shifted by e + cmp/A
    off_up = VLSB + 0.010 + 0.020 / 3.1623;
    off_dn = -VLSB + 0.010 - 0.020 / 3.1623;
    apply(32 * VLSB + off_up - 0.001, 32); check(!up1, "uncalibrated UP threshold shifted (below)");
    apply(32 * VLSB + off_up + 0.001, 32); check(up1, "uncalibrated UP threshold shifted (above)");
    apply(32 * VLSB + off_dn + 0.001, 32); check(!dn1, "uncalibrated DN threshold (above)");
    apply(32 * VLSB + off_dn - 0.001, 32); check(dn1, "uncalibrated DN threshold (below)");
    // Calibration sequence
    phi1 = 1; #10 phi1 = 0; #10 phi2 = 1; #10 phi2 = 0; #10 phi3 = 1; #10 phi3 = 0; #10;
    off_up = VLSB + 0.020 / 3.1623;
    off_dn = -VLSB - 0.020 / 3.1623;
    apply(32 * VLSB + off_up - 0.001, 32); check(!up1, "calibrated UP threshold (below)");
    apply(32 * VLSB + off_up + 0.001, 32); check(up1, "calibrated UP threshold (above)");
    apply(32 * VLSB + off_dn + 0.001, 32); check(!dn1, "calibrated DN threshold (above)");
    apply(32 * VLSB + off_dn - 0.001, 32); check(dn1, "calibrated DN threshold (below)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
