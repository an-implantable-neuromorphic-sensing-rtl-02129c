// tb_nss_core: test of the digital core with integer comparator models in
// place of the analog front ends (input in 1/16 LSB, thresholds +/-1 LSB
// around each DAC code, comparators held low during phi1/phi2).
// Channel 1 gets slow triangular ramps, channel 2 the same ramps delayed.
// Full-diagnosis mode: every converter event must come out of the link as a
// packet with the right address, in order per channel (the ramps are slow
// enough that no event is lost), and the running sum of the received events
// must equal each converter's DAC code. Feature mode: with the chains UP1 -> D, DN1 -> R, UP2 -> H in
// the SNN, every label spike must come out as its packet, in order, and no
// raw event may be sent.
//
// The AER codes of both modes follow the original system; the integer
// comparator models and the hand-made SNN chains are this testbench's own.
module tb_nss_core
  import nss_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  nss_mode_e mode;
  logic [1:0] up_cmp, dn_cmp, phi1, phi2, phi3, asc_relock;
  logic [5:0] dac_code [2];
  snn_wr_t snn_wr;
  logic [4:0] tbit_cyc;
  logic [7:0] treset_cyc;
  logic oh, ol, aer_bit, tx_busy, pkt_start, tx_dropped, snn_active;
  logic [3:0] asc_ev;
  logic [7:0] snn_out;
  logic [2:0] snn_merged, pkt_addr;
  int checks = 0, failures = 0;
  int vin16 [2];

  nss_core dut (.*);
  always #62.5 clk = ~clk;

  for (genvar c = 0; c < 2; c++) begin : g_cmp
    always_comb begin
      if (phi1[c] || phi2[c]) begin
        up_cmp[c] = 0; dn_cmp[c] = 0;
      end else begin
        up_cmp[c] = vin16[c] > (int'(dac_code[c]) + 1) * 16;
        dn_cmp[c] = vin16[c] < (int'(dac_code[c]) - 1) * 16;
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int exp_q [$];
  int rx_q [$];
  int code_of [4] = '{3'b011, 3'b010, 3'b001, 3'b000};
  int lbl_code [3] = '{3'b110, 3'b101, 3'b100};
  int n_drop = 0;
  int dac0_start, dac1_start;

  always @(negedge clk) begin
    if (tx_dropped) n_drop++;
    if (mode == MODE_DIAG) begin
      for (int i = 0; i < 4; i++) if (asc_ev[i]) exp_q.push_back(code_of[i]);
    end else begin
      for (int i = 0; i < 3; i++) if (snn_out[i]) exp_q.push_back(lbl_code[i]);
    end
  end

  // receiver on OH/OL
  initial begin
    forever begin
      int code;
      bit ch [6];
      @(negedge clk);
      if (oh || ol) begin
        for (int c = 0; c < 6; c++) begin
          for (int k = 0; k < tbit_cyc; k++) begin
            if (k > 0 || c > 0) @(negedge clk);
            if (k == 0) ch[c] = oh;
          end
        end
        code = 0;
        for (int b = 0; b < 3; b++) code = (code << 1) | int'(ch[2*b] && !ch[2*b+1]);
        rx_q.push_back(code);
      end
    end
  end

  initial begin
    #2000000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic ramps(input int n);
    // triangle: 12 LSB up and down, 1/16 LSB every 16 cycles (2 us)
    for (int r = 0; r < n; r++)
      for (int i = 0; i < 4 * 12 * 16; i++) begin
        int tri_v, j;
        tri_v = (i < 2 * 192) ? i / 2 : (4 * 192 - i) / 2;
        vin16[0] = 32 * 16 + 4 + tri_v;
        j = (i + 768 - 300) % 768;
        vin16[1] = 32 * 16 + 4 + ((j < 384) ? j / 2 : (768 - j) / 2);
        repeat (16) @(negedge clk);
      end
  endtask

  initial begin
    mode = MODE_DIAG; snn_wr = '0; tbit_cyc = 5'd4; treset_cyc = 8'd24;
    vin16 = '{32 * 16 + 4, 32 * 16 + 4};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 46; n++) for (int s = 0; s < 50; s++) begin
      snn_wr = '{en: 1'b1, layer: 2'd0, neuron: 7'(n), syn: 7'(s), data: (n < 3 && s == n) ? 8'sd127 : 8'sd0};
      @(negedge clk);
    end
    for (int n = 0; n < 46; n++) for (int s = 0; s < 92; s++) begin
      snn_wr = '{en: 1'b1, layer: 2'd1, neuron: 7'(n), syn: 7'(s), data: (n < 3 && s == n) ? 8'sd127 : 8'sd0};
      @(negedge clk);
    end
    for (int n = 0; n < 8; n++) for (int s = 0; s < 46; s++) begin
      snn_wr = '{en: 1'b1, layer: 2'd2, neuron: 7'(n), syn: 7'(s), data: (n < 3 && s == n) ? 8'sd127 : 8'sd0};
      @(negedge clk);
    end
    snn_wr = '0;
    repeat (100) @(negedge clk);
    // diagnosis mode: start from the first point of the ramps, let settle
    vin16 = '{32 * 16 + 4, 32 * 16 + 4 + 150};
    repeat (2000) @(negedge clk);
    exp_q.delete(); rx_q.delete(); n_drop = 0;
    dac0_start = int'(dac_code[0]); dac1_start = int'(dac_code[1]);
    ramps(2);
    repeat (500) @(negedge clk);
    check(exp_q.size() > 40, $sformatf("%0d converter events", exp_q.size()));
    check(rx_q.size() == exp_q.size(), $sformatf("%0d packets for %0d events", rx_q.size(), exp_q.size()));
    // Per channel the order must be kept (events of the two channels may
    // swap places when they wait for the link at the same time).
    for (int ch = 0; ch < 2; ch++) begin
      int e [$], r [$];
      foreach (exp_q[i]) if ((exp_q[i] >> 1) == (ch ? 0 : 1)) e.push_back(exp_q[i]);
      foreach (rx_q[i]) if ((rx_q[i] >> 1) == (ch ? 0 : 1)) r.push_back(rx_q[i]);
      check(e.size() == r.size(), $sformatf("channel %0d: %0d packets for %0d events", ch + 1, r.size(), e.size()));
      for (int i = 0; i < e.size() && i < r.size(); i++)
        check(r[i] == e[i], $sformatf("channel %0d packet %0d code %b exp %b", ch + 1, i, r[i], e[i]));
    end
    check(n_drop == 0, "no merged events at this rate");
    // Running sum of the received events must land on each DAC code.
    begin
      int rc [2];
      rc = '{dac0_start, dac1_start};
      foreach (rx_q[i])
        case (rx_q[i])
          3'b011: rc[0]++;
          3'b010: rc[0]--;
          3'b001: rc[1]++;
          3'b000: rc[1]--;
          default: ;
        endcase
      check(rc[0] == int'(dac_code[0]) && rc[1] == int'(dac_code[1]),
            $sformatf("reconstruction %0d/%0d vs DAC %0d/%0d", rc[0], rc[1], dac_code[0], dac_code[1]));
    end
    // feature mode
    mode = MODE_FEATURE;
    repeat (10) @(negedge clk);
    exp_q.delete(); rx_q.delete();
    ramps(4);
    repeat (500) @(negedge clk);
    check(exp_q.size() >= 3, $sformatf("%0d labels", exp_q.size()));
    check(rx_q.size() == exp_q.size(), $sformatf("%0d packets for %0d labels", rx_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < rx_q.size(); i++)
      check(rx_q[i] == exp_q[i], $sformatf("label packet %0d code %b exp %b", i, rx_q[i], exp_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
