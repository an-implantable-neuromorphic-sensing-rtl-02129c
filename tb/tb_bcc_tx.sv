// tb_bcc_tx: self-checking test of the AER + Manchester transmitter.
// A receiver model here watches OH/OL, measures every chip and the reset
// gap, decodes the 3-bit address ('+-' = 1, '-+' = 0) and checks it against
// the coding tables (feature mode D/R/H = 110/101/100, diagnosis mode
// UP1/DN1/UP2/DN2 = 011/010/001/000). Also checks: the packet length of
// 6*tbit + treset cycles, the 2-cycle start latency, charge balance, the
// order of colliding events, merging of a repeated event, the discard on a
// mode change, and a random low-rate event stream decoded in order at two
// bit periods.
//
// The codes, Manchester chips and packet length follow the original
// transmitter; the queue behaviour (merge, discard on mode change) and the
// 2-cycle start latency are this implementation's choices.
module tb_bcc_tx
  import nss_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  nss_mode_e mode;
  logic [3:0] asc_ev;
  logic [2:0] label;
  logic [4:0] tbit_cyc;
  logic [7:0] treset_cyc;
  logic oh, ol, aer_bit, busy, pkt_start, dropped;
  logic [2:0] pkt_addr;
  int checks = 0, failures = 0;

  bcc_tx dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- receiver model ----------------
  int cyc = 0;
  int rx_codes [$];
  int rx_start [$];
  int n_drop = 0;
  always @(negedge clk) begin
    cyc++;
    if (dropped) n_drop++;
  end

  initial begin : rx
    forever begin
      int st, code, len, bal;
      bit ch [6];
      @(negedge clk);
      if (oh || ol) begin
        st = cyc; bal = 0;
        for (int c = 0; c < 6; c++) begin
          int plus_n, minus_n;
          plus_n = 0; minus_n = 0;
          for (int k = 0; k < tbit_cyc; k++) begin
            if (k > 0 || c > 0) @(negedge clk);
            if (oh) plus_n++;
            if (ol) minus_n++;
          end
          check(plus_n == tbit_cyc || minus_n == tbit_cyc, "chip holds one level for tbit cycles");
          ch[c] = (plus_n == tbit_cyc);
          bal += plus_n - minus_n;
        end
        check(bal == 0, "packet is charge balanced");
        code = 0;
        for (int b = 0; b < 3; b++) begin
          check(ch[2*b] != ch[2*b+1], "Manchester pair has a mid-bit transition");
          code = (code << 1) | int'(ch[2*b] && !ch[2*b+1]);
        end
        // reset gap: both low for treset cycles
        len = 0;
        @(negedge clk);
        while (!oh && !ol && len < 1000) begin
          len++;
          @(negedge clk);
          if (len >= treset_cyc && !oh && !ol) break;
        end
        check(len >= treset_cyc, $sformatf("reset gap %0d >= %0d", len, treset_cyc));
        rx_codes.push_back(code);
        rx_start.push_back(st);
        if (oh || ol) disable rx;  // never expected: gap too short
      end
    end
  end

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse_asc(input logic [3:0] e);
    @(negedge clk); asc_ev = e; @(negedge clk); asc_ev = '0;
  endtask
  task automatic pulse_lbl(input logic [2:0] e);
    @(negedge clk); label = e; @(negedge clk); label = '0;
  endtask
  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  int exp_feat [3] = '{3'b110, 3'b101, 3'b100};
  int exp_diag [4] = '{3'b011, 3'b010, 3'b001, 3'b000};

  initial begin
    int t_ev, n0;
    mode = MODE_FEATURE; asc_ev = '0; label = '0; tbit_cyc = 5'd4; treset_cyc = 8'd32;
    repeat (2) @(negedge clk); rst_n = 1;
    // 1) every label, feature mode
    for (int k = 0; k < 3; k++) begin
      n0 = rx_codes.size();
      @(negedge clk); label = 3'(1 << k); t_ev = cyc; @(negedge clk); label = '0;
      wait_idle();
      check(rx_codes.size() == n0 + 1, "one packet per label");
      check(rx_codes[n0] == exp_feat[k], $sformatf("label %0d code %b", k, rx_codes[n0]));
      check(rx_start[n0] - t_ev == 2, $sformatf("start latency %0d", rx_start[n0] - t_ev));
    end
    // 2) every event, diagnosis mode, tbit 16 (2 us at 8 MHz)
    mode = MODE_DIAG; tbit_cyc = 5'd16; repeat (3) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      n0 = rx_codes.size();
      pulse_asc(4'(1 << k));
      wait_idle();
      check(rx_codes.size() == n0 + 1 && rx_codes[n0] == exp_diag[k], $sformatf("event %0d code", k));
    end
    // 3) collision UP1 + DN2 -> two packets, spaced by >= 6*tbit + treset
    tbit_cyc = 5'd4;
    n0 = rx_codes.size();
    pulse_asc(4'b1001);
    wait_idle(); wait_idle();
    check(rx_codes.size() == n0 + 2, "two packets for two colliding events");
    if (rx_codes.size() == n0 + 2) begin
      check(rx_codes[n0] == 3'b011 && rx_codes[n0+1] == 3'b000, "round-robin order UP1 then DN2");
      check(rx_start[n0+1] - rx_start[n0] == 6 * 4 + 32 + 2,
            $sformatf("packet spacing %0d", rx_start[n0+1] - rx_start[n0]));
    end
    // 4) repeated event while busy is merged
    n0 = rx_codes.size(); n_drop = 0;
    pulse_asc(4'b0010); pulse_asc(4'b0100); pulse_asc(4'b0100);
    wait_idle(); wait_idle(); wait_idle();
    check(n_drop == 1, $sformatf("merge flagged %0d", n_drop));
    check(rx_codes.size() == n0 + 2, "merged event sent once");
    // 5) mode switch discards waiting events
    n0 = rx_codes.size();
    pulse_asc(4'b0001); pulse_asc(4'b0010);
    @(negedge clk); mode = MODE_FEATURE;
    wait_idle(); wait_idle();
    check(rx_codes.size() == n0 + 1, "waiting event discarded on mode change");
    // 6) random low-rate stream, decoded in order
    for (int pass = 0; pass < 2; pass++) begin
      int sent [$];
      sent.delete();
      mode = pass ? MODE_DIAG : MODE_FEATURE;
      tbit_cyc = pass ? 5'd8 : 5'd4;
      repeat (3) @(negedge clk);
      n0 = rx_codes.size();
      for (int i = 0; i < 60; i++) begin
        int k;
        k = $urandom_range(0, pass ? 3 : 2);
        if (pass) pulse_asc(4'(1 << k)); else pulse_lbl(3'(1 << k));
        sent.push_back(pass ? exp_diag[k] : exp_feat[k]);
        wait_idle();
      end
      check(rx_codes.size() == n0 + 60, "all random events received");
      for (int i = 0; i < 60 && n0 + i < rx_codes.size(); i++)
        check(rx_codes[n0 + i] == sent[i], $sformatf("random stream pass %0d item %0d code %b exp %b", pass, i, rx_codes[n0 + i], sent[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
