// tb_nss_feature_timing: temporal precision of the R (repolarisation) label in
// feature-extraction mode, on the whole chip at its default size (8 MHz).
//
// The same synthetic triphasic CAP as in the end-to-end test is applied to
// channel 1 sixteen times. Each repetition gets a random baseline offset of up
// to +/-0.2 LSB and a random start time within one microsecond, so the
// converter crosses its levels at slightly different moments each time. The
// SNN holds a small hand-made network (no trained weights are available):
//   pool 1 n0 counts UP1 and is cleared by DN1, n1 counts DN1 and is cleared by UP1;
//   pool 2 n0/n1 do the same with pool 1 n0/n1 as inputs;
//   output n1 (label R) counts pool 2 n1 and is cleared by pool 2 n0.
// With weight +127 and inhibition -128 (ReLU clears the neuron) each stage
// fires on its third input after a clear and then on every second, so the
// first R label of a CAP comes on the 15th DN1 event of the falling edge.
// The spread of that label's transmission time over all repetitions is the
// temporal precision; the original system reports 10 us, which is checked
// here. Also checked: one label packet per R spike, each with the R address
// (101) and starting 2 cycles after the label spike; no D or H labels.
//
// The CAP shape, the offsets and the network weights are this testbench's
// own; only the 10 us target comes from the original system.
module tb_nss_feature_timing
  import nss_pkg::*;
;
  localparam real VLSB = 1.0 / 64.0;
  localparam int N_CAP = 16;
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

  real t_cap = 1.0e9;   // CAP start, ms of simulated time
  real offs = 0.0;      // baseline offset of this repetition, V
  always @(negedge clk) begin
    vin1 = 0.5 + 0.25 * VLSB + offs + cap($realtime / 1.0e6 - t_cap);
    vin2 = 0.5 + 0.25 * VLSB;
  end

  // ---------------- observers ----------------
  int cyc = 0;
  int last_r_cyc = -100;
  int n_r = 0, n_dh = 0, n_pkt = 0;
  int first_pkt = -1;   // cycle of the first R packet of the current CAP
  always @(negedge clk) begin
    cyc++;
    if (snn_out[1]) begin n_r++; last_r_cyc = cyc; end
    if (snn_out[0] || snn_out[2]) n_dh++;
    if (pkt_start) begin
      n_pkt++;
      check(pkt_addr == AER_R, $sformatf("label packet address %b is R", pkt_addr));
      check(cyc - last_r_cyc == 2, $sformatf("packet %0d cycles after the R spike", cyc - last_r_cyc));
      if (first_pkt < 0) first_pkt = cyc;
    end
  end

  task automatic run_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wr_w(input int layer, input int n, input int s, input int val);
    snn_wr.en = 1; snn_wr.layer = 2'(layer); snn_wr.neuron = 7'(n); snn_wr.syn = 7'(s);
    snn_wr.data = 8'(val);
    @(negedge clk);
  endtask

  // Excite from the own-polarity source, inhibit from the other one.
  function automatic int w_of(input int n, input int s);
    if (n > 1 || s > 1) return 0;
    return (n == s) ? 127 : -128;
  endfunction

  initial begin
    #1000000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t_first [N_CAP];
    int t_min, t_max;
    real mean, var_acc;
    mode = MODE_FEATURE; snn_wr = '0; tbit_cyc = 5'd4; treset_cyc = 8'd24;
    run_cycles(3); rst_n = 1;
    for (int n = 0; n < 46; n++) for (int s = 0; s < 50; s++) wr_w(0, n, s, w_of(n, s));
    for (int n = 0; n < 46; n++) for (int s = 0; s < 92; s++) wr_w(1, n, s, w_of(n, s));
    for (int n = 0; n < 8; n++)  for (int s = 0; s < 46; s++) wr_w(2, n, s, n == 1 ? w_of(n, s) : 0);
    snn_wr.en = 0;
    run_cycles(200);

    for (int k = 0; k < N_CAP; k++) begin
      int c0;
      offs = (real'($urandom_range(0, 400)) - 200.0) / 1000.0 * VLSB;
      run_cycles(20);
      t_cap = $realtime / 1.0e6 + 0.05 + real'($urandom_range(0, 1000)) * 1.0e-6;
      c0 = cyc + int'(0.05 * 8000.0);
      first_pkt = -1;
      run_cycles(int'(6.5e-3 * 8.0e6));
      check(first_pkt > 0, $sformatf("CAP %0d produced an R label", k));
      t_first[k] = first_pkt - c0;
    end
    run_cycles(200);

    t_min = t_first[0]; t_max = t_first[0]; mean = 0.0;
    foreach (t_first[k]) begin
      if (t_first[k] < t_min) t_min = t_first[k];
      if (t_first[k] > t_max) t_max = t_first[k];
      mean += real'(t_first[k]) / N_CAP;
    end
    var_acc = 0.0;
    foreach (t_first[k]) var_acc += (real'(t_first[k]) - mean) * (real'(t_first[k]) - mean) / N_CAP;
    $display("R label: %0d spikes, %0d packets; first R at %0.1f us after CAP start, spread %0.2f us (sd %0.2f us)",
             n_r, n_pkt, mean / 8.0, real'(t_max - t_min) / 8.0, $sqrt(var_acc) / 8.0);
    check(n_pkt == n_r, $sformatf("%0d packets for %0d R spikes", n_pkt, n_r));
    check(n_dh == 0, "no D or H labels with this network");
    check(mean / 8.0 > 750.0 && mean / 8.0 < 1400.0, "first R label falls on the falling edge (0.75..1.4 ms)");
    check(t_max - t_min <= 80, $sformatf("R label spread %0d cycles within 10 us", t_max - t_min));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
