// tb_snn_core: self-checking test of the three-layer SNN at its full size
// (4 inputs, 2 x 46 recurrent neurons, 8 outputs). All 6900 weights are
// loaded; three feed-forward chains input k -> pool1 neuron k -> pool2
// neuron k -> output neuron k (k = 0, 1, 2, the D/R/H labels) use weight 127,
// and pool 1 neuron 3 listens only to pool 1 neuron 0 through a recurrent
// synapse. With spikes spaced so they never collide, a neuron receiving x
// spikes of weight 127 fires floor(127*x/256) times; the test checks those
// counts at every stage and that each output spike comes exactly 6 cycles
// after the input spike that caused it (2 cycles per layer).
// A second phase loads random weights (recurrent synapses biased negative so
// activity dies out), drives random, often colliding input spikes for 3000
// cycles and follows the dispatch of every layer's arbiter with an integer
// model of its neurons: every neuron's membrane and every output spike of all
// three layers is compared each cycle, and the network must fall idle.
//
// The network size (4-46-46-8, 8-bit weights) follows the original; the
// weights and the 8-bit accumulator are this implementation's choices.
module tb_snn_core
  import nss_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  snn_wr_t wr;
  logic [3:0] in_spk;
  logic [45:0] pool1_spk, pool2_spk;
  logic [7:0] out_spk;
  logic [2:0] merged;
  logic active;
  int checks = 0, failures = 0;

  snn_core dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic wr_w(input int layer, input int n, input int s, input int val);
    wr.en = 1; wr.layer = 2'(layer); wr.neuron = 7'(n); wr.syn = 7'(s); wr.data = 8'(val);
    @(posedge clk); #1;
  endtask

  int cyc;
  int p1c [46], p2c [46], oc [8];
  int last_in [4];
  int lat_bad;
  // Sampled at the falling edge, away from the clock edge that changes them.
  always @(negedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 46; i++) begin
      if (pool1_spk[i]) p1c[i]++;
      if (pool2_spk[i]) p2c[i]++;
    end
    for (int i = 0; i < 8; i++) if (out_spk[i]) begin
      oc[i]++;
      if (i < 3 && cyc - last_in[i] != 6) lat_bad++;
    end
  end

  // ---------------- random phase: per-layer integer model ----------------
  int w0 [46][50], w1 [46][92], w2 [8][46];
  int mv0 [46], mv1 [46], mv2 [8];
  logic [45:0] ex0, ex1;
  logic [7:0] ex2;
  bit model_on = 0;
  int n_disp = 0, n_fire = 0, n_vm_bad = 0, n_spk_bad = 0;

  function automatic bit step(inout int v, input int w);
    int sum;
    sum = v + w;
    if (sum < 0) begin v = 0; return 0; end
    if (sum >= 256) begin v = sum - 256; return 1; end
    v = sum;
    return 0;
  endfunction

  always @(negedge clk) if (model_on) begin
    checks++;
    if (pool1_spk != ex0 || pool2_spk != ex1 || out_spk != ex2) begin
      n_spk_bad++; failures++;
    end
    for (int n = 0; n < 46; n++) begin
      if (int'(dut.u_pool1.vmem[n]) != mv0[n]) n_vm_bad++;
      if (int'(dut.u_pool2.vmem[n]) != mv1[n]) n_vm_bad++;
    end
    for (int n = 0; n < 8; n++) if (int'(dut.u_out.vmem[n]) != mv2[n]) n_vm_bad++;
    ex0 = '0; ex1 = '0; ex2 = '0;
    if (dut.u_pool1.spk_valid) begin
      n_disp++;
      for (int n = 0; n < 46; n++) ex0[n] = step(mv0[n], w0[n][dut.u_pool1.spk_idx]);
    end
    if (dut.u_pool2.spk_valid) begin
      n_disp++;
      for (int n = 0; n < 46; n++) ex1[n] = step(mv1[n], w1[n][dut.u_pool2.spk_idx]);
    end
    if (dut.u_out.spk_valid) begin
      n_disp++;
      for (int n = 0; n < 8; n++) ex2[n] = step(mv2[n], w2[n][dut.u_out.spk_idx]);
    end
    n_fire += $countones(ex0) + $countones(ex1) + $countones(ex2);
  end

  function automatic int rnd_w(input bit recurrent);
    return recurrent ? int'($urandom_range(0, 168)) - 128 : int'($urandom_range(0, 200)) - 73;
  endfunction

  task automatic random_phase();
    rst_n = 0;
    for (int n = 0; n < 46; n++) for (int s = 0; s < 50; s++) begin
      w0[n][s] = rnd_w(s >= 4); wr_w(0, n, s, w0[n][s]);
    end
    for (int n = 0; n < 46; n++) for (int s = 0; s < 92; s++) begin
      w1[n][s] = rnd_w(s >= 46); wr_w(1, n, s, w1[n][s]);
    end
    for (int n = 0; n < 8; n++) for (int s = 0; s < 46; s++) begin
      w2[n][s] = rnd_w(0); wr_w(2, n, s, w2[n][s]);
    end
    wr.en = 0;
    mv0 = '{default: 0}; mv1 = '{default: 0}; mv2 = '{default: 0};
    ex0 = '0; ex1 = '0; ex2 = '0;
    #1 rst_n = 1;
    @(negedge clk); model_on = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      in_spk = 4'($urandom_range(0, 15) & $urandom_range(0, 15));
      @(posedge clk); #1;
    end
    in_spk = '0;
    repeat (3000) begin
      if (!active) break;
      @(posedge clk); #1;
    end
    repeat (10) @(posedge clk);
    @(negedge clk); model_on = 0;
    $display("random phase: %0d dispatches, %0d neuron spikes", n_disp, n_fire);
    check(n_disp > 3000 && n_fire > 100, "random phase exercised the network");
    if (n_spk_bad != 0) $display("FAIL: %0d cycles with output spikes unlike the model", n_spk_bad);
    check(n_vm_bad == 0, $sformatf("%0d membrane mismatches against the model", n_vm_bad));
    check(!active, "network idle after the random phase");
  endtask

  function automatic int fires(input int x);
    return (127 * x) / 256;
  endfunction

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nspk [3];
    wr = '0; in_spk = '0; cyc = 0; lat_bad = 0;
    for (int i = 0; i < 46; i++) begin p1c[i] = 0; p2c[i] = 0; end
    for (int i = 0; i < 8; i++) oc[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 46; n++) for (int s = 0; s < 50; s++)
      wr_w(0, n, s, ((n < 3 && s == n) || (n == 3 && s == 4 + 0)) ? 127 : 0);
    for (int n = 0; n < 46; n++) for (int s = 0; s < 92; s++)
      wr_w(1, n, s, (n < 3 && s == n) ? 127 : 0);
    for (int n = 0; n < 8; n++) for (int s = 0; s < 46; s++)
      wr_w(2, n, s, (n < 3 && s == n) ? 127 : 0);
    wr.en = 0;
    nspk = '{200, 150, 90};
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < nspk[k]; i++) begin
        in_spk = 4'(1 << k);
        last_in[k] = cyc;
        @(posedge clk); #1 in_spk = '0;
        repeat (11) @(posedge clk);
        #1;
      end
    repeat (50) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      check(p1c[k] == fires(nspk[k]), $sformatf("pool1[%0d] fired %0d exp %0d", k, p1c[k], fires(nspk[k])));
      check(p2c[k] == fires(fires(nspk[k])), $sformatf("pool2[%0d] fired %0d", k, p2c[k]));
      check(oc[k] == fires(fires(fires(nspk[k]))), $sformatf("out[%0d] fired %0d", k, oc[k]));
    end
    check(p1c[3] == fires(fires(nspk[0])), $sformatf("recurrent pool1[3] fired %0d", p1c[3]));
    check(oc[3] == 0 && oc[7] == 0 && p1c[10] == 0, "silent neurons stay silent");
    check(lat_bad == 0, $sformatf("%0d output spikes not 6 cycles after their input", lat_bad));
    check(!active, "network idle after the input stops");
    $display("out counts D=%0d R=%0d H=%0d", oc[0], oc[1], oc[2]);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
