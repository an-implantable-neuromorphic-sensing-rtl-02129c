// tb_spike_arbiter: self-checking test of the round-robin spike arbiter.
// Directed cases (single spike latency, a three-way collision dispatched in
// round-robin order, merging while held, flush) followed by 3000 cycles of
// random spikes and random 'ready', compared cycle by cycle against a
// reference model of pending flags and round-robin pointer kept here.
//
// Round-robin dispatch follows the original; the pending flags, merging
// and the one-cycle latency are this implementation's choices.
module tb_spike_arbiter;
  localparam int N = 46;
  localparam int IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req;
  logic ready, flush;
  logic spk_valid, merged;
  logic [IW-1:0] spk_idx;
  logic [N-1:0] spk_onehot;
  int checks = 0, failures = 0;

  spike_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // Reference model state.
  bit [N-1:0] rp;
  int rlast;
  bit exp_valid, exp_merged;
  int exp_idx;

  task automatic ref_step(input bit [N-1:0] r, input bit rdy, input bit fl);
    bit [N-1:0] c;
    int k;
    exp_valid = 0;
    if (fl) begin
      rp = '0; exp_merged = 0;
      return;
    end
    exp_merged = |(rp & r);
    c = rp | r;
    if (rdy) begin
      for (int off = 1; off <= N; off++) begin
        k = (rlast + off) % N;
        if (c[k]) begin
          exp_valid = 1; exp_idx = k; rlast = k; c[k] = 0;
          break;
        end
      end
    end
    rp = c;
  endtask

  // Drive one cycle: apply inputs, clock, compare outputs with the model.
  task automatic cyc(input bit [N-1:0] r, input bit rdy, input bit fl);
    req = r; ready = rdy; flush = fl;
    @(posedge clk);
    ref_step(r, rdy, fl);
    #1;
    check(spk_valid == exp_valid, "spk_valid");
    if (exp_valid) begin
      check(int'(spk_idx) == exp_idx, $sformatf("spk_idx %0d exp %0d", spk_idx, exp_idx));
      check(spk_onehot == (N'(1) << exp_idx), "spk_onehot");
    end
    check(merged == exp_merged, "merged");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; ready = 1'b1; flush = 1'b0;
    rp = '0; rlast = N - 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1) single spike: dispatched in the next cycle (1 cycle latency)
    cyc(N'(1) << 5, 1, 0);
    check(spk_valid && spk_idx == 5, "single spike latency 1 cycle");
    cyc('0, 1, 0);
    check(!spk_valid, "no spurious spike");
    // 2) collision of lines 3, 10, 40: order 10, 40, 3 after last=5
    cyc((N'(1) << 3) | (N'(1) << 10) | (N'(1) << 40), 1, 0);
    check(spk_valid && spk_idx == 10, "collision first = 10");
    cyc('0, 1, 0);
    check(spk_valid && spk_idx == 40, "collision second = 40");
    cyc('0, 1, 0);
    check(spk_valid && spk_idx == 3, "collision third = 3");
    // 3) held spikes merge
    cyc(N'(1) << 7, 0, 0);
    cyc(N'(1) << 7, 0, 0);
    check(merged, "merge flagged");
    cyc('0, 1, 0);
    check(spk_valid && spk_idx == 7, "held spike released");
    cyc('0, 1, 0);
    check(!spk_valid, "merged spike dispatched once");
    // 4) flush
    cyc(N'(1) << 9, 0, 0);
    cyc('0, 1, 1);
    cyc('0, 1, 0);
    check(!spk_valid, "flushed spike gone");
    // 5) random traffic against the model
    for (int i = 0; i < 3000; i++) begin
      bit [N-1:0] r;
      r = '0;
      for (int b = 0; b < N; b++) if ($urandom_range(0, 99) < 3) r[b] = 1'b1;
      cyc(r, $urandom_range(0, 3) != 0, $urandom_range(0, 199) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
