// tb_snn_neuron: self-checking test of the weight selector and
// integrate-and-fire unit. Loads random 8-bit signed weights, then applies
// 4000 random input spikes and checks the membrane value and the output
// spike (one cycle after the input) against an integer model computed here:
// v' = v + w; v' < 0 -> 0 (ReLU); v' >= 2^ACC_W -> fire, keep v' - 2^ACC_W.
// Directed cases cover the negative clamp and an exact overflow.
//
// Weight selection, accumulation, ReLU and overflow firing follow the
// original neuron; the accumulator width is this implementation's choice.
module tb_snn_neuron;
  localparam int N_SYN = 50, WW = 8, AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [$clog2(N_SYN)-1:0] wr_syn, spk_idx;
  logic signed [WW-1:0] wr_data;
  logic spk_valid, nout;
  logic [AW-1:0] vmem;
  int checks = 0, failures = 0;
  int w [N_SYN];
  int v, fires, clamps;

  snn_neuron #(.N_SYN(N_SYN), .WEIGHT_W(WW), .ACC_W(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic write_w(input int s, input int val);
    wr_en = 1; wr_syn = s[$clog2(N_SYN)-1:0]; wr_data = WW'(val);
    @(posedge clk); #1; wr_en = 0;
    w[s] = val;
  endtask

  task automatic spike(input int s);
    int nv;
    bit exp_fire;
    spk_valid = 1; spk_idx = s[$clog2(N_SYN)-1:0];
    @(posedge clk); #1; spk_valid = 0;
    nv = v + w[s];
    exp_fire = 0;
    if (nv < 0) begin nv = 0; clamps++; end
    else if (nv >= (1 << AW)) begin nv -= (1 << AW); exp_fire = 1; fires++; end
    v = nv;
    check(nout == exp_fire, $sformatf("nout=%0d exp %0d", nout, exp_fire));
    check(int'(vmem) == v, $sformatf("vmem=%0d exp %0d", vmem, v));
    @(posedge clk); #1;
    check(nout == 0, "nout is a one-cycle pulse");
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; wr_syn = '0; wr_data = '0; spk_valid = 0; spk_idx = '0;
    v = 0; fires = 0; clamps = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < N_SYN; s++) write_w(s, $urandom_range(0, 255) - 128);
    check(vmem == 0, "reset membrane");
    // negative clamp
    write_w(0, -100);
    spike(0);
    check(vmem == 0, "ReLU clamps at zero");
    // exact overflow: 127+127+2 = 256 -> fire, remainder 0
    write_w(1, 127); write_w(2, 2);
    spike(1); spike(1); spike(2);
    check(fires == 1 && vmem == 0, "exact overflow fires once with remainder 0");
    for (int s = 0; s < N_SYN; s++) write_w(s, $urandom_range(0, 227) - 100);
    for (int i = 0; i < 4000; i++) spike($urandom_range(0, N_SYN - 1));
    check(fires > 50, $sformatf("neuron fired %0d times", fires));
    check(clamps > 0, "clamp exercised");
    $display("fires=%0d clamps=%0d", fires, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
