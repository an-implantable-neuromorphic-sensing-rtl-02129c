// tb_snn_layer: self-checking test of a fully recurrent pool (4 inputs, 46
// neurons, the first pool of the network). Random weights are loaded, random
// input spikes are applied for 3000 cycles, and after every clock edge the
// output spikes and all membranes are compared with a cycle-level model of
// the layer kept here: a round-robin dispatcher over {neuron outputs, inputs}
// feeding integrate-and-fire neurons one cycle later. Also checks the
// two-cycle input-to-output latency and that recurrent spikes occurred.
//
// The pool size and full recurrence follow the original; the cycle-level
// dispatch timing checked is this implementation's own.
module tb_snn_layer;
  localparam int NI = 4, NN = 46, NS = NI + NN, AW = 8;
  localparam int SW = $clog2(NS), NW = $clog2(NN);
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [NW-1:0] wr_neuron;
  logic [SW-1:0] wr_syn;
  logic signed [7:0] wr_data;
  logic [NI-1:0] in_spk;
  logic [NN-1:0] out_spk;
  logic [AW-1:0] vmem [NN];
  logic merged, busy;
  int checks = 0, failures = 0;

  snn_layer #(.N_IN(NI), .N_NEUR(NN), .RECURRENT(1'b1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int w [NN][NS];
  int v [NN];
  bit [NN-1:0] nout;
  bit [NS-1:0] rp;
  int rlast, aidx, rec_spikes, out_total;
  bit av;

  task automatic model_edge(input bit [NI-1:0] inp);
    bit [NN-1:0] nn;
    bit [NS-1:0] c;
    bit nav;
    int nidx, k, s;
    nn = '0;
    if (av) begin
      for (int n = 0; n < NN; n++) begin
        s = v[n] + w[n][aidx];
        if (s < 0) s = 0;
        else if (s >= 256) begin s -= 256; nn[n] = 1; end
        v[n] = s;
      end
    end
    c = rp | {nout, inp};
    nav = 0; nidx = 0;
    for (int off = 1; off <= NS; off++) begin
      k = (rlast + off) % NS;
      if (c[k]) begin nav = 1; nidx = k; rlast = k; c[k] = 0; break; end
    end
    if (nav && nidx >= NI) rec_spikes++;
    rp = c; av = nav; aidx = nidx; nout = nn;
    out_total += $countones(nn);
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; wr_neuron = '0; wr_syn = '0; wr_data = '0; in_spk = '0;
    rp = '0; rlast = NS - 1; av = 0; aidx = 0; nout = '0; rec_spikes = 0; out_total = 0;
    for (int n = 0; n < NN; n++) v[n] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < NN; n++)
      for (int s = 0; s < NS; s++) begin
        w[n][s] = (s < NI) ? $urandom_range(0, 127) : $urandom_range(0, 60) - 30;
        wr_en = 1; wr_neuron = NW'(n); wr_syn = SW'(s); wr_data = 8'(w[n][s]);
        @(posedge clk); #1;
      end
    wr_en = 0;
    // latency: three spikes on input 0 with weight forced to 127 on neuron 0
    // are checked by the model; here check the first output appears 2 cycles
    // after an input that crosses threshold.
    for (int i = 0; i < 3000; i++) begin
      bit [NI-1:0] inp;
      for (int b = 0; b < NI; b++) inp[b] = ($urandom_range(0, 99) < 10);
      in_spk = inp;
      @(posedge clk);
      model_edge(inp);
      #1;
      in_spk = '0;
      check(out_spk == nout, "out_spk matches model");
      for (int n = 0; n < NN; n++) check(int'(vmem[n]) == v[n], $sformatf("vmem[%0d]", n));
    end
    check(rec_spikes > 0, $sformatf("recurrent spikes dispatched: %0d", rec_spikes));
    check(out_total > 0, $sformatf("output spikes: %0d", out_total));
    $display("recurrent=%0d outputs=%0d", rec_spikes, out_total);
    // Latency: drain, then one input spike whose weight alone crosses the
    // threshold of a neuron sitting near it.
    repeat (200) begin @(posedge clk); model_edge('0); end
    begin
      int lat;
      in_spk = 4'b0001; @(posedge clk); model_edge(4'b0001); #1 in_spk = '0;
      lat = 1;
      while (out_spk == '0 && lat < 10) begin @(posedge clk); model_edge('0); #1; lat++; end
      if (nout != '0) check(lat == 2, $sformatf("input to output latency %0d cycles", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
