// snn_neuron: digital spiking neuron = weight selector + integrate-and-fire.
//
// How it works: the neuron keeps one signed WEIGHT_W-bit weight per
// presynaptic source (N_SYN of them). When the layer arbiter dispatches a
// spike (spk_valid) from source spk_idx, the weight selector picks that
// source's weight and the integrate-and-fire unit adds it to the membrane
// accumulator. The sum passes a rectifier (ReLU): a result below zero is
// clamped to zero. When the sum overflows the ACC_W-bit accumulator the
// neuron fires: nout pulses for one cycle and the accumulator keeps the
// wrapped-around remainder, so the membrane drops back like a sawtooth.
// There is no leak.
//
// Interface/timing: weights are written one at a time through wr_en/wr_syn/
// wr_data. An input spike in cycle t updates the membrane at the clock edge
// ending cycle t; nout is registered and high during cycle t+1.
//
// From the design: the weight-per-input selection, 8-bit weights, the
// accumulate/ReLU/overflow-fires structure. This implementation's choices:
// ACC_W (the design does not give the accumulator size), the write port,
// the remainder kept after an overflow, the synchronous clocking.
module snn_neuron #(
  parameter int unsigned N_SYN    = 50,
  parameter int unsigned WEIGHT_W = 8,
  parameter int unsigned ACC_W    = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // weight programming
  input  logic                        wr_en,
  input  logic [$clog2(N_SYN)-1:0]    wr_syn,
  input  logic signed [WEIGHT_W-1:0]  wr_data,
  // dispatched input spike
  input  logic                        spk_valid,
  input  logic [$clog2(N_SYN)-1:0]    spk_idx,
  // output
  output logic                        nout,
  output logic [ACC_W-1:0]            vmem
);

  localparam int unsigned SW = (ACC_W > WEIGHT_W ? ACC_W : WEIGHT_W) + 2;

  logic signed [WEIGHT_W-1:0] weight_q [N_SYN];
  logic signed [WEIGHT_W-1:0] w_sel;
  logic signed [SW-1:0]       sum;
  logic                       overflow;
  logic [ACC_W-1:0]           relu;

  // Weight selector.
  assign w_sel = (int'(spk_idx) < N_SYN) ? weight_q[spk_idx] : '0;

  // Accumulate, rectify, detect overflow.
  always_comb begin
    sum      = $signed(SW'(vmem)) + SW'(w_sel);
    overflow = 1'b0;
    relu     = '0;
    if (sum < 0) begin
      relu = '0;
    end else if (sum >= $signed(SW'(1) << ACC_W)) begin
      overflow = 1'b1;
      relu     = sum[ACC_W-1:0];
    end else begin
      relu     = sum[ACC_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_syn) < N_SYN) weight_q[wr_syn] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmem <= '0;
      nout <= 1'b0;
    end else begin
      nout <= spk_valid & overflow;
      if (spk_valid) vmem <= relu;
    end
  end

endmodule
