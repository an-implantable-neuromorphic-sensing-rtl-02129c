// snn_layer: one layer of digital spiking neurons with its spike arbiter.
//
// How it works: the layer's presynaptic sources are its N_IN input lines
// and, when RECURRENT is set, the outputs of its own N_NEUR neurons (a fully
// recurrent pool: every neuron sees every neuron of the pool, itself
// included). A single round-robin arbiter placed in front of the layer
// serialises spikes from all sources and broadcasts the address of the
// dispatched spike to every neuron; each neuron adds its own weight for that
// source. Neuron output spikes leave the layer on out_spk and, in a
// recurrent pool, re-enter the arbiter.
//
// Source numbering (= synapse index of the weight-write port): inputs are
// 0..N_IN-1, pool neurons N_IN..N_IN+N_NEUR-1.
//
// Timing: an input pulse sampled at edge k is dispatched in the cycle after
// edge k (if no collision), the neurons integrate at edge k+1 and a firing
// neuron's out_spk is high in the cycle after edge k+1. vmem shows every
// neuron's membrane accumulator. At most one spike is
// integrated per cycle; 'merged' flags a spike lost because its source was
// already waiting.
//
// From the design: one arbiter per layer, fully recurrent pools, broadcast
// of the spike address to the weight selectors. This implementation's
// choice: the synchronous timing and the weight-write port.
module snn_layer #(
  parameter int unsigned N_IN      = 4,
  parameter int unsigned N_NEUR    = 46,
  parameter bit          RECURRENT = 1'b1,
  parameter int unsigned WEIGHT_W  = 8,
  parameter int unsigned ACC_W     = 8,
  localparam int unsigned N_SRC    = N_IN + (RECURRENT ? N_NEUR : 0),
  localparam int unsigned SRC_W    = (N_SRC > 1) ? $clog2(N_SRC) : 1,
  localparam int unsigned NEUR_W   = (N_NEUR > 1) ? $clog2(N_NEUR) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [NEUR_W-1:0]          wr_neuron,
  input  logic [SRC_W-1:0]           wr_syn,
  input  logic signed [WEIGHT_W-1:0] wr_data,
  input  logic [N_IN-1:0]            in_spk,
  output logic [N_NEUR-1:0]          out_spk,
  output logic [ACC_W-1:0]           vmem [N_NEUR],
  output logic                       merged,
  output logic                       busy
);

  logic [N_SRC-1:0] req;
  logic             spk_valid;
  logic [SRC_W-1:0] spk_idx;
  logic [N_SRC-1:0] spk_onehot;

  if (RECURRENT) begin : g_rec
    assign req = {out_spk, in_spk};
  end else begin : g_ff
    assign req = in_spk;
  end

  spike_arbiter #(.N(N_SRC)) u_arb (
    .clk, .rst_n,
    .req       (req),
    .ready     (1'b1),
    .flush     (1'b0),
    .spk_valid (spk_valid),
    .spk_idx   (spk_idx),
    .spk_onehot(spk_onehot),
    .merged    (merged)
  );

  assign busy = spk_valid;

  for (genvar n = 0; n < N_NEUR; n++) begin : g_neur
    snn_neuron #(.N_SYN(N_SRC), .WEIGHT_W(WEIGHT_W), .ACC_W(ACC_W)) u_neur (
      .clk, .rst_n,
      .wr_en    (wr_en && int'(wr_neuron) == n),
      .wr_syn   (wr_syn),
      .wr_data  (wr_data),
      .spk_valid(spk_valid),
      .spk_idx  (spk_idx),
      .nout     (out_spk[n]),
      .vmem     (vmem[n])
    );
  end

endmodule
