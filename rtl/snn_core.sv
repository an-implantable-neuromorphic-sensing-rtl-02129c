// snn_core: fully synthesizable spiking neural network that extracts the
// temporal features of a compound action potential (CAP) from level-crossing
// events.
//
// Structure: four input lines (UP1, DN1, UP2, DN2 from the two level-crossing
// converters) drive recurrent pool 1 (46 neurons, fully recurrently
// connected), whose spikes drive recurrent pool 2 (46 neurons, fully
// recurrent), whose spikes drive a feed-forward layer of 8 neurons. Each
// layer has its own round-robin arbiter, so the network only switches when
// spikes arrive. Output neurons 0, 1 and 2 are the D (depolarisation),
// R (repolarisation) and H (hyperpolarisation) labels; the remaining output
// neurons are available on out_spk but are not transmitted.
//
// Weights (8-bit signed) are loaded through the snn_wr_t bus, one per cycle:
// layer 0/1/2 = pool 1 / pool 2 / output layer; syn = presynaptic source,
// feed-forward inputs first, then the pool's own neurons.
//
// Timing: each layer adds two clock cycles when spikes do not collide, so a
// lone input spike that makes one neuron fire in every layer gives an output
// spike six cycles after it was sampled.
//
// From the design: 4 inputs, two recurrent pools of 46 neurons, 8 output
// neurons, 8-bit weights, one arbiter per layer. This implementation's
// choices: the accumulator width ACC_W, the weight bus, the label mapping
// to output neurons 0..2, the synchronous timing.
module snn_core
  import nss_pkg::*;
#(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned N_POOL = 46,
  parameter int unsigned N_OUT  = 8,
  parameter int unsigned ACC_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  snn_wr_t           wr,
  input  logic [N_IN-1:0]   in_spk,
  output logic [N_POOL-1:0] pool1_spk,
  output logic [N_POOL-1:0] pool2_spk,
  output logic [N_OUT-1:0]  out_spk,
  output logic [2:0]        merged,
  output logic              active
);

  localparam int unsigned P1_SRC = N_IN + N_POOL;
  localparam int unsigned P2_SRC = 2 * N_POOL;
  localparam int unsigned P1_SW  = $clog2(P1_SRC);
  localparam int unsigned P2_SW  = $clog2(P2_SRC);
  localparam int unsigned FF_SW  = $clog2(N_POOL);
  localparam int unsigned PN_W   = $clog2(N_POOL);
  localparam int unsigned ON_W   = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic [2:0] busy;

  snn_layer #(.N_IN(N_IN), .N_NEUR(N_POOL), .RECURRENT(1'b1),
              .WEIGHT_W(WEIGHT_W), .ACC_W(ACC_W)) u_pool1 (
    .clk, .rst_n,
    .wr_en    (wr.en && wr.layer == 2'd0),
    .wr_neuron(wr.neuron[PN_W-1:0]),
    .wr_syn   (wr.syn[P1_SW-1:0]),
    .wr_data  (wr.data),
    .in_spk   (in_spk),
    .out_spk  (pool1_spk),
    .vmem     (),
    .merged   (merged[0]),
    .busy     (busy[0])
  );

  snn_layer #(.N_IN(N_POOL), .N_NEUR(N_POOL), .RECURRENT(1'b1),
              .WEIGHT_W(WEIGHT_W), .ACC_W(ACC_W)) u_pool2 (
    .clk, .rst_n,
    .wr_en    (wr.en && wr.layer == 2'd1),
    .wr_neuron(wr.neuron[PN_W-1:0]),
    .wr_syn   (wr.syn[P2_SW-1:0]),
    .wr_data  (wr.data),
    .in_spk   (pool1_spk),
    .out_spk  (pool2_spk),
    .vmem     (),
    .merged   (merged[1]),
    .busy     (busy[1])
  );

  snn_layer #(.N_IN(N_POOL), .N_NEUR(N_OUT), .RECURRENT(1'b0),
              .WEIGHT_W(WEIGHT_W), .ACC_W(ACC_W)) u_out (
    .clk, .rst_n,
    .wr_en    (wr.en && wr.layer == 2'd2),
    .wr_neuron(wr.neuron[ON_W-1:0]),
    .wr_syn   (wr.syn[FF_SW-1:0]),
    .wr_data  (wr.data),
    .in_spk   (pool2_spk),
    .out_spk  (out_spk),
    .vmem     (),
    .merged   (merged[2]),
    .busy     (busy[2])
  );

  assign active = |busy;

endmodule
