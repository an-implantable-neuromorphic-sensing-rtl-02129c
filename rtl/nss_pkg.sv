// nss_pkg: types and constants shared by the neuromorphic sensing system (NSS).
//
// The NSS turns two analog nerve signals into level-crossing events (UP/DN),
// optionally classifies them with a spiking neural network (SNN), and sends
// either the raw events or the SNN labels over a pulse-based body channel
// link as 3-bit address-event (AER) words in Manchester code.
//
// The AER codes follow the coding tables of the design: in feature
// extraction mode D=110, R=101, H=100; in full diagnosis mode UP1=011,
// DN1=010, UP2=001 and DN2=000 (the last one completes the pattern of the
// other three). Everything else here (widths of the weight-write bus, the
// mode encoding) is a choice of this implementation.
package nss_pkg;

  // Operating mode of the whole system.
  typedef enum logic {
    MODE_FEATURE = 1'b0,   // SNN labels D/R/H are transmitted
    MODE_DIAG    = 1'b1    // raw UP/DN events of both channels are transmitted
  } nss_mode_e;

  localparam int unsigned AER_W      = 3;   // AER word length in bits
  localparam int unsigned WEIGHT_W   = 8;   // synaptic weight resolution

  // AER address per transmitter source index, per mode.
  // Feature mode: source 0..2 = D, R, H (source 3 unused).
  // Diagnosis mode: source 0..3 = UP1, DN1, UP2, DN2.
  localparam logic [AER_W-1:0] AER_D   = 3'b110;
  localparam logic [AER_W-1:0] AER_R   = 3'b101;
  localparam logic [AER_W-1:0] AER_H   = 3'b100;
  localparam logic [AER_W-1:0] AER_UP1 = 3'b011;
  localparam logic [AER_W-1:0] AER_DN1 = 3'b010;
  localparam logic [AER_W-1:0] AER_UP2 = 3'b001;
  localparam logic [AER_W-1:0] AER_DN2 = 3'b000;

  function automatic logic [AER_W-1:0] aer_code(nss_mode_e mode, logic [1:0] src);
    logic [AER_W-1:0] c;
    if (mode == MODE_FEATURE) begin
      case (src)
        2'd0:    c = AER_D;
        2'd1:    c = AER_R;
        default: c = AER_H;
      endcase
    end else begin
      case (src)
        2'd0:    c = AER_UP1;
        2'd1:    c = AER_DN1;
        2'd2:    c = AER_UP2;
        default: c = AER_DN2;
      endcase
    end
    return c;
  endfunction

  // Weight-programming bus of the SNN: one 8-bit weight per write.
  // layer 0 = recurrent pool 1, 1 = recurrent pool 2, 2 = feed-forward layer.
  // syn indexes the presynaptic source of the layer: feed-forward inputs
  // first, then (for a recurrent pool) the pool's own neurons.
  typedef struct packed {
    logic                       en;
    logic [1:0]                 layer;
    logic [6:0]                 neuron;
    logic [6:0]                 syn;
    logic signed [WEIGHT_W-1:0] data;
  } snn_wr_t;

endpackage
