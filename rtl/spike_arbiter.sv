// spike_arbiter: round-robin arbiter that serialises spikes arriving on N
// input lines into a stream of spike addresses, one per clock cycle.
//
// How it works: every input line has a pending flag (the set-reset latch of
// the arbiter) that is set by a one-cycle pulse on req[i] and cleared when
// the spike is dispatched. A round-robin polling stage picks, among the
// pending lines and the lines pulsing this cycle, the first one after the
// line granted last, and dispatches it: spk_valid is high for one cycle with
// spk_idx the line number and spk_onehot its one-hot form. Spikes that collide
// in time are therefore separated by whole cycles, which is the small time
// offset the arbiter adds. A pulse on a line that is still pending is merged
// with the pending spike and flagged on 'merged'.
//
// Interface/timing: req is sampled at the rising clock edge; a spike on an
// otherwise idle arbiter appears on spk_valid/spk_idx in the following cycle
// (registered outputs). 'ready' low holds all spikes pending (used by the
// transmitter while it is busy); 'flush' drops every pending spike.
//
// The round-robin polling, the pending latch and the per-layer placement
// follow the design; the synchronous one-spike-per-cycle timing replaces the
// self-timed delay loop of the original and is this implementation's choice.
module spike_arbiter #(
  parameter int unsigned N = 46
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 ready,
  input  logic                 flush,
  output logic                 spk_valid,
  output logic [$clog2(N)-1:0] spk_idx,
  output logic [N-1:0]         spk_onehot,
  output logic                 merged
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  pending_q;
  logic [N-1:0]  cand;
  logic [IW-1:0] last_q;
  logic          found;
  logic [IW-1:0] pick;

  assign cand = pending_q | req;

  // Round-robin search starting just after the last granted line.
  always_comb begin
    int unsigned k;
    found = 1'b0;
    pick  = '0;
    for (int unsigned off = 1; off <= N; off++) begin
      k = (int'(last_q) + off) % N;
      if (!found && cand[k]) begin
        found = 1'b1;
        pick  = IW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q  <= '0;
      last_q     <= IW'(N - 1);
      spk_valid  <= 1'b0;
      spk_idx    <= '0;
      spk_onehot <= '0;
      merged     <= 1'b0;
    end else if (flush) begin
      pending_q  <= '0;
      spk_valid  <= 1'b0;
      spk_onehot <= '0;
      merged     <= 1'b0;
    end else begin
      merged <= |(pending_q & req);
      if (ready && found) begin
        pending_q  <= cand & ~(N'(1) << pick);
        last_q     <= pick;
        spk_valid  <= 1'b1;
        spk_idx    <= pick;
        spk_onehot <= N'(1) << pick;
      end else begin
        pending_q  <= cand;
        spk_valid  <= 1'b0;
        spk_onehot <= '0;
      end
    end
  end

  // At most one spike is dispatched per cycle and only a pending/requesting one.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    spk_valid |-> $onehot(spk_onehot));
  a_idx: assert property (@(posedge clk) disable iff (!rst_n)
    spk_valid |-> spk_onehot[spk_idx]);

endmodule
