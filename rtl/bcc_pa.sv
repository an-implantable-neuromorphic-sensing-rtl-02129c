// bcc_pa: BEHAVIOURAL MODEL (not synthesizable logic) of the differential
// pulse power amplifier that drives the galvanic body-channel coupler.
//
// Behaviour modelled: with OH high the PA drives a positive differential
// output (OP at VDD, ON at ground); with OL high a negative one (OP at
// ground, ON at VDD). With both low the reset switches short the two outputs
// together at VDD/2, which removes residual charge from the tissue; this is
// also the idle state. OH and OL high together is illegal and is reported.
// op_minus_on is the differential output normalised to +1/0/-1.
//
// Not modelled: the driver on-resistances and output settling, the
// electrode/tissue load. VDD is a parameter (0.9 V assumed).
module bcc_pa #(
  parameter real VDD = 0.9
) (
  input  logic               oh,
  input  logic               ol,
  output real                op,
  output real                on,
  output logic signed [1:0]  op_minus_on
);

  always_comb begin
    if (oh && !ol) begin
      op = VDD;
      on = 0.0;
      op_minus_on = 2'sd1;
    end else if (ol && !oh) begin
      op = 0.0;
      on = VDD;
      op_minus_on = -2'sd1;
    end else begin
      op = VDD / 2.0;
      on = VDD / 2.0;
      op_minus_on = 2'sd0;
    end
  end

  always_comb begin
    a_not_both: assert (!(oh && ol))
      else $error("bcc_pa: OH and OL driven high together");
  end

endmodule
