// power_detect: the decision of the detector.  For each of LANES channels
// per cycle it compares the accumulated power T(k) with the adapted
// threshold gamma(k) and reports H1 (occupied, decision = 1) when
// T(k) >= gamma(k), H0 otherwise.  Both operands are non-negative floats, so
// the comparison is exponent first, then mantissa (ss_pkg::flt_ge).
// Timing: one register stage; chan travels with the decision.
module power_detect
  import ss_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [9:0] in_chan  [LANES],
  input  flt_t       t_pow    [LANES],
  input  flt_t       gamma    [LANES],
  output logic       out_valid,
  output logic [9:0] out_chan [LANES],
  output logic       decision [LANES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    for (int u = 0; u < LANES; u++) begin
      out_chan[u] <= in_chan[u];
      decision[u] <= flt_ge(t_pow[u], gamma[u]);
    end
  end
endmodule
