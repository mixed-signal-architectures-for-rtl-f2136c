// hbridge_model: behavioural model (not synthesizable) of the full-bridge
// power stage and its load, for testbenches only.
//
// Each clock, the four gate commands set the two leg voltages: a conducting
// switch ties its leg to VDD or ground; with both switches of a leg off (dead
// time) the body diodes clamp the leg according to the load current (current
// leaving leg A pulls it to ground, current entering leg B pulls it to VDD,
// and the reverse for negative current). The load is modelled as a series R-L
// (speaker resistance plus filter inductance), integrated with a forward Euler
// step of one clock: i += (vA - vB - R*i) * TCLK / L. Outputs are the bridge
// level (vA - vB)/VDD as -1/0/+1, the load current sign for the 1-bit
// feedback, and a shoot-through flag (both switches of one leg on).
module hbridge_model
  import amp_pkg::*;
#(
  parameter real VDD  = 25.0,       // supply, volts
  parameter real R    = 4.0,        // load, ohms
  parameter real L    = 22.0e-6,    // series inductance, henry
  parameter real TCLK = 11.07e-9    // clock period, seconds
) (
  input  logic   clk,
  input  gates_t gates,
  output logic   i_pos,
  output int     level,
  output logic   shoot
);

  real i_load = 0.0;
  real va, vb;

  always_comb begin
    va = gates.a_hs ? VDD : gates.a_ls ? 0.0 : (i_load > 0.0 ? 0.0 : VDD);
    vb = gates.b_hs ? VDD : gates.b_ls ? 0.0 : (i_load > 0.0 ? VDD : 0.0);
    if (!gates.a_hs && !gates.a_ls && i_load == 0.0) va = 0.0;
    if (!gates.b_hs && !gates.b_ls && i_load == 0.0) vb = 0.0;
    level = (va > vb) ? 1 : (va < vb) ? -1 : 0;
    shoot = (gates.a_hs && gates.a_ls) || (gates.b_hs && gates.b_ls);
    i_pos = (i_load > 0.0);
  end

  always @(posedge clk) i_load <= i_load + (va - vb - R * i_load) * TCLK / L;

endmodule
