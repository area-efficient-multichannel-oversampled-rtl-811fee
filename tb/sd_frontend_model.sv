// Behavioural model (testbench only, not synthesizable) of one analog front end:
// a fully differential first-order sigma-delta loop made of a switched-capacitor
// integrator, a regenerative latch comparator (the 1-bit A/D) and a 1-bit D/A
// that feeds +/-vref back into the integrator.
//
// Signals are reals: vin is the differential input (vin+ - vin-), dith the
// differential dither input, vref the reference. Once per sample, on the rising
// clock edge with fs_tick high, the integrator adds vin + dith minus the fed-back
// reference, with the finite op-amp gain modelled as a leak of 1/A per sample
// (A = 1000), and the comparator decides on the new integrator output. vf is the
// comparator output (vf+; vf- is its complement), so the 1-bit code is held for
// the two clocks of the following sample. Density of ones = (1 + vin/vref) / 2.
module sd_frontend_model #(
  parameter real A = 1000.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fs_tick,
  input  real  vin,
  input  real  dith,
  input  real  vref,
  output logic vf
);
  real integ, integ_next;

  assign integ_next = integ * (1.0 - 1.0 / A) + vin + dith - (vf ? vref : -vref);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= 0.0;
      vf    <= 1'b0;
    end else if (fs_tick) begin
      integ <= integ_next;
      vf    <= (integ_next >= 0.0);
    end
  end
endmodule
