// s2_features: stage S2, local image feature computation.
//
// Three independent datapaths work on the eight complex oriented filter
// outputs of a pixel: energy (7 cycles), phase (27 cycles) and orientation
// (30 cycles, fed with the per-orientation energies of the energy datapath).
// Delay buffers of 23 and 3 cycles hold energy and phase until the
// orientation is ready, so the three features of a pixel leave together,
// 30 cycles after in_valid: energy 22 bits unsigned, orientation 9 bits
// unsigned (LSB pi/512, range [0, pi)), phase 9 bits signed (LSB pi/256).
module s2_features
  import gauss_coef_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  filt_t         c [NORI],
  input  filt_t         s [NORI],
  output logic          out_valid,
  output logic          out_sof,
  output energy_t       energy,
  output logic [AW-1:0] orient,
  output logic [AW-1:0] phase
);

  logic    e_valid, m_valid, p_valid, o_valid;
  energy_t e_ori [NORI];
  energy_t mean;
  logic [AW-1:0] ph;

  s2_energy u_energy (
    .clk, .rst_n, .in_valid, .c, .s,
    .e_valid, .e_ori, .out_valid(m_valid), .mean);

  s2_orientation u_orient (
    .clk, .rst_n, .e_valid, .e_ori, .out_valid(o_valid), .orient);

  s2_phase u_phase (
    .clk, .rst_n, .in_valid, .c, .s, .out_valid(p_valid), .phase(ph));

  // Synchronisation buffers.
  delay_buffer #(.W(EW), .D(O_LAT - E_LAT)) u_sync_e (.clk, .d(mean), .q(energy));
  delay_buffer #(.W(AW), .D(O_LAT - P_LAT)) u_sync_p (.clk, .d(ph),   .q(phase));

  logic sof_d;
  delay_buffer #(.W(1), .D(S2_LAT)) u_sof (.clk, .d(in_sof & in_valid), .q(sof_d));

  assign out_valid = o_valid;
  assign out_sof   = sof_d & o_valid;

  // The three datapaths run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               o_valid |-> $past(p_valid, O_LAT - P_LAT) && $past(m_valid, O_LAT - E_LAT))
    else $error("s2_features: datapaths out of step");

endmodule
