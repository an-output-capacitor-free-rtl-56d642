// ldo_plant: behavioural model of the analog side of the regulator, for
// simulation only: the PMOS power-switch array with its drivers, the
// analog-assisted (AA) coupling network and the load.
//
// Each enabled unit switch is modelled as a conductance that carries IU at
// the nominal dropout VDROP = VIN - VREF; Lx and (L*M)x switches are L and
// L*M units. The AA loop is modelled by the drivers' ground rail V_SSB,
// which follows changes of V_OUT through C_C and relaxes to ground with the
// time constant TAU_C = R_C*C_C; a V_SSB below ground raises the gate drive,
// scaling the switch current by 1 - KAA*V_SSB (about 5x for a 100 mV droop
// with the default KAA). The output node integrates switch current minus
// load current on CNODE, with a forward-Euler step of 1 ns. The load is an
// ideal current sink of `iload_ua` microamperes. V_OUT is delivered as an
// unsigned number with 100 uV per LSB, as the comparator models take it.
// All constants are illustrative, chosen to give a stable, recognisable
// transient; they are not measured values of a real chip.
module ldo_plant
  import dldo_pkg::*;
#(
  parameter int unsigned L = L_DEF,
  parameter int unsigned M = M_DEF,
  parameter int unsigned H = H_DEF
) (
  input  logic [L-1:0] l_word,
  input  logic [M-1:0] m_word,
  input  logic [H-1:0] h_word,
  input  int unsigned  iload_ua,   // load current, uA
  output volt_t        vout
);
  timeunit 1ns;
  timeprecision 100ps;

  localparam real VIN      = 0.6;
  localparam real VDROP    = 0.1;
  localparam real IU       = 30.0e-6;
  localparam real KAA      = 40.0;
  localparam real TAU_C    = 500.0e-9;
  localparam real CNODE    = 2.0e-9;
  localparam real DT       = 1.0e-9;

  real v = 0.0, vssb = 0.0, isw, iload, boost, vnew;
  int  units;

  always begin
    #1;
    units = $countones(l_word) + int'(L) * $countones(m_word) + int'(L * M) * $countones(h_word);
    boost = 1.0 - KAA * vssb;
    if (boost < 0.2) boost = 0.2;
    if (boost > 8.0) boost = 8.0;
    isw   = real'(units) * IU * ((VIN - v) / VDROP) * boost;
    iload = real'(iload_ua) * 1.0e-6;
    // a current load cannot pull the node below ground
    if (v <= 0.0 && iload > isw) iload = isw;
    vnew  = v + (isw - iload) * DT / CNODE;
    if (vnew > VIN) vnew = VIN;
    if (vnew < 0.0) vnew = 0.0;
    vssb  = vssb + (vnew - v) - vssb * DT / TAU_C;
    v     = vnew;
  end

  assign vout = volt_t'(int'(v * 10000.0));

endmodule
