// dldo_pkg: types and default sizes shared by the analog-assisted digital LDO
// controller.
//
// The power-switch array is split into three thermometer-coded sections:
// L unit (1x) switches, M switches of weight L and H switches of weight L*M,
// so that L*M*H = 512 levels give 9 bits of resolution with only L+M+H = 28
// shift-register bits. L = 8, M = 4 and H = 16 are the sizes of the design;
// the voltage encoding (unsigned, 100 uV per LSB) is this implementation's
// own choice for handing the sensed voltages to the comparator models.
package dldo_pkg;

  localparam int unsigned L_DEF = 8;   // low (fine) section, 1x switches
  localparam int unsigned M_DEF = 4;   // medium (coarse) section, Lx switches
  localparam int unsigned H_DEF = 16;  // high section, (L*M)x switches

  // Voltage as seen by the comparators: unsigned, 100 uV per LSB.
  typedef logic [15:0] volt_t;

  // Carry/In bundle passed from one shift-register section to the next
  // (Carry1/In1 from Low to Medium, Carry2/In2 from Medium to High).
  typedef struct packed {
    logic carry;  // request one step of the next section in this cycle
    logic up;     // 1: shift a one in (carry-in), 0: shift it out (carry-out)
  } carry_t;

  // Thermometer word with n ones at the bottom.
  function automatic logic [31:0] therm(input int unsigned n);
    return (n >= 32) ? '1 : ((32'd1 << n) - 32'd1);
  endfunction

endpackage
