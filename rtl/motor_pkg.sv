// motor_pkg: types and constants shared by the triplicated motor speed
// control subsystem.
//
// Each of the three redundant controllers drives the shared peripherals
// through one ctrl_bus_t: a write strobe with a new PWM width, and a clear
// strobe for the encoder pulse counter. The three buses are majority-voted
// bit by bit before they reach the peripherals. The bus layout and the
// field widths are this design's choice; the 32-bit counter width follows
// the 32-bit processor word of the controllers.
package motor_pkg;

  // Number of redundant controllers (triple modular redundancy).
  localparam int unsigned N_MOD = 3;

  // Width of the PWM high-time field, in clock cycles.
  localparam int unsigned PWM_WIDTH_W = 16;

  // Width of the encoder pulse counter, one processor word.
  localparam int unsigned COUNT_W = 32;

  // One controller's write bus towards the shared peripherals.
  typedef struct packed {
    logic                   pwm_we;     // load pwm_width into the PWM
    logic [PWM_WIDTH_W-1:0] pwm_width;  // PWM high time in clock cycles
    logic                   cnt_clear;  // restart the encoder pulse count
  } ctrl_bus_t;

  localparam int unsigned CTRL_BUS_W = $bits(ctrl_bus_t);

endpackage
